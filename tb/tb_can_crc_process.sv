// tb_can_crc_process - self-checking test of the CRC-generation process.
// Sends random messages of 19 and more bits as bit(b) signals followed by
// msgEnd, and compares the crc(hi, lo) signal returned to the environment
// with a reference computed as the remainder of the polynomial division
// M(x) * x^15 mod G(x), G = x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1.
// Signals of other types must be ignored.
module tb_can_crc_process;
  import sdl_pkg::*;

  localparam pid_t SELF = 5, SER = 4, ENV = 0;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0, rx_ready;
  word_t rx_word = '0;
  logic tx_req, tx_last, tx_ack;
  word_t tx_word;
  pid_t tx_dest;
  logic [14:0] crc;
  int checks = 0, failures = 0;
  logic ack_en;

  can_crc_process #(.SELF_PID(SELF), .ENV_PID(ENV)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ack_en <= ($urandom_range(0, 1) == 0);
  assign tx_ack = tx_req && ack_en;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: long division over GF(2)
  function automatic logic [14:0] ref_crc(logic msg[], int n);
    logic [15:0] g;
    logic r[];
    logic [14:0] res;
    g = 16'hC599;                      // x^15 .. x^0
    r = new[n + 15];
    for (int i = 0; i < n; i++) r[i] = msg[i];
    for (int i = n; i < n + 15; i++) r[i] = 1'b0;
    for (int i = 0; i < n; i++)
      if (r[i]) for (int j = 0; j < 16; j++) r[i + j] ^= g[15 - j];
    for (int j = 0; j < 15; j++) res[14 - j] = r[n + j];
    return res;
  endfunction

  word_t got[$];
  always @(posedge clk) if (rst_n && tx_req && tx_ack) begin
    got.push_back(tx_word);
    checks++;
    if (tx_dest != ENV) begin failures++; $display("FAIL crc sent to %0d", tx_dest); end
  end

  task automatic put_sig(sigtype_t t, word_t a, int n);
    @(negedge clk);
    rx_valid = 1; rx_word = make_header(t, SER, SELF); rx_last = (n == 1);
    @(posedge clk); while (!rx_ready) @(posedge clk);
    if (n == 2) begin
      #1 rx_word = a; rx_last = 1;
      @(posedge clk); while (!rx_ready) @(posedge clk);
    end
    #1 rx_valid = 0; rx_last = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 8; m++) begin
      int n;
      logic msg[];
      logic [14:0] e;
      n = (m == 0) ? 19 : $urandom_range(19, 83);
      msg = new[n];
      for (int i = 0; i < n; i++) msg[i] = 1'($urandom);
      if (m == 1) for (int i = 0; i < n; i++) msg[i] = 1'b0;
      e = ref_crc(msg, n);
      got.delete();
      for (int i = 0; i < n; i++) begin
        put_sig(2'b01, word_t'(msg[i]), 2);
        if (i == 3) put_sig(2'b11, 8'hFF, 2);   // foreign signal, ignored
      end
      put_sig(2'b10, 0, 1);
      repeat (40) @(posedge clk);
      checks += 3;
      if (got.size() != 3) begin
        failures++; $display("FAIL message %0d: %0d words returned", m, got.size());
      end else begin
        if (got[0] != make_header(2'b01, SELF, ENV)) begin failures++; $display("FAIL header %h", got[0]); end
        if ({got[1][6:0], got[2]} != e) begin
          failures++; $display("FAIL message %0d (%0d bits): crc %h expected %h", m, n, {got[1][6:0], got[2]}, e);
        end
      end
      checks++;
      if (crc != 0) begin failures++; $display("FAIL register not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
