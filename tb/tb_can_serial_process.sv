// tb_can_serial_process - self-checking test of the serialization process.
// Sends CAN messages of MSG_BITS = 19 bits as canMsg signals (three data
// words, first bit in the MSB of the first word), two of them back to back
// plus a foreign signal, and checks that exactly MSG_BITS bit(b) signals in
// message order and one msgEnd signal per message go to the CRC process.
module tb_can_serial_process;
  import sdl_pkg::*;

  localparam int NB = 19, NW = 3;
  localparam pid_t SELF = 4, CRC = 5, ENV = 0;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0, rx_ready;
  word_t rx_word = '0;
  logic tx_req, tx_last, tx_ack;
  word_t tx_word;
  pid_t tx_dest;
  logic msg_done;
  int checks = 0, failures = 0, done_pulses = 0;
  logic ack_en;

  can_serial_process #(.MSG_BITS(NB), .SELF_PID(SELF), .CRC_PID(CRC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ack_en <= ($urandom_range(0, 1) == 0);
  assign tx_ack = tx_req && ack_en;
  always @(posedge clk) if (msg_done) done_pulses++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream of {last, word}
  logic [W:0] exp_q[$];
  always @(posedge clk) if (rst_n && tx_req && tx_ack) begin
    checks++;
    if (exp_q.size() == 0 || tx_dest != CRC) begin
      failures++; $display("FAIL unexpected word %h to %0d", tx_word, tx_dest);
    end else begin
      logic [W:0] e;
      e = exp_q.pop_front();
      if ({tx_last, tx_word} !== e) begin failures++; $display("FAIL got %b/%h expected %b/%h", tx_last, tx_word, e[W], e[W-1:0]); end
    end
  end

  task automatic put_words(word_t w[], int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_word = w[i]; rx_last = (i == n - 1);
      @(posedge clk); while (!rx_ready) @(posedge clk);
      #1 rx_valid = 0; rx_last = 0;
    end
  endtask

  task automatic send_msg(logic [NW*W-1:0] bits);
    word_t w[];
    w = new[NW + 1];
    w[0] = make_header(2'b01, ENV, SELF);
    for (int i = 0; i < NW; i++) w[i + 1] = bits[(NW - 1 - i) * W +: W];
    for (int b = 0; b < NB; b++) begin
      exp_q.push_back({1'b0, make_header(2'b01, SELF, CRC)});
      exp_q.push_back({1'b1, word_t'(bits[NW*W - 1 - b])});
    end
    exp_q.push_back({1'b1, make_header(2'b10, SELF, CRC)});
    put_words(w, NW + 1);
  endtask

  initial begin
    word_t f[];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send_msg(24'hA5C3F0);
    f = new[2]; f[0] = make_header(2'b10, ENV, SELF); f[1] = 8'h55;
    put_words(f, 2);                   // not a canMsg: removed
    send_msg(24'h123456);
    send_msg(24'hFFFFFF);
    repeat (1500) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words not sent", exp_q.size()); end
    if (done_pulses != 3) begin failures++; $display("FAIL %0d messages completed", done_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
