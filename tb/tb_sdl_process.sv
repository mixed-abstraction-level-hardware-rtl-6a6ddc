// tb_sdl_process - self-checking test of a complete process module
// (queue + connection-setup behaviour + send component) on its bus ports.
// With a two-signal queue, a burst of five input signals is offered
// back-to-back, so the receive port must stall while the queue is full; the
// bus side acknowledges at random. Checks the output words, the final state
// and Id, that back-pressure occurred, and that an over-long signal sets
// the overflow flag and is still consumed.
module tb_sdl_process;
  import sdl_pkg::*;

  localparam pid_t SELF = 2, PEER = 1, ENV = 0;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0, rx_ready;
  word_t rx_word = '0;
  logic tx_req, tx_last, tx_ack;
  word_t tx_word;
  pid_t tx_dest;
  logic [1:0] sdl_state;
  word_t conn_id;
  logic [2:0] fired;
  logic [1:0] queue_count;
  logic queue_overflow;
  int checks = 0, failures = 0, stalls = 0;
  logic ack_en;

  sdl_process #(.SELF_PID(SELF), .PEER_PID(PEER), .ENV_PID(ENV), .QUEUE_LEN(2), .MAXW(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ack_en <= ($urandom_range(0, 2) == 0);
  assign tx_ack = tx_req && ack_en;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PID_W+W:0] exp_q[$];
  always @(posedge clk) if (rst_n && tx_req && tx_ack) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output %h", tx_word);
    end else begin
      logic [PID_W+W:0] e;
      e = exp_q.pop_front();
      if ({tx_dest, tx_last, tx_word} !== e) begin
        failures++; $display("FAIL output %0d/%0b/%h expected %h", tx_dest, tx_last, tx_word, e);
      end
    end
  end
  always @(posedge clk) if (rst_n && rx_valid && !rx_ready) stalls++;

  task automatic expect_sig(pid_t d, word_t w0, word_t w1, word_t w2, int n);
    exp_q.push_back({d, 1'(n == 1), w0});
    if (n > 1) exp_q.push_back({d, 1'(n == 2), w1});
    if (n > 2) exp_q.push_back({d, 1'b1, w2});
  endtask

  task automatic put_sig(sigtype_t t, word_t a, word_t b, word_t c, int n);
    word_t w[4];
    w[0] = make_header(t, PEER, SELF); w[1] = a; w[2] = b; w[3] = c;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_word = w[i]; rx_last = (i == n - 1);
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
      #1 rx_valid = 0; rx_last = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // B side of a connection: REQUEST arrives -> ACK to peer, conInd to env
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), CMD_ACK, 8'd42, 3);
    expect_sig(ENV, make_header(SIG_CONIND, SELF, ENV), 8'd42, 0, 2);
    // then a disReq with another id (ignored), a timer signal (removed),
    // a DISCONECT for another id (ignored) and the matching DISCONECT
    expect_sig(ENV, make_header(SIG_DISIND, SELF, ENV), 8'd42, 0, 2);
    put_sig(SIG_MEDIUMIND, CMD_REQUEST, 8'd42, 0, 3);
    put_sig(SIG_DISREQ, 8'd7, 0, 0, 2);
    put_sig(SIG_TIMER, 0, 0, 0, 1);
    put_sig(SIG_MEDIUMIND, CMD_DISCONNECT, 8'd41, 0, 3);
    put_sig(SIG_MEDIUMIND, CMD_DISCONNECT, 8'd42, 0, 3);
    repeat (200) @(posedge clk);
    checks += 4;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d output words missing", exp_q.size()); end
    if (sdl_state != 2'd0) begin failures++; $display("FAIL final state %0d", sdl_state); end
    if (conn_id != 8'd42) begin failures++; $display("FAIL Id %0d", conn_id); end
    if (stalls == 0) begin failures++; $display("FAIL queue never applied back-pressure"); end
    // over-long signal: REQUEST with an extra word
    checks++; if (queue_overflow) begin failures++; $display("FAIL early overflow"); end
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), CMD_ACK, 8'd3, 3);
    expect_sig(ENV, make_header(SIG_CONIND, SELF, ENV), 8'd3, 0, 2);
    put_sig(SIG_MEDIUMIND, CMD_REQUEST, 8'd3, 8'd99, 4);
    repeat (100) @(posedge clk);
    checks += 3;
    if (!queue_overflow) begin failures++; $display("FAIL overflow not flagged"); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL truncated signal not handled"); end
    if (sdl_state != 2'd2 || queue_count != 0) begin failures++; $display("FAIL state %0d count %0d", sdl_state, queue_count); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
