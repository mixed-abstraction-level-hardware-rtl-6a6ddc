// tb_sdl_example_fsm - self-checking test of the connection-setup process
// behaviour. The controller is placed between a signal queue and a send
// component, as in a process module. The test feeds a sequence of input
// signals that takes every transition T1..T5 through both of its decision
// outcomes, plus signals the current state does not consume, and compares
// every output word, the SDL state after each signal and the transition
// reported with values written down by hand from the process description.
module tb_sdl_example_fsm;
  import sdl_pkg::*;

  localparam pid_t SELF = 1, PEER = 2, ENV = 0;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_last = 0, wr_ready;
  word_t wr_word = '0;
  logic rd_valid, rd_last, rd_next, rd_remove, rd_save, rd_restart;
  word_t rd_word;
  logic p_changed, p_last, p_busy;
  word_t p_word;
  pid_t p_dest;
  logic tx_req, tx_last, tx_ack;
  word_t tx_word;
  pid_t tx_dest;
  logic [1:0] sdl_state;
  word_t conn_id;
  logic [2:0] fired;
  int checks = 0, failures = 0;
  logic ack_en;

  sdl_signal_queue #(.QUEUE_LEN(4), .MAXW(3)) u_q (
    .clk, .rst_n, .wr_valid, .wr_word, .wr_last, .wr_ready,
    .rd_valid, .rd_word, .rd_last, .rd_next, .rd_remove, .rd_save, .rd_restart,
    .count(), .overflow());
  sdl_example_fsm #(.SELF_PID(SELF), .PEER_PID(PEER), .ENV_PID(ENV)) dut (.*);
  sdl_send_if u_s (.clk, .rst_n, .p_changed, .p_word, .p_dest, .p_last, .p_busy,
                   .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack);

  always #5 clk = ~clk;
  always @(posedge clk) ack_en <= ($urandom_range(0, 1) == 0);
  assign tx_ack = tx_req && ack_en;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output words: {dest, last, word}
  logic [PID_W+W:0] exp_q[$];
  int fired_seen[8];

  always @(posedge clk) if (rst_n && tx_req && tx_ack) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output %h to %0d", tx_word, tx_dest);
    end else begin
      logic [PID_W+W:0] e;
      e = exp_q.pop_front();
      if ({tx_dest, tx_last, tx_word} !== e) begin
        failures++;
        $display("FAIL output %0d/%0b/%h expected %0d/%0b/%h", tx_dest, tx_last, tx_word,
                 e[PID_W+W:W+1], e[W], e[W-1:0]);
      end
    end
  end
  always @(posedge clk) if (rst_n && fired != 0) fired_seen[fired]++;

  task automatic expect_sig(pid_t d, word_t w0, word_t w1, word_t w2, int n);
    exp_q.push_back({d, 1'(n == 1), w0});
    if (n > 1) exp_q.push_back({d, 1'(n == 2), w1});
    if (n > 2) exp_q.push_back({d, 1'b1, w2});
  endtask

  task automatic put_sig(sigtype_t t, word_t a, word_t b, int n);
    word_t w[3];
    w[0] = make_header(t, 5, SELF); w[1] = a; w[2] = b;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (!wr_ready) @(negedge clk);
      wr_valid = 1; wr_word = w[i]; wr_last = (i == n - 1);
      @(negedge clk);
      wr_valid = 0; wr_last = 0;
    end
  endtask

  // wait until the controller has handled everything and the outputs are out
  task automatic settle(string what, int exp_state, int exp_fired);
    int f, quiet;
    f = 0;
    quiet = 0;
    while (quiet < 8) begin
      @(posedge clk);
      if (fired != 0) f = fired;
      if (!rd_valid && !tx_req && !p_busy && !p_changed && !wr_valid) quiet++;
      else quiet = 0;
    end
    checks += 3;
    if (int'(sdl_state) != exp_state) begin failures++; $display("FAIL %s: state %0d expected %0d", what, sdl_state, exp_state); end
    if (f != exp_fired) begin failures++; $display("FAIL %s: transition %0d expected %0d", what, f, exp_fired); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL %s: %0d output words missing", what, exp_q.size()); exp_q.delete(); end
  endtask

  localparam int IDLE = 0, SETUP = 1, CONECT = 2;

  initial begin
    foreach (fired_seen[i]) fired_seen[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // disReq in IDLE: not consumed by any transition, removed
    put_sig(SIG_DISREQ, 8'd5, 0, 2);                    settle("disReq in IDLE", IDLE, 7);
    // T1
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), 8'd1, 8'd5, 3);
    put_sig(SIG_CONREQ, 8'd5, 0, 2);                    settle("T1", SETUP, 1);
    checks++; if (conn_id != 8'd5) begin failures++; $display("FAIL Id not stored"); end
    // conReq in SETUP: removed
    put_sig(SIG_CONREQ, 8'd6, 0, 2);                    settle("conReq in SETUP", SETUP, 7);
    // T5 false (wrong id): disInd(Id)
    expect_sig(ENV, make_header(SIG_DISIND, SELF, ENV), 8'd5, 0, 2);
    put_sig(SIG_MEDIUMIND, 8'd1, 8'd9, 3);              settle("T5 false", IDLE, 5);
    // T1 again, then T5 true: conRes(Id)
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), 8'd1, 8'd7, 3);
    put_sig(SIG_CONREQ, 8'd7, 0, 2);                    settle("T1 b", SETUP, 1);
    expect_sig(ENV, make_header(SIG_CONRES, SELF, ENV), 8'd7, 0, 2);
    put_sig(SIG_MEDIUMIND, 8'd1, 8'd7, 3);              settle("T5 true", CONECT, 5);
    // T2 false, T3 false twice
    put_sig(SIG_DISREQ, 8'd8, 0, 2);                    settle("T2 false", CONECT, 2);
    put_sig(SIG_MEDIUMIND, 8'd3, 8'd8, 3);              settle("T3 wrong id", CONECT, 3);
    put_sig(SIG_MEDIUMIND, 8'd1, 8'd7, 3);              settle("T3 wrong cmd", CONECT, 3);
    // timer signal: not consumed
    put_sig(SIG_TIMER, 0, 0, 1);                        settle("timer in CONECT", CONECT, 7);
    // T3 true: disInd(message!Id)
    expect_sig(ENV, make_header(SIG_DISIND, SELF, ENV), 8'd7, 0, 2);
    put_sig(SIG_MEDIUMIND, 8'd3, 8'd7, 3);              settle("T3 true", IDLE, 3);
    // T4 false, T4 true: mediumReq(ACK, id) then conInd(id)
    put_sig(SIG_MEDIUMIND, 8'd2, 8'd4, 3);              settle("T4 false", IDLE, 4);
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), 8'd1, 8'd4, 3);
    expect_sig(ENV, make_header(SIG_CONIND, SELF, ENV), 8'd4, 0, 2);
    put_sig(SIG_MEDIUMIND, 8'd1, 8'd4, 3);              settle("T4 true", CONECT, 4);
    // T2 true: mediumReq(DISCONECT, Id) twice
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), 8'd3, 8'd4, 3);
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), 8'd3, 8'd4, 3);
    put_sig(SIG_DISREQ, 8'd4, 0, 2);                    settle("T2 true", IDLE, 2);
    // several signals queued at once are handled in order
    expect_sig(PEER, make_header(SIG_MEDIUMIND, SELF, PEER), 8'd1, 8'd9, 3);
    expect_sig(ENV, make_header(SIG_CONRES, SELF, ENV), 8'd9, 0, 2);
    put_sig(SIG_CONREQ, 8'd9, 0, 2);
    put_sig(SIG_MEDIUMIND, 8'd1, 8'd9, 3);
    put_sig(SIG_DISREQ, 8'd1, 0, 2);                    settle("burst", CONECT, 2);
    for (int t = 1; t <= 5; t++) begin
      checks++;
      if (fired_seen[t] == 0) begin failures++; $display("FAIL T%0d never taken", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
