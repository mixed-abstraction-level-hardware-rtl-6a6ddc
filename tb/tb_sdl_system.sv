// tb_sdl_system - end-to-end test of the whole SDL system at its default
// parameters. The testbench plays the environment (Pid 0) on the bus and
// the user of the external-memory port. It runs:
//   1. connection setup A -> B and release (T1, T4, T5, T2, T3),
//   2. a setup in which the environment injects a stray mediumInd so that A
//      takes the failing branch of T5 and later answers B's ACK through T4,
//   3. signals no transition consumes and an over-long signal (overflow),
//   4. timer set / reset with the expiry latency checked,
//   5. three CAN messages sent back to back to serialization, whose
//      two-signal queue fills, checked against a reference CRC-15,
//   5b. four 31-bit balls to the ping-pong process, each echoed unchanged,
//   6. external memory writes and reads through the width adapter,
// with the environment dropping its receive-ready at random throughout.
// Every signal the environment receives is compared with the expected set
// and the final SDL states are checked. It also counts how often each
// mechanism happened (transitions, implicit consumption, bus contention,
// full queue, overflow, timer expiry and cancel, environment back-pressure,
// ping-pong returns, memory read-modify-write) and fails a mechanism that never happened.
module tb_sdl_system;
  import sdl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic env_tx_req = 0, env_tx_last = 0, env_tx_ack;
  word_t env_tx_word = '0;
  pid_t env_tx_dest = '0;
  logic env_rx_valid, env_rx_last, env_rx_ready;
  word_t env_rx_word;
  logic mem_req = 0, mem_we = 0, mem_ready, mem_done;
  logic [8:0] mem_addr = '0;
  word_t mem_wdata = '0, mem_rdata;
  logic [1:0] a_state, b_state;
  word_t a_conn_id, b_conn_id;
  logic [2:0] a_fired, b_fired;
  logic a_queue_full, b_queue_full, queue_overflow;
  logic [15:0] now;
  logic [14:0] can_crc;
  logic can_msg_done, pp_returned, bus_locked;

  sdl_system dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d (%0h) expected %0d (%0h)", what, got, got, exp, exp); end
  endtask

  // ---------------- environment receiver ----------------
  // A received signal is kept as {w0 .. w4, len}.
  typedef struct packed { word_t w0, w1, w2, w3, w4; logic [2:0] len; } rsig_t;
  rsig_t rx_list[$];
  rsig_t cur;
  int    rx_timer_cycle;
  logic  rx_rand_ready = 1;

  always @(posedge clk) rx_rand_ready <= ($urandom_range(0, 3) != 0);
  assign env_rx_ready = rx_rand_ready;

  function automatic rsig_t put(rsig_t r, word_t w);
    unique case (r.len)
      3'd0: r.w0 = w;
      3'd1: r.w1 = w;
      3'd2: r.w2 = w;
      3'd3: r.w3 = w;
      default: r.w4 = w;
    endcase
    r.len = r.len + 3'd1;
    return r;
  endfunction

  always @(posedge clk) if (rst_n && env_rx_valid && env_rx_ready) begin
    rsig_t r;
    r = put(cur, env_rx_word);
    if (env_rx_last) begin
      rx_list.push_back(r);
      if (env_rx_word[7:6] == SIG_TIMER && r.len == 1) rx_timer_cycle = cyc;
      cur <= '0;
    end else cur <= r;
  end

  function automatic rsig_t mk(sigtype_t t, pid_t s, word_t a, word_t b, int n);
    rsig_t r;
    r = '0;
    r.w0 = make_header(t, s, 0); r.w1 = (n > 1) ? a : '0; r.w2 = (n > 2) ? b : '0;
    r.len = 3'(n);
    return r;
  endfunction

  // compare the received signals with an expected set (order free)
  task automatic expect_set(string what, rsig_t e[$]);
    check({what, ": number of signals"}, rx_list.size(), e.size());
    foreach (e[i]) begin
      int hit;
      hit = -1;
      foreach (rx_list[j]) if (hit < 0 && rx_list[j] == e[i]) hit = j;
      checks++;
      if (hit < 0) begin failures++; $display("FAIL %s: missing signal %h", what, e[i]); end
      else rx_list.delete(hit);
    end
    foreach (rx_list[j]) $display("  %s: extra signal %h", what, rx_list[j]);
    rx_list.delete();
  endtask

  // ---------------- environment sender ----------------
  task automatic env_send(pid_t d, word_t w[$]);
    foreach (w[i]) begin
      @(negedge clk);
      env_tx_req = 1; env_tx_dest = d; env_tx_word = w[i]; env_tx_last = (i == w.size() - 1);
      @(posedge clk);
      while (!env_tx_ack) @(posedge clk);
      #1 env_tx_req = 0; env_tx_last = 0;
    end
  endtask

  task automatic env_sig(pid_t d, sigtype_t t, word_t a, word_t b, int n);
    word_t w[$];
    w.push_back(make_header(t, 0, d));
    if (n > 1) w.push_back(a);
    if (n > 2) w.push_back(b);
    env_send(d, w);
  endtask

  task automatic quiet(int n);
    int q;
    q = 0;
    while (q < n) begin
      @(posedge clk);
      if (!bus_locked && !env_rx_valid && !env_tx_req && a_fired == 0 && b_fired == 0) q++;
      else q = 0;
    end
  endtask

  // ---------------- mechanism counters ----------------
  int fired_a[8], fired_b[8];
  int contention = 0, queue_full = 0, env_bp = 0, ovf_seen = 0, rmw = 0;
  int timer_exp = 0, timer_cancel = 0, can_msgs = 0, pp_returns = 0;
  always @(posedge clk) if (rst_n) begin
    int nreq;
    if (a_fired != 0) fired_a[a_fired]++;
    if (b_fired != 0) fired_b[b_fired]++;
    nreq = 0;
    for (int i = 0; i < 7; i++) nreq += int'(dut.tx_req[i]);
    if (nreq > 1) contention++;
    for (int i = 1; i < 6; i++) if (!dut.rx_ready[i]) queue_full++;
    if (env_rx_valid && !env_rx_ready) env_bp++;
    if (queue_overflow) ovf_seen = 1;
    if (mem_req && mem_we && mem_ready) rmw++;
    if (can_msg_done) can_msgs++;
    if (pp_returned) pp_returns++;
  end

  // CAN CRC-15 reference by polynomial division
  function automatic logic [14:0] ref_crc(logic [23:0] bits, int n);
    logic [15:0] g;
    logic [40:0] r;   // message bits followed by 15 zeros, MSB first
    g = 16'hC599;
    r = '0;
    for (int i = 0; i < n; i++) r[40 - i] = bits[23 - i];
    for (int i = 0; i < n; i++)
      if (r[40 - i]) for (int j = 0; j < 16; j++) r[40 - i - j] ^= g[15 - j];
    return r[40 - n -: 15];
  endfunction

  initial begin
    rsig_t e[$];
    int t0;
    logic [23:0] msgs[3];
    foreach (fired_a[i]) begin fired_a[i] = 0; fired_b[i] = 0; end
    cur = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. setup and release
    env_sig(1, SIG_CONREQ, 8'h21, 0, 2);
    quiet(20);
    e = {}; e.push_back(mk(SIG_CONIND, 2, 8'h21, 0, 2)); e.push_back(mk(SIG_CONRES, 1, 8'h21, 0, 2));
    expect_set("setup", e);
    check("A connected", a_state, 2); check("B connected", b_state, 2);
    check("A id", a_conn_id, 8'h21); check("B id", b_conn_id, 8'h21);
    env_sig(1, SIG_DISREQ, 8'h21, 0, 2);
    quiet(20);
    e = {}; e.push_back(mk(SIG_DISIND, 2, 8'h21, 0, 2));
    expect_set("release", e);
    check("A idle", a_state, 0); check("B idle", b_state, 0);

    // 2. stray mediumInd: T5 false, then T4 at A
    fork
      env_sig(1, SIG_CONREQ, 8'h33, 0, 2);
    join
    env_sig(1, SIG_MEDIUMIND, CMD_DISCONNECT, 8'h33, 3);
    quiet(20);
    e = {};
    e.push_back(mk(SIG_CONIND, 2, 8'h33, 0, 2));
    e.push_back(mk(SIG_DISIND, 1, 8'h33, 0, 2));
    e.push_back(mk(SIG_CONIND, 1, 8'h33, 0, 2));
    expect_set("stray", e);
    check("A connected after stray", a_state, 2); check("B connected after stray", b_state, 2);
    env_sig(1, SIG_DISREQ, 8'h33, 0, 2);
    quiet(20);
    e = {}; e.push_back(mk(SIG_DISIND, 2, 8'h33, 0, 2));
    expect_set("release 2", e);
    check("A idle 2", a_state, 0); check("B idle 2", b_state, 0);

    // 3. unconsumed signals and an over-long one
    env_sig(2, SIG_DISREQ, 8'h01, 0, 2);
    env_sig(1, SIG_TIMER, 0, 0, 1);
    begin
      word_t w[$];
      w = {make_header(SIG_DISREQ, 0, 1), 8'h1, 8'h2, 8'h3};
      env_send(1, w);
    end
    quiet(20);
    check("nothing sent for unconsumed signals", rx_list.size(), 0);
    check("overflow flagged", int'(queue_overflow), 1);

    // 4. timer: set 20 units, then set + reset
    t0 = cyc;
    env_sig(3, TMR_SET, 8'd20, 0, 2);
    quiet(40);
    e = {}; e.push_back(mk(SIG_TIMER, 3, 0, 0, 1));
    checks++;
    if (rx_timer_cycle - t0 < 20 || rx_timer_cycle - t0 > 30) begin
      failures++; $display("FAIL timer expiry after %0d cycles", rx_timer_cycle - t0);
    end else timer_exp++;
    expect_set("timer", e);
    env_sig(3, TMR_SET, 8'd30, 0, 2);
    env_sig(3, TMR_RESET, 0, 0, 1);
    repeat (60) @(posedge clk);
    check("reset timer stays silent", rx_list.size(), 0);
    if (rx_list.size() == 0) timer_cancel++;

    // 5. three CAN messages back to back
    msgs[0] = 24'hA5C3E0; msgs[1] = 24'h000000; msgs[2] = 24'h7FFFFE;
    for (int m = 0; m < 3; m++) begin
      word_t w[$];
      w = {make_header(2'b01, 0, 4), msgs[m][23:16], msgs[m][15:8], msgs[m][7:0]};
      env_send(4, w);
    end
    quiet(60);
    e = {};
    for (int m = 0; m < 3; m++) begin
      logic [14:0] c;
      c = ref_crc(msgs[m], 19);
      e.push_back(mk(2'b01, 5, word_t'(c[14:8]), c[7:0], 3));
    end
    expect_set("CAN CRC", e);

    // 5b. ping-pong: four 31-bit balls, each must come back unchanged
    e = {};
    for (int m = 0; m < 4; m++) begin
      word_t w[$];
      rsig_t r;
      w = {make_header(2'b01, 0, 6)};
      for (int i = 0; i < 4; i++) w.push_back(word_t'($urandom));
      w[4][0] = 1'b0;                     // 31 bits: the last bit is padding
      env_send(6, w);
      r = '0;
      r.w0 = make_header(2'b01, 6, 0); r.w1 = w[1]; r.w2 = w[2]; r.w3 = w[3]; r.w4 = w[4];
      r.len = 3'd5;
      e.push_back(r);
    end
    quiet(40);
    expect_set("ping-pong", e);

    // 6. external memory
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); mem_req = 1; mem_we = 1; mem_addr = 9'(i * 37); mem_wdata = word_t'(i * 29 + 5);
      @(posedge clk); #1 mem_req = 0;
      while (!mem_done) @(posedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); mem_req = 1; mem_we = 0; mem_addr = 9'(i * 37);
      @(posedge clk); #1 mem_req = 0;
      while (!mem_done) @(posedge clk);
      #1 check("memory read", mem_rdata, (i * 29 + 5) % 256);
    end

    // mechanism counts
    for (int t = 1; t <= 5; t++) begin
      checks++;
      if (fired_a[t] + fired_b[t] == 0) begin failures++; $display("FAIL T%0d never happened", t); end
    end
    check("implicit consumption happened", int'(fired_a[7] + fired_b[7] > 0), 1);
    check("bus contention happened", int'(contention > 0), 1);
    check("full queue happened", int'(queue_full > 0), 1);
    check("environment back-pressure happened", int'(env_bp > 0), 1);
    check("overflow happened", ovf_seen, 1);
    check("timer expiry happened", timer_exp, 1);
    check("timer cancel happened", timer_cancel, 1);
    check("CAN messages completed", can_msgs, 3);
    check("memory read-modify-writes", rmw, 8);
    check("ping-pong returns", pp_returns, 4);
    $display("mechanisms: T1..T5 A=%0d,%0d,%0d,%0d,%0d B=%0d,%0d,%0d,%0d,%0d implicit=%0d contention=%0d queue_full=%0d env_bp=%0d overflow=%0d timer=%0d/%0d can=%0d pp=%0d rmw=%0d",
             fired_a[1], fired_a[2], fired_a[3], fired_a[4], fired_a[5],
             fired_b[1], fired_b[2], fired_b[3], fired_b[4], fired_b[5],
             fired_a[7] + fired_b[7], contention, queue_full, env_bp, ovf_seen,
             timer_exp, timer_cancel, can_msgs, pp_returns, rmw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
