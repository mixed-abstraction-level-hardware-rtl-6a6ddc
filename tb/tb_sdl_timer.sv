// tb_sdl_timer - self-checking test of the timer component.
// Sends set/reset commands as bus signals from different owner Pids and
// checks: now advances one unit per TICK_DIV cycles; a timer set to d units
// reports to its owner after d ticks (cycle count checked); reset cancels;
// setting again restarts; two timers expiring report in Pid order, each
// as a one-word timer signal from the timer's Pid.
module tb_sdl_timer;
  import sdl_pkg::*;

  localparam int TD = 2;          // cycles per time unit
  localparam pid_t TP = 3;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0, rx_ready;
  word_t rx_word = '0;
  logic tx_req, tx_last, tx_ack;
  word_t tx_word;
  pid_t tx_dest;
  logic [15:0] now;
  logic tick;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_owner[$];
  int exp_cycle[$];
  logic ack_en = 1;

  sdl_timer #(.N_SLOTS(4), .TICK_DIV(TD), .NOW_W(16), .TIMER_PID(TP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign tx_ack = tx_req && ack_en;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic cmd_set(pid_t owner, int d);
    @(negedge clk);
    rx_valid = 1; rx_word = make_header(TMR_SET, owner, TP); rx_last = 0;
    @(posedge clk); #1;
    rx_word = word_t'(d); rx_last = 1;
    @(posedge clk); #1;
    rx_valid = 0; rx_last = 0;
  endtask

  task automatic cmd_reset(pid_t owner);
    @(negedge clk);
    rx_valid = 1; rx_word = make_header(TMR_RESET, owner, TP); rx_last = 1;
    @(posedge clk); #1;
    rx_valid = 0; rx_last = 0;
  endtask

  // every timer signal must be expected
  int got_n = 0;
  always @(posedge clk) if (rst_n && tx_req && tx_ack) begin
    got_n++;
    check("signal is one word", tx_last, 1);
    check("signal type", int'(tx_word[7:6]), int'(SIG_TIMER));
    check("signal sender", int'(tx_word[5:3]), int'(TP));
    if (exp_owner.size() == 0) begin
      failures++; checks++; $display("FAIL unexpected timer signal to %0d", tx_dest);
    end else begin
      int o, c;
      o = exp_owner.pop_front(); c = exp_cycle.pop_front();
      check("owner", int'(tx_dest), o);
      check("receiver field", int'(tx_word[2:0]), o);
      checks++;
      if (cyc < c - TD || cyc > c + TD) begin
        failures++; $display("FAIL expiry of %0d at cycle %0d, expected about %0d", o, cyc, c);
      end
    end
  end

  initial begin
    int t0, n0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("rx always ready", rx_ready, 1);
    // now advances one unit per TD cycles
    n0 = now;
    repeat (10 * TD) @(posedge clk);
    #1 check("now after 10 units", int'(now - 16'(n0)), 10);
    // a single timer: 6 units
    t0 = cyc;
    cmd_set(1, 6);
    exp_owner.push_back(1); exp_cycle.push_back(t0 + 2 + 6 * TD);
    repeat (8 * TD + 4) @(posedge clk);
    check("one signal", got_n, 1);
    // reset cancels
    cmd_set(2, 5);
    repeat (2 * TD) @(posedge clk);
    cmd_reset(2);
    repeat (8 * TD) @(posedge clk);
    check("reset cancelled", got_n, 1);
    // set again restarts
    t0 = cyc;
    cmd_set(1, 4);
    repeat (2 * TD) @(posedge clk);
    t0 = cyc;
    cmd_set(1, 4);
    exp_owner.push_back(1); exp_cycle.push_back(t0 + 2 + 4 * TD);
    repeat (6 * TD + 4) @(posedge clk);
    check("restart gives one signal", got_n, 2);
    // two timers at once, delivered in Pid order; bus stalls the first
    ack_en = 0;
    cmd_set(2, 3);
    cmd_set(0, 2);
    t0 = cyc;
    repeat (5 * TD) @(posedge clk);
    exp_owner.push_back(0); exp_cycle.push_back(cyc + 1);
    exp_owner.push_back(2); exp_cycle.push_back(cyc + 2);
    #1 ack_en = 1;
    repeat (6) @(posedge clk);
    check("both delivered", got_n, 4);
    check("nothing left over", exp_owner.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
