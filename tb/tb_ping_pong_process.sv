// tb_ping_pong_process - self-checking test of the ping-pong process over
// the sizes the example is swept across: message size 0 to 31 bits at
// queue lengths 0, 1 and 2, and queue lengths up to 25 at 8 bits. Each
// configuration runs side by side on its own process; the testbench plays
// the bus. Per configuration:
//   1. with the transmit side stalled, balls are offered until the receive
//      port refuses: exactly QUEUE_LEN + 1 must be taken (one is being
//      answered, QUEUE_LEN wait in the queue; with no queue only the one);
//   2. the transmit side is released with random acknowledge gaps: every
//      ball must come back, in order, unchanged, addressed to its sender,
//      with the process as sender;
//   3. a random mix of balls and two-word signals of other types with
//      random gaps: only the balls are answered.
// Every transmitted word is compared with an expected word stream, and
// the 'returned' pulses are counted.
module tb_ping_pong_process;
  import sdl_pkg::*;

  localparam int NCFG = 7;
  localparam int CFG_BITS  [NCFG] = '{0, 31, 0, 17, 31, 8, 31};
  localparam int CFG_QLEN  [NCFG] = '{0, 0, 1, 1, 2, 25, 25};
  localparam pid_t SELF = 6;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit finished [NCFG];

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int MSG_BITS = CFG_BITS[c];
    localparam int QLEN     = CFG_QLEN[c];
    localparam int NW       = (MSG_BITS + W - 1) / W;

    logic  rx_valid = 0, rx_last = 0, rx_ready;
    word_t rx_word = '0;
    logic  tx_req, tx_last, returned;
    word_t tx_word;
    pid_t  tx_dest;
    logic  tx_ack;
    bit    stall = 1;
    int    ack_pct = 100;
    int    returns = 0;

    ping_pong_process #(.MSG_BITS(MSG_BITS), .QUEUE_LEN(QLEN), .SELF_PID(SELF)) dut (
      .clk, .rst_n, .rx_valid, .rx_word, .rx_last, .rx_ready,
      .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack, .returned);

    // expected transmit stream: {dest, last, word}
    typedef struct packed { pid_t dest; logic last; word_t word; } beat_t;
    beat_t exp_q[$];

    always_comb tx_ack = tx_req && !stall && ack_draw;
    logic ack_draw = 1;
    always @(posedge clk) ack_draw <= ($urandom_range(1, 100) <= ack_pct);

    always @(posedge clk) if (rst_n) begin
      if (returned) returns++;
      if (tx_req && tx_ack) begin
        beat_t got;
        got = '{tx_dest, tx_last, tx_word};
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL cfg %0d: unexpected word %h", c, got);
        end else begin
          if (got !== exp_q[0]) begin
            failures++; $display("FAIL cfg %0d: got %h expected %h", c, got, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
      end
    end

    // offer one signal word by word; gives up if the first word is refused
    // for 'patience' cycles, then returns 0
    task automatic offer(word_t w[$], int patience, output bit taken);
      taken = 1;
      foreach (w[i]) begin
        int waited;
        @(negedge clk);
        rx_valid = 1; rx_word = w[i]; rx_last = (i == w.size() - 1);
        waited = 0;
        @(posedge clk);
        while (!rx_ready) begin
          waited++;
          if (i == 0 && waited >= patience) begin
            taken = 0;
            break;
          end
          @(posedge clk);
        end
        #1 rx_valid = 0; rx_last = 0;
        if (!taken) return;
      end
    endtask

    // a ball from 'from'; its answer is appended to the expected stream
    task automatic ball(pid_t from, int patience, output bit taken);
      word_t w[$];
      beat_t b[$];
      w = {make_header(2'b01, from, SELF)};
      b = {'{from, (NW == 0), make_header(2'b01, SELF, from)}};
      for (int i = 0; i < NW; i++) begin
        word_t d;
        d = word_t'($urandom);
        w.push_back(d);
        b.push_back('{from, (i == NW - 1), d});
      end
      offer(w, patience, taken);
      if (taken) foreach (b[i]) exp_q.push_back(b[i]);
    endtask

    initial begin
      int taken_n, sent;
      bit t;
      wait (rst_n);
      repeat (2) @(posedge clk);
      // 1. stalled transmit side: count how many balls are taken
      taken_n = 0;
      for (int i = 0; i < QLEN + 3; i++) begin
        ball(pid_t'($urandom_range(0, 5)), 40, t);
        if (t) taken_n++;
        else break;
      end
      checks++;
      if (taken_n != QLEN + 1) begin
        failures++; $display("FAIL cfg %0d: %0d balls taken while stalled, expected %0d", c, taken_n, QLEN + 1);
      end
      // 2. release
      ack_pct = 60;
      stall = 0;
      while (exp_q.size() != 0) @(posedge clk);
      repeat (5) @(posedge clk);
      checks++;
      if (returns != taken_n) begin
        failures++; $display("FAIL cfg %0d: %0d returns after release, expected %0d", c, returns, taken_n);
      end
      // 3. random mix
      sent = taken_n;
      for (int i = 0; i < 40; i++) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          word_t w[$];
          w = {make_header(2'($urandom_range(2, 3)), pid_t'($urandom_range(0, 5)), SELF), word_t'($urandom)};
          offer(w, 100000, t);
        end else begin
          ball(pid_t'($urandom_range(0, 5)), 100000, t);
          sent++;
        end
      end
      repeat (20 * (NW + 1) * QLEN + 50) @(posedge clk);
      checks++;
      if (exp_q.size() != 0) begin
        failures++; $display("FAIL cfg %0d: %0d expected words never sent", c, exp_q.size());
      end
      checks++;
      if (returns != sent) begin
        failures++; $display("FAIL cfg %0d: %0d returns, expected %0d", c, returns, sent);
      end
      finished[c] = 1;
    end
  end

  initial begin
    wait (finished.and() == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
