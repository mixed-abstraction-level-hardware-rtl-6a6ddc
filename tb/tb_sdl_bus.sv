// tb_sdl_bus - self-checking test of the shared bus.
// Four nodes; nodes 0, 1 and 2 each send a series of multi-word signals,
// all of them to node 3 and some to node 0, while receivers drop ready at
// random. The test rebuilds every received signal and checks that its words
// arrive complete, in order and never interleaved with another sender's
// words (the header names its sender), that every signal arrives exactly
// once, and that the arbiter shares the bus (each sender gets the bus
// again while the others still wait).
module tb_sdl_bus;
  import sdl_pkg::*;

  localparam int N = 4;
  localparam int NSIG = 12;   // signals per sender
  logic clk = 0, rst_n = 0;
  logic  tx_req  [N];
  word_t tx_word [N];
  pid_t  tx_dest [N];
  logic  tx_last [N];
  logic  tx_ack  [N];
  logic  rx_valid[N];
  word_t rx_word [N];
  logic  rx_last [N];
  logic  rx_ready[N];
  logic  busy_locked;
  int checks = 0, failures = 0;

  sdl_bus #(.N_NODES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // signal k of sender s: header(type, s, dest), then (k + 1) mod 3 words s*16+k
  function automatic int sig_len(int k); return 1 + ((k + 1) % 3); endfunction
  function automatic pid_t sig_dest(int s, int k); return pid_t'((k % 4 == 3 && s != 0) ? 0 : 3); endfunction

  int widx[N], kidx[N];
  logic gap[N];   // a sender pauses between words, as a send component does
  always @(posedge clk) for (int i = 0; i < N; i++) gap[i] <= ($urandom_range(0, 2) == 0);
  int done_cnt[N];
  int got[N][NSIG];
  logic grant_turns_seen;
  int last_sender = -1, switches = 0;

  // senders
  for (genvar s = 0; s < 3; s++) begin : g_send
    always_comb begin
      tx_req[s]  = rst_n && kidx[s] < NSIG && !gap[s];
      tx_dest[s] = sig_dest(s, kidx[s]);
      tx_last[s] = (widx[s] == sig_len(kidx[s]) - 1);
      tx_word[s] = (widx[s] == 0) ? make_header(2'b01, pid_t'(s), sig_dest(s, kidx[s]))
                                  : word_t'(s * 16 + kidx[s]);
    end
    always @(posedge clk) if (rst_n && tx_ack[s]) begin
      if (tx_last[s]) begin widx[s] <= 0; kidx[s] <= kidx[s] + 1; end
      else widx[s] <= widx[s] + 1;
    end
  end
  assign tx_req[3] = 0;
  assign tx_word[3] = '0;
  assign tx_dest[3] = '0;
  assign tx_last[3] = 0;

  // receivers
  int    cur_sender[N];
  int    cur_len[N];
  word_t cur_w1[N];
  for (genvar r = 0; r < N; r++) begin : g_recv
    always @(posedge clk) rx_ready[r] <= ($urandom_range(0, 2) != 0);
    always @(posedge clk) if (rst_n && rx_valid[r] && rx_ready[r]) begin
      if (cur_len[r] == 0) begin
        cur_sender[r] <= int'(rx_word[r][5:3]);
        checks++;
        if (int'(rx_word[r][2:0]) != r) begin
          failures++; $display("FAIL node %0d got a signal for %0d", r, rx_word[r][2:0]);
        end
      end else begin
        checks++;
        if (rx_word[r] / 16 != word_t'(cur_sender[r])) begin
          failures++; $display("FAIL node %0d: word %h interleaved into signal of %0d", r, rx_word[r], cur_sender[r]);
        end
        cur_w1[r] <= rx_word[r];
      end
      if (rx_last[r]) begin
        int snd, k;
        snd = (cur_len[r] == 0) ? int'(rx_word[r][5:3]) : cur_sender[r];
        k   = (cur_len[r] == 0) ? -1 : int'(rx_word[r]) % 16;
        cur_len[r] <= 0;
        if (k >= 0) begin
          checks++;
          if (sig_len(k) != cur_len[r] + 1) begin
            failures++; $display("FAIL signal %0d of %0d has %0d words", k, snd, cur_len[r] + 1);
          end
          got[snd][k]++;
        end else begin
          // one-word signals carry no index; count them by order
          k = kidx_seen1(snd);
          got[snd][k]++;
        end
        if (last_sender != snd) switches++;
        last_sender = snd;
      end else cur_len[r] <= cur_len[r] + 1;
    end
  end

  int one_word_seen[3];
  function automatic int kidx_seen1(int s);
    int k;
    k = 2 + 3 * one_word_seen[s];   // one-word signals are k = 2, 5, 8, 11
    one_word_seen[s]++;
    return k;
  endfunction

  initial begin
    foreach (widx[i]) begin widx[i] = 0; kidx[i] = 0; cur_len[i] = 0; cur_sender[i] = 0; end
    foreach (one_word_seen[i]) one_word_seen[i] = 0;
    foreach (got[i, j]) got[i][j] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (kidx[0] == NSIG && kidx[1] == NSIG && kidx[2] == NSIG);
    repeat (5) @(posedge clk);
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < NSIG; k++) begin
        checks++;
        if (got[s][k] != 1) begin failures++; $display("FAIL signal %0d of sender %0d arrived %0d times", k, s, got[s][k]); end
      end
    checks++;
    if (switches < 3 * NSIG / 2) begin failures++; $display("FAIL arbiter did not share the bus (%0d switches)", switches); end
    checks++;
    if (busy_locked) begin failures++; $display("FAIL bus still locked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
