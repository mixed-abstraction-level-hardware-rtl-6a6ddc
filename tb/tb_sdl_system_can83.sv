// tb_sdl_system_can83 - CAN workload at the maximum message length of 83
// bits. The system top is built with CAN_BITS = 83, so a canMsg signal is a
// header plus 11 parameter words and the serialization queue holds slots of
// 12 words. The testbench plays the environment: it sends random 83-bit
// messages back to back to serialization (Pid 4), collects the crc(hi, lo)
// signals that CRC-generation (Pid 5) returns, and compares each with a
// CRC-15 worked out by polynomial division of the message. It also checks
// the number of cycles per message: each message bit is one 2-word signal
// over the bus, so a message takes at least 2 * 83 cycles.
module tb_sdl_system_can83;
  import sdl_pkg::*;

  localparam int NBITS = 83;
  localparam int NW    = (NBITS + W - 1) / W;   // 11 parameter words
  localparam int NMSG  = 6;

  logic clk = 0, rst_n = 0;
  logic env_tx_req = 0, env_tx_last = 0, env_tx_ack;
  word_t env_tx_word = '0;
  pid_t env_tx_dest = '0;
  logic env_rx_valid, env_rx_last;
  logic env_rx_ready = 1;
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

  sdl_system #(.CAN_BITS(NBITS)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // received signals: {header, hi, lo}
  logic [3*W-1:0] rx_list[$];
  logic [3*W-1:0] cur = '0;
  int             cur_len = 0;
  int             done_cycle[$];
  always @(posedge clk) if (rst_n && env_rx_valid && env_rx_ready) begin
    logic [3*W-1:0] n;
    n = {cur[2*W-1:0], env_rx_word};
    if (env_rx_last) begin
      rx_list.push_back(n);
      cur <= '0; cur_len <= 0;
    end else begin
      cur <= n; cur_len <= cur_len + 1;
    end
  end
  always @(posedge clk) if (rst_n && can_msg_done) done_cycle.push_back(cyc);

  // CAN CRC-15 by polynomial division: (message * x^15) mod x^15+x^14+x^10+x^8+x^7+x^4+x^3+1
  function automatic logic [14:0] ref_crc(logic [NBITS-1:0] m);
    logic [15:0] g;
    logic [NBITS+14:0] r;
    g = 16'hC599;
    r = {m, 15'b0};
    for (int i = NBITS + 14; i >= 15; i--)
      if (r[i]) for (int j = 0; j < 16; j++) r[i - j] ^= g[15 - j];
    return r[14:0];
  endfunction

  task automatic env_send(pid_t d, word_t w[$]);
    foreach (w[i]) begin
      @(negedge clk);
      env_tx_req = 1; env_tx_dest = d; env_tx_word = w[i]; env_tx_last = (i == w.size() - 1);
      @(posedge clk);
      while (!env_tx_ack) @(posedge clk);
      #1 env_tx_req = 0; env_tx_last = 0;
    end
  endtask

  initial begin
    logic [NBITS-1:0] msgs[NMSG];
    int t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    for (int m = 0; m < NMSG; m++) begin
      for (int b = 0; b < NBITS; b++) msgs[m][b] = 1'($urandom);
      if (m == 0) msgs[m] = '0;
      if (m == 1) msgs[m] = '1;
    end
    t0 = cyc;
    for (int m = 0; m < NMSG; m++) begin
      word_t w[$];
      logic [NW*W-1:0] padded;
      padded = {msgs[m], {(NW*W-NBITS){1'b0}}};   // first bit in the MSB of word 1
      w = {make_header(2'b01, 0, 4)};
      for (int i = NW - 1; i >= 0; i--) w.push_back(padded[i*W +: W]);
      env_send(4, w);
    end
    while (rx_list.size() < NMSG && cyc - t0 < 30000) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (rx_list.size() != NMSG) begin
      failures++; $display("FAIL received %0d CRC signals, expected %0d", rx_list.size(), NMSG);
    end
    for (int m = 0; m < NMSG && m < rx_list.size(); m++) begin
      logic [14:0] c;
      c = ref_crc(msgs[m]);
      checks++;
      if (rx_list[m] !== {make_header(2'b01, 5, 0), 1'b0, c}) begin
        failures++;
        $display("FAIL message %0d: got %h expected crc %h", m, rx_list[m], c);
      end
    end
    checks++;
    if (done_cycle.size() != NMSG) begin
      failures++; $display("FAIL %0d message-done pulses", done_cycle.size());
    end else begin
      for (int m = 1; m < NMSG; m++) begin
        checks++;
        if (done_cycle[m] - done_cycle[m-1] < 2 * NBITS) begin
          failures++; $display("FAIL message %0d took only %0d cycles", m, done_cycle[m] - done_cycle[m-1]);
        end
      end
      $display("cycles per 83-bit message: %0d", done_cycle[NMSG-1] - done_cycle[NMSG-2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
