// tb_sdl_send_if - self-checking test of the send component.
// A process model hands over signals word by word with the changed/busy
// handshake while the bus side acknowledges after random delays. The test
// checks every word, destination and last flag arriving on the bus, the
// order of words, that a word is offered one cycle after changed rises,
// and that busy stays high until the bus has taken the word.
module tb_sdl_send_if;
  import sdl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic p_changed = 0, p_last = 0, p_busy;
  word_t p_word = '0;
  pid_t p_dest = '0;
  logic tx_req, tx_last, tx_ack;
  word_t tx_word;
  pid_t tx_dest;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0;
  word_t exp_word[$];
  pid_t  exp_dest[$];
  logic  exp_last[$];
  logic  ack_en = 0;

  sdl_send_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus model: acknowledge after a random wait
  assign tx_ack = tx_req && ack_en;
  always @(posedge clk) ack_en <= ($urandom_range(0, 3) == 0);

  always @(posedge clk) if (rst_n && tx_req && tx_ack) begin
    checks++;
    if (exp_word.size() == 0) begin
      failures++; $display("FAIL unexpected word %h", tx_word);
    end else begin
      word_t w; pid_t d; logic l;
      w = exp_word.pop_front(); d = exp_dest.pop_front(); l = exp_last.pop_front();
      if (tx_word !== w || tx_dest !== d || tx_last !== l) begin
        failures++;
        $display("FAIL got %h/%0d/%0b expected %h/%0d/%0b", tx_word, tx_dest, tx_last, w, d, l);
      end
    end
    n_recv++;
  end

  // busy must not drop while a word waits for the bus
  always @(posedge clk) if (rst_n && tx_req && !tx_ack) begin
    #1;
    if (!p_busy) begin failures++; $display("FAIL busy low while word pending"); end
  end

  task automatic send_word(word_t w, pid_t d, logic l);
    while (p_busy) @(posedge clk);
    #1;
    p_changed = 1; p_word = w; p_dest = d; p_last = l;
    exp_word.push_back(w); exp_dest.push_back(d); exp_last.push_back(l);
    @(posedge clk); #1;
    checks++;
    if (!(p_busy && tx_req)) begin failures++; $display("FAIL word not taken one cycle after changed"); end
    while (!p_busy) @(posedge clk);
    #1 p_changed = 0;
    @(posedge clk);
    n_sent++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < 20; s++) begin
      int n;
      pid_t d;
      n = $urandom_range(1, 4);
      d = pid_t'($urandom_range(0, 7));
      for (int i = 0; i < n; i++) send_word(word_t'($urandom), d, i == n - 1);
    end
    while (p_busy) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (n_recv != n_sent || exp_word.size() != 0) begin
      failures++; $display("FAIL sent %0d received %0d", n_sent, n_recv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
