// tb_sdl_signal_queue - self-checking test of the signal queue.
// Fills a three-signal queue, checks full back-pressure, word-by-word
// reading, save (cursor to the next signal), removal from the middle with
// the younger signals moving up, restart, overflow of a too-long signal and
// a write that coincides with a removal.
module tb_sdl_signal_queue;
  import sdl_pkg::*;

  localparam int QL = 3, MW = 3;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_last = 0, wr_ready;
  word_t wr_word = '0;
  logic rd_valid, rd_last;
  word_t rd_word;
  logic rd_next = 0, rd_remove = 0, rd_save = 0, rd_restart = 0;
  logic [$clog2(QL+1)-1:0] count;
  logic overflow;
  int checks = 0, failures = 0;

  sdl_signal_queue #(.QUEUE_LEN(QL), .MAXW(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic put(word_t w, logic last);
    wr_valid = 1; wr_word = w; wr_last = last;
    @(posedge clk); #1;
    wr_valid = 0; wr_last = 0;
  endtask

  task automatic rdcmd(int which);   // 0 next 1 remove 2 save 3 restart
    rd_next = (which == 0); rd_remove = (which == 1);
    rd_save = (which == 2); rd_restart = (which == 3);
    @(posedge clk); #1;
    rd_next = 0; rd_remove = 0; rd_save = 0; rd_restart = 0;
  endtask

  task automatic head(string what, word_t w, logic last);
    check({what, " valid"}, rd_valid, 1);
    check({what, " word"}, rd_word, w);
    check({what, " last"}, rd_last, last);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("empty", rd_valid, 0);
    check("ready when empty", wr_ready, 1);
    // A = a0 a1 a2, B = b0 b1, C = c0
    put(8'hA0, 0); check("incomplete signal invisible", rd_valid, 0);
    put(8'hA1, 0); put(8'hA2, 1);
    head("A0", 8'hA0, 0);
    put(8'hB0, 0); put(8'hB1, 1);
    put(8'hC0, 1);
    check("count 3", count, 3);
    check("full", wr_ready, 0);
    // reading A word by word
    rdcmd(0); head("A1", 8'hA1, 0);
    rdcmd(0); head("A2", 8'hA2, 1);
    rdcmd(0); head("A2 stays", 8'hA2, 1);
    // save A, look at B, remove B from the middle
    rdcmd(2); head("B0 after save", 8'hB0, 0);
    rdcmd(1); head("C0 moved up", 8'hC0, 1);
    check("count 2", count, 2);
    check("ready again", wr_ready, 1);
    // restart: A is considered again
    rdcmd(3); head("A0 after restart", 8'hA0, 0);
    // write D while removing A in the same cycle
    wr_valid = 1; wr_word = 8'hD0; wr_last = 1; rd_remove = 1;
    @(posedge clk); #1;
    wr_valid = 0; wr_last = 0; rd_remove = 0;
    check("count after write+remove", count, 2);
    head("C0 first", 8'hC0, 1);
    rdcmd(1); head("D0 second", 8'hD0, 1);
    rdcmd(1); check("empty again", rd_valid, 0);
    check("no overflow yet", overflow, 0);
    // overflow: 4-word signal into 3-word slot
    put(8'hE0, 0); put(8'hE1, 0); put(8'hE2, 0); put(8'hE3, 1);
    check("overflow flagged", overflow, 1);
    head("E0", 8'hE0, 0);
    rdcmd(0); rdcmd(0); head("E2 kept, E3 dropped", 8'hE2, 1);
    rdcmd(1); check("count 0", count, 0);
    // partial signal survives removal of an older one
    put(8'h10, 1); put(8'h20, 0);
    rdcmd(1);
    put(8'h21, 1);
    head("partial signal assembled after shift", 8'h20, 0);
    rdcmd(0); head("second word", 8'h21, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
