// sdl_signal_queue - input signal queue of one SDL process.
//
// The queue holds up to QUEUE_LEN complete SDL signals, each a header word
// plus parameter words, at most MAXW words in all. It is organised as an
// ordered array of signal slots: slot 0 is the oldest signal. Removing a
// signal shifts every younger slot down by one, so a signal in the middle of
// the queue can be consumed while older ones stay saved (the SDL save
// construct).
//
// Write side (from the communication structure): one word per cycle with
// wr_valid/wr_ready; wr_last marks the final word of a signal. Words are
// assembled in the slot behind the last complete signal, and the signal
// becomes visible to the process only when its last word is written. Words
// beyond MAXW are dropped and set the sticky overflow flag.
//
// Read side (to the process behaviour): rd_word is word rd_idx of the signal
// under the read cursor (rd_sel); rd_valid says such a signal exists.
//   rd_next    step to the next word of the signal (stays on the last one)
//   rd_remove  consume the signal under the cursor (the receive/REMOVE of
//              the generated code); the cursor stays, younger signals move up
//   rd_save    leave the signal in the queue and move the cursor to the next
//   rd_restart move the cursor back to the oldest signal (after a state
//              change, saved signals are considered again)
// At most one of these per cycle; priority is remove, save, restart, next.
// All read outputs are combinational from registers; updates take effect at
// the next clock edge. The queue is the design's own realisation of the
// signal queue the framework sizes by its queue length.
module sdl_signal_queue
  import sdl_pkg::*;
#(
  parameter int QUEUE_LEN = 4,
  parameter int MAXW      = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // write side
  input  logic  wr_valid,
  input  word_t wr_word,
  input  logic  wr_last,
  output logic  wr_ready,
  // read side
  output logic  rd_valid,
  output word_t rd_word,
  output logic  rd_last,
  input  logic  rd_next,
  input  logic  rd_remove,
  input  logic  rd_save,
  input  logic  rd_restart,
  // status
  output logic [$clog2(QUEUE_LEN+1)-1:0] count,
  output logic  overflow
);

  localparam int CW = $clog2(QUEUE_LEN+1);
  localparam int IW = $clog2(MAXW+1);

  word_t          slot_q [QUEUE_LEN][MAXW];
  logic [IW-1:0]  len_q  [QUEUE_LEN];
  logic [IW-1:0]  widx_q;             // words written into the tail slot so far
  logic [CW-1:0]  sel_q;              // read cursor (signal index)
  logic [IW-1:0]  ridx_q;             // word index within the selected signal

  word_t          slot_d [QUEUE_LEN][MAXW];
  logic [IW-1:0]  len_d  [QUEUE_LEN];

  logic wr_fire, commit, do_remove, do_save, do_restart, do_next;

  assign wr_ready   = (count < CW'(QUEUE_LEN));
  assign wr_fire    = wr_valid && wr_ready;
  assign commit     = wr_fire && wr_last;
  assign rd_valid   = (sel_q < count);
  assign do_remove  = rd_remove && rd_valid;
  assign do_save    = !rd_remove && rd_save && rd_valid;
  assign do_restart = !rd_remove && !rd_save && rd_restart;
  assign do_next    = !rd_remove && !rd_save && !rd_restart && rd_next && rd_valid;

  always_comb begin
    rd_word = '0;
    rd_last = 1'b0;
    for (int s = 0; s < QUEUE_LEN; s++) begin
      if (CW'(s) == sel_q) begin
        for (int i = 0; i < MAXW; i++)
          if (IW'(i) == ridx_q) rd_word = slot_q[s][i];
        rd_last = (ridx_q + IW'(1) >= len_q[s]);
      end
    end
  end

  // Next contents of the slot array: write first, then the shift of a remove.
  always_comb begin
    for (int s = 0; s < QUEUE_LEN; s++) begin
      len_d[s] = len_q[s];
      for (int i = 0; i < MAXW; i++) slot_d[s][i] = slot_q[s][i];
    end
    if (wr_fire) begin
      for (int s = 0; s < QUEUE_LEN; s++) begin
        if (CW'(s) == count) begin
          for (int i = 0; i < MAXW; i++)
            if (IW'(i) == widx_q) slot_d[s][i] = wr_word;
          if (wr_last) len_d[s] = (widx_q < IW'(MAXW)) ? widx_q + IW'(1) : IW'(MAXW);
        end
      end
    end
    if (do_remove) begin
      for (int s = 0; s < QUEUE_LEN-1; s++) begin
        if (CW'(s) >= sel_q) begin
          len_d[s] = len_d[s+1];
          for (int i = 0; i < MAXW; i++) slot_d[s][i] = slot_d[s+1][i];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < QUEUE_LEN; s++) begin
      len_q[s] <= len_d[s];
      for (int i = 0; i < MAXW; i++) slot_q[s][i] <= slot_d[s][i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      widx_q   <= '0;
      sel_q    <= '0;
      ridx_q   <= '0;
      overflow <= 1'b0;
    end else begin
      count <= count + CW'(commit) - CW'(do_remove);
      if (wr_fire) begin
        if (wr_last)               widx_q <= '0;
        else if (widx_q < IW'(MAXW)) widx_q <= widx_q + IW'(1);
        if (widx_q >= IW'(MAXW))   overflow <= 1'b1;
      end
      if (do_remove)       ridx_q <= '0;
      else if (do_save)    begin sel_q <= sel_q + CW'(1); ridx_q <= '0; end
      else if (do_restart) begin sel_q <= '0;             ridx_q <= '0; end
      else if (do_next && !rd_last) ridx_q <= ridx_q + IW'(1);
    end
  end

  // Only one read command per cycle is meaningful.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({rd_remove, rd_save, rd_restart}))
    else $error("sdl_signal_queue: more than one read command in a cycle");

endmodule
