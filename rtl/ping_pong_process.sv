// ping_pong_process - the 'ping-pong' example process: an SDL process with
// almost no behaviour, used to see what message handling alone costs.
//
// It is a complete process module (signal queue, behaviour, send component)
// whose behaviour answers every ball(m) signal (type 01, m = NW =
// ceil(MSG_BITS / 8) parameter words, NW = 0 for MSG_BITS = 0) by sending
// the same ball(m) back to the process that sent it (the SDL 'sender', bits
// [5:3] of the header). Words beyond NW are not kept; missing words are sent
// as zero. Other signal types are removed from the queue unconsumed. While
// it is answering it does not look at its queue, so further balls wait
// there, and a full queue holds the sender on the bus. With QUEUE_LEN = 0
// there is no queue: the behaviour reads the words of a ball directly from
// the bus, which holds the sender until the process is ready for them.
// Interface: bus receive port (rx_*) and transmit port (tx_*) as on every
// process module; 'returned' pulses for one cycle when the last word of an
// answer has been handed over.
// Timing: one cycle per received word to read a ball, then one handshake
// per word sent (at least two cycles each).
// The document gives the example's name, its lack of arithmetic and its two
// swept sizes (message size 0..31 bits, queue length 0..25); the echo behaviour
// and the signal format are this design's own.
module ping_pong_process
  import sdl_pkg::*;
#(
  parameter int   MSG_BITS  = 31,
  parameter int   QUEUE_LEN = 25,
  parameter pid_t SELF_PID  = 6,
  localparam int  NW        = (MSG_BITS + W - 1) / W,
  localparam int  NWS       = (NW > 0) ? NW : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx_valid,
  input  word_t rx_word,
  input  logic  rx_last,
  output logic  rx_ready,
  output logic  tx_req,
  output word_t tx_word,
  output pid_t  tx_dest,
  output logic  tx_last,
  input  logic  tx_ack,
  output logic  returned
);

  localparam int IW = $clog2(NW + 2);

  logic  rd_valid, rd_last, rd_next, rd_remove;
  word_t rd_word;
  logic  p_changed, p_last, p_busy;
  word_t p_word;

  typedef enum logic [2:0] {S_WAIT, S_READ, S_SKIP, S_DRIVE, S_RELEASE} state_e;
  state_e        st_q;
  word_t         msg_q [NWS];
  pid_t          from_q;
  logic [IW-1:0] ridx_q;     // parameter word being read
  logic [IW-1:0] widx_q;     // word being sent: 0 header, 1..NW parameters

  if (QUEUE_LEN > 0) begin : g_queue
    sdl_signal_queue #(.QUEUE_LEN(QUEUE_LEN), .MAXW(NW + 1)) u_queue (
      .clk, .rst_n,
      .wr_valid(rx_valid), .wr_word(rx_word), .wr_last(rx_last), .wr_ready(rx_ready),
      .rd_valid, .rd_word, .rd_last, .rd_next, .rd_remove,
      .rd_save(1'b0), .rd_restart(1'b0),
      .count(), .overflow()
    );
  end else begin : g_direct
    // no queue: the behaviour reads the words straight off the bus; it is
    // ready whenever it is reading, so every word offered is taken
    assign rd_valid = rx_valid;
    assign rd_word  = rx_word;
    assign rd_last  = rx_last;
    assign rx_ready = (st_q == S_WAIT) || (st_q == S_READ) || (st_q == S_SKIP);
  end

  sdl_send_if u_send (
    .clk, .rst_n,
    .p_changed, .p_word, .p_dest(from_q), .p_last, .p_busy,
    .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack
  );

  logic is_ball;
  assign is_ball = (rd_word[W-1 -: 2] == 2'b01);

  always_comb begin
    rd_next   = 1'b0;
    rd_remove = 1'b0;
    if (st_q == S_WAIT && rd_valid) begin
      if (is_ball && !rd_last) rd_next   = 1'b1;
      else                     rd_remove = 1'b1;
    end else if (st_q == S_READ && rd_valid) begin
      if (rd_last) rd_remove = 1'b1;
      else         rd_next   = 1'b1;
    end
  end

  always_comb begin
    if (widx_q == '0) p_word = make_header(2'b01, SELF_PID, from_q);
    else              p_word = msg_q[int'(widx_q) - 1];
    p_last    = (int'(widx_q) == NW);
    p_changed = (st_q == S_DRIVE) && !p_busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_WAIT;
      from_q   <= '0;
      ridx_q   <= '0;
      widx_q   <= '0;
      returned <= 1'b0;
      for (int i = 0; i < NWS; i++) msg_q[i] <= '0;
    end else begin
      returned <= 1'b0;
      unique case (st_q)
        S_WAIT: if (rd_valid && is_ball) begin
          from_q <= rd_word[2*PID_W-1 -: PID_W];
          for (int i = 0; i < NWS; i++) msg_q[i] <= '0;
          ridx_q <= '0;
          widx_q <= '0;
          st_q   <= rd_last ? S_DRIVE : S_READ;
        end else if (rd_valid && !rd_last && QUEUE_LEN == 0) begin
          st_q   <= S_SKIP;      // drop the rest of a foreign signal
        end
        S_SKIP: if (rd_valid && rd_last) st_q <= S_WAIT;
        S_READ: if (rd_valid) begin
          if (int'(ridx_q) < NW) begin
            msg_q[int'(ridx_q)] <= rd_word;
            ridx_q <= ridx_q + IW'(1);
          end
          if (rd_last) st_q <= S_DRIVE;
        end
        S_DRIVE: if (p_busy) st_q <= S_RELEASE;
        S_RELEASE: if (!p_busy) begin
          if (p_last) begin
            returned <= 1'b1;
            st_q     <= S_WAIT;
          end else begin
            widx_q <= widx_q + IW'(1);
            st_q   <= S_DRIVE;
          end
        end
        default: st_q <= S_WAIT;
      endcase
    end
  end

endmodule
