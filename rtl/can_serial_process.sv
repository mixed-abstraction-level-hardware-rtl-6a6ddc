// can_serial_process - 'serialization' process of the CAN controller example.
//
// An SDL process module (signal queue, behaviour, send component) that
// receives a CAN message as one signal canMsg(w0 .. wN-1) (signal type 01,
// N = ceil(MSG_BITS / 8) parameter words, first message bit in the MSB of
// w0) and passes the message on bit by bit to the CRC-generation process:
// one signal bit(b) (type 01, one parameter word holding 0 or 1) per message
// bit, followed by one header-only signal msgEnd (type 10). Other signals
// are removed from the queue unconsumed. While it is sending it does not
// look at its queue, so further messages wait there.
// The split into a serialization and a CRC process and the one-bit messages
// between them follow the document; the signal formats and the message
// layout are this design's own.
module can_serial_process
  import sdl_pkg::*;
#(
  parameter int   MSG_BITS  = 19,
  parameter int   QUEUE_LEN = 2,
  parameter pid_t SELF_PID  = 4,
  parameter pid_t CRC_PID   = 5,
  localparam int  NW        = (MSG_BITS + W - 1) / W
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
  output logic  msg_done      // one-cycle pulse after msgEnd has been handed over
);

  localparam int BW = $clog2(MSG_BITS + 1);
  localparam int NWW = $clog2(NW + 1);

  logic  rd_valid, rd_last, rd_next, rd_remove;
  word_t rd_word;
  logic  p_changed, p_last, p_busy;
  word_t p_word;

  typedef enum logic [2:0] {S_WAIT, S_READ, S_DRIVE, S_RELEASE} state_e;
  state_e           st_q;
  logic [NW*W-1:0]  msg_q;
  logic [NWW-1:0]   ridx_q;
  logic [BW-1:0]    bit_q;      // message bit being sent; MSG_BITS = msgEnd
  logic             widx_q;     // 0 header, 1 parameter

  sdl_signal_queue #(.QUEUE_LEN(QUEUE_LEN), .MAXW(NW + 1)) u_queue (
    .clk, .rst_n,
    .wr_valid(rx_valid), .wr_word(rx_word), .wr_last(rx_last), .wr_ready(rx_ready),
    .rd_valid, .rd_word, .rd_last, .rd_next, .rd_remove,
    .rd_save(1'b0), .rd_restart(1'b0),
    .count(), .overflow()
  );

  sdl_send_if u_send (
    .clk, .rst_n,
    .p_changed, .p_word, .p_dest(CRC_PID), .p_last, .p_busy,
    .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack
  );

  logic is_end;
  assign is_end = (int'(bit_q) == MSG_BITS);

  always_comb begin
    rd_next   = 1'b0;
    rd_remove = 1'b0;
    if (st_q == S_WAIT && rd_valid) begin
      if (rd_word[W-1 -: 2] == 2'b01 && !rd_last) rd_next = 1'b1;
      else                                         rd_remove = 1'b1;
    end else if (st_q == S_READ) begin
      if (rd_last || int'(ridx_q) == NW) rd_remove = 1'b1;
      else                               rd_next   = 1'b1;
    end
  end

  always_comb begin
    if (widx_q == 1'b0)
      p_word = make_header(is_end ? 2'b10 : 2'b01, SELF_PID, CRC_PID);
    else
      p_word = word_t'(msg_q[NW*W-1 - int'(bit_q)]);
    p_last    = is_end || widx_q;
    p_changed = (st_q == S_DRIVE) && !p_busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_WAIT;
      msg_q    <= '0;
      ridx_q   <= '0;
      bit_q    <= '0;
      widx_q   <= 1'b0;
      msg_done <= 1'b0;
    end else begin
      msg_done <= 1'b0;
      unique case (st_q)
        S_WAIT: if (rd_valid && rd_word[W-1 -: 2] == 2'b01 && !rd_last) begin
          msg_q  <= '0;
          ridx_q <= NWW'(1);
          st_q   <= S_READ;
        end
        S_READ: begin
          if (int'(ridx_q) <= NW)
            msg_q[(NW - int'(ridx_q)) * W +: W] <= rd_word;
          ridx_q <= ridx_q + NWW'(1);
          if (rd_last || int'(ridx_q) == NW) begin
            bit_q  <= '0;
            widx_q <= 1'b0;
            st_q   <= S_DRIVE;
          end
        end
        S_DRIVE: if (p_busy) st_q <= S_RELEASE;
        S_RELEASE: if (!p_busy) begin
          if (!p_last) begin
            widx_q <= 1'b1;
            st_q   <= S_DRIVE;
          end else if (is_end) begin
            msg_done <= 1'b1;
            st_q     <= S_WAIT;
          end else begin
            widx_q <= 1'b0;
            bit_q  <= bit_q + BW'(1);
            st_q   <= S_DRIVE;
          end
        end
        default: st_q <= S_WAIT;
      endcase
    end
  end

endmodule
