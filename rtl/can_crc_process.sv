// can_crc_process - 'CRC-generation' process of the CAN controller example.
//
// An SDL process module (signal queue, behaviour, send component) that
// receives the message bits one signal at a time and updates the CAN CRC-15
// with the usual iterative rule: with nxt = bit XOR crc[14], shift crc left
// by one and, if nxt is 1, XOR in the generator 0x4599
// (x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1); the register starts at 0.
// Signals consumed:
//   bit(b)  type 01, one parameter word (bit 0 is b): one CRC step
//   msgEnd  type 10, no parameter: send crc(hi, lo) to ENV_PID (type 01,
//           crc[14:8] and crc[7:0]) and clear the register for the next message
// Other signals are removed unconsumed. One bit costs three cycles of the
// behaviour (header, parameter, update) once it is in the queue.
// The process split, one-bit messages and the iterative CRC come from the
// document; the generator polynomial is the one of the CAN standard, and
// the signal formats are this design's own.
module can_crc_process
  import sdl_pkg::*;
#(
  parameter int   QUEUE_LEN = 2,
  parameter pid_t SELF_PID  = 5,
  parameter pid_t ENV_PID   = 0,
  parameter logic [14:0] CRC_POLY = 15'h4599
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
  output logic [14:0] crc      // running CRC register
);

  logic  rd_valid, rd_last, rd_next, rd_remove;
  word_t rd_word;
  logic  p_changed, p_last, p_busy;
  word_t p_word;

  typedef enum logic [2:0] {S_WAIT, S_BIT, S_DRIVE, S_RELEASE} state_e;
  state_e       st_q;
  logic [1:0]   widx_q;
  logic [14:0]  result_q;

  sdl_signal_queue #(.QUEUE_LEN(QUEUE_LEN), .MAXW(2)) u_queue (
    .clk, .rst_n,
    .wr_valid(rx_valid), .wr_word(rx_word), .wr_last(rx_last), .wr_ready(rx_ready),
    .rd_valid, .rd_word, .rd_last, .rd_next, .rd_remove,
    .rd_save(1'b0), .rd_restart(1'b0),
    .count(), .overflow()
  );

  sdl_send_if u_send (
    .clk, .rst_n,
    .p_changed, .p_word, .p_dest(ENV_PID), .p_last, .p_busy,
    .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack
  );

  function automatic logic [14:0] crc_step(logic [14:0] c, logic b);
    logic nxt;
    nxt = b ^ c[14];
    return nxt ? ({c[13:0], 1'b0} ^ CRC_POLY) : {c[13:0], 1'b0};
  endfunction

  always_comb begin
    rd_next   = 1'b0;
    rd_remove = 1'b0;
    if (st_q == S_WAIT && rd_valid) begin
      if (rd_word[W-1 -: 2] == 2'b01 && !rd_last) rd_next = 1'b1;
      else                                         rd_remove = 1'b1;
    end else if (st_q == S_BIT) begin
      rd_remove = 1'b1;
    end
  end

  always_comb begin
    unique case (widx_q)
      2'd0:    p_word = make_header(2'b01, SELF_PID, ENV_PID);
      2'd1:    p_word = word_t'(result_q[14:8]);
      default: p_word = result_q[7:0];
    endcase
    p_last    = (widx_q == 2'd2);
    p_changed = (st_q == S_DRIVE) && !p_busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_WAIT;
      widx_q   <= '0;
      crc      <= '0;
      result_q <= '0;
    end else begin
      unique case (st_q)
        S_WAIT: if (rd_valid) begin
          if (rd_word[W-1 -: 2] == 2'b01 && !rd_last) st_q <= S_BIT;
          else if (rd_word[W-1 -: 2] == 2'b10) begin
            result_q <= crc;
            crc      <= '0;
            widx_q   <= '0;
            st_q     <= S_DRIVE;
          end
        end
        S_BIT: begin
          crc  <= crc_step(crc, rd_word[0]);
          st_q <= S_WAIT;
        end
        S_DRIVE: if (p_busy) st_q <= S_RELEASE;
        S_RELEASE: if (!p_busy) begin
          if (p_last) st_q <= S_WAIT;
          else begin
            widx_q <= widx_q + 2'd1;
            st_q   <= S_DRIVE;
          end
        end
        default: st_q <= S_WAIT;
      endcase
    end
  end

endmodule
