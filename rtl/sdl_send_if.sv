// sdl_send_if - send component of the SDL run-time library.
//
// The behaviour of a process hands over the words of an outgoing signal
// (header first, then parameters) one at a time through a four-phase
// changed/busy handshake, in the manner of the library send procedures:
//   1. process waits for busy = 0, drives word/dest/last and raises changed;
//   2. this block latches the word and raises busy;
//   3. process sees busy = 1 and drops changed;
//   4. this block drops busy once the word has been accepted by the
//      communication structure and changed is low.
// The latched word is offered to the bus with tx_req until tx_ack. The
// separate 'last' flag marks the final word of a signal (the document's
// generated code signals this with a 'continue' line; a per-word flag is
// this design's choice). One word is buffered, so the process can prepare
// the next word while the current one waits for the bus.
module sdl_send_if
  import sdl_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // process side
  input  logic  p_changed,
  input  word_t p_word,
  input  pid_t  p_dest,
  input  logic  p_last,
  output logic  p_busy,
  // bus side
  output logic  tx_req,
  output word_t tx_word,
  output pid_t  tx_dest,
  output logic  tx_last,
  input  logic  tx_ack
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAITLOW} state_e;
  state_e state;

  assign tx_req = (state == S_SEND);
  assign p_busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tx_word <= '0;
      tx_dest <= '0;
      tx_last <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (p_changed) begin
          tx_word <= p_word;
          tx_dest <= p_dest;
          tx_last <= p_last;
          state   <= S_SEND;
        end
        S_SEND: if (tx_ack) state <= p_changed ? S_WAITLOW : S_IDLE;
        S_WAITLOW: if (!p_changed) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
