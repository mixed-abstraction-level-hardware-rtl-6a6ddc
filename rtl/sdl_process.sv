// sdl_process - hardware module of one SDL process.
//
// Bundles what the framework puts into every process module: the behaviour
// of the process (here the example connection-setup controller), its input
// signal queue, and the send component that connects it to the
// communication structure. The receive port takes words from the bus into
// the queue; the transmit port offers outgoing words to the bus. Queue
// length and maximum signal length are parameters, as the framework lets the
// designer choose them per process.
module sdl_process
  import sdl_pkg::*;
#(
  parameter pid_t SELF_PID  = 1,
  parameter pid_t PEER_PID  = 2,
  parameter pid_t ENV_PID   = 0,
  parameter int   QUEUE_LEN = 4,
  parameter int   MAXW      = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the bus
  input  logic  rx_valid,
  input  word_t rx_word,
  input  logic  rx_last,
  output logic  rx_ready,
  // to the bus
  output logic  tx_req,
  output word_t tx_word,
  output pid_t  tx_dest,
  output logic  tx_last,
  input  logic  tx_ack,
  // observation
  output logic [1:0] sdl_state,
  output word_t      conn_id,
  output logic [2:0] fired,
  output logic [$clog2(QUEUE_LEN+1)-1:0] queue_count,
  output logic       queue_overflow
);

  logic  rd_valid, rd_last, rd_next, rd_remove, rd_save, rd_restart;
  word_t rd_word;
  logic  p_changed, p_last, p_busy;
  word_t p_word;
  pid_t  p_dest;

  sdl_signal_queue #(.QUEUE_LEN(QUEUE_LEN), .MAXW(MAXW)) u_queue (
    .clk, .rst_n,
    .wr_valid(rx_valid), .wr_word(rx_word), .wr_last(rx_last), .wr_ready(rx_ready),
    .rd_valid, .rd_word, .rd_last, .rd_next, .rd_remove, .rd_save, .rd_restart,
    .count(queue_count), .overflow(queue_overflow)
  );

  sdl_example_fsm #(.SELF_PID(SELF_PID), .PEER_PID(PEER_PID), .ENV_PID(ENV_PID)) u_fsm (
    .clk, .rst_n,
    .rd_valid, .rd_word, .rd_last, .rd_next, .rd_remove, .rd_save, .rd_restart,
    .p_changed, .p_word, .p_dest, .p_last, .p_busy,
    .sdl_state, .conn_id, .fired
  );

  sdl_send_if u_send (
    .clk, .rst_n,
    .p_changed, .p_word, .p_dest, .p_last, .p_busy,
    .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack
  );

endmodule
