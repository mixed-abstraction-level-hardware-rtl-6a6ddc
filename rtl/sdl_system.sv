// sdl_system - structural top of the SDL hardware system.
//
// Seven nodes share one sdl_bus; a node's Pid is its bus port number:
//   Pid 0  environment    brought out as ports (the outside world / HW-SW side)
//   Pid 1  process A      example connection-setup process, peer = Pid 2
//   Pid 2  process B      example connection-setup process, peer = Pid 1
//   Pid 3  timer          run-time library timer (set/reset/now)
//   Pid 4  serialization  CAN example, sends message bits to Pid 5
//   Pid 5  CRC-generation CAN example, returns the CRC-15 to Pid 0
//   Pid 6  ping-pong      answers every ball(m) to its sender
// A and B form the connection-setup example: the mediumReq of one arrives
// as the mediumInd of the other, and both report conInd/conRes/disInd to
// the environment. Besides the bus, the external-memory path of the run-time
// library (access adapter with word-width shifter plus RAM) is brought out
// as a datapath-word port.
//
// Environment port: env_tx_* offers words to the bus exactly as a send
// component does (request held until ack; last marks the end of a signal);
// env_rx_* delivers the words addressed to Pid 0 (a word moves when
// env_rx_valid and env_rx_ready are both high). The set of nodes, the Pids
// and the sizes of queues and memory are this design's own composition of
// the blocks the document describes.
module sdl_system
  import sdl_pkg::*;
#(
  parameter int QUEUE_LEN = 4,     // signal queue length of processes A and B
  parameter int MAXW      = 3,     // header + (cmd, id)
  parameter int CAN_BITS  = 19,    // CAN message length handled by serialization
  parameter int TICK_DIV  = 1,
  parameter int MEM_MW    = 16,
  parameter int MEM_AW    = 8,
  parameter int PP_BITS   = 31,    // ping-pong message size (largest swept)
  parameter int PP_QUEUE_LEN = 25, // ping-pong queue length (largest swept)
  localparam int N_NODES  = 7,
  localparam int MEM_DAW  = MEM_AW + ((MEM_MW / W > 1) ? $clog2(MEM_MW / W) : 0)
                                    - ((W / MEM_MW > 1) ? $clog2(W / MEM_MW) : 0)
) (
  input  logic  clk,
  input  logic  rst_n,
  // environment node (Pid 0)
  input  logic  env_tx_req,
  input  word_t env_tx_word,
  input  pid_t  env_tx_dest,
  input  logic  env_tx_last,
  output logic  env_tx_ack,
  output logic  env_rx_valid,
  output word_t env_rx_word,
  output logic  env_rx_last,
  input  logic  env_rx_ready,
  // external memory access (datapath words)
  input  logic               mem_req,
  input  logic               mem_we,
  input  logic [MEM_DAW-1:0] mem_addr,
  input  word_t              mem_wdata,
  output logic               mem_ready,
  output logic               mem_done,
  output word_t              mem_rdata,
  // observation
  output logic [1:0]  a_state,
  output logic [1:0]  b_state,
  output word_t       a_conn_id,
  output word_t       b_conn_id,
  output logic [2:0]  a_fired,
  output logic [2:0]  b_fired,
  output logic        a_queue_full,
  output logic        b_queue_full,
  output logic        queue_overflow,
  output logic [15:0] now,
  output logic [14:0] can_crc,
  output logic        can_msg_done,
  output logic        pp_returned,
  output logic        bus_locked
);

  logic  tx_req  [N_NODES];
  word_t tx_word [N_NODES];
  pid_t  tx_dest [N_NODES];
  logic  tx_last [N_NODES];
  logic  tx_ack  [N_NODES];
  logic  rx_valid[N_NODES];
  word_t rx_word [N_NODES];
  logic  rx_last [N_NODES];
  logic  rx_ready[N_NODES];

  logic [$clog2(QUEUE_LEN+1)-1:0] a_count, b_count;
  logic a_ovf, b_ovf;

  sdl_bus #(.N_NODES(N_NODES)) u_bus (
    .clk, .rst_n,
    .tx_req, .tx_word, .tx_dest, .tx_last, .tx_ack,
    .rx_valid, .rx_word, .rx_last, .rx_ready,
    .busy_locked(bus_locked)
  );

  // Pid 0: environment
  assign tx_req[0]    = env_tx_req;
  assign tx_word[0]   = env_tx_word;
  assign tx_dest[0]   = env_tx_dest;
  assign tx_last[0]   = env_tx_last;
  assign env_tx_ack   = tx_ack[0];
  assign env_rx_valid = rx_valid[0];
  assign env_rx_word  = rx_word[0];
  assign env_rx_last  = rx_last[0];
  assign rx_ready[0]  = env_rx_ready;

  // Pid 1 and 2: the two example processes
  sdl_process #(.SELF_PID(1), .PEER_PID(2), .ENV_PID(0),
                .QUEUE_LEN(QUEUE_LEN), .MAXW(MAXW)) u_proc_a (
    .clk, .rst_n,
    .rx_valid(rx_valid[1]), .rx_word(rx_word[1]), .rx_last(rx_last[1]), .rx_ready(rx_ready[1]),
    .tx_req(tx_req[1]), .tx_word(tx_word[1]), .tx_dest(tx_dest[1]), .tx_last(tx_last[1]),
    .tx_ack(tx_ack[1]),
    .sdl_state(a_state), .conn_id(a_conn_id), .fired(a_fired),
    .queue_count(a_count), .queue_overflow(a_ovf)
  );

  sdl_process #(.SELF_PID(2), .PEER_PID(1), .ENV_PID(0),
                .QUEUE_LEN(QUEUE_LEN), .MAXW(MAXW)) u_proc_b (
    .clk, .rst_n,
    .rx_valid(rx_valid[2]), .rx_word(rx_word[2]), .rx_last(rx_last[2]), .rx_ready(rx_ready[2]),
    .tx_req(tx_req[2]), .tx_word(tx_word[2]), .tx_dest(tx_dest[2]), .tx_last(tx_last[2]),
    .tx_ack(tx_ack[2]),
    .sdl_state(b_state), .conn_id(b_conn_id), .fired(b_fired),
    .queue_count(b_count), .queue_overflow(b_ovf)
  );

  assign a_queue_full   = (int'(a_count) == QUEUE_LEN);
  assign b_queue_full   = (int'(b_count) == QUEUE_LEN);
  assign queue_overflow = a_ovf || b_ovf;

  // Pid 3: timer
  sdl_timer #(.N_SLOTS(N_NODES), .TICK_DIV(TICK_DIV), .NOW_W(16), .TIMER_PID(3)) u_timer (
    .clk, .rst_n,
    .rx_valid(rx_valid[3]), .rx_word(rx_word[3]), .rx_last(rx_last[3]), .rx_ready(rx_ready[3]),
    .tx_req(tx_req[3]), .tx_word(tx_word[3]), .tx_dest(tx_dest[3]), .tx_last(tx_last[3]),
    .tx_ack(tx_ack[3]),
    .now, .tick()
  );

  // Pid 4 and 5: CAN controller example
  can_serial_process #(.MSG_BITS(CAN_BITS), .SELF_PID(4), .CRC_PID(5)) u_can_ser (
    .clk, .rst_n,
    .rx_valid(rx_valid[4]), .rx_word(rx_word[4]), .rx_last(rx_last[4]), .rx_ready(rx_ready[4]),
    .tx_req(tx_req[4]), .tx_word(tx_word[4]), .tx_dest(tx_dest[4]), .tx_last(tx_last[4]),
    .tx_ack(tx_ack[4]),
    .msg_done(can_msg_done)
  );

  can_crc_process #(.SELF_PID(5), .ENV_PID(0)) u_can_crc (
    .clk, .rst_n,
    .rx_valid(rx_valid[5]), .rx_word(rx_word[5]), .rx_last(rx_last[5]), .rx_ready(rx_ready[5]),
    .tx_req(tx_req[5]), .tx_word(tx_word[5]), .tx_dest(tx_dest[5]), .tx_last(tx_last[5]),
    .tx_ack(tx_ack[5]),
    .crc(can_crc)
  );

  // Pid 6: ping-pong example
  ping_pong_process #(.MSG_BITS(PP_BITS), .QUEUE_LEN(PP_QUEUE_LEN), .SELF_PID(6)) u_ping_pong (
    .clk, .rst_n,
    .rx_valid(rx_valid[6]), .rx_word(rx_word[6]), .rx_last(rx_last[6]), .rx_ready(rx_ready[6]),
    .tx_req(tx_req[6]), .tx_word(tx_word[6]), .tx_dest(tx_dest[6]), .tx_last(tx_last[6]),
    .tx_ack(tx_ack[6]),
    .returned(pp_returned)
  );

  // External memory path
  logic              m_en, m_we;
  logic [MEM_AW-1:0] m_addr;
  logic [MEM_MW-1:0] m_wdata, m_rdata;

  sdl_mem_adapter #(.DW(W), .MW(MEM_MW), .MEM_AW(MEM_AW)) u_mem_adapter (
    .clk, .rst_n,
    .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ready(mem_ready), .done(mem_done), .rdata(mem_rdata),
    .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata), .mem_rdata(m_rdata)
  );

  sdl_ext_ram #(.MW(MEM_MW), .AW(MEM_AW)) u_ram (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

endmodule
