// sdl_timer - timer component of the SDL run-time library.
//
// A node of the communication structure. Processes control it by sending
// it ordinary signals:
//   header type TMR_SET   + one parameter word d : set(now + d)
//   header type TMR_RESET                        : reset
// There is one timer per owner Pid (the sender of the command), so every
// process can run one timer. now counts time units; one unit is TICK_DIV
// clock cycles. A set timer counts its remaining units down and, when they
// run out, becomes pending; pending timers are reported to their owners,
// lowest Pid first, as a one-word timer signal (type SIG_TIMER, sender
// TIMER_PID). Setting a timer again restarts it and reset cancels it, both
// also withdrawing an expiry that has not been sent yet. d = 0 expires at the
// next tick. Commands are accepted every cycle (rx_ready is always 1).
// The set/reset/now services follow the document; the command encoding, one
// timer per process and the count-down realisation are this design's own.
module sdl_timer
  import sdl_pkg::*;
#(
  parameter int   N_SLOTS   = 4,   // one timer for each Pid 0 .. N_SLOTS-1
  parameter int   TICK_DIV  = 1,   // clock cycles per time unit
  parameter int   NOW_W     = 16,  // width of the 'now' time counter
  parameter pid_t TIMER_PID = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // receive side (commands)
  input  logic  rx_valid,
  input  word_t rx_word,
  input  logic  rx_last,
  output logic  rx_ready,
  // transmit side (timer signals)
  output logic  tx_req,
  output word_t tx_word,
  output pid_t  tx_dest,
  output logic  tx_last,
  input  logic  tx_ack,
  // time
  output logic [NOW_W-1:0] now,
  output logic             tick
);

  localparam int DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  typedef enum logic [1:0] {R_HDR, R_ARG, R_SKIP} rstate_e;
  rstate_e   rstate;
  header_t   cmd_q;
  logic [DW-1:0] div_q;

  logic  active [N_SLOTS];
  logic  pending[N_SLOTS];
  word_t rem    [N_SLOTS];

  logic  sending;
  pid_t  send_pid;

  logic  do_set, do_reset;
  pid_t  cmd_pid;
  word_t set_val;
  header_t hdr_in;

  assign rx_ready = 1'b1;
  assign hdr_in   = header_t'(rx_word);

  // Command decode: set on the argument word, reset on a one-word header.
  always_comb begin
    do_set   = 1'b0;
    do_reset = 1'b0;
    cmd_pid  = cmd_q.sender;
    set_val  = rx_word;
    if (rx_valid) begin
      if (rstate == R_HDR && rx_last && hdr_in.stype == TMR_RESET) begin
        do_reset = 1'b1;
        cmd_pid  = hdr_in.sender;
      end
      if (rstate == R_ARG && cmd_q.stype == TMR_SET) do_set = 1'b1;
    end
  end

  assign tick = (TICK_DIV <= 1) ? 1'b1 : (int'(div_q) == TICK_DIV-1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_HDR;
      cmd_q  <= '0;
      div_q  <= '0;
      now    <= '0;
    end else begin
      if (TICK_DIV > 1) div_q <= tick ? '0 : div_q + DW'(1);
      if (tick) now <= now + NOW_W'(1);
      if (rx_valid) begin
        unique case (rstate)
          R_HDR: begin
            cmd_q <= hdr_in;
            if (!rx_last) rstate <= R_ARG;
          end
          R_ARG:  rstate <= rx_last ? R_HDR : R_SKIP;
          R_SKIP: if (rx_last) rstate <= R_HDR;
          default: rstate <= R_HDR;
        endcase
      end
    end
  end

  // Timers: count down, expire, report.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SLOTS; s++) begin
        active[s]  <= 1'b0;
        pending[s] <= 1'b0;
        rem[s]     <= '0;
      end
    end else begin
      for (int s = 0; s < N_SLOTS; s++) begin
        if (active[s] && tick) begin
          if (rem[s] <= word_t'(1)) begin
            active[s]  <= 1'b0;
            pending[s] <= 1'b1;
          end else begin
            rem[s] <= rem[s] - word_t'(1);
          end
        end
        if (sending && tx_ack && int'(send_pid) == s) pending[s] <= 1'b0;
        if ((do_set || do_reset) && int'(cmd_pid) == s) begin
          active[s]  <= do_set;
          rem[s]     <= set_val;
          pending[s] <= 1'b0;
        end
      end
    end
  end

  // Pick the lowest pending timer and send its signal.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending  <= 1'b0;
      send_pid <= '0;
    end else if (!sending) begin
      for (int s = N_SLOTS-1; s >= 0; s--) begin
        if (pending[s] && !((do_set || do_reset) && int'(cmd_pid) == s)) begin
          sending  <= 1'b1;
          send_pid <= pid_t'(s);
        end
      end
    end else if (tx_ack) begin
      sending <= 1'b0;
    end else if ((do_set || do_reset) && cmd_pid == send_pid) begin
      sending <= 1'b0;   // withdrawn before the bus took it
    end
  end

  assign tx_req  = sending;
  assign tx_word = make_header(SIG_TIMER, TIMER_PID, send_pid);
  assign tx_dest = send_pid;
  assign tx_last = 1'b1;

endmodule
