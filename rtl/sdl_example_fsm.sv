// sdl_example_fsm - behaviour of the example connection-setup SDL process,
// written as a cycle-fixed register-transfer controller.
//
// SDL states IDLE, SETUP and CONECT; transitions
//   T1 IDLE   conReq(Id)         : message := (REQUEST, Id); mediumReq(message); -> SETUP
//   T2 CONECT disReq(disId)      : if disId = Id: message := (DISCONECT, Id);
//                                  mediumReq(message) twice; -> IDLE, else stay
//   T3 CONECT mediumInd(message) : if message!Id = Id and message!cmd = DISCONECT:
//                                  disInd(message!Id); -> IDLE, else stay
//   T4 IDLE   mediumInd(message) : if message!cmd = REQUEST: Id := message!Id;
//                                  message := (ACK, Id); mediumReq(message);
//                                  conInd(Id); -> CONECT, else stay
//   T5 SETUP  mediumInd(message) : if message!Id = Id and message!cmd = ACK:
//                                  conRes(Id); -> CONECT, else disInd(Id); -> IDLE
// A signal that no transition of the current state consumes is removed from
// the queue (SDL implicit consumption). The states, transitions, decisions
// and constants are those of the design's example process. This design adds
// that T4 adopts the Id of the incoming request, so that the answering side
// can later recognise the DISCONECT of that connection.
//
// Sequencing: M_WAIT looks at the header of the oldest queued signal; the
// parameters are read one word per cycle (M_P1, M_P2) and the signal is then
// removed; M_EXEC evaluates the whole transition in one cycle and records up
// to two output signals; M_SEND hands their words one at a time to the send
// component through the changed/busy handshake. mediumReq is delivered to
// the peer process as its mediumInd (the medium is a direct connection).
// 'fired' pulses for one cycle in M_EXEC with the transition taken.
module sdl_example_fsm
  import sdl_pkg::*;
#(
  parameter pid_t SELF_PID = 1,
  parameter pid_t PEER_PID = 2,
  parameter pid_t ENV_PID  = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  // signal queue
  input  logic  rd_valid,
  input  word_t rd_word,
  input  logic  rd_last,
  output logic  rd_next,
  output logic  rd_remove,
  output logic  rd_save,
  output logic  rd_restart,
  // send component
  output logic  p_changed,
  output word_t p_word,
  output pid_t  p_dest,
  output logic  p_last,
  input  logic  p_busy,
  // observation
  output logic [1:0] sdl_state,   // 0 IDLE, 1 SETUP, 2 CONECT
  output word_t      conn_id,
  output logic [2:0] fired        // 0 none, 1..5 = T1..T5, 7 = implicit consumption
);

  typedef enum logic [1:0] {IDLE = 2'd0, SETUP = 2'd1, CONECT = 2'd2} sdl_state_e;
  typedef enum logic [2:0] {M_WAIT, M_P1, M_P2, M_EXEC, M_DRIVE, M_RELEASE} micro_e;

  typedef struct packed {
    pid_t     dest;
    logic [1:0] nw;          // number of words, 1..3
    word_t    w0, w1, w2;
  } outsig_t;

  sdl_state_e st_q;
  micro_e     m_q;
  sigtype_t   type_q;
  word_t      id_q, disid_q;
  word_t      msg_cmd_q, msg_id_q;
  word_t      p1_q, p2_q;
  outsig_t    out_q [2];
  logic [1:0] nsig_q;        // output signals recorded by M_EXEC
  logic       sidx_q;        // output signal being sent
  logic [1:0] widx_q;        // word being sent

  logic       accept;

  assign sdl_state  = st_q;
  assign conn_id    = id_q;
  assign rd_save    = 1'b0;   // the example process has no save
  assign rd_restart = 1'b0;

  // Which signals the current state consumes.
  always_comb begin
    header_t h;
    h      = header_t'(rd_word);
    accept = 1'b0;
    unique case (h.stype)
      SIG_CONREQ:    accept = (st_q == IDLE);
      SIG_DISREQ:    accept = (st_q == CONECT);
      SIG_MEDIUMIND: accept = 1'b1;
      default:       accept = 1'b0;
    endcase
  end

  always_comb begin
    rd_next   = 1'b0;
    rd_remove = 1'b0;
    unique case (m_q)
      M_WAIT: if (rd_valid) begin
        if (accept && !rd_last) rd_next   = 1'b1;
        else if (!accept)       rd_remove = 1'b1;
        else                    rd_remove = 1'b1;   // header only: parameters read as 0
      end
      M_P1: if (type_q == SIG_MEDIUMIND && !rd_last) rd_next = 1'b1;
            else rd_remove = 1'b1;
      M_P2: rd_remove = 1'b1;
      default: ;
    endcase
  end

  // Word to hand to the send component.
  always_comb begin
    outsig_t o;
    o      = out_q[sidx_q];
    p_dest = o.dest;
    p_word = (widx_q == 2'd0) ? o.w0 : (widx_q == 2'd1) ? o.w1 : o.w2;
    p_last = (widx_q + 2'd1 == o.nw);
    p_changed = (m_q == M_DRIVE) && (nsig_q != 2'd0) && !p_busy;
  end

  function automatic outsig_t medium_req(word_t cmd, word_t id);
    outsig_t o;
    o.dest = PEER_PID;
    o.nw   = 2'd3;
    o.w0   = make_header(SIG_MEDIUMIND, SELF_PID, PEER_PID);
    o.w1   = cmd;
    o.w2   = id;
    return o;
  endfunction

  function automatic outsig_t to_env(sigtype_t t, word_t id);
    outsig_t o;
    o.dest = ENV_PID;
    o.nw   = 2'd2;
    o.w0   = make_header(t, SELF_PID, ENV_PID);
    o.w1   = id;
    o.w2   = '0;
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= IDLE;
      m_q       <= M_WAIT;
      type_q    <= SIG_TIMER;
      id_q      <= '0;
      disid_q   <= '0;
      msg_cmd_q <= '0;
      msg_id_q  <= '0;
      p1_q      <= '0;
      p2_q      <= '0;
      out_q[0]  <= '0;
      out_q[1]  <= '0;
      nsig_q    <= '0;
      sidx_q    <= 1'b0;
      widx_q    <= '0;
      fired     <= '0;
    end else begin
      fired <= '0;
      unique case (m_q)
        M_WAIT: if (rd_valid) begin
          type_q <= rd_word[W-1 -: 2];
          p1_q   <= '0;
          p2_q   <= '0;
          if (!accept)       fired <= 3'd7;
          else if (rd_last)  m_q   <= M_EXEC;
          else               m_q   <= M_P1;
        end
        M_P1: begin
          p1_q <= rd_word;
          m_q  <= (type_q == SIG_MEDIUMIND && !rd_last) ? M_P2 : M_EXEC;
        end
        M_P2: begin
          p2_q <= rd_word;
          m_q  <= M_EXEC;
        end
        M_EXEC: begin
          nsig_q <= 2'd0;
          sidx_q <= 1'b0;
          widx_q <= '0;
          unique case (st_q)
            IDLE: if (type_q == SIG_CONREQ) begin                       // T1
              fired     <= 3'd1;
              id_q      <= p1_q;
              msg_cmd_q <= CMD_REQUEST;
              msg_id_q  <= p1_q;
              out_q[0]  <= medium_req(CMD_REQUEST, p1_q);
              nsig_q    <= 2'd1;
              st_q      <= SETUP;
            end else begin                                               // T4
              fired     <= 3'd4;
              msg_cmd_q <= p1_q;
              msg_id_q  <= p2_q;
              if (p1_q == CMD_REQUEST) begin
                id_q      <= p2_q;
                msg_cmd_q <= CMD_ACK;
                out_q[0]  <= medium_req(CMD_ACK, p2_q);
                out_q[1]  <= to_env(SIG_CONIND, p2_q);
                nsig_q    <= 2'd2;
                st_q      <= CONECT;
              end
            end
            SETUP: begin                                                 // T5
              fired     <= 3'd5;
              msg_cmd_q <= p1_q;
              msg_id_q  <= p2_q;
              nsig_q    <= 2'd1;
              if (p2_q == id_q && p1_q == CMD_ACK) begin
                out_q[0] <= to_env(SIG_CONRES, id_q);
                st_q     <= CONECT;
              end else begin
                out_q[0] <= to_env(SIG_DISIND, id_q);
                st_q     <= IDLE;
              end
            end
            CONECT: if (type_q == SIG_DISREQ) begin                     // T2
              fired   <= 3'd2;
              disid_q <= p1_q;
              if (p1_q == id_q) begin
                msg_cmd_q <= CMD_DISCONNECT;
                msg_id_q  <= id_q;
                out_q[0]  <= medium_req(CMD_DISCONNECT, id_q);
                out_q[1]  <= medium_req(CMD_DISCONNECT, id_q);
                nsig_q    <= 2'd2;
                st_q      <= IDLE;
              end
            end else begin                                               // T3
              fired     <= 3'd3;
              msg_cmd_q <= p1_q;
              msg_id_q  <= p2_q;
              if (p2_q == id_q && p1_q == CMD_DISCONNECT) begin
                out_q[0] <= to_env(SIG_DISIND, p2_q);
                nsig_q   <= 2'd1;
                st_q     <= IDLE;
              end
            end
            default: st_q <= IDLE;
          endcase
          m_q <= M_DRIVE;
        end
        M_DRIVE: begin
          if (nsig_q == 2'd0) m_q <= M_WAIT;          // transition without output
          else if (p_busy)    m_q <= M_RELEASE;       // word taken over
        end
        M_RELEASE: if (!p_busy) begin
          if (!p_last) begin
            widx_q <= widx_q + 2'd1;
            m_q    <= M_DRIVE;
          end else if (sidx_q == 1'b0 && nsig_q == 2'd2) begin
            sidx_q <= 1'b1;
            widx_q <= '0;
            m_q    <= M_DRIVE;
          end else begin
            m_q    <= M_WAIT;
          end
        end
        default: m_q <= M_WAIT;
      endcase
    end
  end

endmodule
