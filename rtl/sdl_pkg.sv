// sdl_pkg - shared constants and types of the SDL hardware run-time system.
//
// Every SDL signal travels as a sequence of W-bit words: one header word
// followed by its parameter words. The header carries the signal type, the
// Pid of the sending process and the Pid of the receiving process, so that
// sender/self/to can be supported. The 8-bit word and the position of the
// type field in bits 7:6 follow the example process of the design; the Pid
// fields below it and their 3-bit width are this design's own choice.
// Signal-type codes are local to the receiving process.
package sdl_pkg;

  localparam int W     = 8;   // datapath / communication word width
  localparam int PID_W = 3;   // width of a process identifier

  typedef logic [W-1:0]     word_t;
  typedef logic [PID_W-1:0] pid_t;
  typedef logic [1:0]       sigtype_t;

  // Header word: [7:6] type, [5:3] sender Pid, [2:0] receiver Pid.
  typedef struct packed {
    sigtype_t stype;
    pid_t     sender;
    pid_t     receiver;
  } header_t;

  // Signal types seen by the example connection-setup process.
  localparam sigtype_t SIG_TIMER     = 2'b00;  // timer expiry (from the timer component)
  localparam sigtype_t SIG_CONREQ    = 2'b01;  // conReq(Id)
  localparam sigtype_t SIG_DISREQ    = 2'b10;  // disReq(disId)
  localparam sigtype_t SIG_MEDIUMIND = 2'b11;  // mediumInd(message), message = (cmd, id)

  // Signal types seen by the environment.
  localparam sigtype_t SIG_CONIND    = 2'b01;  // conInd(id)
  localparam sigtype_t SIG_CONRES    = 2'b10;  // conRes(id)
  localparam sigtype_t SIG_DISIND    = 2'b11;  // disInd(id)

  // Commands understood by the timer component.
  localparam sigtype_t TMR_SET       = 2'b01;  // set(duration)
  localparam sigtype_t TMR_RESET     = 2'b10;  // reset

  // Command values carried in message!cmd by the example process.
  localparam word_t CMD_REQUEST    = 8'd1;
  localparam word_t CMD_ACK        = 8'd1;
  localparam word_t CMD_DISCONNECT = 8'd3;

  function automatic word_t make_header(sigtype_t t, pid_t s, pid_t r);
    header_t h;
    h.stype    = t;
    h.sender   = s;
    h.receiver = r;
    return word_t'(h);
  endfunction

endpackage
