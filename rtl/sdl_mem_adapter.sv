// sdl_mem_adapter - external-memory access function of the run-time library.
//
// Large SDL arrays are kept in an external memory instead of the register
// set of the process datapath. When the memory word (MW bits) and the
// datapath word (DW bits) differ, this block adapts one to the other with a
// parameterized shifter:
//   MW >= DW (R = MW / DW lanes per memory word): datapath address a lives
//     in memory word a / R at lane a % R.
//       read : one memory read, the lane is shifted down to bit 0.
//       write: read-modify-write; the lane is shifted up, merged into the
//              memory word and written back.
//   MW <  DW (K = DW / MW memory words per datapath word): datapath address
//     a occupies memory words a*K .. a*K+K-1, least significant part first.
//       read : K memory reads, each part shifted into place.
//       write: K memory writes of the shifted-down parts.
// Timing: req is taken when ready is high; done pulses with the result.
// Request to done: MW >= DW read 3 cycles, write 4; MW < DW read 2K+1,
// write K+1. The memory has a one-cycle synchronous read. The larger width
// must be a multiple of the smaller. Only the word-length adaptation by a
// shifter is from the document; the handshake, the part order and the
// read-modify-write sequence are this design's own.
module sdl_mem_adapter #(
  parameter int DW     = 8,    // datapath word width
  parameter int MW     = 16,   // memory word width
  parameter int MEM_AW = 8,    // memory address width
  localparam bit NARROW = (MW < DW),
  localparam int R     = NARROW ? 1 : MW / DW,
  localparam int K     = NARROW ? DW / MW : 1,
  localparam int RB    = (R > 1) ? $clog2(R) : 0,
  localparam int KB    = (K > 1) ? $clog2(K) : 0,
  localparam int CW    = (K > 1) ? KB : 1,
  localparam int AW    = MEM_AW + RB - KB
) (
  input  logic              clk,
  input  logic              rst_n,
  // datapath side
  input  logic              req,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DW-1:0]     wdata,
  output logic              ready,
  output logic              done,
  output logic [DW-1:0]     rdata,
  // memory side
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [MW-1:0]     mem_wdata,
  input  logic [MW-1:0]     mem_rdata
);

  typedef enum logic [2:0] {A_IDLE, A_RD, A_WAIT, A_WR, N_RD, N_WAIT, N_WR} astate_e;
  astate_e          state;
  logic             we_q;
  logic [AW-1:0]    addr_q;
  logic [DW-1:0]    wdata_q;
  logic [MW-1:0]    merged_q;
  logic [DW-1:0]    acc_q;
  logic [CW-1:0]    cnt_q;
  int unsigned      shamt;       // lane offset (wide memory)
  int unsigned      pshift;      // part offset (narrow memory)
  logic [MW-1:0]    lane_mask;
  logic [MW-1:0]    wide_wdata;

  assign shamt      = NARROW ? 0 : (int'(addr_q) % R) * DW;
  assign pshift     = int'(cnt_q) * MW;
  assign lane_mask  = MW'({DW{1'b1}}) << shamt;
  assign wide_wdata = MW'(wdata_q) << shamt;

  assign ready     = (state == A_IDLE);
  assign mem_en    = (state == A_RD) || (state == A_WR) || (state == N_RD) || (state == N_WR);
  assign mem_we    = (state == A_WR) || (state == N_WR);
  assign mem_addr  = NARROW ? MEM_AW'((int'(addr_q) * K) + int'(cnt_q))
                            : MEM_AW'(int'(addr_q) / R);
  assign mem_wdata = NARROW ? MW'(wdata_q >> pshift) : merged_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      we_q     <= 1'b0;
      addr_q   <= '0;
      wdata_q  <= '0;
      merged_q <= '0;
      acc_q    <= '0;
      cnt_q    <= '0;
      rdata    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE: if (req) begin
          we_q    <= we;
          addr_q  <= addr;
          wdata_q <= wdata;
          cnt_q   <= '0;
          acc_q   <= '0;
          state   <= !NARROW ? A_RD : (we ? N_WR : N_RD);
        end
        // memory word at least as wide as the datapath word
        A_RD: state <= A_WAIT;
        A_WAIT: begin
          if (we_q) begin
            merged_q <= (mem_rdata & ~lane_mask) | wide_wdata;
            state    <= A_WR;
          end else begin
            rdata <= DW'(mem_rdata >> shamt);
            done  <= 1'b1;
            state <= A_IDLE;
          end
        end
        A_WR: begin
          done  <= 1'b1;
          state <= A_IDLE;
        end
        // memory word narrower than the datapath word
        N_RD: state <= N_WAIT;
        N_WAIT: begin
          if (int'(cnt_q) == K-1) begin
            rdata <= acc_q | (DW'(mem_rdata) << pshift);
            done  <= 1'b1;
            state <= A_IDLE;
          end else begin
            acc_q <= acc_q | (DW'(mem_rdata) << pshift);
            cnt_q <= cnt_q + CW'(1);
            state <= N_RD;
          end
        end
        N_WR: begin
          if (int'(cnt_q) == K-1) begin
            done  <= 1'b1;
            state <= A_IDLE;
          end else begin
            cnt_q <= cnt_q + CW'(1);
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  initial assert ((MW % DW == 0) || (DW % MW == 0))
    else $error("sdl_mem_adapter: the wider word must be a multiple of the narrower");

endmodule
