// sdl_ext_ram - external memory for large SDL data segments.
//
// A single-port static RAM of 2**AW words of MW bits with a synchronous,
// one-cycle read: when en is high, the word at addr appears on rdata after
// the clock edge; when en and we are high, wdata is written at that edge.
// The contents are not reset. Its size and word width are this design's
// own choice; the run-time library reaches it through sdl_mem_adapter.
module sdl_ext_ram #(
  parameter int MW = 16,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [MW-1:0] wdata,
  output logic [MW-1:0] rdata
);

  logic [MW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
