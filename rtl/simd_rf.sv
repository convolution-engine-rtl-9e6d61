// Vector register file of the engine's SIMD side.
//
// ENTRIES vectors of LANES pixels (18 x 16 x 10 bits, as the document gives).
// Two combinational read ports and one write port clocked at the rising
// edge. Reading an entry number at or above ENTRIES returns zero; writing
// one is ignored. Port count, out-of-range behaviour and reset to zero are
// this design's choices.
module simd_rf
  import ce_pkg::*;
#(
  parameter int unsigned ENTRIES = SIMD_ENTRIES,
  parameter int unsigned LANES_P = SIMD_LANES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [4:0]             waddr,
  input  pix_t [LANES_P-1:0]     wdata,
  input  logic [4:0]             raddr0,
  input  logic [4:0]             raddr1,
  output pix_t [LANES_P-1:0]     rdata0,
  output pix_t [LANES_P-1:0]     rdata1
);

  pix_t [ENTRIES-1:0][LANES_P-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else if (we && (32'(waddr) < ENTRIES)) mem[waddr] <= wdata;
  end

  assign rdata0 = (32'(raddr0) < ENTRIES) ? mem[raddr0] : '0;
  assign rdata1 = (32'(raddr1) < ENTRIES) ? mem[raddr1] : '0;

endmodule
