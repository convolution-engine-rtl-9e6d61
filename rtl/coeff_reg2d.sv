// 2D coefficient register.
//
// A ROWS x COLS array of PIX_W-bit coefficients (16x16 of 10 bits, as the
// document gives). One instruction writes a whole row of COLS values; every
// element is visible on rd_data at all times, so the map unit can read the
// complete stencil in parallel. Writes take effect at the rising clock edge;
// reset clears the array (the reset value is this design's choice).
module coeff_reg2d
  import ce_pkg::*;
#(
  parameter int unsigned ROWS = CROWS,
  parameter int unsigned COLS = CCOLS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(ROWS)-1:0]      wr_row,
  input  pix_t [COLS-1:0]              wr_data,
  output pix_t [ROWS-1:0][COLS-1:0]    rd_data
);

  pix_t [ROWS-1:0][COLS-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mem <= '0;
    else if (wr_en) mem[wr_row] <= wr_data;
  end

  assign rd_data = mem;

endmodule
