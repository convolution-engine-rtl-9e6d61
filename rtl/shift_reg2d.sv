// 2D shift register holding the stencil neighbourhood.
//
// ROWS x COLS pixels (16 x 32, as in the document's figures). Two movements
// make the register slide over an image with one new row of input per step:
//  * load: SEG pixels are written into half ld_seg of the bottom row. With
//    ld_shift set, every row first moves up by one (row 0 is dropped), so a
//    new image row enters at the bottom in the same cycle.
//  * rotate: every row moves one column left; column 0 wraps to column
//    COLS-1, so after COLS/2 steps the two halves have swapped.
// Both act at the rising edge; load wins if both are requested (the engine's
// controller never asks for both). Whole array is visible on rd_data.
// The rotate and shift-up follow the document; writing the entering row
// straight into row ROWS-1 (rather than a separate staging row) and the
// reset to zero are this design's choices.
module shift_reg2d
  import ce_pkg::*;
#(
  parameter int unsigned ROWS = SROWS,
  parameter int unsigned COLS = SCOLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ld_en,
  input  logic                       ld_shift,
  input  logic                       ld_seg,
  input  pix_t [SEG-1:0]             ld_data,
  input  logic                       rot_en,
  output pix_t [ROWS-1:0][COLS-1:0]  rd_data
);

  pix_t [ROWS-1:0][COLS-1:0] r;
  pix_t [ROWS-1:0][COLS-1:0] nxt;

  always_comb begin
    nxt = r;
    if (ld_en) begin
      if (ld_shift)
        for (int unsigned i = 0; i + 1 < ROWS; i++) nxt[i] = r[i+1];
      for (int unsigned j = 0; j < SEG; j++)
        nxt[ROWS-1][SEG*ld_seg + j] = ld_data[j];
    end else if (rot_en) begin
      for (int unsigned i = 0; i < ROWS; i++)
        for (int unsigned j = 0; j < COLS; j++)
          nxt[i][j] = r[i][(j+1) % COLS];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else        r <= nxt;
  end

  assign rd_data = r;

endmodule
