// Operand interface: the "2D / Column Access" network between the two
// register files and the map unit.
//
// For each of the 64 map lanes it picks one pixel from the shift register
// (a) and one coefficient (b), and says whether the lane is inside the
// stencil (active). Lane l is split as group g = l / 16, element k = l % 16.
//   MODE_2D : pass p covers stencil rows 4p..4p+3; lane reads row 4p+g,
//             column k of both registers (window = columns 0..15).
//             Active when row and column are below size.
//   MODE_1DH: group g is a horizontal stencil on shift row base+g, taps
//             from coefficient row 0. Active when k < size.
//   MODE_1DV: group g is a vertical stencil down shift column base+g, taps
//             from coefficient row 0. Active when k < size.
//   MODE_MAT: group 0 reads row base of both registers element by element
//             (a 16-wide matrix operation); the other groups are idle.
// Purely combinational. The document names this interface and the data
// flows it must serve; how the lanes are assigned here is this design's own.
module operand_if
  import ce_pkg::*;
(
  input  mode_e                          mode,
  input  logic [4:0]                     size,
  input  logic [1:0]                     pass,
  input  logic [3:0]                     base,
  input  pix_t [SROWS-1:0][SCOLS-1:0]    sreg,
  input  pix_t [CROWS-1:0][CCOLS-1:0]    creg,
  output pix_t [LANES-1:0]               a,
  output pix_t [LANES-1:0]               b,
  output logic [LANES-1:0]               active
);

  always_comb begin
    for (int unsigned l = 0; l < LANES; l++) begin
      logic [1:0] g;
      logic [3:0] k;
      logic [3:0] row;
      logic [4:0] col;
      g = 2'(l / GLANES);
      k = 4'(l % GLANES);
      row = '0;
      col = '0;
      unique case (mode)
        MODE_2D: begin
          row       = {pass, g};
          a[l]      = sreg[row][k];
          b[l]      = creg[row][k];
          active[l] = ({1'b0, row} < size) && ({1'b0, k} < size);
        end
        MODE_1DH: begin
          row       = base + 4'(g);
          a[l]      = sreg[row][k];
          b[l]      = creg[0][k];
          active[l] = {1'b0, k} < size;
        end
        MODE_1DV: begin
          col       = {1'b0, base} + 5'(g);
          a[l]      = sreg[k][col];
          b[l]      = creg[0][k];
          active[l] = {1'b0, k} < size;
        end
        default: begin  // MODE_MAT
          a[l]      = sreg[base][k];
          b[l]      = creg[base][k];
          active[l] = (g == 2'd0);
        end
      endcase
    end
  end

endmodule
