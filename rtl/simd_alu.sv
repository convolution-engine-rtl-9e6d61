// 16-way SIMD ALU on unsigned 10-bit pixels.
//
// Every lane applies op to a[l] and b[l] in the same cycle:
//   SIMD_ADD     a+b, saturated at the pixel maximum
//   SIMD_SUB     a-b, saturated at zero
//   SIMD_ABSDIFF |a-b|
//   SIMD_AVG     (a+b+1)>>1
//   SIMD_MIN / SIMD_MAX
// The lane count and width follow the document; the operation set is this
// design's own choice, since the document gives only the unit's size.
// Combinational.
module simd_alu
  import ce_pkg::*;
#(
  parameter int unsigned N = SIMD_LANES
) (
  input  simd_op_e       op,
  input  pix_t [N-1:0]   a,
  input  pix_t [N-1:0]   b,
  output pix_t [N-1:0]   y
);

  localparam pix_t PMAX = '1;

  always_comb begin
    for (int unsigned l = 0; l < N; l++) begin
      logic [PIX_W:0] s;
      s = {1'b0, a[l]} + {1'b0, b[l]};
      unique case (op)
        SIMD_ADD:     y[l] = s[PIX_W] ? PMAX : s[PIX_W-1:0];
        SIMD_SUB:     y[l] = (a[l] > b[l]) ? a[l] - b[l] : '0;
        SIMD_ABSDIFF: y[l] = (a[l] > b[l]) ? a[l] - b[l] : b[l] - a[l];
        SIMD_AVG:     y[l] = PIX_W'((s + 1'b1) >> 1);
        SIMD_MIN:     y[l] = (a[l] < b[l]) ? a[l] : b[l];
        default:      y[l] = (a[l] > b[l]) ? a[l] : b[l];
      endcase
    end
  end

endmodule
