// Map unit: LANES identical ALUs working in lock step.
//
// Every lane applies the same map function to its pixel a (unsigned) and
// coefficient b, giving a signed MAP_W-bit result in the same cycle:
//   MAP_ABSDIFF |a-b|       (the sum-of-absolute-differences case)
//   MAP_MUL     a * b, b read as a signed two's-complement tap
//   MAP_AVG     (a+b+1)>>1
//   MAP_SUB     a-b
//   MAP_CMP     1 if a > b else 0
//   MAP_PASS    a
// The operation list and the 64-lane width follow the document; signed taps
// for multiply, rounding of the average and the sense of the comparison are
// this design's choices. Combinational.
module map_unit
  import ce_pkg::*;
#(
  parameter int unsigned N = LANES
) (
  input  map_op_e        op,
  input  pix_t [N-1:0]   a,
  input  pix_t [N-1:0]   b,
  output map_t [N-1:0]   y
);

  always_comb begin
    for (int unsigned l = 0; l < N; l++) begin
      map_t sa, sb, d;
      sa = map_t'({1'b0, a[l]});
      sb = map_t'({1'b0, b[l]});
      d  = sa - sb;
      unique case (op)
        MAP_ABSDIFF: y[l] = (d < 0) ? -d : d;
        MAP_MUL:     y[l] = sa * map_t'($signed(b[l]));
        MAP_AVG:     y[l] = (sa + sb + map_t'(1)) >>> 1;
        MAP_SUB:     y[l] = d;
        MAP_CMP:     y[l] = (a[l] > b[l]) ? map_t'(1) : map_t'(0);
        default:     y[l] = sa;
      endcase
    end
  end

endmodule
