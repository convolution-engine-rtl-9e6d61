// Flexible reduce unit.
//
// Reduces the LANES map results in one of two shapes:
//   total   : over all lanes (2D stencils)
//   part[g] : over each group of LANES/GROUPS lanes (four 1D stencils)
// RED_ADD builds a binary summation tree; lanes outside the stencil add 0.
// RED_AND gives 1 when every active lane is non-zero (inactive lanes count
// as true), as used for extremum tests. RED_NONE leaves the lanes to the
// caller (total and part are 0). Both shapes are always computed; the
// controller picks one. Combinational.
// The summation tree and add / logic-AND operations follow the document;
// the group size and neutral handling of inactive lanes are this design's.
module reduce_unit
  import ce_pkg::*;
(
  input  red_op_e              op,
  input  map_t [LANES-1:0]     x,
  input  logic [LANES-1:0]     active,
  output acc_t                 total,
  output acc_t [GROUPS-1:0]    part
);

  // Summation tree: level 0 holds the masked lanes, each level halves.
  localparam int unsigned LVL  = $clog2(LANES);
  localparam int unsigned GLVL = $clog2(GLANES);  // groups are subtrees here

  acc_t [LANES-1:0]  leaf;
  logic [LANES-1:0]  nz;
  acc_t [GROUPS-1:0] gsum;
  acc_t              tsum;

  always_comb begin
    for (int unsigned l = 0; l < LANES; l++) begin
      leaf[l] = active[l] ? acc_t'(x[l]) : '0;
      nz[l]   = !active[l] || (x[l] != '0);
    end
  end

  for (genvar s = 1; s <= LVL; s++) begin : g_lvl
    acc_t [(LANES >> s)-1:0] v;
    for (genvar l = 0; l < (LANES >> s); l++) begin : g_add
      if (s == 1) begin : g_first
        assign v[l] = leaf[2*l] + leaf[2*l+1];
      end else begin : g_next
        assign v[l] = g_lvl[s-1].v[2*l] + g_lvl[s-1].v[2*l+1];
      end
    end
  end

  assign tsum = g_lvl[LVL].v[0];
  assign gsum = g_lvl[GLVL].v;

  always_comb begin
    total = '0;
    part  = '0;
    unique case (op)
      RED_ADD: begin
        total = tsum;
        part  = gsum;
      end
      RED_AND: begin
        total = acc_t'(&nz);
        for (int unsigned g = 0; g < GROUPS; g++)
          part[g] = acc_t'(&nz[g*GLANES +: GLANES]);
      end
      default: ;
    endcase
  end

endmodule
