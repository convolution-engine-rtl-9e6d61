// Convolution Engine: a specialised functional unit for convolution-like
// image kernels.
//
// Image kernels such as motion-estimation SAD, filtering, difference of
// Gaussians and extremum search all apply a "map" function to every
// (pixel, coefficient) pair of a stencil and "reduce" the results. This unit
// keeps the stencil neighbourhood in a 16x32 shift register and the
// coefficients in a 16x16 register, so one row load feeds hundreds of
// operations. A 64-lane map unit and a flexible reduce tree turn the two
// registers into one result per 16x16 stencil every four cycles, or four 1D
// stencil results per cycle. Rotating the shift register left slides the
// window one pixel. A 16-lane SIMD unit with an 18-entry register file takes
// element-wise (matrix) results, clamped to pixels, and post-processes them;
// the same results also go to the output register at full signed precision
// (difference-of-Gaussians values can be negative).
//
// Interface: the host processor issues ce_instr_t words with
// instr_valid/instr_ready (ready low = stall during multi-pass 2D
// convolves). OP_ST_OUT and OP_ST_SIMD put the output register (16 x 32-bit)
// or one SIMD entry (zero-extended pixels in entries 0..15) on out_data one
// cycle after they are accepted, with out_valid high for that cycle.
//
// Structure and sizes follow the document; the instruction set, the data
// flow of the operand interface, the store port and the link from matrix
// results to the SIMD register file are this design's own.
module conv_engine
  import ce_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      instr_valid,
  output logic                      instr_ready,
  input  ce_instr_t                 instr,
  output logic                      out_valid,
  output acc_t [OUT_ENTRIES-1:0]    out_data
);

  map_op_e    map_op;
  red_op_e    red_op;
  logic [4:0] size;
  mode_e      mode;
  logic [1:0] pass;
  logic [3:0] base;
  logic       coeff_we;
  logic [3:0] coeff_row;
  logic       sreg_ld, sreg_shift, sreg_seg, sreg_rot;
  vec_t       ld_data;
  logic [GROUPS-1:0]      out_we;
  logic                   out_acc;
  logic [GROUPS-1:0][3:0] out_idx;
  logic                   out_part;
  logic                   out_row;
  logic       rf_we;
  logic [4:0] rf_waddr, rf_raddr0, rf_raddr1;
  logic [1:0] rf_wsel;
  simd_op_e   simd_op;
  logic       st_out, st_simd;

  ce_ctrl u_ctrl (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr,
    .map_op, .red_op, .size, .mode, .pass, .base,
    .coeff_we, .coeff_row, .sreg_ld, .sreg_shift, .sreg_seg, .sreg_rot, .ld_data,
    .out_we, .out_acc, .out_idx, .out_part, .out_row,
    .rf_we, .rf_waddr, .rf_wsel, .rf_raddr0, .rf_raddr1, .simd_op,
    .st_out, .st_simd
  );

  // ---- register storage ----
  pix_t [CROWS-1:0][CCOLS-1:0] creg;
  pix_t [SROWS-1:0][SCOLS-1:0] sreg;

  coeff_reg2d u_creg (
    .clk, .rst_n, .wr_en(coeff_we), .wr_row(coeff_row), .wr_data(ld_data), .rd_data(creg)
  );

  shift_reg2d u_sreg (
    .clk, .rst_n, .ld_en(sreg_ld), .ld_shift(sreg_shift), .ld_seg(sreg_seg),
    .ld_data, .rot_en(sreg_rot), .rd_data(sreg)
  );

  // ---- compute ----
  pix_t [LANES-1:0] opa, opb;
  logic [LANES-1:0] active;
  map_t [LANES-1:0] mapped;
  acc_t             total;
  acc_t [GROUPS-1:0] part;

  operand_if u_opif (
    .mode, .size, .pass, .base, .sreg, .creg, .a(opa), .b(opb), .active
  );

  map_unit u_map (.op(map_op), .a(opa), .b(opb), .y(mapped));

  reduce_unit u_red (.op(red_op), .x(mapped), .active, .total, .part);

  acc_t [OUT_ENTRIES-1:0] oreg;
  acc_t [GROUPS-1:0]      owdata;
  acc_t [OUT_ENTRIES-1:0] orow;

  always_comb begin
    owdata    = out_part ? part : '0;
    if (!out_part) owdata[0] = total;
    for (int unsigned k = 0; k < OUT_ENTRIES; k++) orow[k] = acc_t'(mapped[k]);
  end

  out_reg u_oreg (
    .clk, .rst_n, .we(out_we), .acc(out_acc), .land(red_op == RED_AND), .idx(out_idx), .wdata(owdata),
    .row_we(out_row), .row_data(orow), .rd_data(oreg)
  );

  // ---- SIMD side ----
  vec_t rf_a, rf_b, alu_y, mat_y, rf_wdata;

  // Matrix results are clamped to the pixel range before they enter the
  // 10-bit register file.
  always_comb begin
    for (int unsigned k = 0; k < SIMD_LANES; k++)
      mat_y[k] = (mapped[k] < 0)                   ? '0 :
                 (mapped[k] > map_t'({PIX_W{1'b1}})) ? '1 : mapped[k][PIX_W-1:0];
    unique case (rf_wsel)
      2'd1:    rf_wdata = mat_y;
      2'd2:    rf_wdata = alu_y;
      default: rf_wdata = ld_data;
    endcase
  end

  simd_rf u_rf (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr0(rf_raddr0), .raddr1(rf_raddr1), .rdata0(rf_a), .rdata1(rf_b)
  );

  simd_alu u_alu (.op(simd_op), .a(rf_a), .b(rf_b), .y(alu_y));

  // ---- store port ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= st_out || st_simd;
      if (st_out) out_data <= oreg;
      else if (st_simd)
        for (int unsigned k = 0; k < OUT_ENTRIES; k++) out_data[k] <= acc_t'(rf_a[k]);
    end
  end

endmodule
