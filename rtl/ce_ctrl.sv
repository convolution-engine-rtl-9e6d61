// Convolution Engine instruction controller.
//
// The host processor issues one instruction per cycle over a valid/ready
// handshake. The controller keeps the configuration set by OP_SET_OPS (map
// and reduce functions) and OP_SET_SIZE (stencil size) and turns each
// instruction into register-file writes, shift-register movements and
// output-register updates. A matrix operation writes its 16 results both to
// the SIMD register file (clamped to pixels) and, at full signed precision,
// to the output register.
//
// Timing: every instruction completes in one cycle except OP_CONV_2D, which
// needs ceil(size/4) passes of the 64-lane map unit (4 stencil rows x 16
// columns each). The first pass runs in the cycle the instruction is
// accepted; for the remaining passes the instruction is held and
// instr_ready is low, stalling the processor. Pass 0 overwrites the output
// entry and later passes add to it. A requested rotate happens in the last
// pass, so the next convolve sees the window moved one column.
//
// The instructions follow the calls of the document's SAD example
// (SET_CE_OPS, SET_CE_OPSIZE, LD_COEFF_REG, LD_2D_REG with shift enable,
// CONVOLVE_2D with rotate, ST_OUT_REG); their encoding, the 1D / matrix /
// SIMD instructions' operands and the handshake are this design's own.
// The assertions below are disabled during reset with disable iff (!rst_n);
// lint reports that as rst_n being used both synchronously and
// asynchronously, which is expected: the flip-flops use it asynchronously.
module ce_ctrl
  import ce_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid,
  output logic              instr_ready,
  input  ce_instr_t         instr,
  // configuration
  output map_op_e           map_op,
  output red_op_e           red_op,
  output logic [4:0]        size,
  // operand interface
  output mode_e             mode,
  output logic [1:0]        pass,
  output logic [3:0]        base,
  // coefficient register
  output logic              coeff_we,
  output logic [3:0]        coeff_row,
  // shift register
  output logic              sreg_ld,
  output logic              sreg_shift,
  output logic              sreg_seg,
  output logic              sreg_rot,
  output vec_t              ld_data,
  // output register
  output logic [GROUPS-1:0] out_we,
  output logic              out_acc,
  output logic [GROUPS-1:0][3:0] out_idx,
  output logic              out_part,    // write per-group results
  output logic              out_row,     // write all entries from the matrix lanes
  // SIMD register file and ALU
  output logic              rf_we,
  output logic [4:0]        rf_waddr,
  output logic [1:0]        rf_wsel,     // 0 load data, 1 matrix result, 2 SIMD ALU
  output logic [4:0]        rf_raddr0,
  output logic [4:0]        rf_raddr1,
  output simd_op_e          simd_op,
  // stores
  output logic              st_out,
  output logic              st_simd
);

  map_op_e    cfg_map;
  red_op_e    cfg_red;
  logic [4:0] cfg_size;

  logic       busy;
  logic [1:0] pass_q;
  ce_instr_t  held;

  ce_instr_t  cur;
  logic       go;       // an instruction executes this cycle
  logic [2:0] npass;
  logic       last;

  assign instr_ready = !busy;
  assign go          = busy || instr_valid;
  assign cur         = busy ? held : instr;
  assign pass        = busy ? pass_q : 2'd0;
  // size 0 is treated as one pass
  assign npass       = (cfg_size == 5'd0) ? 3'd1 : 3'((cfg_size + 5'd3) >> 2);
  assign last        = (cur.opcode != OP_CONV_2D) || ({1'b0, pass} == npass - 3'd1);

  assign map_op = cfg_map;
  assign red_op = cfg_red;
  assign size   = cfg_size;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_map  <= MAP_ABSDIFF;
      cfg_red  <= RED_ADD;
      cfg_size <= 5'd16;
      busy     <= 1'b0;
      pass_q   <= '0;
      held     <= '0;
    end else begin
      if (go && !busy) begin
        if (instr.opcode == OP_SET_OPS) begin
          cfg_map <= instr.map_op;
          cfg_red <= instr.red_op;
        end
        if (instr.opcode == OP_SET_SIZE) cfg_size <= instr.size;
      end
      if (go && !last) begin
        busy   <= 1'b1;
        held   <= cur;
        pass_q <= pass + 2'd1;
      end else if (busy) begin
        busy   <= 1'b0;
        pass_q <= '0;
      end
    end
  end

  always_comb begin
    mode       = MODE_2D;
    base       = cur.b[3:0];
    coeff_we   = 1'b0;
    coeff_row  = cur.a[3:0];
    sreg_ld    = 1'b0;
    sreg_shift = cur.shift;
    sreg_seg   = cur.seg;
    sreg_rot   = 1'b0;
    ld_data    = cur.data;
    out_we     = '0;
    out_acc    = 1'b0;
    out_part   = 1'b0;
    out_row    = 1'b0;
    for (int unsigned g = 0; g < GROUPS; g++) out_idx[g] = cur.a[3:0] + 4'(4 * g);
    rf_we      = 1'b0;
    rf_waddr   = cur.a;
    rf_wsel    = 2'd0;
    rf_raddr0  = cur.b;
    rf_raddr1  = cur.c;
    simd_op    = cur.simd_op;
    st_out     = 1'b0;
    st_simd    = 1'b0;
    if (go) begin
      unique case (cur.opcode)
        OP_LD_COEFF: coeff_we = 1'b1;
        OP_LD_2D:    sreg_ld  = 1'b1;
        OP_CONV_2D: begin
          mode      = MODE_2D;
          out_we[0] = 1'b1;
          out_acc   = (pass != 2'd0);
          sreg_rot  = cur.rotate && last;
        end
        OP_CONV_1DH, OP_CONV_1DV: begin
          mode     = (cur.opcode == OP_CONV_1DH) ? MODE_1DH : MODE_1DV;
          out_we   = '1;
          out_part = 1'b1;
          sreg_rot = cur.rotate;
        end
        OP_CONV_MAT: begin
          mode     = MODE_MAT;
          out_row  = 1'b1;
          rf_we    = 1'b1;
          rf_wsel  = 2'd1;
          sreg_rot = cur.rotate;
        end
        OP_ST_OUT:  st_out = 1'b1;
        OP_LD_SIMD: rf_we  = 1'b1;
        OP_ST_SIMD: begin
          st_simd   = 1'b1;
          rf_raddr0 = cur.a;
        end
        OP_SIMD: begin
          rf_we   = 1'b1;
          rf_wsel = 2'd2;
        end
        default: ;
      endcase
    end
  end

  // The shift register never loads and rotates in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(sreg_ld && sreg_rot));
  // A stalled instruction is the one that started the multi-pass convolve.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> held.opcode == OP_CONV_2D);

endmodule
