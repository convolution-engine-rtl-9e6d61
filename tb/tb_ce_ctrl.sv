// Self-checking testbench for ce_ctrl. Issues every instruction type and
// checks the datapath controls it produces, the configuration it keeps,
// and the timing of OP_CONV_2D: ceil(size/4) passes, instr_ready low for all
// but the first, accumulate on every pass but the first, and the rotate in
// the last pass only.
module tb_ce_ctrl;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready;
  ce_instr_t instr;
  map_op_e map_op;
  red_op_e red_op;
  logic [4:0] size;
  mode_e mode;
  logic [1:0] pass;
  logic [3:0] base;
  logic coeff_we;
  logic [3:0] coeff_row;
  logic sreg_ld, sreg_shift, sreg_seg, sreg_rot;
  vec_t ld_data;
  logic [3:0] out_we;
  logic out_acc;
  logic [3:0][3:0] out_idx;
  logic out_part;
  logic out_row;
  logic rf_we;
  logic [4:0] rf_waddr, rf_raddr0, rf_raddr1;
  logic [1:0] rf_wsel;
  simd_op_e simd_op;
  logic st_out, st_simd;
  int checks = 0, failures = 0;

  ce_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s failed", $time, what);
    end
  endtask

  function automatic ce_instr_t rnd(opcode_e op);
    ce_instr_t i;
    i.opcode  = op;
    i.map_op  = map_op_e'($urandom % 6);
    i.red_op  = red_op_e'($urandom % 3);
    i.simd_op = simd_op_e'($urandom % 6);
    i.size    = 5'(1 + $urandom % 16);
    i.a       = 5'($urandom % 16);
    i.b       = 5'($urandom % 16);
    i.c       = 5'($urandom % 18);
    i.seg     = 1'($urandom);
    i.shift   = 1'($urandom);
    i.rotate  = 1'($urandom);
    for (int k = 0; k < 16; k++) i.data[k] = pix_t'($urandom);
    return i;
  endfunction

  // Issue one instruction and check each cycle it occupies.
  // Returns the number of cycles it took.
  task automatic issue(ce_instr_t i, int cur_size, output int cycles);
    int np = (cur_size + 3) / 4;
    if (np == 0) np = 1;
    cycles = 0;
    @(negedge clk);
    instr_valid = 1;
    instr = i;
    do begin
      #1;
      if (cycles == 0) chk("ready at issue", instr_ready);
      else             chk("stall during pass", !instr_ready);
      chk("coeff_we",  coeff_we == (i.opcode == OP_LD_COEFF));
      chk("sreg_ld",   sreg_ld  == (i.opcode == OP_LD_2D));
      chk("st_out",    st_out   == (i.opcode == OP_ST_OUT));
      chk("st_simd",   st_simd  == (i.opcode == OP_ST_SIMD));
      chk("out_row",   out_row  == (i.opcode == OP_CONV_MAT));
      chk("rf_we",     rf_we == (i.opcode inside {OP_CONV_MAT, OP_LD_SIMD, OP_SIMD}));
      case (i.opcode)
        OP_LD_COEFF: chk("coeff row/data", coeff_row == i.a[3:0] && ld_data == i.data);
        OP_LD_2D:    chk("ld fields", sreg_shift == i.shift && sreg_seg == i.seg && ld_data == i.data && !sreg_rot);
        OP_CONV_2D: begin
          chk("2d mode", mode == MODE_2D && pass == 2'(cycles));
          chk("2d out write", out_we == 4'b0001 && out_idx[0] == i.a[3:0] && !out_part);
          chk("2d acc", out_acc == (cycles != 0));
          chk("2d rotate", sreg_rot == (i.rotate && cycles == np - 1));
        end
        OP_CONV_1DH, OP_CONV_1DV: begin
          chk("1d mode", mode == ((i.opcode == OP_CONV_1DH) ? MODE_1DH : MODE_1DV) && base == i.b[3:0]);
          chk("1d out", out_we == 4'b1111 && out_part && !out_acc);
          for (int g = 0; g < 4; g++) chk("1d idx", out_idx[g] == 4'(i.a + 4 * g));
          chk("1d rotate", sreg_rot == i.rotate);
        end
        OP_CONV_MAT: chk("mat", mode == MODE_MAT && rf_wsel == 2'd1 && rf_waddr == i.a && base == i.b[3:0]);
        OP_LD_SIMD:  chk("ld simd", rf_wsel == 2'd0 && rf_waddr == i.a && ld_data == i.data);
        OP_ST_SIMD:  chk("st simd", rf_raddr0 == i.a);
        OP_SIMD:     chk("simd", rf_wsel == 2'd2 && rf_waddr == i.a && rf_raddr0 == i.b && rf_raddr1 == i.c && simd_op == i.simd_op);
        default: chk("idle datapath", out_we == 0 && !sreg_rot);
      endcase
      cycles++;
      @(negedge clk);
    end while (!instr_ready);
    instr_valid = 0;
  endtask

  initial begin
    int cyc;
    int cur_size;
    instr_valid = 0;
    instr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1;
    chk("reset config", map_op == MAP_ABSDIFF && red_op == RED_ADD && size == 5'd16);
    chk("idle", !coeff_we && !sreg_ld && !sreg_rot && out_we == 0 && !rf_we && !st_out && !st_simd && instr_ready);
    cur_size = 16;
    for (int n = 0; n < 400; n++) begin
      automatic ce_instr_t i = rnd(opcode_e'($urandom % 13));
      issue(i, cur_size, cyc);
      if (i.opcode == OP_CONV_2D) chk("2d cycle count", cyc == (cur_size + 3) / 4);
      else                        chk("single cycle", cyc == 1);
      if (i.opcode == OP_SET_OPS) begin
        #1 chk("set ops", map_op == i.map_op && red_op == i.red_op);
      end
      if (i.opcode == OP_SET_SIZE) begin
        cur_size = int'(i.size);
        #1 chk("set size", size == i.size);
      end
      // idle cycle with no instruction: no side effects
      if (n % 7 == 0) begin
        #1 chk("no valid, no effect", !coeff_we && !sreg_ld && !sreg_rot && out_we == 0 && !rf_we && !st_out && !st_simd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
