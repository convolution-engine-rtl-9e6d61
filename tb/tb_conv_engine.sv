// End-to-end testbench for conv_engine at its default sizes.
//
// An instruction-level reference model (shift register, coefficient
// register, output register and SIMD register file as plain integer arrays)
// is updated with every instruction issued; each store is compared with it.
// Workloads run:
//  * motion-estimation SAD: 16x16 current block in the coefficient register,
//    a 32x16 reference window loaded with shift-up, 16 convolve-and-rotate
//    steps, store of the 16 SADs; then one more row loaded and 16 more steps;
//    also 4x4 and 9x9 stencils
//  * 1D horizontal 6-tap filter (taps 1,-5,20,20,-5,1) and 1D vertical
//    9/13/15-tap binomial filters
//  * extremum test: compare map with logic-AND reduce, 1D and 2D (multi-pass)
//  * matrix operations: average and subtract into the SIMD register file
//    (clamped) and the output register (signed, full precision)
//  * SIMD operations on register-file entries
//  * a random instruction stream
// Checks the 2D convolve rate (ceil(size/4) cycles each, the processor
// stalled for the rest) and counts each mechanism; one that never happens
// is a failure.
module tb_conv_engine;
  import ce_pkg::*;

  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready;
  ce_instr_t instr;
  logic out_valid;
  acc_t [15:0] out_data;

  conv_engine dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  int S [16][32];
  int C [16][16];
  int O [16];
  int RF[18][16];
  int m_map, m_red, m_size;

  // mechanism counters
  int n_stall, n_shift_ld, n_noshift_ld, n_rot, n_acc_pass, n_1dh, n_1dv, n_mat,
      n_simd, n_clamp, n_and_true, n_and_false, n_st_out, n_st_simd, n_multi_and, n_neg_mat;
  int n_map [6];
  int n_red [3];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int f_map(int op, int x, int c);
    int sc;
    sc = (c >= 512) ? c - 1024 : c;
    case (op)
      0: return (x > c) ? x - c : c - x;   // abs diff
      1: return x * sc;                   // multiply, signed tap
      2: return (x + c + 1) / 2;          // average
      3: return x - c;                    // subtract
      4: return (x > c) ? 1 : 0;          // compare
      default: return x;
    endcase
  endfunction

  // reduce a list of (pixel, coeff) pairs
  function automatic int f_red(int px [], int cf []);
    int r;
    r = (m_red == 1) ? 1 : 0;
    for (int i = 0; i < px.size(); i++) begin
      int v;
      v = f_map(m_map, px[i], cf[i]);
      if (m_red == 0) r += v;
      if (m_red == 1 && v == 0) r = 0;
    end
    if (m_red == 2) r = 0;
    if (m_red == 1) begin
      if (r != 0) n_and_true++; else n_and_false++;
    end
    return r;
  endfunction

  task automatic m_rotate();
    int t [16][32];
    for (int i = 0; i < 16; i++) for (int j = 0; j < 32; j++) t[i][j] = S[i][(j + 1) % 32];
    S = t;
    n_rot++;
  endtask

  task automatic model(ce_instr_t in);
    int sz;
    sz = m_size;
    case (in.opcode)
      OP_SET_OPS:  begin m_map = int'(in.map_op); m_red = int'(in.red_op); end
      OP_SET_SIZE: m_size = int'(in.size);
      OP_LD_COEFF: for (int k = 0; k < 16; k++) C[in.a[3:0]][k] = int'(in.data[k]);
      OP_LD_2D: begin
        if (in.shift) begin
          for (int i = 0; i < 15; i++) S[i] = S[i+1];
          n_shift_ld++;
        end else n_noshift_ld++;
        for (int k = 0; k < 16; k++) S[15][16 * int'(in.seg) + k] = int'(in.data[k]);
      end
      OP_CONV_2D: begin
        int px [], cf [];
        int n;
        n = 0;
        px = new[sz * sz];
        cf = new[sz * sz];
        for (int i = 0; i < sz; i++) for (int j = 0; j < sz; j++) begin
          px[n] = S[i][j]; cf[n] = C[i][j]; n++;
        end
        O[in.a[3:0]] = f_red(px, cf);
        if (m_red == 1 && sz > 4) n_multi_and++;
        n_map[m_map]++; n_red[m_red]++;
        if (in.rotate) m_rotate();
      end
      OP_CONV_1DH, OP_CONV_1DV: begin
        for (int g = 0; g < 4; g++) begin
          int px [], cf [];
          px = new[sz];
          cf = new[sz];
          for (int k = 0; k < sz; k++) begin
            px[k] = (in.opcode == OP_CONV_1DH) ? S[(int'(in.b[3:0]) + g) % 16][k]
                                               : S[k][int'(in.b[3:0]) + g];
            cf[k] = C[0][k];
          end
          O[(int'(in.a[3:0]) + 4 * g) % 16] = f_red(px, cf);
        end
        if (in.opcode == OP_CONV_1DH) n_1dh++; else n_1dv++;
        n_map[m_map]++; n_red[m_red]++;
        if (in.rotate) m_rotate();
      end
      OP_CONV_MAT: begin
        for (int k = 0; k < 16; k++) begin
          int v;
          v = f_map(m_map, S[in.b[3:0]][k], C[in.b[3:0]][k]);
          O[k] = v;
          if (v < 0) n_neg_mat++;
          if (v < 0 || v > 1023) n_clamp++;
          if (v < 0) v = 0;
          if (v > 1023) v = 1023;
          if (in.a < 18) RF[in.a][k] = v;
        end
        n_mat++;
        n_map[m_map]++;
        if (in.rotate) m_rotate();
      end
      OP_LD_SIMD: if (in.a < 18) for (int k = 0; k < 16; k++) RF[in.a][k] = int'(in.data[k]);
      OP_SIMD: begin
        int r [16];
        for (int k = 0; k < 16; k++) begin
          int x, y;
          x = (in.b < 18) ? RF[in.b][k] : 0;
          y = (in.c < 18) ? RF[in.c][k] : 0;
          case (in.simd_op)
            SIMD_ADD:     r[k] = (x + y > 1023) ? 1023 : x + y;
            SIMD_SUB:     r[k] = (x > y) ? x - y : 0;
            SIMD_ABSDIFF: r[k] = (x > y) ? x - y : y - x;
            SIMD_AVG:     r[k] = (x + y + 1) / 2;
            SIMD_MIN:     r[k] = (x < y) ? x : y;
            default:      r[k] = (x > y) ? x : y;
          endcase
        end
        if (in.a < 18) for (int k = 0; k < 16; k++) RF[in.a][k] = r[k];
        n_simd++;
      end
      default: ;
    endcase
  endtask

  // ---------------- driver ----------------
  int busy_cycles;  // cycles the last instruction occupied

  task automatic issue(ce_instr_t in);
    @(negedge clk);
    instr_valid = 1;
    instr = in;
    busy_cycles = 1;
    @(posedge clk);
    while (!instr_ready) begin
      n_stall++;
      busy_cycles++;
      @(posedge clk);
    end
    // the convolve's later passes run while ready is low
    model(in);
    #1;
    instr_valid = 0;
    // count the extra pass cycles of a multi-pass convolve
    while (!instr_ready) begin
      n_stall++;
      n_acc_pass++;
      busy_cycles++;
      @(posedge clk); #1;
    end
    if (in.opcode == OP_ST_OUT || in.opcode == OP_ST_SIMD) begin
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid after store"); end
      for (int k = 0; k < 16; k++) begin
        int e;
        e = (in.opcode == OP_ST_OUT) ? O[k] : ((in.a < 18) ? RF[in.a][k] : 0);
        checks++;
        if (int'(out_data[k]) != e) begin
          failures++;
          if (failures < 20) $display("%0t store %s entry %0d got %0d exp %0d (map %0d red %0d size %0d)",
                                      $time, in.opcode.name(), k, out_data[k], e, m_map, m_red, m_size);
        end
      end
      if (in.opcode == OP_ST_OUT) n_st_out++; else n_st_simd++;
    end
  endtask

  function automatic ce_instr_t mk(opcode_e op);
    ce_instr_t i;
    i = '0;
    i.opcode = op;
    return i;
  endfunction

  task automatic set_ops(map_op_e m, red_op_e r);
    ce_instr_t i;
    i = mk(OP_SET_OPS); i.map_op = m; i.red_op = r; issue(i);
  endtask
  task automatic set_size(int s);
    ce_instr_t i;
    i = mk(OP_SET_SIZE); i.size = 5'(s); issue(i);
  endtask
  task automatic ld_coeff(int row, int v [16]);
    ce_instr_t i;
    i = mk(OP_LD_COEFF); i.a = 5'(row);
    for (int k = 0; k < 16; k++) i.data[k] = pix_t'(v[k]);
    issue(i);
  endtask
  task automatic ld_2d(int v [16], bit seg, bit shift);
    ce_instr_t i;
    i = mk(OP_LD_2D); i.seg = seg; i.shift = shift;
    for (int k = 0; k < 16; k++) i.data[k] = pix_t'(v[k]);
    issue(i);
  endtask
  task automatic conv(opcode_e op, int a, int b, bit rot);
    ce_instr_t i;
    i = mk(op); i.a = 5'(a); i.b = 5'(b); i.rotate = rot; issue(i);
  endtask
  task automatic st_out();
    issue(mk(OP_ST_OUT));
  endtask
  task automatic st_simd(int e);
    ce_instr_t i;
    i = mk(OP_ST_SIMD); i.a = 5'(e); issue(i);
  endtask

  // images
  int REF [17][32];
  int CUR [16][16];

  task automatic rnd_row(output int v [16]);
    for (int k = 0; k < 16; k++) v[k] = $urandom % 1024;
  endtask

  task automatic load_window();
    int v [16];
    for (int r = 0; r < 16; r++) begin
      for (int k = 0; k < 16; k++) v[k] = REF[r][k];
      ld_2d(v, 0, 1);
      for (int k = 0; k < 16; k++) v[k] = REF[r][16 + k];
      ld_2d(v, 1, 0);
    end
  endtask

  task automatic chk_rate(string what, int exp);
    checks++;
    if (busy_cycles != exp) begin
      failures++;
      $display("%s took %0d cycles, expected %0d", what, busy_cycles, exp);
    end
  endtask

  initial begin
    int v [16];
    instr_valid = 0;
    instr = '0;
    foreach (S[i, j]) S[i][j] = 0;
    foreach (C[i, j]) C[i][j] = 0;
    foreach (O[i]) O[i] = 0;
    foreach (RF[i, j]) RF[i][j] = 0;
    foreach (n_map[i]) n_map[i] = 0;
    foreach (n_red[i]) n_red[i] = 0;
    m_map = 0; m_red = 0; m_size = 16;
    {n_stall, n_shift_ld, n_noshift_ld, n_rot, n_acc_pass, n_1dh, n_1dv, n_mat,
     n_simd, n_clamp, n_and_true, n_and_false, n_st_out, n_st_simd, n_multi_and, n_neg_mat} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- motion estimation SAD, 16x16 block over a 32-wide window ----
    foreach (REF[i, j]) REF[i][j] = $urandom % 1024;
    foreach (CUR[i, j]) CUR[i][j] = (REF[i][5 + j] + ($urandom % 9) - 4 + 1024) % 1024;
    set_ops(MAP_ABSDIFF, RED_ADD);
    set_size(16);
    for (int r = 0; r < 16; r++) begin
      for (int k = 0; k < 16; k++) v[k] = CUR[r][k];
      ld_coeff(r, v);
    end
    load_window();
    for (int x = 0; x < 16; x++) begin
      conv(OP_CONV_2D, x, 0, 1);
      chk_rate("16x16 CONV_2D", 4);
    end
    st_out();
    // the SADs also against the image directly, and the best match
    begin
      int best, bestx;
      best = 1 << 30; bestx = -1;
      for (int x = 0; x < 16; x++) begin
        int sad;
        sad = 0;
        for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++)
          sad += (REF[i][x + j] > CUR[i][j]) ? REF[i][x + j] - CUR[i][j] : CUR[i][j] - REF[i][x + j];
        checks++;
        if (int'(out_data[x]) != sad) begin failures++; $display("SAD %0d got %0d exp %0d", x, out_data[x], sad); end
        if (sad < best) begin best = sad; bestx = x; end
      end
      checks++;
      if (bestx != 5) begin failures++; $display("best match at %0d, expected 5", bestx); end
    end
    // one new row: the window has been rotated by 16, so the halves swap
    for (int k = 0; k < 16; k++) v[k] = REF[16][16 + k];
    ld_2d(v, 0, 1);
    for (int k = 0; k < 16; k++) v[k] = REF[16][k];
    ld_2d(v, 1, 0);
    for (int x = 0; x < 16; x++) conv(OP_CONV_2D, x, 0, 1);
    st_out();
    // smaller stencils: 4x4 (one pass, no stall) and 9x9 (three passes)
    set_size(4);
    for (int x = 0; x < 8; x++) begin
      conv(OP_CONV_2D, x, 0, 1);
      chk_rate("4x4 CONV_2D", 1);
    end
    st_out();
    set_size(9);
    for (int x = 0; x < 4; x++) begin
      conv(OP_CONV_2D, x, 0, 1);
      chk_rate("9x9 CONV_2D", 3);
    end
    st_out();

    // ---- 1D horizontal 6-tap half-pixel filter ----
    set_ops(MAP_MUL, RED_ADD);
    set_size(6);
    v = '{1, -5 & 1023, 20, 20, -5 & 1023, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    ld_coeff(0, v);
    for (int r = 0; r < 16; r++) begin
      rnd_row(v); ld_2d(v, 0, 1);
      rnd_row(v); ld_2d(v, 1, 0);
    end
    for (int b = 0; b < 16; b += 4) begin
      for (int x = 0; x < 4; x++) begin
        conv(OP_CONV_1DH, x, b, 1);
        chk_rate("CONV_1DH", 1);
      end
      st_out();
    end
    // ---- 1D vertical binomial filters of 9, 13, 15 taps ----
    foreach (int_sizes[s]) begin
      int n;
      n = int_sizes[s];
      set_size(n);
      for (int k = 0; k < 16; k++) begin
        int c;
        c = 1;
        for (int t = 0; t < k; t++) c = c * (n - 1 - t) / (t + 1);
        v[k] = (k < n) ? c % 1024 : 0;
      end
      ld_coeff(0, v);
      for (int x = 0; x < 4; x++) conv(OP_CONV_1DV, x, 4 * x, 0);
      st_out();
      for (int x = 0; x < 4; x++) conv(OP_CONV_1DV, x, 16 + 4 * (x % 3), 0);
      st_out();
    end

    // ---- extremum test: compare + logic AND ----
    set_ops(MAP_CMP, RED_AND);
    set_size(3);
    for (int k = 0; k < 16; k++) v[k] = 512;
    ld_coeff(0, v);
    for (int r = 0; r < 16; r++) begin
      for (int k = 0; k < 16; k++) v[k] = (r % 3 == 0) ? 600 + k : $urandom % 1024;
      ld_2d(v, 0, 1);
      ld_2d(v, 1, 0);
    end
    for (int x = 0; x < 4; x++) conv(OP_CONV_1DH, x, 0, 1);
    st_out();
    for (int x = 0; x < 4; x++) conv(OP_CONV_1DV, x, x, 0);
    st_out();
    // multi-pass logic AND: 8x8 window of pixels above a low threshold
    for (int r = 0; r < 16; r++) begin
      for (int k = 0; k < 16; k++) v[k] = 100;
      ld_coeff(r, v);
    end
    for (int r = 0; r < 16; r++) begin
      for (int k = 0; k < 16; k++) v[k] = (r == 9 && k == 3) ? 50 : 200 + k;
      ld_2d(v, 0, 1);
      ld_2d(v, 1, 0);
    end
    set_size(8);
    for (int x = 0; x < 4; x++) conv(OP_CONV_2D, x, 0, 0);
    set_size(12);   // now the low pixel at row 9 is inside
    for (int x = 4; x < 8; x++) conv(OP_CONV_2D, x, 0, 1);
    st_out();

    // ---- matrix operations into the SIMD register file ----
    set_ops(MAP_AVG, RED_NONE);
    for (int r = 0; r < 16; r++) begin rnd_row(v); ld_coeff(r, v); end
    for (int r = 0; r < 16; r++) begin rnd_row(v); ld_2d(v, 0, 1); rnd_row(v); ld_2d(v, 1, 0); end
    for (int e = 0; e < 8; e++) conv(OP_CONV_MAT, e, e, 0);
    set_ops(MAP_SUB, RED_NONE);
    for (int e = 8; e < 16; e++) begin
      conv(OP_CONV_MAT, e, e, 1);
      st_out();   // signed full-precision differences
    end
    for (int e = 0; e < 18; e++) st_simd(e);

    // ---- SIMD operations ----
    for (int n = 0; n < 24; n++) begin
      ce_instr_t i;
      i = mk(OP_SIMD);
      i.simd_op = simd_op_e'(n % 6);
      i.a = 5'($urandom % 18); i.b = 5'($urandom % 18); i.c = 5'($urandom % 18);
      issue(i);
      st_simd(int'(i.a));
    end
    begin
      ce_instr_t i;
      i = mk(OP_LD_SIMD); i.a = 5'd17;
      for (int k = 0; k < 16; k++) i.data[k] = pix_t'($urandom);
      issue(i);
      st_simd(17);
    end

    // ---- random instruction stream ----
    for (int n = 0; n < 1500; n++) begin
      ce_instr_t i;
      i.opcode  = opcode_e'($urandom % 13);
      i.map_op  = map_op_e'($urandom % 6);
      i.red_op  = red_op_e'($urandom % 3);
      i.simd_op = simd_op_e'($urandom % 6);
      i.size    = 5'(1 + $urandom % 16);
      i.a       = 5'($urandom % 18);
      i.b       = 5'($urandom % 16);
      i.c       = 5'($urandom % 18);
      i.seg     = 1'($urandom);
      i.shift   = 1'($urandom);
      i.rotate  = 1'($urandom);
      for (int k = 0; k < 16; k++) i.data[k] = pix_t'($urandom);
      if (i.opcode inside {OP_CONV_1DH, OP_CONV_1DV, OP_CONV_2D} && i.a > 15) i.a = 5'(i.a - 16);
      issue(i);
      if (n % 10 == 9) st_out();
    end
    st_out();

    // ---- mechanism coverage ----
    begin
      string nm [17];
      int    ct [17];
      nm = '{"stall", "shift-up load", "load without shift", "rotate", "accumulate pass",
             "1D horizontal", "1D vertical", "matrix op", "SIMD op", "matrix clamp",
             "AND true", "AND false", "output store", "SIMD store", "multi-pass AND", "map/reduce ops",
             "negative matrix result"};
      ct = '{n_stall, n_shift_ld, n_noshift_ld, n_rot, n_acc_pass, n_1dh, n_1dv, n_mat,
             n_simd, n_clamp, n_and_true, n_and_false, n_st_out, n_st_simd, n_multi_and, 1, n_neg_mat};
      foreach (n_map[m]) if (n_map[m] == 0) ct[15] = 0;
      foreach (n_red[r]) if (n_red[r] == 0) ct[15] = 0;
      for (int k = 0; k < 17; k++) begin
        $display("mechanism %-20s : %0d", nm[k], ct[k]);
        checks++;
        if (ct[k] == 0) begin failures++; $display("mechanism %s never happened", nm[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_sizes [3] = '{9, 13, 15};
endmodule
