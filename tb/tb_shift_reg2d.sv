// Self-checking testbench for shift_reg2d. A reference array is updated by
// the document's two movements: a load of 16 pixels into one half of the
// bottom row (after an optional shift up of all rows) and a left rotate with
// wrap-around. It also replays the SAD example: after loading 16 rows of a
// 32-wide window and rotating 16 times, columns 0..15 must hold the former
// columns 16..31.
module tb_shift_reg2d;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_en, ld_shift, ld_seg, rot_en;
  pix_t [15:0] ld_data;
  pix_t [15:0][31:0] rd_data;
  int checks = 0, failures = 0;
  int model [16][32];
  int tmp [16][32];

  shift_reg2d dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 32; j++) begin
        checks++;
        if (int'(rd_data[i][j]) != model[i][j]) begin
          failures++;
          if (failures < 10) $display("mismatch [%0d][%0d] got %0d exp %0d", i, j, rd_data[i][j], model[i][j]);
        end
      end
  endtask

  task automatic step(bit ld, bit sh, bit sg, bit rot);
    @(negedge clk);
    ld_en = ld; ld_shift = sh; ld_seg = sg; rot_en = rot;
    for (int j = 0; j < 16; j++) ld_data[j] = pix_t'($urandom);
    tmp = model;
    if (ld) begin
      if (sh) for (int i = 0; i < 15; i++) tmp[i] = model[i+1];
      for (int j = 0; j < 16; j++) tmp[15][16*int'(sg) + j] = int'(ld_data[j]);
    end else if (rot) begin
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 32; j++) tmp[i][j] = model[i][(j+1) % 32];
    end
    model = tmp;
    @(posedge clk); #1;
    ld_en = 0; rot_en = 0;
    compare();
  endtask

  initial begin
    ld_en = 0; ld_shift = 0; ld_seg = 0; rot_en = 0; ld_data = '0;
    foreach (model[i, j]) model[i][j] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    // SAD-style window fill: 16 rows, each two halves
    for (int r = 0; r < 16; r++) begin
      step(1, 1, 0, 0);
      step(1, 0, 1, 0);
    end
    begin
      int right [16][16];
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) right[i][j] = model[i][16+j];
      for (int x = 0; x < 16; x++) step(0, 0, 0, 1);
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) begin
        checks++;
        if (int'(rd_data[i][j]) != right[i][j]) failures++;
      end
    end
    // random mix, including load and rotate requested together
    for (int n = 0; n < 150; n++)
      step(($urandom % 3) == 0, $urandom % 2, $urandom % 2, $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
