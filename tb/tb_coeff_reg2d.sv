// Self-checking testbench for coeff_reg2d: checks reset clears the array,
// then writes random rows in random order and compares every element with a
// reference array after each write.
module tb_coeff_reg2d;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [3:0] wr_row;
  pix_t [15:0] wr_data;
  pix_t [15:0][15:0] rd_data;
  int checks = 0, failures = 0;
  int model [16][16];

  coeff_reg2d dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (int'(rd_data[i][j]) != model[i][j]) begin
          failures++;
          if (failures < 10) $display("mismatch [%0d][%0d] got %0d exp %0d", i, j, rd_data[i][j], model[i][j]);
        end
      end
  endtask

  initial begin
    wr_en = 0; wr_row = 0; wr_data = '0;
    foreach (model[i, j]) model[i][j] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      wr_en  = ($urandom % 4) != 0;
      wr_row = 4'($urandom);
      for (int j = 0; j < 16; j++) wr_data[j] = pix_t'($urandom);
      if (wr_en) for (int j = 0; j < 16; j++) model[wr_row][j] = int'(wr_data[j]);
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
