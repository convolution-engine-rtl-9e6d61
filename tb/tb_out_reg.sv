// Self-checking testbench for out_reg: random writes on up to four ports to
// distinct entries, overwriting, accumulating by addition or by logic AND,
// and whole-register row writes, compared with a reference
// array after every cycle.
module tb_out_reg;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] we;
  logic acc, land;
  logic [3:0][3:0] idx;
  acc_t [3:0] wdata;
  logic row_we;
  acc_t [15:0] row_data;
  acc_t [15:0] rd_data;
  int checks = 0, failures = 0;
  int model [16];

  out_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; acc = 0; land = 0; row_we = 0; row_data = '0; idx = '0; wdata = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int first;
      @(negedge clk);
      acc   = 1'($urandom);
      land  = ($urandom % 4) == 0;
      first = $urandom % 16;
      for (int p = 0; p < 4; p++) begin
        we[p]    = 1'($urandom);
        idx[p]   = 4'(first + 4 * p);   // distinct entries
        wdata[p] = land ? acc_t'($urandom % 2) : acc_t'($urandom % 100000) - 50000;
      end
      row_we = ($urandom % 8) == 0;
      for (int k = 0; k < 16; k++) row_data[k] = acc_t'($urandom % 4000) - 2000;
      if (row_we) begin
        we = '0;
        for (int k = 0; k < 16; k++) model[k] = int'(row_data[k]);
      end
      for (int p = 0; p < 4; p++)
        if (we[p]) begin
          if (!acc)      model[idx[p]] = int'(wdata[p]);
          else if (land) model[idx[p]] = (model[idx[p]] != 0 && wdata[p] != 0) ? 1 : 0;
          else           model[idx[p]] = model[idx[p]] + int'(wdata[p]);
        end
      @(posedge clk); #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(rd_data[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("entry %0d got %0d exp %0d", i, rd_data[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
