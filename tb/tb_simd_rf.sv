// Self-checking testbench for simd_rf: random writes (including entry
// numbers beyond the 18 that exist, which must be ignored) and random reads
// on both ports, compared with a reference array.
module tb_simd_rf;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [4:0] waddr, raddr0, raddr1;
  pix_t [15:0] wdata, rdata0, rdata1;
  int checks = 0, failures = 0;
  int model [18][16];

  simd_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rd(int e, int k);
    return (e < 18) ? model[e][k] : 0;
  endfunction

  initial begin
    we = 0; waddr = 0; raddr0 = 0; raddr1 = 0; wdata = '0;
    foreach (model[i, j]) model[i][j] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 5'($urandom % 20);
      for (int k = 0; k < 16; k++) wdata[k] = pix_t'($urandom);
      if (we && waddr < 18) for (int k = 0; k < 16; k++) model[waddr][k] = int'(wdata[k]);
      @(posedge clk); #1;
      we = 0;
      raddr0 = 5'($urandom % 20);
      raddr1 = 5'($urandom % 20);
      #1;
      for (int k = 0; k < 16; k++) begin
        checks += 2;
        if (int'(rdata0[k]) != rd(raddr0, k)) failures++;
        if (int'(rdata1[k]) != rd(raddr1, k)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
