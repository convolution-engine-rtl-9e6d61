// Self-checking testbench for reduce_unit: random signed lane values and
// lane masks for add, logic AND and none; the full reduction and the four
// 16-lane group reductions are compared with sums and loops in the bench.
module tb_reduce_unit;
  import ce_pkg::*;
  red_op_e op;
  map_t [63:0] x;
  logic [63:0] active;
  acc_t total;
  acc_t [3:0] part;
  int checks = 0, failures = 0;

  reduce_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s %s got %0d exp %0d", op.name(), what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      int et, ep [4];
      op = red_op_e'(n % 3);
      for (int l = 0; l < 64; l++) begin
        automatic int v = int'($urandom % 2097152) - 1048576;
        if (n % 5 == 1) v = (l % 9 == 0) ? 0 : 1;
        if (n % 5 == 2) v = 1;
        x[l] = map_t'(v);
        active[l] = (n % 4 == 0) ? 1'b1 : 1'($urandom);
      end
      #1;
      et = (op == RED_AND) ? 1 : 0;
      foreach (ep[g]) ep[g] = et;
      for (int l = 0; l < 64; l++) begin
        automatic int v = int'(x[l]);
        if (op == RED_ADD && active[l]) begin et += v; ep[l/16] += v; end
        if (op == RED_AND && active[l] && v == 0) begin et = 0; ep[l/16] = 0; end
      end
      chk("total", int'(total), et);
      for (int g = 0; g < 4; g++) chk($sformatf("part%0d", g), int'(part[g]), ep[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
