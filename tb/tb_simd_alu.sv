// Self-checking testbench for simd_alu: random and extreme pixel pairs for
// every operation, compared with integer arithmetic.
module tb_simd_alu;
  import ce_pkg::*;
  simd_op_e op;
  pix_t [15:0] a, b, y;
  int checks = 0, failures = 0;

  simd_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_op(simd_op_e o, int x, int c);
    case (o)
      SIMD_ADD:     return (x + c > 1023) ? 1023 : x + c;
      SIMD_SUB:     return (x > c) ? x - c : 0;
      SIMD_ABSDIFF: return (x > c) ? x - c : c - x;
      SIMD_AVG:     return (x + c + 1) / 2;
      SIMD_MIN:     return (x < c) ? x : c;
      default:      return (x > c) ? x : c;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      op = simd_op_e'(n % 6);
      for (int k = 0; k < 16; k++) begin
        a[k] = (n % 7 == 3) ? 10'd1023 : pix_t'($urandom);
        b[k] = (n % 5 == 2) ? 10'd1000 : pix_t'($urandom);
      end
      #1;
      for (int k = 0; k < 16; k++) begin
        automatic int e = ref_op(op, int'(a[k]), int'(b[k]));
        checks++;
        if (int'(y[k]) != e) begin
          failures++;
          if (failures < 10) $display("%s lane %0d a=%0d b=%0d got %0d exp %0d", op.name(), k, a[k], b[k], y[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
