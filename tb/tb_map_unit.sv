// Self-checking testbench for map_unit: random pixels and coefficients
// (including the extremes 0 and 1023) for every map operation, compared with
// integer arithmetic. Multiply reads the coefficient as a signed 10-bit tap.
module tb_map_unit;
  import ce_pkg::*;
  map_op_e op;
  pix_t [63:0] a, b;
  map_t [63:0] y;
  int checks = 0, failures = 0;

  map_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_map(map_op_e o, int x, int c);
    int sc = (c >= 512) ? c - 1024 : c;
    case (o)
      MAP_ABSDIFF: return (x > c) ? x - c : c - x;
      MAP_MUL:     return x * sc;
      MAP_AVG:     return (x + c + 1) / 2;
      MAP_SUB:     return x - c;
      MAP_CMP:     return (x > c) ? 1 : 0;
      default:     return x;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 120; n++) begin
      op = map_op_e'(n % 6);
      for (int l = 0; l < 64; l++) begin
        a[l] = (n % 7 == 0) ? pix_t'((l % 2) ? 1023 : 0) : pix_t'($urandom);
        b[l] = (n % 11 == 0) ? pix_t'((l % 3) ? 1023 : 512) : pix_t'($urandom);
      end
      #1;
      for (int l = 0; l < 64; l++) begin
        automatic int e = ref_map(op, int'(a[l]), int'(b[l]));
        checks++;
        if (int'(y[l]) != e) begin
          failures++;
          if (failures < 10) $display("%s lane %0d a=%0d b=%0d got %0d exp %0d", op.name(), l, a[l], b[l], y[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
