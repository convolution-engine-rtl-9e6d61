// Self-checking testbench for operand_if. Random register contents; for each
// data-flow mode the 64 selected operand pairs and the lane mask are compared
// with a reference that walks the stencil coordinates directly.
module tb_operand_if;
  import ce_pkg::*;
  mode_e mode;
  logic [4:0] size;
  logic [1:0] pass;
  logic [3:0] base;
  pix_t [15:0][31:0] sreg;
  pix_t [15:0][15:0] creg;
  pix_t [63:0] a, b;
  logic [63:0] active;
  int checks = 0, failures = 0;

  operand_if dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lane(int l, int ea, int eb, bit eact);
    checks++;
    if (int'(a[l]) != ea || int'(b[l]) != eb || active[l] != eact) begin
      failures++;
      if (failures < 10) $display("mode %s lane %0d: got a=%0d b=%0d act=%0b exp a=%0d b=%0d act=%0b",
                                  mode.name(), l, a[l], b[l], active[l], ea, eb, eact);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 16; i++) for (int j = 0; j < 32; j++) sreg[i][j] = pix_t'($urandom);
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) creg[i][j] = pix_t'($urandom);
      mode = mode_e'(n % 4);
      size = 5'(1 + $urandom % 16);
      pass = 2'($urandom);
      base = 4'($urandom);
      #1;
      for (int row = 0; row < 4; row++)
        for (int k = 0; k < 16; k++) begin
          automatic int l = row * 16 + k;
          case (mode)
            MODE_2D: begin
              automatic int r = 4 * int'(pass) + row;
              expect_lane(l, sreg[r][k], creg[r][k], (r < size) && (k < size));
            end
            MODE_1DH: expect_lane(l, sreg[(int'(base) + row) % 16][k], creg[0][k], k < size);
            MODE_1DV: expect_lane(l, sreg[k][int'(base) + row], creg[0][k], k < size);
            default:  expect_lane(l, sreg[base][k], creg[base][k], row == 0);
          endcase
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
