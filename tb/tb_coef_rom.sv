// tb_coef_rom: checks every ROM word on every port, with and without the
// negate flag, against the constant computed here from its trigonometric
// definition (within one LSB of the 2**30 scale).
module tb_coef_rom;
  import sbdct_pkg::*;
  localparam int CW = 32, FRAC = 30;
  localparam real PI = 3.14159265358979323846;
  ksel_t [3:0]         sel;
  logic  [3:0][CW-1:0] z;
  int checks = 0, failures = 0;

  coef_rom #(.CW(CW), .FRAC(FRAC)) dut (.sel, .z);

  function automatic real kval(int a);
    real c8, s8, c1, s1, c3, s3;
    c8 = $cos(PI / 8); s8 = $sin(PI / 8);
    c1 = $cos(PI / 16); s1 = $sin(PI / 16);
    c3 = $cos(3 * PI / 16); s3 = $sin(3 * PI / 16);
    case (a)
      0: return c8;      1: return s8;
      2: return c1 * c8; 3: return c1 * s8;
      4: return s1 * c8; 5: return s1 * s8;
      6: return c3 * c8; 7: return c3 * s8;
      8: return s3 * c8; default: return s3 * s8;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 10; a++) begin
      for (int n = 0; n < 2; n++) begin
        for (int p = 0; p < 4; p++) begin
          sel[p].addr = kaddr_e'(4'((a + p) % 10));
          sel[p].neg  = n[0];
        end
        #1;
        for (int p = 0; p < 4; p++) begin
          real e, g;
          e = kval((a + p) % 10) * (2.0 ** FRAC) * (n ? -1.0 : 1.0);
          g = real'($signed(z[p]));
          checks++;
          if (g - e > 1.0 || e - g > 1.0) begin
            failures++;
            $display("FAIL: addr %0d neg %0d port %0d: %0d expected %f", (a + p) % 10, n, p, $signed(z[p]), e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
