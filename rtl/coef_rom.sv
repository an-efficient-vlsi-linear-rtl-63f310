// coef_rom: the 10-word constant ROM of the multiplier array, with four
// signed read ports (one per multiplier).
//
// The words are the magnitudes of the ten distinct constants of Fh, in
// signed fixed point with FRAC fraction bits:
//   c8, s8, c1*c8, c1*s8, s1*c8, s1*s8, c3*c8, c3*s8, s3*c8, s3*s8
// where cN/sN = cos/sin(N*pi/16) and c8/s8 = cos/sin(pi/8). Each port also
// takes a negate flag, so a port returns +word or -word. The values are
// computed at elaboration from $cos/$sin and rounded to nearest (real-to-integer cast).
// Purely combinational.
module coef_rom
  import sbdct_pkg::*;
#(
  parameter int unsigned CW   = 32,
  parameter int unsigned FRAC = 30
) (
  input  ksel_t [3:0]         sel,
  output logic  [3:0][CW-1:0] z
);
  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [CW-1:0] fx(input real v);
    return CW'(longint'(v * (2.0 ** FRAC)));
  endfunction

  localparam real C8 = $cos(PI / 8.0);
  localparam real S8 = $sin(PI / 8.0);
  localparam real C1 = $cos(PI / 16.0);
  localparam real S1 = $sin(PI / 16.0);
  localparam real C3 = $cos(3.0 * PI / 16.0);
  localparam real S3 = $sin(3.0 * PI / 16.0);

  logic signed [CW-1:0] rom [NCOEF];

  always_comb begin
    rom[K_C8]   = fx(C8);
    rom[K_S8]   = fx(S8);
    rom[K_C1C8] = fx(C1 * C8);
    rom[K_C1S8] = fx(C1 * S8);
    rom[K_S1C8] = fx(S1 * C8);
    rom[K_S1S8] = fx(S1 * S8);
    rom[K_C3C8] = fx(C3 * C8);
    rom[K_C3S8] = fx(C3 * S8);
    rom[K_S3C8] = fx(S3 * C8);
    rom[K_S3S8] = fx(S3 * S8);
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      z[i] = sel[i].neg ? -rom[sel[i].addr] : rom[sel[i].addr];
    end
  end
endmodule
