// coef_rom: read-only table of FIR coefficients, loaded at elaboration from a hex file.
//
// The file holds one two's-complement word per line, DEPTH lines, tap 0 first. The read is
// asynchronous (a LUT ROM): rdata follows addr in the same cycle.
//
// The three coefficient sets shipped with the decimator are low-pass designs with the orders and
// band edges of its specification, each designed for the rate its stage actually runs at, pass
// band 0-3.4 kHz:
//   coef_s1.hex  26 taps, fs 256 kHz, stop 28-128 kHz: equiripple (Parks-McClellan)
//   coef_s2.hex  70 taps, fs  32 kHz, stop 12-16 kHz: Kaiser-windowed sinc, cutoff 7.7 kHz,
//                beta 7.857 (80 dB); equiripple does not converge for so wide a transition
//   coef_s3.hex 137 taps, fs  16 kHz, stop  4-8 kHz: equiripple (Parks-McClellan)
// Equiripple weights are 1/dp and 1/ds with dp = 10^(0.033/20)-1 and ds = 10^(-40/20). Each set
// is scaled to unit DC gain and rounded to Q1.15: word = round(h[k] * 2^15).
module coef_rom #(
  parameter int unsigned DEPTH  = 26,
  parameter int unsigned WIDTH  = 16,
  parameter string       INIT_FILE = "rtl/coef_s1.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic signed [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] rom [DEPTH];

  initial $readmemh(INIT_FILE, rom);

  assign rdata = signed'(rom[addr]);

endmodule
