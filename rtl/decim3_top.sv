// decim3_top: three-stage FIR decimation filter for audio, total decimation factor 32.
//
// Brings 256 kHz input samples down to an 8 kHz output carrying the 0-3.4 kHz speech band, in
// three low-pass-and-down-sample stages: a short filter (order 25, 26 taps) with M1 = 8, then
// order 69 (70 taps) with M2 = 2, then order 136 (137 taps) with M3 = 2. Splitting the
// decimation lets the early stages use wide transition bands and therefore short filters:
// 233 coefficients in total instead of the 901 of a single-stage design with the same final
// transition band.
//
// Interface: 16-bit two's-complement samples with valid/ready on input and output.
// sat_event[i] pulses when stage i+1 clipped a result that went on to its down-sampler.
// Timing: each stage's MAC needs NTAPS+3 clocks per input word; the first stage, 29 clocks, is
// the limit at the input, so a clock of 29 x 256 kHz = 7.4 MHz or more keeps up with a 256 kHz
// input without back-pressure (stages 2 and 3 see 1/8 and 1/16 of the input rate).
//
// Stage count, factors, filter orders, the 3.4 kHz pass band and the first two stop-band edges
// follow the filter specification. The coefficient values, the 4 kHz stop edge of stage 3
// (the specification's 8 kHz is the Nyquist frequency of that stage), the word widths,
// rounding/saturation and the handshakes are this implementation's choice. Each coefficient
// set is designed for the rate its stage actually runs at (256, 32 and 16 kHz).
module decim3_top
  import decim_pkg::*;
#(
  parameter int unsigned N1 = 26,  // stage 1 taps (order 25)
  parameter int unsigned N2 = 70,  // stage 2 taps (order 69)
  parameter int unsigned N3 = 137, // stage 3 taps (order 136)
  parameter int unsigned M1 = 8,
  parameter int unsigned M2 = 2,
  parameter int unsigned M3 = 2,
  parameter string COEF1 = "rtl/coef_s1.hex",
  parameter string COEF2 = "rtl/coef_s2.hex",
  parameter string COEF3 = "rtl/coef_s3.hex"
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  sample_t    in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output sample_t    out_data,
  output logic [2:0] sat_event
);

  logic    v1, r1, v2, r2;
  sample_t d1, d2;

  decim_stage #(.NTAPS(N1), .M(M1), .COEF_FILE(COEF1)) u_stage1 (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid (v1), .out_ready (r1), .out_data (d1),
    .sat_event (sat_event[0])
  );

  decim_stage #(.NTAPS(N2), .M(M2), .COEF_FILE(COEF2)) u_stage2 (
    .clk, .rst_n,
    .in_valid  (v1), .in_ready  (r1), .in_data  (d1),
    .out_valid (v2), .out_ready (r2), .out_data (d2),
    .sat_event (sat_event[1])
  );

  decim_stage #(.NTAPS(N3), .M(M3), .COEF_FILE(COEF3)) u_stage3 (
    .clk, .rst_n,
    .in_valid  (v2), .in_ready  (r2), .in_data  (d2),
    .out_valid, .out_ready, .out_data,
    .sat_event (sat_event[2])
  );

endmodule
