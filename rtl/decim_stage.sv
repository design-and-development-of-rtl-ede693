// decim_stage: one stage of a multistage decimator -- low-pass FIR, then keep 1 sample in M.
//
// The chain is the one of each stage of the filter's block model:
//   fir_mac (MAC FIR, full precision) -> z1_reg (z^-1) -> fix_convert (round, saturate to
//   SAMPLE_W bits) -> down_sample (keep 1 in M).
// The FIR filters every input sample and the down-sampler then discards M-1 of every M
// results, as in the block model. All links use valid/ready, so a busy next stage back-pressures
// this one and, in the end, its input.
//
// Timing: one input sample per NTAPS+3 clocks at most (the MAC's rate); the first kept output
// appears NTAPS+3 clocks after the first input is accepted. sat_event pulses for one clock for
// each FIR result, kept or dropped by the down-sampler, that the convert had to clip.
// Coefficients come from COEF_FILE (Q1.15, see coef_rom); the Q1.15 scaling means the
// convert drops COEF_W-1 fraction bits.
module decim_stage
  import decim_pkg::*;
#(
  parameter int unsigned NTAPS     = 26,
  parameter int unsigned M         = 8,
  parameter string       COEF_FILE = "rtl/coef_s1.hex"
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data,
  output logic    sat_event
);

  localparam int unsigned AW = acc_width(SAMPLE_W, COEF_W, NTAPS);

  logic                 fir_valid, fir_ready;
  logic signed [AW-1:0] fir_data;
  logic                 reg_valid, reg_ready;
  logic [AW-1:0]        reg_data;
  logic                 cvt_valid, cvt_ready, cvt_sat;
  sample_t              cvt_data;

  fir_mac #(.NTAPS(NTAPS), .DW(SAMPLE_W), .CW(COEF_W), .COEF_FILE(COEF_FILE)) u_fir (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid (fir_valid), .out_ready (fir_ready), .out_data (fir_data)
  );

  z1_reg #(.W(AW)) u_reg (
    .clk, .rst_n,
    .in_valid  (fir_valid), .in_ready  (fir_ready), .in_data  (fir_data),
    .out_valid (reg_valid), .out_ready (reg_ready), .out_data (reg_data)
  );

  fix_convert #(.IN_W(AW), .OUT_W(SAMPLE_W), .SHIFT(COEF_W - 1)) u_cvt (
    .in_valid  (reg_valid), .in_ready  (reg_ready), .in_data  (signed'(reg_data)),
    .out_valid (cvt_valid), .out_ready (cvt_ready), .out_data (cvt_data),
    .sat       (cvt_sat)
  );

  down_sample #(.M(M), .W(SAMPLE_W)) u_ds (
    .clk, .rst_n,
    .in_valid  (cvt_valid), .in_ready  (cvt_ready), .in_data  (cvt_data),
    .out_valid, .out_ready, .out_data (out_data)
  );

  assign sat_event = cvt_valid && cvt_ready && cvt_sat;

endmodule
