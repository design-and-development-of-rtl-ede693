// down_sample: keeps one sample out of every M (sample-rate reduction by M).
//
// A phase counter counts the words that pass; the word at phase 0 is forwarded and the M-1
// words after it are taken and dropped. After reset the first word is the one kept. The
// handshake is combinational: a word that will be kept waits for out_ready, a dropped word is
// taken at once. No latency, no storage besides the counter.
//
// The factor M and the place of the down-sampler after each low-pass filter follow the filter
// description; keeping the first word of each group is this implementation's choice.
module down_sample #(
  parameter int unsigned M = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  logic [PW-1:0] phase;
  logic          keep;

  assign keep      = (phase == '0);
  assign out_valid = in_valid && keep;
  assign out_data  = in_data;
  assign in_ready  = keep ? out_ready : 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n)
      phase <= '0;
    else if (in_valid && in_ready)
      phase <= (phase == PW'(M - 1)) ? '0 : phase + 1'b1;
  end

endmodule
