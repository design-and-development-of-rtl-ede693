// fix_convert: fixed-point cast from the FIR's full-precision result to the sample format.
//
// The input is a signed IN_W-bit number with SHIFT more fraction bits than the output. The
// cast drops those bits with round-half-up (add half an output LSB, then shift right
// arithmetically) and saturates to the OUT_W-bit range instead of wrapping; sat flags a word
// that was clipped. Purely combinational: data, valid and ready pass straight through, so it
// adds no latency.
//
// That a cast stage sits after the register follows the filter's block diagram; the rounding
// and saturation modes and the widths are this implementation's choice.
module fix_convert #(
  parameter int unsigned IN_W  = 37,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned SHIFT = 15
) (
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    sat
);

  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'(  (64'sd1 <<< (OUT_W-1)) - 1);
  localparam logic signed [IN_W:0] MINV = (IN_W+1)'(-(64'sd1 <<< (OUT_W-1)));
  localparam logic signed [IN_W:0] HALF = (SHIFT > 0) ? (IN_W+1)'(64'sd1 <<< (SHIFT-1)) : '0;

  logic signed [IN_W:0] rounded;

  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_comb begin
    rounded = ((IN_W+1)'(in_data) + HALF) >>> SHIFT;
    sat     = 1'b0;
    if (rounded > MAXV) begin
      out_data = MAXV[OUT_W-1:0];
      sat      = 1'b1;
    end else if (rounded < MINV) begin
      out_data = MINV[OUT_W-1:0];
      sat      = 1'b1;
    end else begin
      out_data = rounded[OUT_W-1:0];
    end
  end

endmodule
