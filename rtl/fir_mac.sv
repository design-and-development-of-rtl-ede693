// fir_mac: MAC-based FIR filter (one multiplier, one accumulator, NTAPS taps).
//
// Computes y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k] for every accepted input sample, the
// direct-form tapped delay line of the classic FIR structure folded onto a single
// multiply-accumulate unit. The delay line is a circular buffer of NTAPS samples; each new
// sample overwrites the oldest one. After the sample is written, the MAC walks the buffer from
// the newest sample backwards while the tap index walks the coefficient table forwards, one
// product per clock, through a one-stage product register into the accumulator. The result is
// full precision (SAMPLE_W + COEF_W + clog2(NTAPS) bits), so it can never overflow.
//
// Interface: valid/ready on both sides. in_ready is high only while the unit is idle; out_valid
// is held, with out_data stable, until out_ready is seen.
// Timing: after reset the delay line is cleared (NTAPS cycles, in_ready low). An accepted sample
// raises out_valid NTAPS+2 clocks after the accepting edge; with out_ready high, one sample is processed every
// NTAPS+3 clocks, so the clock must run at least NTAPS+3 times the sample rate.
//
// The MAC organisation and the FIR structure follow the filter description; the buffer
// organisation, handshake, reset clear and widths are this implementation's own.
module fir_mac
  import decim_pkg::*;
#(
  parameter int unsigned NTAPS     = 26,
  parameter int unsigned DW        = SAMPLE_W,
  parameter int unsigned CW        = COEF_W,
  parameter string       COEF_FILE = "rtl/coef_s1.hex",
  localparam int unsigned AW       = acc_width(DW, CW, NTAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [AW-1:0] out_data
);

  localparam int unsigned IW = (NTAPS > 1) ? $clog2(NTAPS) : 1;
  localparam logic [IW-1:0] LAST = IW'(NTAPS - 1);

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_MAC, S_DRAIN, S_HOLD} state_t;
  state_t state;

  logic signed [DW-1:0]    dline [NTAPS];   // circular delay line
  logic [IW-1:0]           head;            // next write position (oldest sample)
  logic [IW-1:0]           rd_ptr;          // sample read by the MAC this cycle
  logic [IW-1:0]           tap;             // coefficient index this cycle
  logic signed [CW-1:0]    coef;
  logic signed [DW+CW-1:0] prod;
  logic signed [AW-1:0]    acc;

  coef_rom #(.DEPTH(NTAPS), .WIDTH(CW), .INIT_FILE(COEF_FILE)) u_rom (
    .addr  (tap),
    .rdata (coef)
  );

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_HOLD);
  assign out_data  = acc;

  // Delay-line memory: one write port (clear sweep or new sample), one read port.
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)
      dline[head] <= '0;
    else if (in_valid && in_ready)
      dline[head] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_CLEAR;
      head   <= '0;
      rd_ptr <= '0;
      tap    <= '0;
      prod   <= '0;
      acc    <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          head <= (head == LAST) ? '0 : head + 1'b1;
          if (head == LAST) state <= S_IDLE;
        end
        S_IDLE: begin
          if (in_valid) begin
            rd_ptr <= head;
            head   <= (head == LAST) ? '0 : head + 1'b1;
            tap    <= '0;
            acc    <= '0;
            state  <= S_MAC;
          end
        end
        S_MAC: begin
          prod   <= dline[rd_ptr] * coef;
          if (tap != '0) acc <= acc + AW'(prod);
          rd_ptr <= (rd_ptr == '0) ? LAST : rd_ptr - 1'b1;
          if (tap == LAST) state <= S_DRAIN;
          else             tap   <= tap + 1'b1;
        end
        S_DRAIN: begin
          acc   <= acc + AW'(prod);
          state <= S_HOLD;
        end
        S_HOLD: begin
          if (out_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: an offered input sample stays put until taken; so does the result.
  a_in_stable: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_data));
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
