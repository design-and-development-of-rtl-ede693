// z1_reg: one-sample delay register (z^-1) with a valid/ready handshake.
//
// Sits between the FIR filter and the fixed-point convert in each decimation stage. It holds
// one word: a word offered on the input is captured at the clock edge when the register is
// empty or its current word is being taken at the same edge, and it is presented on the output
// from the next cycle on. in_ready = !full || out_ready, so a full register with an idle
// consumer stalls the producer. Latency one clock; throughput one word per clock.
//
// The register's place in the chain follows the filter's block diagram; the handshake and the
// reset to empty are this implementation's choice.
module z1_reg #(
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

  logic full;

  assign in_ready  = !full || out_ready;
  assign out_valid = full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= 1'b0;
      out_data <= '0;
    end else begin
      if (in_valid && in_ready) begin
        full     <= 1'b1;
        out_data <= in_data;
      end else if (out_ready) begin
        full <= 1'b0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
