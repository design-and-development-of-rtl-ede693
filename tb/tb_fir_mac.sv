// tb_fir_mac: self-checking test of the MAC FIR (26 taps, stage-1 coefficients).
//
// Drives random and full-scale samples with random gaps and a randomly stalling consumer,
// compares every full-precision result with a plain convolution computed here, and checks
// the timing: the delay line clear takes NTAPS clocks after reset, a result appears NTAPS+2
// clocks after its sample is accepted, and back-to-back samples are taken every NTAPS+3 clocks.
module tb_fir_mac;
  import decim_ref_pkg::*;

  localparam int NTAPS = 26;
  localparam int AW    = 16 + 16 + $clog2(NTAPS);
  localparam int NSAMP = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic signed [15:0]   in_data = '0;
  logic signed [AW-1:0] out_data;

  int checks = 0, failures = 0;
  int_q h, xs;
  int n_out = 0, cycle = 0, acc_cycle = 0, last_acc = -1000;

  fir_mac #(.NTAPS(NTAPS), .COEF_FILE("rtl/coef_s1.hex")) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Scoreboard and latency monitor.
  logic out_valid_q = 1'b0;
  always @(posedge clk) begin
    out_valid_q <= out_valid;
    if (rst_n && in_valid && in_ready) begin
      xs.push_back(int'(in_data));
      if (last_acc >= 0 && cycle - last_acc < NTAPS + 3)
        check(0, "samples accepted closer than NTAPS+3 clocks");
      last_acc = cycle;
      acc_cycle = cycle;
    end
    if (rst_n && out_valid && !out_valid_q)
      check(cycle - acc_cycle == NTAPS + 2,
            $sformatf("latency %0d, expected %0d", cycle - acc_cycle, NTAPS + 2));
    if (rst_n && out_valid && out_ready) begin
      check(longint'(out_data) == conv_at(xs, h, n_out),
            $sformatf("y[%0d] = %0d, expected %0d", n_out, out_data, conv_at(xs, h, n_out)));
      n_out++;
    end
  end

  initial begin
    int t0, k;
    h = load_coefs("rtl/coef_s1.hex", NTAPS);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t0 = cycle;
    while (!in_ready) @(posedge clk);
    check(cycle - t0 == NTAPS, $sformatf("clear took %0d clocks", cycle - t0));
    // Phase 1: back-to-back samples, consumer always ready -> one per NTAPS+3 clocks.
    k = 0;
    for (int i = 0; i < 40; i++) begin
      in_valid <= 1'b1;
      in_data  <= (i % 7 == 0) ? 16'sh7fff : (i % 5 == 0) ? -16'sh8000 : 16'($urandom);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (i > 0) k++;
    end
    // Phase 2: random gaps and a stalling consumer.
    for (int i = 40; i < NSAMP; i++) begin
      in_valid <= 1'b0;
      repeat ($urandom_range(0, 40)) @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= (i % 11 == 0) ? -16'sh8000 : 16'($urandom);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (200) @(posedge clk);
    check(n_out == NSAMP, $sformatf("%0d results for %0d samples", n_out, NSAMP));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) out_ready <= (cycle < 2000) ? 1'b1 : ($urandom_range(0, 3) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
