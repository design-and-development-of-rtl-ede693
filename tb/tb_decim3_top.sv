// tb_decim3_top: end-to-end test of the three-stage decimator at its default sizes
// (26/70/137 taps, M = 8, 2, 2).
//
// Part 1 paces the input at the design's rate: one sample every 29 clocks, which is a 256 kHz
// input on a 7.424 MHz clock. The input must never be back-pressured there. Part 2 offers
// samples back to back while the output consumer stalls at random, so that every handshake in
// the chain has to hold data. The input is random words, a slow full-scale square wave that
// makes every stage clip, and tones at 1 kHz (pass band: must come out within 1 %), 5 kHz and
// 20 kHz (must come out at least 40 dB down; without filtering they would alias to 3 kHz and
// 4 kHz). Every output word is compared bit for bit with the
// reference model, the words counted at each stage boundary must be 1/8, 1/16 and 1/32 of the
// input, and each mechanism (input stall, output stall, clipping in each of the three stages)
// must have happened at least once.
module tb_decim3_top;
  import decim_ref_pkg::*;

  localparam int N1 = 26, N2 = 70, N3 = 137;
  localparam int PACE = N1 + 3;        // clocks per input sample at full rate
  localparam int NPACED = 20480;       // samples sent in part 1
  localparam int NFAST  = 4096;        // samples sent in part 2
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic signed [15:0] in_data = '0, out_data;
  logic [2:0] sat_event;

  int checks = 0, failures = 0;
  int_q h1, h2, h3, x, y1, y2, y3, y_got;
  int n_sat [3] = '{0, 0, 0};
  int n_s1 = 0, n_s2 = 0, in_stalls = 0, out_stalls = 0;
  bit fast = 1'b0;

  decim3_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) y_got.push_back(int'(out_data));
    if (out_valid && !out_ready) out_stalls++;
    if (in_valid && !in_ready) in_stalls++;
    for (int s = 0; s < 3; s++) if (sat_event[s]) n_sat[s]++;
    if (dut.v1 && dut.r1) n_s1++;
    if (dut.v2 && dut.r2) n_s2++;
    out_ready <= fast ? ($urandom_range(0, 3) == 0) : 1'b1;
  end

  // Input plan: random words, a full-scale square wave, then 1 kHz, 5 kHz and 20 kHz tones
  // (4096 samples each), then random words again for the back-to-back part.
  function automatic int sample_at(int i);
    if (i < 2048)  return int'($signed(16'($urandom)));
    if (i < 8192)  return ((i / 2048) % 2 == 1) ? 32767 : -32768;
    if (i < 12288) return int'($rtoi(12000.0 * $sin(2.0 * PI * 1.0e3 * i / 256.0e3)));
    if (i < 16384) return int'($rtoi(12000.0 * $sin(2.0 * PI * 5.0e3 * i / 256.0e3)));
    if (i < 20480) return int'($rtoi(12000.0 * $sin(2.0 * PI * 20.0e3 * i / 256.0e3)));
    return int'($signed(16'($urandom)));
  endfunction

  // Amplitude of the output tone for the inputs [hi-1024, hi), from its mean square over 32
  // output samples (four whole periods of a 1 kHz tone at 8 kHz).
  function automatic real tone_amp(int hi);
    real acc = 0.0;
    for (int j = (hi - 1024) / 32; j < hi / 32; j++) acc += real'(y_got[j]) * real'(y_got[j]);
    return $sqrt(2.0 * acc / 32.0);
  endfunction

  initial begin
    int stalls_paced, exp_clips [3];
    h1 = load_coefs("rtl/coef_s1.hex", N1);
    h2 = load_coefs("rtl/coef_s2.hex", N2);
    h3 = load_coefs("rtl/coef_s3.hex", N3);
    for (int i = 0; i < NPACED + NFAST; i++) x.push_back(sample_at(i));
    y1 = fir_decim(x, h1, 8);
    y2 = fir_decim(y1, h2, 2);
    y3 = fir_decim(y2, h3, 2);
    exp_clips[0] = count_clips(x, h1);
    exp_clips[1] = count_clips(y1, h2);
    exp_clips[2] = count_clips(y2, h3);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (!in_ready) @(posedge clk);
    // Part 1: a new sample every PACE clocks.
    for (int i = 0; i < NPACED; i++) begin
      in_valid <= 1'b1;
      in_data  <= 16'(x[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      in_valid <= 1'b0;
      repeat (PACE - 1) @(posedge clk);
    end
    stalls_paced = in_stalls;
    check(stalls_paced == 0, $sformatf("%0d input stalls at the 256 kHz pace", stalls_paced));
    // Part 2: back to back, consumer stalling.
    fast = 1'b1;
    for (int i = NPACED; i < NPACED + NFAST; i++) begin
      in_valid <= 1'b1;
      in_data  <= 16'(x[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    fast = 1'b0;
    repeat (2000) @(posedge clk);

    check(n_s1 == x.size() / 8,  $sformatf("stage 1 gave %0d words", n_s1));
    check(n_s2 == x.size() / 16, $sformatf("stage 2 gave %0d words", n_s2));
    check(y_got.size() == x.size() / 32, $sformatf("%0d outputs for %0d inputs", y_got.size(), x.size()));
    for (int j = 0; j < y3.size() && j < y_got.size(); j++)
      check(y_got[j] == y3[j], $sformatf("out[%0d] = %0d, expected %0d", j, y_got[j], y3[j]));
    for (int s = 0; s < 3; s++)
      check(n_sat[s] == exp_clips[s], $sformatf("stage %0d: %0d clips, expected %0d", s + 1, n_sat[s], exp_clips[s]));
    if (y_got.size() >= NPACED / 32) begin
      real a1, a5, a20;
      a1 = tone_amp(12288); a5 = tone_amp(16384); a20 = tone_amp(20480);
      $display("tone amplitudes at the output (input 12000): 1 kHz %0.1f, 5 kHz %0.1f, 20 kHz %0.1f", a1, a5, a20);
      check(a1 > 11880.0 && a1 < 12120.0, "1 kHz pass-band tone not within 1 %");
      check(a5 < 120.0, "5 kHz tone not 40 dB down");
      check(a20 < 120.0, "20 kHz tone not 40 dB down");
    end else check(0, "too few outputs to measure tones");
    $display("mechanisms: input stalls %0d, output stalls %0d, clips %0d/%0d/%0d",
             in_stalls, out_stalls, n_sat[0], n_sat[1], n_sat[2]);
    check(in_stalls > 0,  "input back-pressure never happened");
    check(out_stalls > 0, "output back-pressure never happened");
    for (int s = 0; s < 3; s++) check(n_sat[s] > 0, $sformatf("stage %0d never clipped", s + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
