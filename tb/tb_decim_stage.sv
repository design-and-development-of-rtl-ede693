// tb_decim_stage: self-checking test of one decimation stage (26 taps, M = 8, first-stage
// coefficients, 256 kHz input).
//
// The input sequence has four parts: random words, a 1 kHz tone, a 60 kHz tone and a
// full-scale square wave. Every output word is compared bit for bit with the reference model;
// the number of outputs must be ceil(inputs / 8); the clip events must match the model's count
// and occur at least once. The tones check the filter as a filter: the 1 kHz tone (passband)
// must come out within 1 % of its input amplitude, the 60 kHz tone (stopband) at least 35 dB
// down. Inputs arrive at random intervals and the consumer stalls at random.
module tb_decim_stage;
  import decim_ref_pkg::*;

  localparam int NTAPS = 26, M = 8;
  localparam int SEG = 1600;           // samples per part
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, sat_event;
  logic signed [15:0] in_data = '0, out_data;

  int checks = 0, failures = 0;
  int_q h, x, y_ref, y_got;
  int n_sat = 0;

  decim_stage #(.NTAPS(NTAPS), .M(M), .COEF_FILE("rtl/coef_s1.hex")) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) y_got.push_back(int'(out_data));
    if (sat_event) n_sat++;
    out_ready <= ($urandom_range(0, 4) != 0);
  end

  // Largest |output| over the outputs of input samples [lo, hi), after the filter has settled.
  function automatic int peak(int lo, int hi);
    int p = 0;
    for (int j = (lo + NTAPS + M - 1) / M; j * M < hi && j < y_got.size(); j++)
      if ((y_got[j] < 0 ? -y_got[j] : y_got[j]) > p) p = (y_got[j] < 0 ? -y_got[j] : y_got[j]);
    return p;
  endfunction

  initial begin
    int exp_clips, p1k, p60k;
    h = load_coefs("rtl/coef_s1.hex", NTAPS);
    for (int i = 0; i < SEG; i++) x.push_back(int'($signed(16'($urandom))));
    for (int i = 0; i < SEG; i++) x.push_back(int'($rtoi(16000.0 * $sin(2.0 * PI * 1.0e3 * i / 256.0e3))));
    for (int i = 0; i < SEG; i++) x.push_back(int'($rtoi(16000.0 * $sin(2.0 * PI * 60.0e3 * i / 256.0e3))));
    for (int i = 0; i < SEG; i++) x.push_back(((i / 200) % 2 == 0) ? 32767 : -32768);
    y_ref = fir_decim(x, h, M);
    exp_clips = count_clips(x, h);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (x[i]) begin
      in_valid <= 1'b0;
      repeat ($urandom_range(0, 10)) @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= 16'(x[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);

    check(y_got.size() == (x.size() + M - 1) / M,
          $sformatf("%0d outputs for %0d inputs", y_got.size(), x.size()));
    for (int j = 0; j < y_ref.size() && j < y_got.size(); j++)
      check(y_got[j] == y_ref[j], $sformatf("out[%0d] = %0d, expected %0d", j, y_got[j], y_ref[j]));
    check(n_sat == exp_clips && n_sat > 0, $sformatf("%0d clip events, expected %0d", n_sat, exp_clips));
    p1k  = peak(SEG, 2 * SEG);
    p60k = peak(2 * SEG, 3 * SEG);
    $display("1 kHz tone peak %0d, 60 kHz tone peak %0d (input 16000)", p1k, p60k);
    check(p1k > 15840 && p1k < 16160, "1 kHz passband gain off by more than 1 %");
    check(p60k < 285, "60 kHz not attenuated by 35 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
