// tb_split_workloads: the other ways of splitting the decimation by 32, built from the same
// decim_stage block and run side by side on one input.
//
//   chain 0: one stage,   901 taps, M = 32
//   chain 1: two stages,  84 / 156 taps, M = 16, 2
//   chain 2: four stages, 11 / 27 / 76 / 141 taps, M = 4, 2, 2, 2
//
// (The three-stage split is the top, tested by tb_decim3_top.) Each chain gets the same 10 240
// samples: random words, then 1 kHz and 5 kHz tones. Every output word is compared bit for
// bit with the reference model and counted (1/32 of the input); the 1 kHz tone must come out
// within 2 % and the 5 kHz tone at least 35 dB down. For each chain the testbench prints the
// coefficient storage and the multiplications this filter-then-discard structure performs per
// output sample, the cost figures by which the splits are compared.
module tb_split_workloads;
  import decim_pkg::*;
  import decim_ref_pkg::*;

  localparam int NSAMP = 10240;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;


  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // chain inputs and outputs
  logic    iv [3], ir [3], ov [3];
  sample_t id [3], od [3];
  logic [6:0] sat;           // clip flags, not checked here
  logic       unused_sat;
  assign unused_sat = ^sat;

  // chain 0: one stage
  decim_stage #(.NTAPS(901), .M(32), .COEF_FILE("tb/coef_1s.hex")) c0 (
    .clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_data(id[0]),
    .out_valid(ov[0]), .out_ready(1'b1), .out_data(od[0]), .sat_event(sat[0]));

  // chain 1: two stages
  logic v1a, r1a; sample_t d1a;
  decim_stage #(.NTAPS(84), .M(16), .COEF_FILE("tb/coef_2s_a.hex")) c1a (
    .clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .in_data(id[1]),
    .out_valid(v1a), .out_ready(r1a), .out_data(d1a), .sat_event(sat[1]));
  decim_stage #(.NTAPS(156), .M(2), .COEF_FILE("tb/coef_2s_b.hex")) c1b (
    .clk, .rst_n, .in_valid(v1a), .in_ready(r1a), .in_data(d1a),
    .out_valid(ov[1]), .out_ready(1'b1), .out_data(od[1]), .sat_event(sat[2]));

  // chain 2: four stages
  logic v2a, r2a, v2b, r2b, v2c, r2c; sample_t d2a, d2b, d2c;
  decim_stage #(.NTAPS(11), .M(4), .COEF_FILE("tb/coef_4s_a.hex")) c2a (
    .clk, .rst_n, .in_valid(iv[2]), .in_ready(ir[2]), .in_data(id[2]),
    .out_valid(v2a), .out_ready(r2a), .out_data(d2a), .sat_event(sat[3]));
  decim_stage #(.NTAPS(27), .M(2), .COEF_FILE("tb/coef_4s_b.hex")) c2b (
    .clk, .rst_n, .in_valid(v2a), .in_ready(r2a), .in_data(d2a),
    .out_valid(v2b), .out_ready(r2b), .out_data(d2b), .sat_event(sat[4]));
  decim_stage #(.NTAPS(76), .M(2), .COEF_FILE("tb/coef_4s_c.hex")) c2c (
    .clk, .rst_n, .in_valid(v2b), .in_ready(r2b), .in_data(d2b),
    .out_valid(v2c), .out_ready(r2c), .out_data(d2c), .sat_event(sat[5]));
  decim_stage #(.NTAPS(141), .M(2), .COEF_FILE("tb/coef_4s_d.hex")) c2d (
    .clk, .rst_n, .in_valid(v2c), .in_ready(r2c), .in_data(d2c),
    .out_valid(ov[2]), .out_ready(1'b1), .out_data(od[2]), .sat_event(sat[6]));

  int_q x, y_got [3];

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 3; c++) if (ov[c]) y_got[c].push_back(int'(od[c]));

  function automatic int sample_at(int i);
    if (i < 2048) return int'($signed(16'($urandom)));
    if (i < 6144) return int'($rtoi(12000.0 * $sin(2.0 * PI * 1.0e3 * i / 256.0e3)));
    return int'($rtoi(12000.0 * $sin(2.0 * PI * 5.0e3 * i / 256.0e3)));
  endfunction

  function automatic real tone_amp(int c, int hi);
    real acc = 0.0;
    for (int j = (hi - 1024) / 32; j < hi / 32; j++) acc += real'(y_got[c][j]) * real'(y_got[c][j]);
    return $sqrt(2.0 * acc / 32.0);
  endfunction

  task automatic drive(int c);
    foreach (x[i]) begin
      iv[c] <= 1'b1;
      id[c] <= 16'(x[i]);
      @(posedge clk);
      while (!ir[c]) @(posedge clk);
    end
    iv[c] <= 1'b0;
  endtask

  // Per-chain sizes: taps and factors, padded with zeros.
  int taps [3][4] = '{'{901, 0, 0, 0}, '{84, 156, 0, 0}, '{11, 27, 76, 141}};
  int facs [3][4] = '{'{32, 0, 0, 0}, '{16, 2, 0, 0}, '{4, 2, 2, 2}};
  string files [3][4] = '{'{"tb/coef_1s.hex", "", "", ""},
                          '{"tb/coef_2s_a.hex", "tb/coef_2s_b.hex", "", ""},
                          '{"tb/coef_4s_a.hex", "tb/coef_4s_b.hex", "tb/coef_4s_c.hex", "tb/coef_4s_d.hex"}};

  initial begin
    int_q y_ref [3];
    for (int c = 0; c < 3; c++) begin iv[c] = 1'b0; id[c] = '0; end
    for (int i = 0; i < NSAMP; i++) x.push_back(sample_at(i));
    for (int c = 0; c < 3; c++) begin
      int_q y, h;
      y = x;
      for (int s = 0; s < 4 && taps[c][s] > 0; s++) begin
        h = load_coefs(files[c][s], taps[c][s]);
        y = fir_decim(y, h, facs[c][s]);
      end
      y_ref[c] = y;
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      drive(0);
      drive(1);
      drive(2);
    join
    repeat (3000) @(posedge clk);

    for (int c = 0; c < 3; c++) begin
      int stored, mults, rate;
      real a1, a5;
      stored = 0; mults = 0; rate = 32;
      for (int s = 0; s < 4 && taps[c][s] > 0; s++) begin
        stored += taps[c][s];
        mults  += taps[c][s] * rate;   // every input of the stage is filtered
        rate   /= facs[c][s];
      end
      check(y_got[c].size() == NSAMP / 32,
            $sformatf("chain %0d: %0d outputs for %0d inputs", c, y_got[c].size(), NSAMP));
      for (int j = 0; j < y_ref[c].size() && j < y_got[c].size(); j++)
        check(y_got[c][j] == y_ref[c][j],
              $sformatf("chain %0d out[%0d] = %0d, expected %0d", c, j, y_got[c][j], y_ref[c][j]));
      if (y_got[c].size() >= NSAMP / 32) begin
        a1 = tone_amp(c, 6144);
        a5 = tone_amp(c, 10240);
        check(a1 > 11760.0 && a1 < 12240.0, $sformatf("chain %0d: 1 kHz amplitude %0.1f", c, a1));
        check(a5 < 213.0, $sformatf("chain %0d: 5 kHz amplitude %0.1f", c, a5));
        $display("split %0d: %0d coefficients, %0d multiplications per output, 1 kHz %0.1f, 5 kHz %0.1f (of 12000)",
                 c == 2 ? 4 : c + 1, stored, mults, a1, a5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
