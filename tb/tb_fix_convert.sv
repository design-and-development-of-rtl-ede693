// tb_fix_convert: self-checking test of the round-and-saturate cast (37-bit in, 16-bit out).
//
// Checks directed corner cases (exact halves, the largest and smallest results, one LSB past
// either end, the extremes of the input range) and 20000 random inputs against an integer
// model; checks the saturation flag and that valid and ready pass through unchanged.
module tb_fix_convert;
  localparam int IN_W = 37, OUT_W = 16, SHIFT = 15;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, sat;
  logic signed [IN_W-1:0]  in_data = '0;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;

  fix_convert #(.IN_W(IN_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic try_value(longint v);
    longint r, e;
    bit     s;
    in_data = IN_W'(v);
    #1;
    // floor((v + 2^14) / 2^15), then clip
    r = v + 64'sd16384;
    e = (r >= 0) ? r / 32768 : -((-r + 32767) / 32768);
    s = 1'b0;
    if (e > 32767)  begin e = 32767;  s = 1'b1; end
    if (e < -32768) begin e = -32768; s = 1'b1; end
    check(longint'(out_data) == e && sat == s,
          $sformatf("in %0d: out %0d sat %0b, expected %0d sat %0b", v, out_data, sat, e, s));
  endtask

  initial begin
    longint lim;
    lim = 64'sd1 <<< (IN_W - 1);
    try_value(16384);  try_value(-16384); try_value(16383); try_value(-16385);
    try_value(0);      try_value(49152);  try_value(-49152); try_value(-1);
    try_value(longint'(32767) * 32768);           // largest in range
    try_value(longint'(32767) * 32768 + 16383);   // rounds down to the largest
    try_value(longint'(32767) * 32768 + 16384);   // rounds past it -> clipped
    try_value(-longint'(32768) * 32768);          // smallest
    try_value(-longint'(32768) * 32768 - 16384);  // rounds to smallest
    try_value(-longint'(32768) * 32768 - 16385);  // past it -> clipped
    try_value(lim - 1);
    try_value(-lim);
    for (int i = 0; i < 20000; i++) begin
      longint v;
      v = longint'({$urandom, $urandom});
      case (i % 3)
        0: v = v % (longint'(1) <<< 31);    // mostly in range
        1: v = v % (longint'(1) <<< 33);    // often clipped
        default: v = v % lim;
      endcase
      try_value(v);
    end
    for (int i = 0; i < 4; i++) begin
      in_valid  = i[0];
      out_ready = i[1];
      #1;
      check(out_valid == in_valid && in_ready == out_ready, "handshake pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
