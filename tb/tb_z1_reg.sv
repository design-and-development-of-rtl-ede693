// tb_z1_reg: self-checking test of the z^-1 handshake register.
//
// A random producer and a random consumer exchange 2000 words; a queue scoreboard checks that
// every word arrives once, in order. It also checks the one-clock latency and that, with both
// sides always ready, one word passes per clock.
module tb_z1_reg;
  localparam int W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;

  int checks = 0, failures = 0;
  logic [W-1:0] sb [$];
  int n_in = 0, n_out = 0, cycle = 0;
  bit random_mode = 1'b0, stop = 1'b0;

  z1_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic         prev_acc = 1'b0;
  logic [W-1:0] prev_data = '0;
  always @(posedge clk) if (rst_n) begin
    // a word accepted at one edge must be on the output right after it
    if (prev_acc) check(out_valid && out_data == prev_data, "one-clock latency");
    prev_acc  <= in_valid && in_ready;
    prev_data <= in_data;
    if (out_valid && out_ready) begin
      check(sb.size() > 0 && out_data == sb[0], $sformatf("word %0d out of order", n_out));
      if (sb.size() > 0) void'(sb.pop_front());
      n_out++;
    end
    if (in_valid && in_ready) begin
      sb.push_back(in_data);
      n_in++;
    end
  end

  // producer: holds a word until it is taken
  always @(posedge clk) if (rst_n) begin
    if (!in_valid || in_ready) begin
      in_valid <= !stop && (random_mode ? ($urandom_range(0, 2) != 0) : 1'b1);
      in_data  <= W'($urandom);
    end
    out_ready <= random_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    int c0, n0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    c0 = cycle; n0 = n_out;
    repeat (100) @(posedge clk);
    check(n_out - n0 == cycle - c0, $sformatf("%0d words in %0d clocks", n_out - n0, cycle - c0));
    random_mode = 1'b1;
    wait (n_in >= 2000);
    stop = 1'b1;
    random_mode = 1'b0;
    repeat (20) @(posedge clk);
    check(n_out == n_in, $sformatf("%0d in, %0d out", n_in, n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
