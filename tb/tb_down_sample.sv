// tb_down_sample: self-checking test of the keep-one-in-M down-sampler (M = 8).
//
// Feeds 4000 numbered words with random gaps and a randomly stalling consumer, and checks that
// exactly the words numbered 0, M, 2M, ... come out, in order, that the dropped words never wait
// for the consumer, and that the output rate is exactly 1/M of the input rate.
module tb_down_sample;
  localparam int M = 8, W = 16, NWORDS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, next_id = 0;

  down_sample #(.M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid && (n_in % M != 0))
      check(in_ready, "dropped word was held back");
    if (out_valid && out_ready) begin
      check(out_data == W'(n_out * M), $sformatf("kept %0d, expected %0d", out_data, n_out * M));
      n_out++;
    end
    if (in_valid && in_ready) n_in++;
    if (!in_valid || in_ready) begin
      if (next_id < NWORDS && $urandom_range(0, 3) != 0) begin
        in_valid <= 1'b1;
        in_data  <= W'(next_id);
        next_id++;
      end else begin
        in_valid <= 1'b0;
      end
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n_in == NWORDS);
    repeat (5) @(posedge clk);
    check(n_out == NWORDS / M, $sformatf("%0d out for %0d in", n_out, n_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
