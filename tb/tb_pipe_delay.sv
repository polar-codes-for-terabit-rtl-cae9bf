// tb_pipe_delay: a random stream through 5-deep and 0-deep delay lines; the
// output must be the input of exactly 5 (and 0) clocks earlier.
module tb_pipe_delay;
  logic clk = 1'b0;
  logic [11:0] din, d5, d0;
  logic [11:0] hist [$];
  int unsigned checks = 0, failures = 0;

  pipe_delay #(.W(12), .D(5)) dut5 (.clk, .din, .dout(d5));
  pipe_delay #(.W(12), .D(0)) dut0 (.clk, .din, .dout(d0));

  always #1 clk = ~clk;

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      din = 12'($urandom);
      hist.push_back(din);
      #0.1;
      checks++;
      if (d0 !== din) failures++;
      if (hist.size() > 5) begin
        checks++;
        if (d5 !== hist[hist.size() - 6]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
