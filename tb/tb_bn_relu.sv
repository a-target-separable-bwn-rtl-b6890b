// tb_bn_relu: random accumulator values, biases and shifts against the
// reference clamp((acc+bias)>>>shift, 0, 127).
module tb_bn_relu;
  logic clk = 0;
  logic signed [15:0] acc, bias;
  logic [3:0] sh;
  logic [7:0] y;
  int checks = 0, failures = 0;

  bn_relu dut (.acc, .bias, .shift(sh), .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int v, e;
      @(negedge clk);
      acc  = 16'($urandom);
      bias = 16'($urandom % 2048) - 16'sd1024;
      sh   = 4'($urandom % 12);
      v = (int'(acc) + int'(bias));
      v = v >>> sh;
      e = (v < 0) ? 0 : (v > 127 ? 127 : v);
      @(posedge clk);
      checks++;
      if (int'(y) != e) begin failures++; if (failures < 10) $display("FAIL acc=%0d b=%0d s=%0d y=%0d e=%0d", acc, bias, sh, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
