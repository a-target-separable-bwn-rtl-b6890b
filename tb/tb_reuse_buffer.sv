// tb_reuse_buffer: pushes a sequence of values with row clears and checks
// that the one-stride and two-stride entries and their valid flags follow
// a reference history.
module tb_reuse_buffer;
  logic clk = 0, rst_n = 0;
  logic clear, push, sel2, valid;
  logic [15:0] rb, q;
  int checks = 0, failures = 0;
  logic [15:0] h1, h2;
  int npush;

  reuse_buffer dut (.clk, .rst_n, .clear, .push, .rb, .sel2, .q, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; push = 0; sel2 = 0; rb = 0; npush = 0; h1 = 0; h2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom % 9) == 0;
      push  = !clear && (($urandom % 3) != 0);
      rb    = 16'($urandom);
      if (clear) npush = 0;
      else if (push) begin h2 = h1; h1 = rb; npush++; end
      @(posedge clk);
      #1;
      for (int s = 0; s < 2; s++) begin
        sel2 = 1'(s);
        #1;
        checks++;
        if (valid !== (npush > s)) begin failures++; $display("FAIL valid s=%0d", s); end
        if (npush > s && q !== (s ? h2 : h1)) begin failures++; $display("FAIL q s=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
