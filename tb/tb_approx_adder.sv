// tb_approx_adder: checks the precision-adaptive adder against an
// arithmetic reference for all four configurations, random and corner
// operands.
module tb_approx_adder;
  import tb_ref_pkg::*;

  logic        clk = 0;
  logic [15:0] a, b, s;
  logic [1:0]  k;
  int checks = 0, failures = 0;

  approx_adder dut (.a, .b, .ora_segs(k), .sum(s));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] ta, logic [15:0] tb_, logic [1:0] tk);
    a = ta; b = tb_; k = tk;
    @(posedge clk);
    checks++;
    if (s !== ref_add(ta, tb_, int'(tk))) begin
      failures++;
      $display("FAIL a=%h b=%h k=%0d got %h exp %h", ta, tb_, tk, s, ref_add(ta, tb_, int'(tk)));
    end
  endtask

  initial begin
    // exact mode equals ordinary addition
    for (int i = 0; i < 500; i++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom); rb = 16'($urandom);
      check(ra, rb, 2'd0);
      if (s !== 16'(ra + rb)) begin failures++; $display("exact mismatch"); end
      checks++;
    end
    for (int kk = 0; kk < 4; kk++)
      for (int i = 0; i < 1000; i++)
        check(16'($urandom), 16'($urandom), 2'(kk));
    // carry must not cross from an ORA segment: 0x0FFF + 0x0001 with 12 ORA bits
    check(16'h0FFF, 16'h0001, 2'd3);
    if (s !== 16'h0FFF) begin failures++; $display("carry crossed ORA"); end
    checks++;
    check(16'h00FF, 16'h00FF, 2'd2);
    if (s !== 16'h00FF) begin failures++; $display("8-bit ORA wrong"); end
    checks++;
    check(16'hFFFF, 16'h0001, 2'd0);
    check(16'h7FF0, 16'h0010, 2'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
