// tb_pe: drives random binary-weight terms, skips, Rb accumulation and
// bias loads into a PE and compares R and Rb with a reference model, in
// exact and approximate modes.
module tb_pe;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en, clr, w, skip, rb_en, approx_sel;
  logic [15:0] x, bias, r, rb;
  logic [1:0] ora;
  int checks = 0, failures = 0;
  logic [15:0] mr, mrb;

  pe dut (.clk, .rst_n, .en, .clr, .x, .w, .skip, .rb_en, .bias,
          .approx_sel, .ora_segs(ora), .r, .rb);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; w = 0; skip = 0; rb_en = 0; approx_sel = 0; x = 0; bias = 0; ora = 0;
    mr = 0; mrb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] t, base_r, base_rb;
      @(negedge clk);
      en         = ($urandom % 8) != 0;
      clr        = ($urandom % 10) == 0;
      w          = 1'($urandom);
      skip       = ($urandom % 5) == 0;
      rb_en      = 1'($urandom);
      approx_sel = (i >= 2000);
      ora        = 2'($urandom);
      x          = 16'(signed'(8'($urandom)));
      bias       = 16'($urandom % 64);
      // reference
      t       = skip ? 16'd0 : (w ? x : 16'(-x));
      base_r  = clr ? bias : mr;
      base_rb = clr ? 16'd0 : mrb;
      if (en) begin
        mr = approx_sel ? ref_add(base_r, t, int'(ora)) : 16'(base_r + t);
        if (rb_en) mrb = approx_sel ? ref_add(base_rb, t, int'(ora)) : 16'(base_rb + t);
        else if (clr) mrb = 16'd0;
      end
      @(posedge clk);
      #1;
      checks++;
      if (r !== mr || rb !== mrb) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d r=%h exp %h rb=%h exp %h", i, r, mr, rb, mrb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
