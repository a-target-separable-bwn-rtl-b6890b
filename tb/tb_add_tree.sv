// tb_add_tree: checks 4-input and 7-input addition trees with random
// per-stage approximate configurations against a pairwise reference.
module tb_add_tree;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic [3:0][15:0] in4;
  logic [6:0][15:0] in7;
  logic [3:0] cfg4;
  logic [5:0] cfg7;
  logic apx;
  logic [15:0] s4, s7;
  int checks = 0, failures = 0;

  add_tree #(.N(4), .DW(16)) d4 (.in(in4), .stage_ora(cfg4), .approx_sel(apx), .sum(s4));
  add_tree #(.N(7), .DW(16)) d7 (.in(in7), .stage_ora(cfg7), .approx_sel(apx), .sum(s7));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] k_of(logic [5:0] c, int s, logic a);
    return a ? 16'(c[2*s +: 2]) : 16'd0;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] e4, e7, p0, p1, p2, p3, q0, q1;
      @(negedge clk);
      for (int j = 0; j < 4; j++) in4[j] = 16'($urandom);
      for (int j = 0; j < 7; j++) in7[j] = 16'($urandom);
      cfg4 = 4'($urandom);
      cfg7 = 6'($urandom);
      apx  = (i % 3) != 0;
      // N=4: (0+1) (2+3) then sum
      p0 = ref_add(in4[0], in4[1], int'(k_of({2'b0, cfg4}, 0, apx)));
      p1 = ref_add(in4[2], in4[3], int'(k_of({2'b0, cfg4}, 0, apx)));
      e4 = ref_add(p0, p1, int'(k_of({2'b0, cfg4}, 1, apx)));
      // N=7: stage0 pairs (0,1)(2,3)(4,5), 6 passes; stage1 (p0,p1)(p2,6); stage2
      p0 = ref_add(in7[0], in7[1], int'(k_of(cfg7, 0, apx)));
      p1 = ref_add(in7[2], in7[3], int'(k_of(cfg7, 0, apx)));
      p2 = ref_add(in7[4], in7[5], int'(k_of(cfg7, 0, apx)));
      p3 = in7[6];
      q0 = ref_add(p0, p1, int'(k_of(cfg7, 1, apx)));
      q1 = ref_add(p2, p3, int'(k_of(cfg7, 1, apx)));
      e7 = ref_add(q0, q1, int'(k_of(cfg7, 2, apx)));
      @(posedge clk);
      checks += 2;
      if (s4 !== e4) begin failures++; if (failures < 10) $display("FAIL4 %h exp %h", s4, e4); end
      if (s7 !== e7) begin failures++; if (failures < 10) $display("FAIL7 %h exp %h", s7, e7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
