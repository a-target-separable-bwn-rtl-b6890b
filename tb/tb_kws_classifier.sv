// tb_kws_classifier: random logits and thresholds; checks the keyword
// index (largest logit, lowest index on ties), the detection rule and the
// one-cycle latency.
module tb_kws_classifier;
  logic clk = 0, rst_n = 0;
  logic valid, lv, det;
  logic [4:0][15:0] fc;
  logic signed [15:0] th;
  logic [2:0] kw;
  int checks = 0, failures = 0;

  kws_classifier dut (.clk, .rst_n, .valid, .fc, .th, .label_valid(lv), .keyword(kw), .detected(det));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ndet = 0;
    valid = 0; fc = '0; th = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bi, bv;
      @(negedge clk);
      valid = 1;
      for (int j = 0; j < 5; j++) fc[j] = 16'(int'($urandom % 200) - 100);
      if (i % 7 == 0) fc[3] = fc[1];
      th = 16'(int'($urandom % 100) - 20);
      bi = 0; bv = int'(signed'(fc[0]));
      for (int j = 1; j < 5; j++) if (int'(signed'(fc[j])) > bv) begin bi = j; bv = int'(signed'(fc[j])); end
      @(negedge clk);
      valid = 0;
      checks += 3;
      if (!lv) failures++;
      if (int'(kw) != bi) begin failures++; if (failures < 10) $display("FAIL kw %0d exp %0d", kw, bi); end
      if (det != (bi != 4 && bv >= int'(th))) failures++;
      if (det) ndet++;
      @(negedge clk);
      checks++;
      if (lv) failures++;
    end
    checks++;
    if (ndet == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
