// tb_sv_classifier: sequences of SV neuron pairs with mostly-speaker runs
// and isolated misclassifications. Checks the initial label of the two
// thresholds, the secondary score X_t = sum(x_{t-i} a_i)/3 + x_t against a
// reference, the final label against beta = 0.4, the N+2 cycle latency, and
// that the secondary classification rejects an isolated speaker label
// that follows non-speaker labels.
module tb_sv_classifier;
  logic clk = 0, rst_n = 0;
  logic valid, busy, lv, il, spk;
  logic signed [15:0] fc0, fc1, th1, th2, beta, score;
  logic [2:0][8:0] wts;
  int checks = 0, failures = 0;

  sv_classifier #(.N(3)) dut (.clk, .rst_n, .valid, .fc0, .fc1, .th1, .th2, .wts, .beta,
    .busy, .label_valid(lv), .init_label(il), .speaker(spk), .score);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  int corrected;

  initial begin
    valid = 0; fc0 = 0; fc1 = 0; th1 = 16'sd10; th2 = -16'sd10; beta = 16'sd102;
    wts = {9'd256, 9'd200, 9'd128};   // a3, a2, a1
    corrected = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int xt, acc, xs, lat, votes;
      bit target;
      target = ((t / 20) % 2) == 0;
      @(negedge clk);
      valid = 1;
      if ($urandom % 6 == 0) target = !target;     // isolated flips
      fc0 = target ? 16'(30 + $urandom % 20) : 16'(-int'($urandom % 20));
      fc1 = target ? 16'(-30 - int'($urandom % 20)) : 16'($urandom % 20);
      if ($urandom % 4 == 0) fc1 = 16'(20);         // one neuron disagrees
      votes = (int'(fc0) < 10) + (int'(fc1) > -10);
      xt = (votes < 2) ? 1 : -1;
      acc = 0;
      for (int i = 0; i < 3 && i < hist.size(); i++) acc += hist[i] * int'(wts[i]);
      xs = acc / 3 + xt * 256;
      lat = 0;
      @(negedge clk);
      valid = 0;
      lat = 1;
      while (!lv) begin @(negedge clk); lat++; end
      checks += 4;
      if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      if (il != (xt == 1)) begin failures++; $display("FAIL init t=%0d", t); end
      if (int'(score) != xs) begin failures++; $display("FAIL score %0d exp %0d", score, xs); end
      if (spk != (xs > 102)) begin failures++; $display("FAIL label t=%0d", t); end
      if (hist.size() >= 2 && hist[0] == -1 && hist[1] == -1 && xt == 1 && !spk) corrected++;
      hist.push_front(xt);
    end
    checks++;
    if (corrected == 0) begin failures++; $display("FAIL no correction"); end
    $display("corrected %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
