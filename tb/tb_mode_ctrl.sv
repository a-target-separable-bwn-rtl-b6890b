// tb_mode_ctrl: all modes and SNR classes; checks where results go, the
// threshold selection and the FC group enables.
module tb_mode_ctrl;
  import speech_pkg::*;
  logic clk = 0;
  mode_e mode;
  snr_class_e snr;
  logic fcv, kv, sv;
  logic [3:0][15:0] kt, t1, t2;
  logic [15:0] ko, o1, o2;
  logic [6:0] ge;
  int checks = 0, failures = 0;

  mode_ctrl dut (.mode, .snr_class(snr), .fc_valid(fcv), .kws_th_tab(kt), .sv_th1_tab(t1),
    .sv_th2_tab(t2), .kws_valid(kv), .sv_valid(sv), .kws_th(ko), .sv_th1(o1), .sv_th2(o2),
    .fc_grp_en(ge));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin kt[i] = 16'(100 + i); t1[i] = 16'(200 + i); t2[i] = 16'(300 + i); end
    for (int m = 0; m < 4; m++)
      for (int s = 0; s < 4; s++)
        for (int v = 0; v < 2; v++) begin
          @(negedge clk);
          mode = mode_e'(m); snr = snr_class_e'(s); fcv = 1'(v);
          @(posedge clk);
          checks += 6;
          if (kv != (v && (m == 2 || m == 3))) failures++;
          if (sv != (v && (m == 1 || m == 3))) failures++;
          if (ko != 16'(100 + s)) failures++;
          if (o1 != 16'(200 + s)) failures++;
          if (o2 != 16'(300 + s)) failures++;
          if (ge != {{2{m[0]}}, {5{m[1]}}}) begin failures++; $display("FAIL ge m=%0d", m); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
