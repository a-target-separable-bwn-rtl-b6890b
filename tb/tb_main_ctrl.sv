// tb_main_ctrl: writes every configuration register and checks the
// outputs, then walks the working states: idle until voice, listening
// until a feature window, computing until the accelerator is done,
// classifying until the enabled classifiers answer (both, SV only, KWS
// only), and back to idle when the voice stops. Also checks the clock-gate
// enables and the SNR-to-ORA mapping.
module tb_main_ctrl;
  import speech_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we, vad, fr, ad, kd, sd;
  logic [5:0] ca;
  logic [31:0] cd;
  snr_class_e snr;
  logic [1:0] st;
  logic as, reuse_en, apx, mfcc_en, snr_en, acc_en;
  mode_e mode;
  logic [1:0] pe_ora;
  logic [3:0] tree_ora;
  logic [31:0] vth;
  logic [8:0] zth;
  logic [3:0][15:0] kt, t1, t2;
  logic signed [15:0] beta;
  logic [2:0][8:0] wts;
  int checks = 0, failures = 0;

  main_ctrl dut (.clk, .rst_n, .cfg_we, .cfg_addr(ca), .cfg_wdata(cd), .vad_active(vad),
    .feat_ready(fr), .acc_done(ad), .kws_done(kd), .sv_done(sd), .snr_class(snr), .state(st),
    .acc_start(as), .mode, .reuse_en, .approx_sel(apx), .pe_ora, .tree_ora, .vad_th(vth),
    .zcr_th(zth), .kws_th_tab(kt), .sv_th1_tab(t1), .sv_th2_tab(t2), .beta, .sv_wts(wts),
    .mfcc_en, .snr_clk_en(snr_en), .acc_clk_en(acc_en));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); cfg_we = 1; ca = 6'(a); cd = 32'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic window(int m);
    int n;
    @(negedge clk); fr = 1;
    @(negedge clk); fr = 0;
    chk(st == 2'd2 && as && acc_en, "compute entry");
    @(negedge clk);
    chk(!as && acc_en, "start is a pulse");
    repeat (5) @(negedge clk);
    // in mode 3 the KWS answer comes while still computing
    if (m == 3) begin kd = 1; @(negedge clk); kd = 0; end
    ad = 1;
    @(negedge clk); ad = 0;
    chk(st == 2'd3 && !acc_en, "classify");
    if (m == 2) begin kd = 1; @(negedge clk); kd = 0; end
    if (m == 3) chk(st == 2'd3, "waits for SV");
    n = 0;
    if (m != 2) begin repeat (3) @(negedge clk); sd = 1; @(negedge clk); sd = 0; end
    chk(st == 2'd1, $sformatf("back to listen m=%0d", m));
  endtask

  initial begin
    cfg_we = 0; ca = 0; cd = 0; vad = 0; fr = 0; ad = 0; kd = 0; sd = 0; snr = SNR_CLEAN;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(mode == MODE_BOTH && reuse_en && apx && beta == 16'sd102 && wts[0] == 9'd256, "reset values");
    wr(1, 12345); wr(2, 77); wr(15, 90);
    for (int i = 0; i < 4; i++) begin wr(3 + i, 10 + i); wr(7 + i, 20 + i); wr(11 + i, 30 + i); end
    for (int i = 0; i < 3; i++) wr(16 + i, 100 + i);
    chk(vth == 12345 && zth == 77 && beta == 90, "scalar registers");
    for (int i = 0; i < 4; i++) chk(kt[i] == 16'(10 + i) && t1[i] == 16'(20 + i) && t2[i] == 16'(30 + i), "tables");
    for (int i = 0; i < 3; i++) chk(wts[i] == 9'(100 + i), "weights");
    for (int s = 0; s < 4; s++) begin
      snr = snr_class_e'(s);
      #1;
      chk(int'(pe_ora) == s && tree_ora == {2'(s), 2'(s)}, "ora map");
    end
    // stage reductions: stage 0 one segment less, stage 1 two less
    wr(0, 32'h933);
    for (int s = 0; s < 4; s++) begin
      snr = snr_class_e'(s);
      #1;
      chk(int'(tree_ora[1:0]) == (s > 1 ? s - 1 : 0) && int'(tree_ora[3:2]) == (s > 2 ? s - 2 : 0),
          "tree stage reduction");
    end
    wr(0, 32'h33);  // both, reuse, approx
    chk(st == 2'd0 && !mfcc_en && !snr_en && !acc_en, "idle gating");
    @(negedge clk); fr = 1;
    @(negedge clk); fr = 0;
    chk(st == 2'd0, "feature ignored while idle");
    vad = 1;
    @(negedge clk);
    chk(st == 2'd1 && mfcc_en && snr_en, "listen");
    window(3);
    wr(0, 32'h31);  // SV only
    chk(mode == MODE_SV, "mode SV");
    window(1);
    wr(0, 32'h22);  // KWS only, no reuse
    chk(mode == MODE_KWS && !reuse_en && apx, "mode KWS");
    window(2);
    vad = 0;
    @(negedge clk);
    chk(st == 2'd0 && !mfcc_en, "idle after voice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
