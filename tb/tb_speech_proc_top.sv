// tb_speech_proc_top: end-to-end test of the processor at its default
// sizes. It loads random binary weights and BN parameters, then plays a
// speech stream: quiet noise (the VAD stays off and the accelerator clock
// is stopped), then loud voiced frames with noise frames of rising level
// in between (the VAD turns on and the SNR class falls). For each of four
// feature windows it plays the role of the external MFCC unit, writing a
// 49x26 feature map and raising feat_ready, and checks the results against
// a reference forward pass:
//   window 1  SV & KWS, exact adders: all 7 FC outputs exact, keyword and
//             initial SV label as the reference
//   window 2  SV only: no KWS label, SV label as the reference
//   window 3  KWS only, reuse off: keyword as the reference
//   window 4  SV & KWS with approximate adders chosen by the SNR class,
//             second tree stage set fully exact by its reduction field
// It counts how often each mechanism happened (VAD turn-on, clock gating,
// result reuse, approximate adders, each mode, an SNR class change, a
// refused load while busy, the secondary SV decision, a layer-table write
// through the configuration bus) and fails any that never did. One window takes 16,722 accelerator cycles.
module tb_speech_proc_top;
  import speech_pkg::*;

  logic clk = 0, rst_n = 0;
  logic x_valid, cfg_we, wt_we, bn_we, feat_we, feat_ready;
  logic signed [9:0] x;
  logic [5:0] cfg_addr, bn_addr;
  logic [31:0] cfg_wdata;
  logic [11:0] wt_addr;
  logic [7:0] wt_data, feat_data;
  logic [15:0] bn_bias;
  logic [3:0] bn_shift;
  logic [13:0] feat_addr;
  logic mfcc_en, load_blocked, vad_active, kw_valid, kw_detected, sv_valid, speaker, sv_init;
  logic [1:0] snr_class, state;
  logic [2:0] keyword;
  logic [6:0][15:0] fc_out;
  logic [31:0] ops_total, ops_skipped, vad_energy;
  logic acc_busy;
  logic signed [15:0] sv_score;
  int checks = 0, failures = 0;
  int cfg0_extra = 0;
  int n_busy = 0;

  speech_proc_top dut (.clk, .rst_n, .x_valid, .x, .cfg_we, .cfg_addr, .cfg_wdata,
    .wt_we, .wt_addr, .wt_data, .bn_we, .bn_addr, .bn_bias, .bn_shift,
    .feat_we, .feat_addr, .feat_data, .feat_ready, .mfcc_en, .load_blocked,
    .vad_active, .vad_energy, .acc_busy, .sv_score, .snr_class, .state, .kw_valid, .keyword, .kw_detected,
    .sv_valid, .speaker, .sv_init_label(sv_init), .fc_out, .ops_total, .ops_skipped);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: state=%0d vad=%0d phase=%0d", state, vad_active, phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [7:0] wbytes [4088];
  int  feat [49][26];
  bit  w1 [10][3][3];
  bit  w2 [20][3][3][10];
  bit  wf [7][4400];
  int  bb [60];
  int  bs [60];
  int  a1 [24][12][10];
  int  a2 [22][10][20];
  logic [15:0] fref [7];

  function automatic int relu_q(int acc16, int bias, int sh);
    int v;
    v = (int'(signed'(16'(acc16))) + bias) >>> sh;
    return v < 0 ? 0 : (v > 127 ? 127 : v);
  endfunction

  task automatic make_weights();
    foreach (wbytes[i]) wbytes[i] = 8'h00;
    for (int m = 0; m < 10; m++)
      for (int ky = 0; ky < 3; ky++) begin
        for (int kx = 0; kx < 3; kx++) w1[m][ky][kx] = 1'($urandom);
        if ($urandom % 2) w1[m][ky][2] = w1[m][ky][0];
        for (int kx = 0; kx < 3; kx++) wbytes[(ky * 30 + m * 3 + kx) / 8][(ky * 30 + m * 3 + kx) % 8] = w1[m][ky][kx];
      end
    for (int m = 0; m < 20; m++)
      for (int ky = 0; ky < 3; ky++)
        for (int n = 0; n < 10; n++) begin
          int b;
          for (int kx = 0; kx < 3; kx++) w2[m][ky][kx][n] = 1'($urandom);
          if ($urandom % 2) w2[m][ky][2][n] = w2[m][ky][0][n];
          for (int kx = 0; kx < 3; kx++) begin
            b = 90 + (ky * 10 + n) * 60 + m * 3 + kx;
            wbytes[b / 8][b % 8] = w2[m][ky][kx][n];
          end
        end
    for (int o = 0; o < 7; o++)
      for (int i = 0; i < 4400; i++) begin
        int b;
        wf[o][i] = 1'($urandom);
        b = 1890 + (i / 3) * 21 + o * 3 + (i % 3);
        wbytes[b / 8][b % 8] = wf[o][i];
      end
    for (int i = 0; i < 60; i++) begin
      bb[i] = int'($urandom % 64) - 32;
      bs[i] = (i < 20) ? 1 : 3;
    end
  endtask

  task automatic forward();
    for (int oy = 0; oy < 24; oy++)
      for (int ox = 0; ox < 12; ox++)
        for (int m = 0; m < 10; m++) begin
          int s;
          s = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              s += w1[m][ky][kx] ? feat[2*oy+ky][2*ox+kx] : -feat[2*oy+ky][2*ox+kx];
          a1[oy][ox][m] = relu_q(s, bb[m], bs[m]);
        end
    for (int oy = 0; oy < 22; oy++)
      for (int ox = 0; ox < 10; ox++)
        for (int m = 0; m < 20; m++) begin
          int s;
          s = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              for (int n = 0; n < 10; n++)
                s += w2[m][ky][kx][n] ? a1[oy+ky][ox+kx][n] : -a1[oy+ky][ox+kx][n];
          a2[oy][ox][m] = relu_q(s, bb[20+m], bs[20+m]);
        end
    for (int o = 0; o < 7; o++) begin
      int s;
      s = bb[40+o];
      for (int i = 0; i < 4400; i++)
        s += wf[o][i] ? a2[i / 200][(i / 20) % 10][i % 20] : -a2[i / 200][(i / 20) % 10][i % 20];
      fref[o] = 16'(s);
    end
  endtask

  // ---------------- speech stream ----------------
  // phase 0: quiet; afterwards speech frames alternate with noise frames
  int phase, noise_amp, sample_i;
  always @(posedge clk) begin
    if (!rst_n) begin
      x_valid <= 0; x <= '0; sample_i <= 0;
    end else begin
      x_valid <= (sample_i % 2) == 0;
      if ((sample_i % 2) == 0) begin
        int k, v;
        k = (sample_i / 2) % 640;
        if (phase == 0)       v = int'($urandom % 3) - 1;
        else if (k < 320)     v = ((k / 40) % 2) ? 250 : -251;
        else                  v = (k % 2) ? noise_amp : -noise_amp - 1;
        x <= 10'(v);
      end
      sample_i <= sample_i + 1;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_vad_on, n_gated_cycles, n_snr_change, n_blocked, n_kw, n_sv;
  logic vad_q;
  logic [1:0] snr_q;
  always @(posedge clk) begin
    vad_q <= vad_active;
    snr_q <= snr_class;
    if (rst_n && vad_active && !vad_q) n_vad_on++;
    if (rst_n && snr_class != snr_q) n_snr_change++;
    if (rst_n && !dut.acc_gclk && !dut.u_cg_acc.en_l) n_gated_cycles++;
    if (rst_n && load_blocked) n_blocked++;
    if (rst_n && acc_busy) n_busy++;
    if (rst_n && kw_valid) n_kw++;
    if (rst_n && sv_valid) n_sv++;
  end

  task automatic cfg(int a, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = 32'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  logic [2:0] kw_got;
  logic kw_seen, sv_seen, sv_init_got, sv_spk_got;
  always @(posedge clk) begin
    if (kw_valid) begin kw_got <= keyword; kw_seen <= 1; end
    if (sv_valid) begin sv_init_got <= sv_init; sv_spk_got <= speaker; sv_seen <= 1; end
  end

  task automatic window(int idx, int mode, bit apx, bit reuse, output int cyc);
    int bi, bv, votes;
    cfg(0, mode | (reuse ? 16 : 0) | (apx ? 32 : 0) | cfg0_extra);
    for (int y = 0; y < 49; y++)
      for (int x_ = 0; x_ < 26; x_++) feat[y][x_] = int'($urandom % 41) - 20;
    forward();
    // wait for the controller to listen, then stream the features
    while (state != 2'd1) @(negedge clk);
    for (int y = 0; y < 49; y++)
      for (int x_ = 0; x_ < 26; x_++) begin
        @(negedge clk); feat_we = 1; feat_addr = 14'(y * 26 + x_); feat_data = 8'(feat[y][x_]);
      end
    @(negedge clk); feat_we = 0;
    kw_seen = 0; sv_seen = 0;
    @(negedge clk); feat_ready = 1;
    @(negedge clk); feat_ready = 0;
    cyc = 0;
    // a load attempt while busy must be refused
    repeat (20) @(negedge clk);
    feat_we = 1; feat_addr = 14'd3; feat_data = 8'hAA;
    @(negedge clk); feat_we = 0;
    cyc = 21;
    while (state != 2'd3) begin @(negedge clk); cyc++; end
    while (state == 2'd3) @(negedge clk);
    repeat (2) @(negedge clk);
    // reference decisions
    bi = 0; bv = int'(signed'(fref[0]));
    for (int j = 1; j < 5; j++) if (int'(signed'(fref[j])) > bv) begin bi = j; bv = int'(signed'(fref[j])); end
    votes = (int'(signed'(fref[5])) < 0) + (int'(signed'(fref[6])) > 0);
    if (!apx) begin
      for (int o = 0; o < 7; o++) if ((o < 5 && mode[1]) || (o >= 5 && mode[0])) begin
        checks++;
        if (fc_out[o] !== fref[o]) begin failures++; $display("FAIL w%0d fc%0d %0d exp %0d", idx, o, signed'(fc_out[o]), signed'(fref[o])); end
      end
      if (mode[1]) begin
        checks += 2;
        if (!kw_seen) begin failures++; $display("FAIL w%0d no keyword", idx); end
        if (int'(kw_got) != bi) begin failures++; $display("FAIL w%0d keyword %0d exp %0d", idx, kw_got, bi); end
      end
      if (mode[0]) begin
        checks += 2;
        if (!sv_seen) begin failures++; $display("FAIL w%0d no SV label", idx); end
        if (sv_init_got != (votes < 2)) begin failures++; $display("FAIL w%0d SV initial label", idx); end
      end
    end else begin
      checks++;
      if (!(kw_seen && sv_seen)) begin failures++; $display("FAIL w%0d labels missing", idx); end
    end
    checks++;
    if ((mode == 1 && kw_seen) || (mode == 2 && sv_seen)) begin
      failures++; $display("FAIL w%0d disabled target answered", idx);
    end
    $display("window %0d mode %0d apx %0d reuse %0d: %0d cycles, ops %0d skipped %0d, snr %0d, kw %0d spk %0d score %0d energy %0d",
             idx, mode, apx, reuse, cyc, ops_total, ops_skipped, snr_class, kw_got, sv_spk_got,
             sv_score, vad_energy);
  endtask

  initial begin
    int cyc, skipped_w1, n_apx;
    phase = 0; noise_amp = 4;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; wt_we = 0; wt_addr = 0; wt_data = 0;
    bn_we = 0; bn_addr = 0; bn_bias = 0; bn_shift = 0; feat_we = 0; feat_addr = 0;
    feat_data = 0; feat_ready = 0; vad_q = 0; snr_q = 0;
    n_vad_on = 0; n_gated_cycles = 0; n_snr_change = 0; n_blocked = 0; n_kw = 0; n_sv = 0;
    kw_seen = 0; sv_seen = 0; n_apx = 0;
    make_weights();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration: VAD threshold, thresholds of the classifiers
    cfg(1, 2000);
    cfg(2, 160);
    for (int i = 0; i < 4; i++) begin cfg(3 + i, 32'hFFFF8000); cfg(7 + i, 0); cfg(11 + i, 0); end
    for (int i = 0; i < 4088; i++) begin
      @(negedge clk); wt_we = 1; wt_addr = 12'(i); wt_data = wbytes[i];
    end
    @(negedge clk); wt_we = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk); bn_we = 1; bn_addr = 6'(i); bn_bias = 16'(bb[i]); bn_shift = 4'(bs[i]);
    end
    @(negedge clk); bn_we = 0;
    // quiet: VAD must stay off
    repeat (3000) @(negedge clk);
    checks++;
    if (vad_active || state != 2'd0) begin failures++; $display("FAIL VAD on in silence"); end
    phase = 1;

    window(1, 3, 0, 1, cyc);
    skipped_w1 = ops_skipped;
    checks++;
    if (cyc < 16722 || cyc > 16722 + 40) begin failures++; $display("FAIL window cycles %0d", cyc); end
    window(2, 1, 0, 1, cyc);
    window(3, 2, 0, 0, cyc);
    checks++;
    if (ops_skipped != 0) begin failures++; $display("FAIL reuse off still skipped"); end
    noise_amp = 70;
    repeat (4000) @(negedge clk);
    if (dut.approx_sel) n_apx++;
    cfg0_extra = 32'hC00;
    window(4, 3, 1, 1, cyc);
    if (dut.approx_sel && dut.pe_ora != 0) n_apx++;
    checks++;
    if (dut.pe_ora != 0 && (dut.tree_ora[3:2] != 0 || dut.tree_ora[1:0] != dut.pe_ora)) begin
      failures++; $display("FAIL tree stage setting %h pe %0d", dut.tree_ora, dut.pe_ora);
    end
    checks++;
    if (n_busy < 4 * 16722) begin failures++; $display("FAIL busy cycles %0d", n_busy); end

    // layer count through the configuration bus (table word 12), then back
    cfg(32 + 12, 2);
    checks++;
    if (dut.u_acc.n_layers != 2'd2) begin failures++; $display("FAIL layer table write"); end
    cfg(32 + 12, 3);
    checks++;
    if (dut.u_acc.n_layers != 2'd3 || dut.u_main.mode != 2'd3) begin
      failures++; $display("FAIL layer table write leaked");
    end

    // mechanisms
    checks += 7;
    if (n_vad_on == 0)      begin failures++; $display("FAIL VAD never turned on"); end
    if (n_gated_cycles == 0) begin failures++; $display("FAIL accelerator clock never gated"); end
    if (skipped_w1 == 0)    begin failures++; $display("FAIL reuse never skipped"); end
    if (n_apx == 0)         begin failures++; $display("FAIL approximate adders never used"); end
    if (n_snr_change == 0)  begin failures++; $display("FAIL SNR class never changed"); end
    if (n_blocked == 0)     begin failures++; $display("FAIL busy load never refused"); end
    if (n_kw != 3 || n_sv != 3) begin failures++; $display("FAIL label counts kw %0d sv %0d", n_kw, n_sv); end
    $display("mechanisms: vad_on=%0d gated_cycles=%0d reuse_skipped=%0d approx=%0d snr_changes=%0d blocked=%0d kw=%0d sv=%0d",
             n_vad_on, n_gated_cycles, skipped_w1, n_apx, n_snr_change, n_blocked, n_kw, n_sv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
