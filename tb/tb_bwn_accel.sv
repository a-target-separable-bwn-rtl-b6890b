// tb_bwn_accel: runs the full network of the accelerator at its default
// sizes (49x26 input, 10 and 20 channel convolutions, 4400-input fully
// connected heads) with random binary weights, features and BN parameters,
// and compares every stored activation of both convolution layers and all
// seven fully connected outputs with a direct reference computation.
// Run 1: exact adders, result reuse on; run 2: reuse off (same results,
// nothing skipped); run 3: approximate adders (results must differ
// somewhere, reuse still counted); run 4: KWS head disabled; run 5: the
// layer table is rewritten at run time to a two-layer network (layer 1,
// then fully connected heads on its 2880 outputs). The cycle
// count of a run is checked against the schedule: 3N issue cycles, one
// drain cycle and M write-back cycles per output position, then the FC
// stream.
module tb_bwn_accel;
  import speech_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, reuse_en, approx_sel, w_we, d_we, bn_we, blk, fc_valid, lt_we;
  logic [3:0] lt_addr;
  logic [31:0] lt_wdata;
  logic [1:0] pe_ora;
  logic [3:0] tree_ora;
  logic [6:0] fc_grp_en;
  logic [11:0] w_addr;
  logic [7:0] w_data, d_data;
  logic [13:0] d_addr;
  logic [5:0] bn_addr;
  logic [15:0] bn_bias;
  logic [3:0] bn_shift;
  logic [6:0][15:0] fc_out;
  logic [31:0] ops_total, ops_skipped;
  int checks = 0, failures = 0;

  bwn_accel dut (.clk, .rst_n, .start, .busy, .done, .reuse_en, .approx_sel, .pe_ora,
    .tree_ora, .fc_grp_en, .lt_we, .lt_addr, .lt_wdata, .w_we, .w_addr, .w_data, .d_we, .d_addr, .d_data, .bn_we,
    .bn_addr, .bn_bias, .bn_shift, .ext_blocked(blk), .fc_valid, .fc_out, .ops_total,
    .ops_skipped);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model data
  logic [7:0] wbytes [4088];
  int  feat [49][26];
  bit  w1 [10][3][3];
  bit  w2 [20][3][3][10];
  bit  wf [7][4401];
  bit  wg [7][2880];
  int  bb [60];
  int  bs [60];
  int  a1 [24][12][10];
  int  a2 [22][10][20];
  logic [15:0] fref [7];
  logic [6:0][15:0] fgot;
  int  fc_seen;

  function automatic int relu_q(int acc16, int bias, int sh);
    int v;
    v = (int'(signed'(16'(acc16))) + bias) >>> sh;
    return v < 0 ? 0 : (v > 127 ? 127 : v);
  endfunction

  task automatic setbit(int bi, bit v);
    wbytes[bi / 8][bi % 8] = v;
  endtask

  task automatic build_model();
    foreach (wbytes[i]) wbytes[i] = 8'h00;
    for (int m = 0; m < 10; m++)
      for (int ky = 0; ky < 3; ky++) begin
        for (int kx = 0; kx < 3; kx++) w1[m][ky][kx] = 1'($urandom);
        if ($urandom % 2) w1[m][ky][2] = w1[m][ky][0];
        for (int kx = 0; kx < 3; kx++) setbit(0 + ky * 30 + m * 3 + kx, w1[m][ky][kx]);
      end
    for (int m = 0; m < 20; m++)
      for (int ky = 0; ky < 3; ky++)
        for (int n = 0; n < 10; n++) begin
          for (int kx = 0; kx < 3; kx++) w2[m][ky][kx][n] = 1'($urandom);
          if ($urandom % 2) w2[m][ky][2][n] = w2[m][ky][0][n];
          for (int kx = 0; kx < 3; kx++) setbit(90 + (ky * 10 + n) * 60 + m * 3 + kx, w2[m][ky][kx][n]);
        end
    for (int o = 0; o < 7; o++)
      for (int i = 0; i < 4401; i++) begin
        wf[o][i] = (i < 4400) ? 1'($urandom) : 1'b0;
        setbit(1890 + (i / 3) * 21 + o * 3 + (i % 3), wf[o][i]);
      end
    for (int y = 0; y < 49; y++)
      for (int x = 0; x < 26; x++) feat[y][x] = int'($urandom % 41) - 20;
    for (int i = 0; i < 60; i++) begin
      bb[i] = int'($urandom % 64) - 32;
      bs[i] = (i < 20) ? 1 : 3;
    end
    // reference forward pass
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
      for (int i = 0; i < 4400; i++) begin
        int v;
        v = a2[i / 200][(i / 20) % 10][i % 20];
        s += wf[o][i] ? v : -v;
      end
      fref[o] = 16'(s);
    end
  endtask

  task automatic load();
    for (int i = 0; i < 4088; i++) begin
      @(negedge clk); w_we = 1; w_addr = 12'(i); w_data = wbytes[i];
    end
    @(negedge clk); w_we = 0;
    for (int y = 0; y < 49; y++)
      for (int x = 0; x < 26; x++) begin
        @(negedge clk); d_we = 1; d_addr = 14'(y * 26 + x); d_data = 8'(feat[y][x]);
      end
    @(negedge clk); d_we = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk); bn_we = 1; bn_addr = 6'(i); bn_bias = 16'(bb[i]); bn_shift = 4'(bs[i]);
    end
    @(negedge clk); bn_we = 0;
  endtask

  // capture FC results
  always @(posedge clk) if (fc_valid) begin fgot <= fc_out; fc_seen <= fc_seen + 1; end

  task automatic lt_write(int a, logic [31:0] v);
    @(negedge clk); lt_we = 1; lt_addr = 4'(a); lt_wdata = v;
    @(negedge clk); lt_we = 0;
  endtask

  task automatic run(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic check_mem(string tag);
    int bad;
    bad = 0;
    for (int oy = 0; oy < 24; oy++) for (int ox = 0; ox < 12; ox++) for (int m = 0; m < 10; m++)
      if (int'(dut.u_dmem.mem[1274 + (oy * 12 + ox) * 10 + m]) != a1[oy][ox][m]) bad++;
    for (int oy = 0; oy < 22; oy++) for (int ox = 0; ox < 10; ox++) for (int m = 0; m < 20; m++)
      if (int'(dut.u_dmem.mem[4154 + (oy * 10 + ox) * 20 + m]) != a2[oy][ox][m]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d activations differ", tag, bad); end
  endtask

  initial begin
    int cyc, exp_cyc, skipped1, diff;
    start = 0; reuse_en = 1; approx_sel = 0; pe_ora = 0; tree_ora = 0; fc_grp_en = '1;
    lt_we = 0; lt_addr = 0; lt_wdata = 0;
    w_we = 0; d_we = 0; bn_we = 0; w_addr = 0; w_data = 0; d_addr = 0; d_data = 0;
    bn_addr = 0; bn_bias = 0; bn_shift = 0; fc_seen = 0;
    build_model();
    repeat (3) @(posedge clk);
    rst_n = 1;
    load();

    exp_cyc = 288 * (3 + 1 + 10) + 220 * (30 + 1 + 20) + 1467 + 1 + 1 + 1;

    // run 1: exact, reuse on
    run(cyc);
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, exp_cyc); end
    $display("run1 cycles=%0d ops=%0d skipped=%0d (%0.1f%%)", cyc, ops_total, ops_skipped,
             100.0 * ops_skipped / ops_total);
    check_mem("run1");
    for (int o = 0; o < 7; o++) begin
      checks++;
      if (fgot[o] !== fref[o]) begin failures++; $display("FAIL fc%0d %0d exp %0d", o, signed'(fgot[o]), signed'(fref[o])); end
    end
    checks++;
    if (ops_skipped == 0) begin failures++; $display("FAIL no reuse happened"); end
    skipped1 = ops_skipped;

    // run 2: reuse off
    reuse_en = 0;
    run(cyc);
    check_mem("run2");
    for (int o = 0; o < 7; o++) begin
      checks++;
      if (fgot[o] !== fref[o]) failures++;
    end
    checks++;
    if (ops_skipped != 0 || ops_total != 288*90 + 220*1800 + 7*4400) begin
      failures++; $display("FAIL run2 ops %0d skipped %0d", ops_total, ops_skipped);
    end

    // run 3: approximate adders (clean setting, 12 ORA bits)
    reuse_en = 1; approx_sel = 1; pe_ora = 2'd3; tree_ora = 4'hF;
    run(cyc);
    diff = 0;
    for (int o = 0; o < 7; o++) if (fgot[o] !== fref[o]) diff++;
    checks++;
    if (diff == 0) begin failures++; $display("FAIL approximate run equals exact"); end
    checks++;
    if (ops_skipped != skipped1) begin failures++; $display("FAIL run3 skipped %0d", ops_skipped); end

    // run 4: exact, KWS head off: SV outputs still right, fewer operations
    approx_sel = 0; pe_ora = 0; tree_ora = 0; fc_grp_en = 7'b1100000;
    run(cyc);
    for (int o = 5; o < 7; o++) begin
      checks++;
      if (fgot[o] !== fref[o]) begin failures++; $display("FAIL run4 fc%0d", o); end
    end
    checks++;
    if (ops_total != 288*90 + 220*1800 + 2*4400) begin failures++; $display("FAIL run4 ops %0d", ops_total); end
    checks++;
    if (fc_seen != 4) begin failures++; $display("FAIL fc_valid count %0d", fc_seen); end

    // run 5: two-layer network set through the layer table
    begin
      layer_t fc2;
      logic [127:0] word;
      fc2 = NET_FC;
      fc2.in_base = 14'd1274; fc2.fc_len = 13'd2880; fc2.w_base = 15'd90;
      for (int i = 90; i < 4088 * 8; i++) setbit(i, 1'b0);
      for (int o = 0; o < 7; o++)
        for (int i = 0; i < 2880; i++) begin
          wg[o][i] = 1'($urandom);
          setbit(90 + (i / 3) * 21 + o * 3 + (i % 3), wg[o][i]);
        end
      for (int o = 0; o < 7; o++) begin
        int sacc;
        sacc = bb[40+o];
        for (int i = 0; i < 2880; i++) begin
          int v;
          v = a1[i / 120][(i / 10) % 12][i % 10];
          sacc += wg[o][i] ? v : -v;
        end
        fref[o] = 16'(sacc);
      end
      for (int i = 0; i < 4088; i++) begin
        @(negedge clk); w_we = 1; w_addr = 12'(i); w_data = wbytes[i];
      end
      @(negedge clk); w_we = 0;
      word = 128'(fc2);
      for (int j = 0; j < 4; j++) lt_write(4 + j, word[32*j +: 32]);
      lt_write(12, 32'd2);
      fc_grp_en = '1;
      run(cyc);
      checks++;
      if (cyc != 288 * 14 + 960 + 3) begin failures++; $display("FAIL run5 cycles %0d", cyc); end
      for (int o = 0; o < 7; o++) begin
        checks++;
        if (fgot[o] !== fref[o]) begin failures++; $display("FAIL run5 fc%0d %0d exp %0d", o, signed'(fgot[o]), signed'(fref[o])); end
      end
      checks++;
      if (ops_total != 288*90 + 7*2880) begin failures++; $display("FAIL run5 ops %0d", ops_total); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
