// tb_layer_ctrl: runs the layer controller on a small three-layer table
// (stride-2 conv, stride-1 conv, FC of 31 inputs) and checks every issued
// data and weight address, every write-back address, the reuse-buffer
// controls, the FC tail masking and the total cycle count against a loop
// model of the schedule.
module tb_layer_ctrl;
  import speech_pkg::*;

  localparam layer_t T1 = '{kind: L_CONV, in_h: 8'd7, in_w: 8'd9, in_c: 6'd2,
      out_h: 8'd3, out_w: 8'd4, out_c: 6'd3, stride: 2'd2, fc_len: 13'd0,
      in_base: 14'd5, out_base: 14'd200, w_base: 15'd7};
  localparam layer_t T2 = '{kind: L_CONV, in_h: 8'd3, in_w: 8'd4, in_c: 6'd3,
      out_h: 8'd1, out_w: 8'd2, out_c: 6'd4, stride: 2'd1, fc_len: 13'd0,
      in_base: 14'd200, out_base: 14'd300, w_base: 15'd100};
  localparam layer_t T3 = '{kind: L_FC, in_h: 8'd0, in_w: 8'd0, in_c: 6'd0,
      out_h: 8'd0, out_w: 8'd0, out_c: 6'd7, stride: 2'd1, fc_len: 13'd31,
      in_base: 14'd300, out_base: 14'd0, w_base: 15'd400};
  localparam layer_t [2:0] TAB = {T3, T2, T1};

  logic clk = 0, rst_n = 0;
  logic start, reuse_en, busy, done, d_re, w_re, pe_en, pe_clr, reuse_active, buf_dist, is_fc;
  logic [2:0][13:0] d_raddr;
  logic [14:0] w_raddr;
  logic [2:0] col_valid;
  logic [5:0] n_groups;
  logic [1:0] layer_idx;
  logic buf_clear, buf_push, wb, fc_valid;
  logic [4:0] wb_ch;
  logic [13:0] wb_addr;
  int checks = 0, failures = 0;

  layer_ctrl dut (.clk, .rst_n, .start, .layers(TAB), .n_layers(2'd3), .reuse_en, .busy, .done, .d_re,
    .d_raddr, .w_re, .w_raddr, .pe_en, .pe_clr, .col_valid, .reuse_active, .buf_dist,
    .n_groups, .is_fc, .layer_idx, .buf_clear, .buf_push, .wb, .wb_ch, .wb_addr, .fc_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin
    int cyc, exp_cyc;
    start = 0; reuse_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    // conv layers
    for (int l = 0; l < 2; l++) begin
      layer_t L;
      L = TAB[l];
      for (int oy = 0; oy < int'(L.out_h); oy++)
        for (int ox = 0; ox < int'(L.out_w); ox++) begin
          for (int ky = 0; ky < 3; ky++)
            for (int n = 0; n < int'(L.in_c); n++) begin
              expect_(d_re && w_re, "issue");
              for (int k = 0; k < 3; k++)
                expect_(int'(d_raddr[k]) == int'(L.in_base) +
                        ((oy * int'(L.stride) + ky) * int'(L.in_w) + ox * int'(L.stride) + k) * int'(L.in_c) + n,
                        $sformatf("daddr l%0d oy%0d ox%0d ky%0d n%0d k%0d got %0d", l, oy, ox, ky, n, k, d_raddr[k]));
              expect_(int'(w_raddr) == int'(L.w_base) + (ky * int'(L.in_c) + n) * 3 * int'(L.out_c), "waddr");
              expect_(buf_clear == (ox == 0 && ky == 0 && n == 0), "buf_clear");
              expect_(reuse_active && buf_dist == (L.stride == 1), "reuse flags");
              @(negedge clk); cyc++;
              expect_(pe_en && pe_clr == (ky == 0 && n == 0), "pe ctl");
            end
          // drain cycle
          expect_(!d_re && !wb, "drain");
          @(negedge clk); cyc++;
          for (int m = 0; m < int'(L.out_c); m++) begin
            expect_(wb && int'(wb_ch) == m, "wb");
            expect_(int'(wb_addr) == int'(L.out_base) + (oy * int'(L.out_w) + ox) * int'(L.out_c) + m, "wb addr");
            expect_(buf_push == (m == int'(L.out_c) - 1), "push");
            @(negedge clk); cyc++;
          end
        end
    end
    // FC layer
    for (int c = 0; c < 11; c++) begin
      expect_(d_re && is_fc && !reuse_active, "fc issue");
      for (int k = 0; k < 3; k++) expect_(int'(d_raddr[k]) == 300 + 3 * c + k, "fc addr");
      expect_(int'(w_raddr) == 400 + c * 21, "fc waddr");
      @(negedge clk); cyc++;
      expect_(pe_clr == (c == 0), "fc clr");
      expect_(col_valid == ((c == 10) ? 3'b001 : 3'b111), "col_valid");
    end
    expect_(!fc_valid, "no early fc_valid");
    @(negedge clk); cyc++;
    expect_(fc_valid, "fc_valid");
    @(negedge clk); cyc++;
    expect_(done, "done");
    exp_cyc = 1 + 12 * (6 + 1 + 3) + 2 * (9 + 1 + 4) + 11 + 2;
    expect_(cyc == exp_cyc, $sformatf("cycles %0d exp %0d", cyc, exp_cyc));
    @(negedge clk);
    expect_(!busy, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
