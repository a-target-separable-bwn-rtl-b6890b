// bwn_accel: target-separable binary-weight network accelerator.
//
// Sixty PEs form 20 groups of three. For a 3x3 convolution with M output
// channels, group m computes channel m and its three PEs the three kernel
// columns; each cycle the three activations of one kernel row and input
// channel are broadcast to all groups and every PE adds or subtracts its
// activation according to its one-bit weight. Per group, an addition tree
// sums the three column results and, when frequency-domain reuse applies,
// the partial sum kept in the group's reuse buffer: kernel elements whose
// column-1 weight equals the column-3 weight are computed once by the third
// PE (into Rb) and skipped by the first PE one or two strides later. The
// tree result goes through BN-ReLU back to the data memory, one channel per
// cycle. The fully connected layer uses 7 groups (5 KWS outputs, 2 SV
// outputs) over one stream of 4400 activations; its sums leave on fc_out
// with fc_valid, and the groups of a disabled target are switched off
// (fc_grp_en). All adders can be made approximate (approx_sel, pe_ora for
// the PEs and tree_ora per tree stage) according to the SNR.
//
// The layer table starts as the parameter LAYERS (the network above) and
// can be rewritten while idle through lt_*: word j (0..3) of entry l is at
// lt_addr = 4*l + j and holds bits 32*j +: 32 of the packed layer_t; address
// 12 holds the number of layers (1..3). So input sizes, channel counts and
// the number of cascaded layers are set at run time.
//
// Interface: byte writes load weights (w_*) and features (d_*) while idle;
// bn_* writes the per-channel BN bias and shift (entry 20*layer + channel;
// entries 40..46 are the FC biases). start runs the whole network; done
// pulses at the end. ops_total and ops_skipped count PE additions performed
// and those skipped through reuse since the last start.
module bwn_accel
  import speech_pkg::*;
#(
  parameter layer_t [NLAYER-1:0] LAYERS = NET_LAYERS,
  parameter int DMEM = DMEM_DEPTH,
  parameter int WMEM = WMEM_BYTES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // configuration
  input  logic                     reuse_en,
  input  logic                     approx_sel,
  input  logic [1:0]               pe_ora,
  input  logic [3:0]               tree_ora,
  input  logic [N_FC-1:0]          fc_grp_en,
  // loading
  input  logic                     w_we,
  input  logic [11:0]              w_addr,
  input  logic [7:0]               w_data,
  input  logic                     d_we,
  input  logic [DADDR_W-1:0]       d_addr,
  input  logic [ACTW-1:0]          d_data,
  input  logic                     lt_we,
  input  logic [3:0]               lt_addr,
  input  logic [31:0]              lt_wdata,
  input  logic                     bn_we,
  input  logic [5:0]               bn_addr,
  input  logic [DW-1:0]            bn_bias,
  input  logic [3:0]               bn_shift,
  output logic                     ext_blocked,
  // results
  output logic                     fc_valid,
  output logic [N_FC-1:0][DW-1:0]  fc_out,
  output logic [31:0]              ops_total,
  output logic [31:0]              ops_skipped
);

  // ---------------- layer controller ----------------
  logic                         d_re, w_re, pe_en, pe_clr, reuse_active, buf_dist, is_fc;
  logic [NCOL-1:0][DADDR_W-1:0] d_raddr;
  logic [WADDR_W-1:0]           w_raddr;
  logic [NCOL-1:0]              col_valid;
  logic [5:0]                   n_groups;
  logic [1:0]                   layer_idx;
  logic                         buf_clear, buf_push, wb;
  logic [4:0]                   wb_ch;
  logic [DADDR_W-1:0]           wb_addr;

  // ---------------- layer table ----------------
  localparam int LTW = $bits(layer_t);
  logic [NLAYER-1:0][127:0] lt_q;
  logic [1:0]               n_layers;
  layer_t [NLAYER-1:0]      layers;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLAYER; l++) lt_q[l] <= 128'(LAYERS[l]);
      n_layers <= 2'(NLAYER);
    end else if (lt_we && !busy) begin
      if (int'(lt_addr) < 4 * NLAYER)
        lt_q[lt_addr[3:2]][32 * lt_addr[1:0] +: 32] <= lt_wdata;
      else if (lt_addr == 4'd12 && lt_wdata[1:0] != 2'd0)
        n_layers <= lt_wdata[1:0];
    end
  end

  always_comb
    for (int l = 0; l < NLAYER; l++) layers[l] = layer_t'(lt_q[l][LTW-1:0]);

  layer_ctrl u_lc (
    .clk, .rst_n, .start, .layers, .n_layers, .reuse_en, .busy, .done,
    .d_re, .d_raddr, .w_re, .w_raddr,
    .pe_en, .pe_clr, .col_valid, .reuse_active, .buf_dist, .n_groups, .is_fc, .layer_idx,
    .buf_clear, .buf_push, .wb, .wb_ch, .wb_addr, .fc_valid);

  // ---------------- memories ----------------
  logic                  mw_we, md_we;
  logic [11:0]           mw_addr;
  logic [7:0]            mw_data;
  logic [DADDR_W-1:0]    md_addr;
  logic [ACTW-1:0]       md_data, wb_data;
  logic [NCOL*NGRP-1:0]  wbits;
  logic [NCOL-1:0][ACTW-1:0] dq;

  mem_ctrl u_mc (
    .acc_busy(busy),
    .ext_w_we(w_we), .ext_w_addr(w_addr), .ext_w_data(w_data),
    .ext_d_we(d_we), .ext_d_addr(d_addr), .ext_d_data(d_data),
    .acc_d_we(wb), .acc_d_addr(wb_addr), .acc_d_data(wb_data),
    .w_we(mw_we), .w_addr(mw_addr), .w_data(mw_data),
    .d_we(md_we), .d_addr(md_addr), .d_data(md_data),
    .ext_blocked);

  logic [NCOL-1:0][$clog2(DMEM)-1:0] d_raddr_n;
  always_comb
    for (int k = 0; k < NCOL; k++)
      d_raddr_n[k] = d_raddr[k][$clog2(DMEM)-1:0];

  weight_sram #(.BYTES(WMEM), .RW(NCOL*NGRP)) u_wmem (
    .clk, .we(mw_we), .waddr(mw_addr[$clog2(WMEM)-1:0]), .wdata(mw_data),
    .re(w_re), .raddr(w_raddr[$clog2(WMEM)+2:0]), .rdata(wbits));

  data_sram #(.DEPTH(DMEM), .AW(ACTW), .NRD(NCOL)) u_dmem (
    .clk, .we(md_we), .waddr(md_addr[$clog2(DMEM)-1:0]), .wdata(md_data),
    .re(d_re), .raddr(d_raddr_n), .rdata(dq));


  // ---------------- BN parameters ----------------
  logic [DW-1:0] bnb [3*NGRP];
  logic [3:0]    bns [3*NGRP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3*NGRP; i++) begin
        bnb[i] <= '0;
        bns[i] <= '0;
      end
    end else if (bn_we && int'(bn_addr) < 3*NGRP) begin
      bnb[bn_addr] <= bn_bias;
      bns[bn_addr] <= bn_shift;
    end
  end

  // ---------------- PE array ----------------
  logic [NGRP-1:0][NCOL-1:0][DW-1:0] r, rb;
  logic [NGRP-1:0][DW-1:0]           bq, tsum;
  logic [NGRP-1:0]                   bvalid, grp_on, mask;
  logic [NCOL-1:0][DW-1:0]           x;

  always_comb
    for (int k = 0; k < NCOL; k++)
      x[k] = DW'(signed'(dq[k]));

  for (genvar m = 0; m < NGRP; m++) begin : g_grp
    assign grp_on[m] = (m < int'(n_groups)) && (!is_fc || (m < N_FC && fc_grp_en[m % N_FC]));
    assign mask[m]   = (wbits[m*NCOL] == wbits[m*NCOL + 2]);

    for (genvar k = 0; k < NCOL; k++) begin : g_col
      logic skip, rb_en;
      logic [DW-1:0] bias;
      assign skip  = !col_valid[k] ||
                     (k == 0 && reuse_active && bvalid[m] && mask[m]);
      assign rb_en = (k == 2) && reuse_active && mask[m];
      assign bias  = (k == 0 && is_fc) ? bnb[2*NGRP + m] : '0;
      pe u_pe (
        .clk, .rst_n, .en(pe_en && grp_on[m]), .clr(pe_clr),
        .x(x[k]), .w(wbits[m*NCOL + k]), .skip, .rb_en, .bias,
        .approx_sel, .ora_segs(pe_ora), .r(r[m][k]), .rb(rb[m][k]));
    end

    reuse_buffer #(.DW(DW)) u_buf (
      .clk, .rst_n, .clear(buf_clear), .push(buf_push), .rb(rb[m][2]),
      .sel2(buf_dist), .q(bq[m]), .valid(bvalid[m]));

    add_tree #(.N(4), .DW(DW)) u_tree (
      .in({(reuse_active && bvalid[m]) ? bq[m] : DW'(0), r[m][2], r[m][1], r[m][0]}),
      .stage_ora(tree_ora), .approx_sel, .sum(tsum[m]));
  end

  // ---------------- write-back and FC outputs ----------------
  bn_relu #(.DW(DW), .AW(ACTW)) u_bn (
    .acc(tsum[wb_ch]), .bias(bnb[int'(layer_idx) * NGRP + int'(wb_ch)]),
    .shift(bns[int'(layer_idx) * NGRP + int'(wb_ch)]), .y(wb_data));

  always_comb
    for (int o = 0; o < N_FC; o++)
      fc_out[o] = tsum[o];

  // ---------------- operation counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ops_total   <= '0;
      ops_skipped <= '0;
    end else if (start && !busy) begin
      ops_total   <= '0;
      ops_skipped <= '0;
    end else if (pe_en) begin
      logic [31:0] t, s;
      t = '0;
      s = '0;
      for (int m = 0; m < NGRP; m++) begin
        if (grp_on[m]) begin
          for (int k = 0; k < NCOL; k++)
            if (col_valid[k]) t = t + 1;
          if (col_valid[0] && reuse_active && bvalid[m] && mask[m]) s = s + 1;
        end
      end
      ops_total   <= ops_total + t;
      ops_skipped <= ops_skipped + s;
    end
  end

endmodule
