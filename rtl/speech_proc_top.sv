// speech_proc_top: target-separable binary-weight-network speech processor.
//
// One network serves two targets: the convolution layers that extract
// speech features are shared, and two small fully connected heads give the
// keyword-spotting (KWS) and the speaker-verification (SV) outputs. The
// speech samples (10-bit, x_valid) feed the VAD and the SNR estimator. When
// the VAD reports voice, the main controller enables the SNR unit and the
// feature extraction (mfcc_en); MFCC features, computed outside this block,
// are written into the accelerator's data memory through feat_* and
// feat_ready starts the network on the 49x26 window. The mode controller
// hands the results to the KWS classifier (softmax decision) and the SV
// classifier (two thresholds, then the continuity-based secondary
// classification), with thresholds chosen by the SNR class. The SNR class
// also sets how many low adder bits of the PEs and trees are approximate.
// The SNR unit and the accelerator run on gated clocks, open during reset.
//
// Ports: cfg_* writes the main controller's registers (addresses 0..31)
// and the accelerator's layer table (addresses 32..44 = table words 0..12);
// wt_* loads packed weights (byte per cycle), bn_* the BN parameters,
// feat_* the feature map (all while the accelerator is idle). Results:
// kw_valid/keyword/kw_detected and sv_valid/speaker pulse after each window (sv_score is
// the secondary-classification score); vad_active, vad_energy, snr_class,
// state and acc_busy show the front end, the controller and the
// accelerator.
module speech_proc_top
  import speech_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // speech input
  input  logic               x_valid,
  input  logic signed [9:0]  x,
  // configuration
  input  logic               cfg_we,
  input  logic [5:0]         cfg_addr,
  input  logic [31:0]        cfg_wdata,
  // weight, BN and feature loading
  input  logic               wt_we,
  input  logic [11:0]        wt_addr,
  input  logic [7:0]         wt_data,
  input  logic               bn_we,
  input  logic [5:0]         bn_addr,
  input  logic [DW-1:0]      bn_bias,
  input  logic [3:0]         bn_shift,
  input  logic               feat_we,
  input  logic [DADDR_W-1:0] feat_addr,
  input  logic [ACTW-1:0]    feat_data,
  input  logic               feat_ready,
  output logic               mfcc_en,
  output logic               load_blocked,
  // status and results
  output logic               vad_active,
  output logic [31:0]        vad_energy,
  output logic               acc_busy,
  output logic signed [15:0] sv_score,
  output logic [1:0]         snr_class,
  output logic [1:0]         state,
  output logic               kw_valid,
  output logic [2:0]         keyword,
  output logic               kw_detected,
  output logic               sv_valid,
  output logic               speaker,
  output logic               sv_init_label,
  output logic [N_FC-1:0][DW-1:0] fc_out,
  output logic [31:0]        ops_total,
  output logic [31:0]        ops_skipped
);

  localparam int NW = 3;

  // ---------------- front end ----------------
  logic        vad_frame;
  logic [31:0] vad_th;
  logic [8:0]  zcr_th;
  snr_class_e  snr_c;
  logic        snr_frame;
  logic        snr_clk_en, snr_gclk;

  vad u_vad (
    .clk, .rst_n, .x_valid, .x, .threshold(vad_th),
    .active(vad_active), .frame_done(vad_frame), .energy(vad_energy));

  clock_gate u_cg_snr (.clk, .en(snr_clk_en | ~rst_n), .gclk(snr_gclk));

  snr u_snr (
    .clk(snr_gclk), .rst_n, .x_valid, .x, .zcr_th,
    .snr_class(snr_c), .frame_done(snr_frame));

  assign snr_class = snr_c;

  // ---------------- main and mode control ----------------
  logic                 acc_start, acc_done, reuse_en, approx_sel;
  logic [1:0]           pe_ora;
  logic [3:0]           tree_ora;
  mode_e                mode;
  logic [3:0][DW-1:0]   kws_th_tab, sv_th1_tab, sv_th2_tab;
  logic signed [15:0]   beta;
  logic [NW-1:0][8:0]   sv_wts;
  logic                 acc_clk_en, acc_gclk;
  logic                 kws_done, sv_done;

  main_ctrl #(.NW(NW)) u_main (
    .clk, .rst_n, .cfg_we(cfg_we && !cfg_addr[5]), .cfg_addr, .cfg_wdata,
    .vad_active, .feat_ready, .acc_done, .kws_done, .sv_done, .snr_class(snr_c),
    .state, .acc_start, .mode, .reuse_en, .approx_sel, .pe_ora, .tree_ora,
    .vad_th, .zcr_th, .kws_th_tab, .sv_th1_tab, .sv_th2_tab, .beta, .sv_wts,
    .mfcc_en, .snr_clk_en, .acc_clk_en);

  logic                    fc_valid, kws_v, sv_v;
  logic [DW-1:0]           kws_th, sv_th1, sv_th2;
  logic [N_FC-1:0]         fc_grp_en;

  mode_ctrl u_mode (
    .mode, .snr_class(snr_c), .fc_valid, .kws_th_tab, .sv_th1_tab, .sv_th2_tab,
    .kws_valid(kws_v), .sv_valid(sv_v), .kws_th, .sv_th1, .sv_th2, .fc_grp_en);

  // ---------------- accelerator ----------------
  // the gates stay open during reset so that the gated units see clock edges
  // while rst_n is low; loads open the accelerator gate for their write cycle
  logic lt_we;
  assign lt_we = cfg_we && cfg_addr[5];

  clock_gate u_cg_acc (.clk, .en(acc_clk_en | wt_we | bn_we | feat_we | lt_we | ~rst_n),
                       .gclk(acc_gclk));

  bwn_accel u_acc (
    .clk(acc_gclk), .rst_n, .start(acc_start), .busy(acc_busy), .done(acc_done),
    .reuse_en, .approx_sel, .pe_ora, .tree_ora, .fc_grp_en,
    .lt_we, .lt_addr(cfg_addr[3:0]), .lt_wdata(cfg_wdata),
    .w_we(wt_we), .w_addr(wt_addr), .w_data(wt_data),
    .d_we(feat_we), .d_addr(feat_addr), .d_data(feat_data),
    .bn_we, .bn_addr, .bn_bias, .bn_shift, .ext_blocked(load_blocked),
    .fc_valid, .fc_out, .ops_total, .ops_skipped);

  // ---------------- classifiers ----------------
  kws_classifier #(.NOUT(N_KWS), .DW(DW)) u_kws (
    .clk, .rst_n, .valid(kws_v), .fc(fc_out[N_KWS-1:0]), .th(kws_th),
    .label_valid(kw_valid), .keyword, .detected(kw_detected));

  logic               sv_busy;

  sv_classifier #(.N(NW), .DW(DW)) u_sv (
    .clk, .rst_n, .valid(sv_v), .fc0(fc_out[N_KWS]), .fc1(fc_out[N_KWS+1]),
    .th1(sv_th1), .th2(sv_th2), .wts(sv_wts), .beta, .busy(sv_busy),
    .label_valid(sv_valid), .init_label(sv_init_label), .speaker, .score(sv_score));

  assign kws_done = kw_valid;
  assign sv_done  = sv_valid;

endmodule
