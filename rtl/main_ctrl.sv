// main_ctrl: main controller of the speech recognition processor.
//
// It holds the configuration registers, written one 32-bit word at a time
// (cfg_we, cfg_addr, cfg_wdata), and runs the working state of the chip:
//   IDLE     no voice: only the VAD is clocked
//   LISTEN   voice present: SNR and feature extraction run until a feature
//            window is ready (feat_ready)
//   COMPUTE  the accelerator runs the network (acc_start pulse on entry)
//   CLASSIFY the enabled classifiers decide; then back to LISTEN, or IDLE
//            when the VAD has dropped
// It drives the clock-gate enables of the SNR unit and the accelerator and
// the feature-extraction enable, and turns the SNR class into the
// approximate-adder configuration: 0, 4, 8 or 12 ORA bits for 5 dB, 10 dB,
// 15 dB and clean. Each addition-tree stage can be made more exact than the
// PEs: stage s uses the PE setting minus its reduction field, floored at 0.
//
// Register map (reset value):
//   0  [1:0] mode (3 = SV&KWS), [4] reuse_en (1), [5] approx_en (1),
//      [9:8] / [11:10] ORA segment reduction of tree stage 0 / 1 (0)
//   1  VAD energy threshold (65536)      2  zero-crossing threshold (160)
//   3..6   KWS threshold per SNR class  7..10  SV threshold 1 per class
//   11..14 SV threshold 2 per class     15 beta, Q8 (102 = 0.4)
//   16..16+NW-1 SV confidence weights a1..aNW, Q8 (256)
// The states, the register map and the reset values are this design's.
module main_ctrl
  import speech_pkg::*;
#(
  parameter int NW = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [5:0]           cfg_addr,
  input  logic [31:0]          cfg_wdata,
  input  logic                 vad_active,
  input  logic                 feat_ready,
  input  logic                 acc_done,
  input  logic                 kws_done,
  input  logic                 sv_done,
  input  snr_class_e           snr_class,
  output logic [1:0]           state,
  output logic                 acc_start,
  output mode_e                mode,
  output logic                 reuse_en,
  output logic                 approx_sel,
  output logic [1:0]           pe_ora,
  output logic [3:0]           tree_ora,
  output logic [31:0]          vad_th,
  output logic [8:0]           zcr_th,
  output logic [3:0][DW-1:0]   kws_th_tab,
  output logic [3:0][DW-1:0]   sv_th1_tab,
  output logic [3:0][DW-1:0]   sv_th2_tab,
  output logic signed [15:0]   beta,
  output logic [NW-1:0][8:0]   sv_wts,
  output logic                 mfcc_en,
  output logic                 snr_clk_en,
  output logic                 acc_clk_en
);

  typedef enum logic [1:0] {S_IDLE, S_LISTEN, S_COMPUTE, S_CLASSIFY} state_e;
  state_e st;
  logic   kws_seen, sv_seen, cls_done;
  logic [1:0][1:0] tree_red;

  assign state = st;

  // configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_BOTH;
      reuse_en   <= 1'b1;
      approx_sel <= 1'b1;
      tree_red   <= '0;
      vad_th     <= 32'd65536;
      zcr_th     <= 9'd160;
      kws_th_tab <= '0;
      sv_th1_tab <= '0;
      sv_th2_tab <= '0;
      beta       <= 16'sd102;
      for (int i = 0; i < NW; i++) sv_wts[i] <= 9'd256;
    end else if (cfg_we) begin
      case (cfg_addr)
        6'd0: begin
          mode       <= mode_e'(cfg_wdata[1:0]);
          reuse_en   <= cfg_wdata[4];
          approx_sel <= cfg_wdata[5];
          tree_red   <= cfg_wdata[11:8];
        end
        6'd1:  vad_th <= cfg_wdata;
        6'd2:  zcr_th <= cfg_wdata[8:0];
        6'd3, 6'd4, 6'd5, 6'd6:     kws_th_tab[cfg_addr - 6'd3]  <= cfg_wdata[DW-1:0];
        6'd7, 6'd8, 6'd9, 6'd10:    sv_th1_tab[cfg_addr - 6'd7]  <= cfg_wdata[DW-1:0];
        6'd11, 6'd12, 6'd13, 6'd14: sv_th2_tab[cfg_addr - 6'd11] <= cfg_wdata[DW-1:0];
        6'd15: beta <= cfg_wdata[15:0];
        default:
          if (cfg_addr >= 6'd16 && int'(cfg_addr) < 16 + NW)
            sv_wts[cfg_addr - 6'd16] <= cfg_wdata[8:0];
      endcase
    end
  end

  // a classifier that is switched off counts as done
  assign cls_done = (kws_seen || kws_done || !mode[1]) && (sv_seen || sv_done || !mode[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      acc_start <= 1'b0;
      kws_seen  <= 1'b0;
      sv_seen   <= 1'b0;
    end else begin
      acc_start <= 1'b0;
      case (st)
        S_IDLE:   if (vad_active) st <= S_LISTEN;
        S_LISTEN: begin
          if (feat_ready && mode != MODE_OFF) begin
            st        <= S_COMPUTE;
            acc_start <= 1'b1;
            kws_seen  <= 1'b0;
            sv_seen   <= 1'b0;
          end else if (!vad_active) begin
            st <= S_IDLE;
          end
        end
        S_COMPUTE: begin
          // the KWS decision can come before the accelerator reports done
          if (kws_done) kws_seen <= 1'b1;
          if (sv_done)  sv_seen  <= 1'b1;
          if (acc_done) st <= S_CLASSIFY;
        end
        S_CLASSIFY: begin
          if (kws_done) kws_seen <= 1'b1;
          if (sv_done)  sv_seen  <= 1'b1;
          if (cls_done) st <= vad_active ? S_LISTEN : S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign pe_ora     = ora_segs_for(snr_class);
  always_comb
    for (int t = 0; t < 2; t++)
      tree_ora[2*t +: 2] = (pe_ora > tree_red[t]) ? pe_ora - tree_red[t] : 2'd0;

  assign mfcc_en    = (st != S_IDLE);
  assign snr_clk_en = vad_active || (st != S_IDLE);
  assign acc_clk_en = (st == S_COMPUTE) || acc_start;

endmodule
