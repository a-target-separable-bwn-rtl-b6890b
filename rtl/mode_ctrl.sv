// mode_ctrl: distribution of the network outputs to the classifiers.
//
// The processor runs in one of three modes: SV, KWS or SV & KWS. The mode
// controller passes the fully connected results to the classifier of each
// enabled target (kws_valid, sv_valid), picks the classification thresholds
// of the current SNR class from the configured tables, and switches off the
// fully connected PE groups of a disabled target so that its head is not
// computed. Combinational. The table layout is this design's choice.
module mode_ctrl
  import speech_pkg::*;
(
  input  mode_e                   mode,
  input  snr_class_e              snr_class,
  input  logic                    fc_valid,
  input  logic [3:0][DW-1:0]      kws_th_tab,
  input  logic [3:0][DW-1:0]      sv_th1_tab,
  input  logic [3:0][DW-1:0]      sv_th2_tab,
  output logic                    kws_valid,
  output logic                    sv_valid,
  output logic [DW-1:0]           kws_th,
  output logic [DW-1:0]           sv_th1,
  output logic [DW-1:0]           sv_th2,
  output logic [N_FC-1:0]         fc_grp_en
);

  logic kws_on, sv_on;
  assign kws_on    = mode[1];
  assign sv_on     = mode[0];
  assign kws_valid = fc_valid & kws_on;
  assign sv_valid  = fc_valid & sv_on;
  assign kws_th    = kws_th_tab[snr_class];
  assign sv_th1    = sv_th1_tab[snr_class];
  assign sv_th2    = sv_th2_tab[snr_class];
  assign fc_grp_en = {{N_SV{sv_on}}, {N_KWS{kws_on}}};

endmodule
