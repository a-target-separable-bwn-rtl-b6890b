// snr: signal-to-noise ratio class estimation.
//
// For each frame of FRAME samples the unit measures the short-term energy
// (sum of squares) and the zero-crossing count (sign changes between
// consecutive samples). A frame whose zero-crossing count exceeds zcr_th is
// taken as noise-like and averaged into a noise-energy estimate; any other
// frame is averaged into a speech-energy estimate (new = (old + frame)/2,
// the first frame of each kind loads directly). At the end of every frame
// the speech/noise ratio is compared with 2^SH_CLEAN, 2^SH_15 and 2^SH_10
// (about 21, 15 and 9 dB) to give the class: 3 clean, 2 15 dB, 1 10 dB,
// 0 5 dB. Before any noise frame has been seen the class is clean.
// snr_class changes one cycle after the frame's last sample. How energy and
// zero-crossing rate are combined is this design's choice.
module snr
  import speech_pkg::*;
#(
  parameter int FRAME    = 320,
  parameter int XW       = 10,
  parameter int SH_CLEAN = 7,
  parameter int SH_15    = 5,
  parameter int SH_10    = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  input  logic [8:0]           zcr_th,
  output snr_class_e           snr_class,
  output logic                 frame_done
);

  localparam int CW = $clog2(FRAME);
  logic [CW-1:0]  cnt;
  logic [8:0]     zcr;
  logic [31:0]    e;
  logic           prev_neg;
  logic [31:0]    noise_e, speech_e;
  logic           noise_ok, speech_ok;
  logic [2*XW-1:0] sq;
  logic            zc;
  logic [31:0]     e_fr;
  logic [8:0]      z_fr;
  logic [31:0]     ne, se;
  logic            nok;

  assign sq    = (2*XW)'(x * x);
  assign zc = (cnt != '0) && (x[XW-1] != prev_neg);
  assign e_fr  = e + 32'(sq);
  assign z_fr  = zcr + 9'(zc);

  // estimates after the frame now ending
  always_comb begin
    ne  = noise_e;
    se  = speech_e;
    nok = noise_ok;
    if (z_fr > zcr_th) begin
      ne  = noise_ok ? 32'((33'(noise_e) + 33'(e_fr)) >> 1) : e_fr;
      nok = 1'b1;
    end else begin
      se  = speech_ok ? 32'((33'(speech_e) + 33'(e_fr)) >> 1) : e_fr;
    end
  end

  function automatic snr_class_e classify(logic [31:0] s, logic [31:0] n, logic ok);
    logic [63:0] s64, n64;
    s64 = 64'(s);
    n64 = 64'(n);
    if (!ok || s64 >= (n64 << SH_CLEAN)) return SNR_CLEAN;
    if (s64 >= (n64 << SH_15))           return SNR_15DB;
    if (s64 >= (n64 << SH_10))           return SNR_10DB;
    return SNR_5DB;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      zcr        <= '0;
      e          <= '0;
      prev_neg   <= 1'b0;
      noise_e    <= '0;
      speech_e   <= '0;
      noise_ok   <= 1'b0;
      speech_ok  <= 1'b0;
      snr_class  <= SNR_CLEAN;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (x_valid) begin
        prev_neg <= x[XW-1];
        if (cnt == CW'(FRAME - 1)) begin
          cnt        <= '0;
          zcr        <= '0;
          e          <= '0;
          noise_e    <= ne;
          speech_e   <= se;
          noise_ok   <= nok;
          speech_ok  <= speech_ok | (z_fr <= zcr_th);
          snr_class  <= classify(se, ne, nok);
          frame_done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          zcr <= z_fr;
          e   <= e_fr;
        end
      end
    end
  end

endmodule
