// speech_pkg: types and constants shared by the speech recognition processor.
//
// The network sizes are those of the target-separable binary-weight network:
// a 49-frame x 26-coefficient MFCC map, a 3x3 convolution to 24x12x10
// (stride 2), a 3x3 convolution to 22x10x20 (stride 1), then two separate
// fully connected heads, 5 outputs for keyword spotting (KWS) and 2 for
// speaker verification (SV). The memory base addresses, the 8-bit activation
// format, the SNR class encoding and the configuration register map are
// choices of this design.
package speech_pkg;

  localparam int DW       = 16;  // PE and adder-tree data width
  localparam int ACTW     = 8;   // stored activation width
  localparam int NGRP     = 20;  // PE groups (output channels in parallel)
  localparam int NCOL     = 3;   // PEs per group (kernel columns)
  localparam int N_KWS    = 5;   // KWS fully connected outputs
  localparam int N_SV     = 2;   // SV fully connected outputs
  localparam int N_FC     = N_KWS + N_SV;
  localparam int DMEM_DEPTH = 10189;  // 9.95 KB of 8-bit words
  localparam int WMEM_BYTES = 4088;   // 3.99 KB of packed 1-bit weights
  localparam int DADDR_W  = 14;
  localparam int WADDR_W  = 15;      // bit address of the weight memory

  // SNR prediction result
  typedef enum logic [1:0] {
    SNR_5DB  = 2'd0,
    SNR_10DB = 2'd1,
    SNR_15DB = 2'd2,
    SNR_CLEAN = 2'd3
  } snr_class_e;

  // Functional mode of the processor
  typedef enum logic [1:0] {
    MODE_OFF = 2'b00,
    MODE_SV  = 2'b01,
    MODE_KWS = 2'b10,
    MODE_BOTH = 2'b11
  } mode_e;

  typedef enum logic [1:0] {
    L_CONV = 2'd0,
    L_FC   = 2'd1
  } layer_kind_e;

  // One layer of the network as the layer controller runs it.
  typedef struct packed {
    layer_kind_e      kind;
    logic [7:0]       in_h;     // input rows (frames)
    logic [7:0]       in_w;     // input columns (frequency)
    logic [5:0]       in_c;     // input channels
    logic [7:0]       out_h;
    logic [7:0]       out_w;
    logic [5:0]       out_c;    // output channels (conv) or outputs (FC)
    logic [1:0]       stride;
    logic [12:0]      fc_len;   // FC input length
    logic [DADDR_W-1:0] in_base;
    logic [DADDR_W-1:0] out_base;
    logic [WADDR_W-1:0] w_base; // first weight bit
  } layer_t;

  localparam int NLAYER = 3;

  // The network as stored: MFCC map at data address 0, layer-1 output at
  // 1274, layer-2 output at 4154 (8554 bytes in all). Weights are packed in
  // the order they are consumed: 3*M bits per cycle, layer 1 from bit 0
  // (90 bits), layer 2 from bit 90 (1800 bits), the FC layer from bit 1890
  // (1467 cycles of 21 bits).
  localparam layer_t NET_L1 = '{kind: L_CONV, in_h: 8'd49, in_w: 8'd26, in_c: 6'd1,
      out_h: 8'd24, out_w: 8'd12, out_c: 6'd10, stride: 2'd2, fc_len: 13'd0,
      in_base: 14'd0, out_base: 14'd1274, w_base: 15'd0};
  localparam layer_t NET_L2 = '{kind: L_CONV, in_h: 8'd24, in_w: 8'd12, in_c: 6'd10,
      out_h: 8'd22, out_w: 8'd10, out_c: 6'd20, stride: 2'd1, fc_len: 13'd0,
      in_base: 14'd1274, out_base: 14'd4154, w_base: 15'd90};
  localparam layer_t NET_FC = '{kind: L_FC, in_h: 8'd0, in_w: 8'd0, in_c: 6'd0,
      out_h: 8'd0, out_w: 8'd0, out_c: 6'(N_FC), stride: 2'd1, fc_len: 13'd4400,
      in_base: 14'd4154, out_base: 14'd0, w_base: 15'd1890};
  localparam layer_t [NLAYER-1:0] NET_LAYERS = {NET_FC, NET_L2, NET_L1};

  // Number of approximate (ORA) 4-bit segments used for each SNR class:
  // 5 dB -> all exact, 15 dB -> 8 ORA bits, clean -> 12 ORA bits.
  // 10 dB is not specified and uses 4 ORA bits.
  function automatic logic [1:0] ora_segs_for(snr_class_e s);
    case (s)
      SNR_5DB:  return 2'd0;
      SNR_10DB: return 2'd1;
      SNR_15DB: return 2'd2;
      default:  return 2'd3;
    endcase
  endfunction

endpackage
