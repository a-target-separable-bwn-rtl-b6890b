// mem_ctrl: access arbitration of the weight and data memories.
//
// While the accelerator runs (acc_busy) it owns the write port of the data
// memory and the weight memory is read-only; external writes (weight loading
// and the MFCC feature stream) are refused and flagged on ext_blocked.
// When the accelerator is idle the external writers own the ports; weight
// loading has its own port, so both can write in the same cycle.
// Combinational. The fixed priority is this design's choice.
module mem_ctrl
  import speech_pkg::*;
(
  input  logic                 acc_busy,
  // external writers
  input  logic                 ext_w_we,
  input  logic [11:0]          ext_w_addr,
  input  logic [7:0]           ext_w_data,
  input  logic                 ext_d_we,
  input  logic [DADDR_W-1:0]   ext_d_addr,
  input  logic [ACTW-1:0]      ext_d_data,
  // accelerator writer
  input  logic                 acc_d_we,
  input  logic [DADDR_W-1:0]   acc_d_addr,
  input  logic [ACTW-1:0]      acc_d_data,
  // memory ports
  output logic                 w_we,
  output logic [11:0]          w_addr,
  output logic [7:0]           w_data,
  output logic                 d_we,
  output logic [DADDR_W-1:0]   d_addr,
  output logic [ACTW-1:0]      d_data,
  output logic                 ext_blocked
);

  always_comb begin
    w_we   = ext_w_we & ~acc_busy;
    w_addr = ext_w_addr;
    w_data = ext_w_data;
    if (acc_busy) begin
      d_we   = acc_d_we;
      d_addr = acc_d_addr;
      d_data = acc_d_data;
    end else begin
      d_we   = ext_d_we;
      d_addr = ext_d_addr;
      d_data = ext_d_data;
    end
    ext_blocked = acc_busy & (ext_w_we | ext_d_we);
  end

endmodule
