// data_sram: on-chip activation memory.
//
// DEPTH words of AW bits (the default 10189 bytes is 9.95 KB) hold the MFCC
// feature map and the outputs of both convolution layers. It has one write
// port and NRD synchronous read ports: the three PEs of a group read three
// kernel columns in the same cycle. Read data appear one cycle after re;
// an address beyond the end reads 0. Port count and word width are this
// design's choices.
module data_sram #(
  parameter int DEPTH = 10189,
  parameter int AW    = 8,
  parameter int NRD   = 3,
  localparam int A    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [A-1:0]          waddr,
  input  logic [AW-1:0]         wdata,
  input  logic                  re,
  input  logic [NRD-1:0][A-1:0] raddr,
  output logic [NRD-1:0][AW-1:0] rdata
);

  logic [AW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH)
      mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re)
      for (int p = 0; p < NRD; p++)
        rdata[p] <= (int'(raddr[p]) < DEPTH) ? mem[raddr[p]] : '0;
  end

endmodule
