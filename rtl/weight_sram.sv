// weight_sram: on-chip memory of the packed binary weights.
//
// BYTES bytes hold the one-bit weights densely, bit i of the weight stream in
// bit i%8 of byte i/8. Writes are a byte per cycle. A read returns, one cycle
// after re, the RW bits starting at any bit address raddr: the nine bytes
// that cover the window are read and shifted, so a layer can consume 3*M
// weight bits per cycle with no padding between cycles. Bits beyond the end
// read as 0. The default of 4088 bytes holds the 32,697 weight bits of the
// network as stored here (3.99 KB); the window read is this design's choice.
module weight_sram #(
  parameter int BYTES = 4088,
  parameter int RW    = 60,
  localparam int BA   = $clog2(BYTES),
  localparam int WA   = BA + 3
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BA-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [WA-1:0] raddr,
  output logic [RW-1:0] rdata
);

  localparam int NB = (RW + 7) / 8 + 1;   // bytes covering any window

  logic [7:0] mem [BYTES];
  logic [NB*8-1:0] win;

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      logic [NB*8-1:0] bytes;
      for (int k = 0; k < NB; k++) begin
        int unsigned a;
        a = int'(32'(raddr) >> 3) + k;
        bytes[8*k +: 8] = (a < BYTES) ? mem[a] : 8'h00;
      end
      win <= bytes >> raddr[2:0];
    end
  end

  assign rdata = win[RW-1:0];

endmodule
