// bn_relu: folded batch normalisation and ReLU of one convolution output.
//
// Batch normalisation is folded offline into a per-channel offset and a
// power-of-two scale: y = clamp((acc + bias) >>> shift, 0, 2^(AW-1)-1).
// The clamp at zero is the ReLU; the upper clamp saturates to the 8-bit
// activation stored in the data memory. Combinational. The folding into an
// add and a shift is this design's choice.
module bn_relu #(
  parameter int DW = 16,
  parameter int AW = 8
) (
  input  logic signed [DW-1:0] acc,
  input  logic signed [DW-1:0] bias,
  input  logic        [3:0]    shift,
  output logic        [AW-1:0] y
);

  logic signed [DW:0] s, t;
  localparam int MAXV = (1 << (AW - 1)) - 1;

  always_comb begin
    s = {acc[DW-1], acc} + {bias[DW-1], bias};
    t = s >>> shift;
    if (t < 0)
      y = '0;
    else if (t > (DW+1)'(MAXV))
      y = AW'(MAXV);
    else
      y = t[AW-1:0];
  end

endmodule
