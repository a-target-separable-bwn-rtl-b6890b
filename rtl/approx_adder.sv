// approx_adder: precision-adaptive adder built from 4-bit segments.
//
// The word is cut into SEG-bit segments. The lowest ora_segs segments are
// OR-gate approximate adders (ORA): each sum bit is a|b and no carry is
// produced, so the carry chain stops there. The remaining high segments are
// exact ripple full adders whose carry input at the lowest exact segment is 0.
// With ora_segs = 0 the adder is exact. In silicon the ORA cells sit on a
// lower supply rail than the full adders; that is a physical property and is
// not modelled here.
//
// Purely combinational; sum wraps modulo 2^WIDTH.
module approx_adder #(
  parameter int WIDTH = 16,
  parameter int SEG   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       ora_segs,
  output logic [WIDTH-1:0] sum
);

  always_comb begin
    logic c;
    c = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      if ((i / SEG) < int'(ora_segs)) begin
        sum[i] = a[i] | b[i];
        c      = 1'b0;
      end else begin
        sum[i] = a[i] ^ b[i] ^ c;
        c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
      end
    end
  end

endmodule
