// pe: precision-adaptive processing element of the binary-weight accelerator.
//
// Each enabled cycle the PE forms a term from its activation x and binary
// weight w: +x for w=1 and -x (inverted plus one) for w=0. When skip
// (Multiplex Rb_n) is set the term is forced to zero, which is how a kernel
// element whose result is reused from an earlier stride is left out. The term
// is added to the accumulator R, and when rb_en is set also to the reuse
// accumulator Rb, which collects the part of the kernel that a later stride
// will reuse. clr marks the first term of a new output: R starts from bias
// and Rb from zero. Both additions use either the exact 16-bit adder or the
// approximate adder (approx_sel, ora_segs), chosen from the SNR.
//
// Registers update on the rising clock edge; r and rb are the register
// outputs. The weight convention and the bias timing are this design's.
module pe
  import speech_pkg::*;
#(
  parameter int DW_P = DW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  logic [DW_P-1:0]   x,
  input  logic              w,
  input  logic              skip,
  input  logic              rb_en,
  input  logic [DW_P-1:0]   bias,
  input  logic              approx_sel,
  input  logic [1:0]        ora_segs,
  output logic [DW_P-1:0]   r,
  output logic [DW_P-1:0]   rb
);

  logic [DW_P-1:0] xg, term, r_base, rb_base;
  logic [DW_P-1:0] r_exact, r_apx, rb_exact, rb_apx;

  assign xg      = skip ? '0 : x;
  assign term    = w ? xg : (~xg + 1'b1);
  assign r_base  = clr ? bias : r;
  assign rb_base = clr ? '0 : rb;

  assign r_exact  = r_base + term;
  assign rb_exact = rb_base + term;

  approx_adder #(.WIDTH(DW_P)) u_apx_r  (.a(r_base),  .b(term), .ora_segs(ora_segs), .sum(r_apx));
  approx_adder #(.WIDTH(DW_P)) u_apx_rb (.a(rb_base), .b(term), .ora_segs(ora_segs), .sum(rb_apx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r  <= '0;
      rb <= '0;
    end else if (en) begin
      r <= approx_sel ? r_apx : r_exact;
      if (rb_en)
        rb <= approx_sel ? rb_apx : rb_exact;
      else if (clr)
        rb <= '0;
    end
  end

endmodule
