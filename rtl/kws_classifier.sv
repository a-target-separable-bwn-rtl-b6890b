// kws_classifier: keyword decision of the KWS head (classifier #1).
//
// The KWS head ends in a softmax. Softmax is monotonic, so its most likely
// class is the largest logit, and that is what is computed: on valid the
// NOUT signed logits are compared, the index of the largest goes to keyword
// (lowest index on a tie), and detected is set when that index is a keyword
// (below NOUT-1; the last output is the non-keyword class) and its logit is
// at least the threshold th, which the mode controller selects from the SNR
// class. Outputs are registered; label_valid pulses one cycle after valid.
module kws_classifier #(
  parameter int NOUT = 5,
  parameter int DW   = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           valid,
  input  logic [NOUT-1:0][DW-1:0]        fc,
  input  logic signed [DW-1:0]           th,
  output logic                           label_valid,
  output logic [$clog2(NOUT)-1:0]        keyword,
  output logic                           detected
);

  logic [$clog2(NOUT)-1:0] best;
  logic signed [DW-1:0]    bestv;

  always_comb begin
    best  = '0;
    bestv = signed'(fc[0]);
    for (int i = 1; i < NOUT; i++)
      if (signed'(fc[i]) > bestv) begin
        best  = ($clog2(NOUT))'(i);
        bestv = signed'(fc[i]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      label_valid <= 1'b0;
      keyword     <= '0;
      detected    <= 1'b0;
    end else begin
      label_valid <= valid;
      if (valid) begin
        keyword  <= best;
        detected <= (int'(best) != NOUT - 1) && (bestv >= th);
      end
    end
  end

endmodule
