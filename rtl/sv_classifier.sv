// sv_classifier: continuity-based speaker verification (classifier #2).
//
// Initial classification: the two SV outputs are compared with two
// thresholds. Each comparison votes against the speaker (fc0 < th1 for the
// speaker neuron, fc1 > th2 for the other neuron); the initial label x_t is
// +1 when fewer than two votes are cast, else -1. Secondary classification
// uses the N previous initial labels and their confidence weights a1..aN:
//   X_t = (sum_{i=1..N} x_{t-i} * a_i) / N + x_t
// and the final label is +1 (speaker = 1) when X_t > beta. Values are fixed
// point with 8 fraction bits (1.0 = 256): weights are 0..256 and beta=0.4 is
// 102. The weighted sum is built with one multiply-accumulate per cycle over
// the stored labels (labels not yet seen count 0), so a decision takes N+2
// cycles after valid; then x_t enters the label history and label_valid
// pulses. valid is ignored while busy. The vote directions, the fixed-point
// format and the empty-history rule are this design's choices.
module sv_classifier #(
  parameter int N  = 3,
  parameter int DW = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic signed [DW-1:0]    fc0,
  input  logic signed [DW-1:0]    fc1,
  input  logic signed [DW-1:0]    th1,
  input  logic signed [DW-1:0]    th2,
  input  logic [N-1:0][8:0]       wts,
  input  logic signed [15:0]      beta,
  output logic                    busy,
  output logic                    label_valid,
  output logic                    init_label,
  output logic                    speaker,
  output logic signed [15:0]      score
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_DEC} state_e;
  state_e state;

  logic [N-1:0]         hist;      // hist[i] = label x_{t-1-i}, 1 = +1
  logic [N-1:0]         hvalid;
  logic                 xt;
  logic signed [19:0]   acc;
  logic [$clog2(N+1)-1:0] i;
  logic [1:0]           votes;
  logic signed [19:0]   xsum;

  assign votes = 2'(fc0 < th1) + 2'(fc1 > th2);
  assign busy  = (state != S_IDLE);
  assign xsum  = acc / 20'(N) + (xt ? 20'sd256 : -20'sd256);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      hist        <= '0;
      hvalid      <= '0;
      xt          <= 1'b0;
      acc         <= '0;
      i           <= '0;
      label_valid <= 1'b0;
      init_label  <= 1'b0;
      speaker     <= 1'b0;
      score       <= '0;
    end else begin
      label_valid <= 1'b0;
      case (state)
        S_IDLE: if (valid) begin
          xt    <= (votes < 2'd2);
          acc   <= '0;
          i     <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          if (hvalid[i])
            acc <= hist[i] ? acc + 20'(wts[i]) : acc - 20'(wts[i]);
          if (int'(i) == N - 1)
            state <= S_DEC;
          else
            i <= i + 1'b1;
        end
        S_DEC: begin
          score       <= 16'(xsum);
          speaker     <= (xsum > 20'(beta));
          init_label  <= xt;
          hist        <= {hist[N-2:0], xt};
          hvalid      <= {hvalid[N-2:0], 1'b1};
          label_valid <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
