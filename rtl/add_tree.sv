// add_tree: precision-adaptive addition tree.
//
// N operands are added two by two in ceil(log2 N) stages; each stage has
// its own approximate-adder configuration (stage_ora[2*s +: 2] for stage s),
// so early stages, whose errors propagate further, can be set more exact than
// late ones. An odd operand passes to the next stage unchanged. approx_sel=0
// makes every adder exact. Combinational; the result wraps modulo 2^DW.
module add_tree #(
  parameter int N  = 4,
  parameter int DW = 16,
  localparam int NS = (N <= 1) ? 1 : $clog2(N)
) (
  input  logic [N-1:0][DW-1:0] in,
  input  logic [2*NS-1:0]      stage_ora,
  input  logic                 approx_sel,
  output logic [DW-1:0]        sum
);

  // level[s] holds the operands entering stage s; level[NS][0] is the result
  logic [NS:0][N-1:0][DW-1:0] level;

  assign level[0] = in;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int CNT  = (N + (1 << s) - 1) >> s;   // operands at stage s
    localparam int PAIR = CNT / 2;
    logic [1:0] cfg;
    assign cfg = approx_sel ? stage_ora[2*s +: 2] : 2'd0;
    for (genvar p = 0; p < N; p++) begin : g_node
      if (p < PAIR) begin : g_add
        approx_adder #(.WIDTH(DW)) u_add (
          .a(level[s][2*p]), .b(level[s][2*p+1]), .ora_segs(cfg), .sum(level[s+1][p]));
      end else if (p == PAIR && (CNT % 2) == 1) begin : g_pass
        assign level[s+1][p] = level[s][2*p];
      end else begin : g_zero
        assign level[s+1][p] = '0;
      end
    end
  end

  assign sum = level[NS][0];

endmodule
