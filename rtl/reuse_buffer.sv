// reuse_buffer: frequency-domain result reuse buffer of one output channel.
//
// When kernel column 1 and column 3 carry the same weights, the column-3
// partial sum of one output position equals the column-1 partial sum of the
// position two strides later (stride 1) or one stride later (stride 2). The
// third PE of the group collects that partial sum in Rb; at the end of every
// output position push shifts it in: Buffer1 takes Rb and Buffer2 takes the
// old Buffer1. sel2 selects Buffer1 (sel2=0, stride 2) or Buffer2 (sel2=1,
// stride 1) as the reused value q. clear starts a new output row: the stored
// values belong to the previous row and valid drops until enough pushes of
// the new row have happened. Registers update on the rising edge.
module reuse_buffer #(
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [DW-1:0] rb,
  input  logic          sel2,
  output logic [DW-1:0] q,
  output logic          valid
);

  logic [DW-1:0] buf1, buf2;
  logic          v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf1 <= '0;
      buf2 <= '0;
      v1   <= 1'b0;
      v2   <= 1'b0;
    end else if (clear) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else if (push) begin
      buf1 <= rb;
      buf2 <= buf1;
      v1   <= 1'b1;
      v2   <= v1;
    end
  end

  assign q     = sel2 ? buf2 : buf1;
  assign valid = sel2 ? v2 : v1;

endmodule
