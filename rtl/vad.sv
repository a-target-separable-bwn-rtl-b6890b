// vad: energy-based voice activity detection.
//
// Each sample first has its mean removed: a running DC estimate follows
// the input with gain 1/2^DC_SHIFT and is subtracted. The square of the
// zero-mean sample is accumulated over a frame of FRAME samples; at the end
// of the frame the energy is compared with threshold and active is set for
// the next frame when it is larger. frame_done pulses for one cycle with the
// new energy and decision. Samples arrive with x_valid; one sample per
// cycle at most. The mean estimator, the squared energy and the frame
// length (20 ms at an assumed 16 kHz) are this design's choices.
module vad #(
  parameter int FRAME    = 320,
  parameter int XW       = 10,
  parameter int DC_SHIFT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  input  logic [31:0]          threshold,
  output logic                 active,
  output logic                 frame_done,
  output logic [31:0]          energy
);

  localparam int CW = $clog2(FRAME);
  logic signed [XW+DC_SHIFT:0] dc_acc;
  logic signed [XW:0]          dc, d;
  logic [2*XW+1:0]             sq;
  logic [31:0]                 acc;
  logic [CW-1:0]               cnt;

  assign dc = (XW+1)'(dc_acc >>> DC_SHIFT);
  assign d  = (XW+1)'(x) - dc;
  assign sq = (2*XW+2)'(d * d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_acc     <= '0;
      acc        <= '0;
      cnt        <= '0;
      active     <= 1'b0;
      frame_done <= 1'b0;
      energy     <= '0;
    end else begin
      frame_done <= 1'b0;
      if (x_valid) begin
        dc_acc <= dc_acc + (XW+DC_SHIFT+1)'(x) - (XW+DC_SHIFT+1)'(dc);
        if (cnt == CW'(FRAME - 1)) begin
          cnt        <= '0;
          acc        <= '0;
          energy     <= acc + 32'(sq);
          active     <= (acc + 32'(sq)) > threshold;
          frame_done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc + 32'(sq);
        end
      end
    end
  end

endmodule
