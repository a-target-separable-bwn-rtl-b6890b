// tb_vad: feeds frames of quiet noise and of loud tones with a DC offset
// to the VAD and checks each frame's energy and decision against a
// reference model, that the decision follows the loud frames, and that a
// frame ends exactly every 320 samples.
module tb_vad;
  logic clk = 0, rst_n = 0;
  logic x_valid, active, frame_done;
  logic signed [9:0] x;
  logic [31:0] th, energy;
  int checks = 0, failures = 0;

  vad dut (.clk, .rst_n, .x_valid, .x, .threshold(th), .active, .frame_done, .energy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dc_acc, acc, nsamp, frames, n_active;
  longint e_exp;

  initial begin
    x_valid = 0; x = 0; th = 32'd200000;
    dc_acc = 0; acc = 0; nsamp = 0; frames = 0; n_active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      bit loud;
      loud = (f % 3) == 1;
      for (int i = 0; i < 320; i++) begin
        int v, dc, d;
        v = 40 + (loud ? ((i % 16) < 8 ? 300 : -300) : int'($urandom % 9) - 4);
        @(negedge clk);
        x_valid = 1; x = 10'(v);
        dc = dc_acc >>> 6;
        d = v - dc;
        dc_acc = dc_acc + v - dc;
        acc += d * d;
        @(negedge clk);
        x_valid = 0;
        if (i == 319) begin
          checks += 3;
          if (!frame_done) begin failures++; $display("FAIL no frame_done f=%0d", f); end
          if (energy != 32'(acc)) begin failures++; $display("FAIL energy %0d exp %0d", energy, acc); end
          if (active != (acc > int'(th))) begin failures++; $display("FAIL active f=%0d", f); end
          if (f > 2) begin
            checks++;
            if (active != loud) begin failures++; $display("FAIL decision f=%0d loud=%0d", f, loud); end
          end
          if (active) n_active++;
          acc = 0;
        end else begin
          checks++;
          if (frame_done) begin failures++; $display("FAIL early frame_done"); end
        end
      end
    end
    checks++;
    if (n_active == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
