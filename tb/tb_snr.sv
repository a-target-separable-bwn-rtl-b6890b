// tb_snr: feeds speech-like frames (slow, loud square wave, few zero
// crossings) and noise-like frames (alternating sign every sample) at
// several levels, and checks the SNR class after every frame against a
// reference model; all four classes must occur.
module tb_snr;
  import speech_pkg::*;
  logic clk = 0, rst_n = 0;
  logic x_valid, frame_done;
  logic signed [9:0] x;
  logic [8:0] zth;
  snr_class_e cls;
  int checks = 0, failures = 0;

  snr dut (.clk, .rst_n, .x_valid, .x, .zcr_th(zth), .snr_class(cls), .frame_done);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ne, se, e;
  bit nok, sok;
  int seen [4];

  function automatic int cls_of(longint s, longint n, bit ok);
    if (!ok || s >= n * 128) return 3;
    if (s >= n * 32) return 2;
    if (s >= n * 8) return 1;
    return 0;
  endfunction

  initial begin
    int noise_amp [8] = '{4, 20, 35, 35, 70, 70, 70, 200};
    x_valid = 0; x = 0; zth = 9'd160;
    ne = 0; se = 0; nok = 0; sok = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 16; f++) begin
      bit noisy;
      int zc, prev;
      noisy = f % 2;
      e = 0; zc = 0; prev = 0;
      for (int i = 0; i < 320; i++) begin
        int v;
        v = noisy ? ((i % 2) ? noise_amp[f / 2] : -noise_amp[f / 2] - 1)
                  : (((i / 40) % 2) ? 250 : -251);
        @(negedge clk);
        x_valid = 1; x = 10'(v);
        e += v * v;
        if (i > 0 && ((v < 0) != (prev < 0))) zc++;
        prev = v;
        @(negedge clk);
        x_valid = 0;
      end
      if (zc > 160) begin ne = nok ? (ne + e) / 2 : e; nok = 1; end
      else begin se = sok ? (se + e) / 2 : e; sok = 1; end
      checks++;
      if (int'(cls) != cls_of(se, ne, nok)) begin
        failures++; $display("FAIL f=%0d cls=%0d exp %0d", f, cls, cls_of(se, ne, nok));
      end
      seen[int'(cls)]++;
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL class %0d never seen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
