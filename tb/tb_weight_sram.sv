// tb_weight_sram: fills the full 4088-byte weight memory with random
// bytes and reads 60-bit windows at random bit addresses, including the
// end of the memory, against a bit-level model; checks the one-cycle read
// latency.
module tb_weight_sram;
  logic clk = 0;
  logic we, re;
  logic [11:0] waddr;
  logic [7:0] wdata;
  logic [14:0] raddr;
  logic [59:0] rdata;
  logic [7:0] model [4088];
  int checks = 0, failures = 0;

  weight_sram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [59:0] win(int a);
    logic [59:0] v;
    for (int i = 0; i < 60; i++) begin
      int bi;
      bi = a + i;
      v[i] = (bi / 8 < 4088) ? model[bi / 8][bi % 8] : 1'b0;
    end
    return v;
  endfunction

  initial begin
    we = 0; re = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 4088; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = (i < 20) ? 32697 - 60 + i * 5 : int'($urandom % 32704);
      @(negedge clk);
      re = 1; raddr = 15'(a);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== win(a)) begin failures++; if (failures < 10) $display("FAIL a=%0d %h exp %h", a, rdata, win(a)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
