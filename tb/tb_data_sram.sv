// tb_data_sram: writes random words over the whole 10189-word memory and
// reads them back through the three read ports at once, one cycle after
// the request; out-of-range addresses read 0.
module tb_data_sram;
  logic clk = 0;
  logic we, re;
  logic [13:0] waddr;
  logic [7:0] wdata;
  logic [2:0][13:0] raddr;
  logic [2:0][7:0] rdata;
  logic [7:0] model [10189];
  int checks = 0, failures = 0;

  data_sram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < 10189; i++) begin
      @(negedge clk);
      we = 1; waddr = 14'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [2:0][13:0] a;
      for (int p = 0; p < 3; p++) a[p] = 14'($urandom % 10300);
      @(negedge clk);
      re = 1; raddr = a;
      @(negedge clk);
      re = 0;
      for (int p = 0; p < 3; p++) begin
        logic [7:0] e;
        e = (int'(a[p]) < 10189) ? model[a[p]] : 8'd0;
        checks++;
        if (rdata[p] !== e) begin failures++; if (failures < 10) $display("FAIL p=%0d a=%0d", p, a[p]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
