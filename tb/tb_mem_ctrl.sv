// tb_mem_ctrl: random requests from the loader and the accelerator; checks
// which one owns each memory port and that blocked loads are flagged.
module tb_mem_ctrl;
  logic clk = 0;
  logic busy, ewe, edwe, adwe, w_we, d_we, blk;
  logic [11:0] ewa, w_addr;
  logic [7:0] ewd, w_data;
  logic [13:0] eda, ada, d_addr;
  logic [7:0] edd, add_, d_data;
  int checks = 0, failures = 0;

  mem_ctrl dut (.acc_busy(busy), .ext_w_we(ewe), .ext_w_addr(ewa), .ext_w_data(ewd),
    .ext_d_we(edwe), .ext_d_addr(eda), .ext_d_data(edd),
    .acc_d_we(adwe), .acc_d_addr(ada), .acc_d_data(add_),
    .w_we, .w_addr, .w_data, .d_we, .d_addr, .d_data, .ext_blocked(blk));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      busy = 1'($urandom); ewe = 1'($urandom); edwe = 1'($urandom); adwe = 1'($urandom);
      ewa = 12'($urandom); ewd = 8'($urandom); eda = 14'($urandom); edd = 8'($urandom);
      ada = 14'($urandom); add_ = 8'($urandom);
      @(posedge clk);
      checks += 4;
      if (w_we !== (ewe && !busy) || (w_we && (w_addr !== ewa || w_data !== ewd))) failures++;
      if (d_we !== (busy ? adwe : edwe)) failures++;
      if (d_we && d_addr !== (busy ? ada : eda)) failures++;
      if (blk !== (busy && (ewe || edwe))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
