// tb_aemb_pipe: checks the reset synchroniser (reset held for two clocks after the
// external reset falls), the two-flip-flop interrupt flag and the global enable
// (high only when no bus interface stalls) against values worked out here.
module tb_aemb_pipe;
  logic clk = 1'b0, sys_rst = 1'b1, sys_int = 1'b0;
  logic ist = 1'b0, dst = 1'b0, xst = 1'b0;
  logic rst, ena, int_flag;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aemb_pipe dut (.sys_clk_i(clk), .sys_rst_i(sys_rst), .sys_int_i(sys_int), .istall(ist),
                 .dstall(dst), .xstall(xst), .rst(rst), .ena(ena), .int_flag(int_flag));

  task automatic check(input string w, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", w, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check("reset asserted", rst, 1'b1);
    sys_rst = 1'b0;
    @(posedge clk); #1 check("reset after 1 clock", rst, 1'b1);
    @(posedge clk); #1 check("reset released after 2 clocks", rst, 1'b0);
    // interrupt synchroniser: two clocks of latency
    sys_int = 1'b1;
    #1 check("int not yet", int_flag, 1'b0);
    @(posedge clk); #1 check("int after 1", int_flag, 1'b0);
    @(posedge clk); #1 check("int after 2", int_flag, 1'b1);
    sys_int = 1'b0;
    @(posedge clk); #1 check("int held 1", int_flag, 1'b1);
    @(posedge clk); #1 check("int dropped", int_flag, 1'b0);
    // enable
    for (int k = 0; k < 8; k++) begin
      {ist, dst, xst} = 3'(k);
      #1 check("ena", ena, k == 0);
    end
    // asynchronous reset assertion
    sys_rst = 1'b1; #1 check("async reset", rst, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
