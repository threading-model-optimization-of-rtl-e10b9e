// tb_aemb_iwbif: drives fetch addresses into the instruction interface and plays a
// Wishbone memory with random wait states. Each fetched word must equal the memory
// word; the first fetch of an address must go to the bus (stall), a repeated fetch
// must hit the cache and return in the next cycle without any bus cycle.
module tb_aemb_iwbif;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        i_req, istall, cyc, stb, we, ack;
  logic [31:0] i_adr, i_dat, adr, dat_i;
  logic [3:0]  sel;
  int checks = 0, failures = 0, bus_reads = 0;

  aemb_iwbif dut (.clk(clk), .rst(rst), .ena(!istall), .i_req(i_req), .i_adr(i_adr), .i_dat(i_dat),
                  .istall(istall), .iwb_adr_o(adr), .iwb_cyc_o(cyc), .iwb_stb_o(stb),
                  .iwb_we_o(we), .iwb_sel_o(sel), .iwb_dat_i(dat_i), .iwb_ack_i(ack));

  function automatic logic [31:0] memword(input logic [31:0] a);
    return a * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction
  assign dat_i = memword(adr);
  always_ff @(posedge clk) begin
    ack <= stb && !ack && ($urandom_range(0, 2) == 0);
    if (stb && ack) bus_reads <= bus_reads + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(input logic [31:0] a, input bit expect_hit);
    int wait_cycles;
    i_req = 1'b1; i_adr = a;
    @(posedge clk); #1;                 // address registered
    i_req = 1'b0;
    wait_cycles = 0;
    while (istall) begin @(posedge clk); #1; wait_cycles++; end
    checks += 2;
    if (i_dat !== memword(a)) begin failures++; $display("FAIL data %h", a); end
    if (expect_hit && wait_cycles != 0) begin failures++; $display("FAIL expected hit at %h", a); end
    if (!expect_hit && wait_cycles == 0) begin failures++; $display("FAIL expected miss at %h", a); end
  endtask

  initial begin
    ack = 1'b0; i_req = 1'b0; i_adr = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 64; k++) fetch(32'h100 + 32'(4 * k), 1'b0);
    for (int k = 0; k < 64; k++) fetch(32'h100 + 32'(4 * k), 1'b1);
    fetch(32'h100 + 32'h800, 1'b0);      // same line, other tag: evicts
    fetch(32'h100, 1'b0);
    checks++;
    if (bus_reads != 66) begin failures++; $display("FAIL bus reads %0d", bus_reads); end
    checks++;
    if (we !== 1'b0 || sel !== 4'hF) begin failures++; $display("FAIL bus attributes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
