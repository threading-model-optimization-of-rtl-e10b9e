// tb_aemb_regf: random writes and reads of the 64-entry two-thread register file
// compared with a reference array; checks that register 0 of both threads reads zero,
// that the two thread halves are independent and that `ena` low blocks writes.
module tb_aemb_regf;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [5:0]  ra, rb, rd, wa;
  logic [31:0] da, db, dd, wd;
  logic        we, ena;
  logic [31:0] ref_m [64];
  int checks = 0, failures = 0;

  aemb_regf dut (.clk(clk), .ena(ena), .ra_adr(ra), .rb_adr(rb), .rd_adr(rd), .ra_dat(da),
                 .rb_dat(db), .rd_dat(dd), .we(we), .w_adr(wa), .w_dat(wd));

  function automatic logic [31:0] model(input logic [5:0] a);
    return (a[4:0] == 5'd0) ? 32'd0 : ref_m[a];
  endfunction

  task automatic check(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b1; ena = 1'b1;
    for (int k = 0; k < 64; k++) begin
      wa = 6'(k); wd = $urandom; ref_m[k] = wd;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 1000; n++) begin
      wa = 6'($urandom); wd = $urandom; we = $urandom_range(0, 1) == 1; ena = $urandom_range(0, 3) != 0;
      ra = 6'($urandom); rb = 6'($urandom); rd = 6'($urandom);
      #1;
      check("ra", da, model(ra));
      check("rb", db, model(rb));
      check("rd", dd, model(rd));
      @(posedge clk);
      if (we && ena) ref_m[wa] = wd;
      #1;
    end
    // thread halves are independent: r5 of thread 0 and thread 1
    we = 1'b1; ena = 1'b1;
    wa = 6'd5;  wd = 32'hAAAA_0005; @(posedge clk); #1;
    wa = 6'd37; wd = 32'hBBBB_0005; @(posedge clk); #1;
    we = 1'b0; ra = 6'd5; rb = 6'd37; rd = 6'd32; #1;
    check("thread 0 r5", da, 32'hAAAA_0005);
    check("thread 1 r5", db, 32'hBBBB_0005);
    check("thread 1 r0", dd, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
