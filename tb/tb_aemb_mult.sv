// tb_aemb_mult: random operands (plus corner values) into the two-cycle multiplier;
// the low 32 bits of the product must appear one enabled clock later, and a clock
// with `ena` low must keep the previous result.
module tb_aemb_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic ena;
  logic [31:0] a, b, res, exp;
  int checks = 0, failures = 0;

  aemb_mult dut (.clk(clk), .ena(ena), .a(a), .b(b), .res(res));

  task automatic check(input string w, input logic [31:0] got, input logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h exp %h", w, got, e); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ena = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; end
        1: begin a = 32'h8000_0000; b = 32'd2; end
        2: begin a = 32'hFFFF_FFFD; b = 32'd140; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      exp = 32'(64'(a) * 64'(b));
      @(posedge clk); #1;
      check("product", res, exp);
    end
    ena = 1'b0; a = 32'd3; b = 32'd3;
    @(posedge clk); #1;
    check("hold while disabled", res, exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
