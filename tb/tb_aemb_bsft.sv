// tb_aemb_bsft: random values and all shift amounts into the two-cycle barrel shifter
// in its three modes (logical right, arithmetic right, left); the result one clock
// later is compared with a reference shift computed here.
module tb_aemb_bsft;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, res, exp;
  logic [4:0]  amt;
  logic        left, arith;
  int checks = 0, failures = 0;

  aemb_bsft dut (.clk(clk), .ena(1'b1), .a(a), .amt(amt), .left(left), .arith(arith), .res(res));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1200; n++) begin
      a = (n % 2 == 0) ? ($urandom | 32'h8000_0000) : $urandom;
      amt = 5'(n % 32);
      case ((n / 32) % 3)
        0: begin left = 1'b0; arith = 1'b0; end
        1: begin left = 1'b0; arith = 1'b1; end
        default: begin left = 1'b1; arith = 1'b0; end
      endcase
      if (left) exp = a << amt;
      else begin
        exp = a >> amt;
        if (arith && a[31]) for (int k = 0; k < 32; k++) if (k >= 32 - int'(amt)) exp[k] = 1'b1;
      end
      @(posedge clk); #1;
      checks++;
      if (res !== exp) begin
        failures++;
        $display("FAIL a=%h amt=%0d left=%b arith=%b got %h exp %h", a, amt, left, arith, res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
