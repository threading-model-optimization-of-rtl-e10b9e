// tb_aemb_brcc: every condition of the branch condition check on zero, positive,
// negative and random operands, plus the three target computations (pc-relative,
// absolute, register + offset for returns), compared with values worked out here.
module tb_aemb_brcc;
  import aemb_pkg::*;
  br_e         br;
  logic [2:0]  cond;
  logic        absol, taken, exp_t;
  logic [31:0] pc, opa, opb, target, exp_a;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  aemb_brcc dut (.br(br), .cond(cond), .absol(absol), .pc(pc), .opa(opa), .opb(opb),
                 .taken(taken), .target(target));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      case (n % 4)
        0: opa = 32'd0;
        1: opa = 32'd5;
        2: opa = 32'hFFFF_FFF0;
        default: opa = $urandom;
      endcase
      cond = 3'((n / 4) % 6);
      br = BR_CND; absol = 1'b0; pc = $urandom & 32'hFFFF_FFFC; opb = $urandom;
      case (cond)
        3'd0: exp_t = (opa == 0);
        3'd1: exp_t = (opa != 0);
        3'd2: exp_t = ($signed(opa) < 0);
        3'd3: exp_t = ($signed(opa) <= 0);
        3'd4: exp_t = ($signed(opa) > 0);
        default: exp_t = ($signed(opa) >= 0);
      endcase
      #1;
      checks += 2;
      if (taken !== exp_t) begin failures++; $display("FAIL cond %0d opa %h", cond, opa); end
      if (target !== pc + opb) begin failures++; $display("FAIL relative target"); end
      br = BR_UNC; absol = n[0]; #1;
      exp_a = absol ? opb : pc + opb;
      checks += 2;
      if (taken !== 1'b1) begin failures++; $display("FAIL unconditional not taken"); end
      if (target !== exp_a) begin failures++; $display("FAIL unconditional target"); end
      br = BR_RET; absol = 1'b0; #1;
      checks += 2;
      if (taken !== 1'b1 || target !== opa + opb) begin failures++; $display("FAIL return"); end
      br = BR_NONE; #1;
      if (taken !== 1'b0) begin failures++; $display("FAIL no branch taken"); end
      #8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
