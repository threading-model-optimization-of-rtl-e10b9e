// aemb_brcc: branch condition check (BRCC) and branch target of the execute stage.
// Conditional branches compare operand A (register rA) with zero: equal, not equal,
// less than, less or equal, greater than, greater or equal (signed). Unconditional
// branches and returns are always taken. The target is
//   returns:               rA + offset
//   absolute branches:     offset
//   all other branches:    pc + offset
// where offset is register rB or the (imm-extended) immediate. Combinational.
//
// Origin: the six conditions against zero and the targets (PC-relative or absolute,
// register plus immediate for returns) follow AEMB's BRCC and the MicroBlaze rules;
// the purely combinational form is a choice of this implementation.
module aemb_brcc
  import aemb_pkg::*;
(
  input  br_e         br,
  input  logic [2:0]  cond,
  input  logic        absol,
  input  logic [31:0] pc,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic        taken,
  output logic [31:0] target
);

  logic zero, neg;
  assign zero = (opa == 32'd0);
  assign neg  = opa[31];

  always_comb begin
    unique case (br)
      BR_UNC, BR_RET: taken = 1'b1;
      BR_CND: begin
        unique case (cond)
          CND_EQ:  taken = zero;
          CND_NE:  taken = !zero;
          CND_LT:  taken = neg;
          CND_LE:  taken = neg || zero;
          CND_GT:  taken = !neg && !zero;
          CND_GE:  taken = !neg;
          default: taken = 1'b0;
        endcase
      end
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    if (br == BR_RET) target = opa + opb;
    else if (absol)   target = opb;
    else              target = pc + opb;
  end

endmodule
