// aemb_bsft: two-cycle barrel shifter (MicroBlaze bsrl, bsra, bsll and their
// immediate forms). The shift amount is amt[4:0]. The first cycle (execute stage)
// shifts by the multiple-of-four part amt[4:2]*4 and registers the partial result with
// the remaining amount when `ena` is high; the second cycle shifts by amt[1:0].
// Right shifts are logical or arithmetic (`arith`); left shifts are always logical.
//
// Origin: left/right, logical/arithmetic (right only) and register or immediate
// amount follow AEMB; the two-stage split of the shift is a choice of this
// implementation.
module aemb_bsft #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          ena,
  input  logic [DW-1:0] a,
  input  logic [4:0]    amt,
  input  logic          left,
  input  logic          arith,
  output logic [DW-1:0] res
);

  logic [DW-1:0] s1;
  logic [DW-1:0] q;
  logic [1:0]    amt_q;
  logic          left_q, fill_q;

  always_comb begin
    if (left) s1 = a << {amt[4:2], 2'b00};
    else      s1 = DW'($signed({arith & a[DW-1], a}) >>> {amt[4:2], 2'b00});
  end

  always_ff @(posedge clk) begin
    if (ena) begin
      q      <= s1;
      amt_q  <= amt[1:0];
      left_q <= left;
      fill_q <= arith & a[DW-1];
    end
  end

  always_comb begin
    if (left_q) res = q << amt_q;
    else        res = DW'($signed({fill_q, q}) >>> amt_q);
  end

endmodule
