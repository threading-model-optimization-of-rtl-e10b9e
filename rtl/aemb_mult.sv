// aemb_mult: two-cycle 32 x 32 multiplier returning the low word of the product
// (MicroBlaze mul/muli). The first cycle (execute stage) forms three 16 x 16 partial
// products and registers them when `ena` is high; the second cycle (write-back stage)
// adds them: p = a_lo*b_lo + ((a_hi*b_lo + a_lo*b_hi) << 16), modulo 2^32.
// The result is valid on `res` one enabled clock after the operands were presented.
//
// Origin: the low word of the product and the 2-cycle latency follow AEMB; the split
// into 16-bit partial products is a choice of this implementation.
module aemb_mult #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          ena,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] res
);
  localparam int unsigned HW = DW / 2;

  logic [DW-1:0] p_ll, p_hl, p_lh;

  always_ff @(posedge clk) begin
    if (ena) begin
      p_ll <= a[HW-1:0]  * b[HW-1:0];
      p_hl <= DW'(a[DW-1:HW] * b[HW-1:0]);
      p_lh <= DW'(a[HW-1:0]  * b[DW-1:HW]);
    end
  end

  logic [DW-1:0] mid;
  assign mid = p_hl + p_lh;
  assign res = p_ll + {mid[HW-1:0], {HW{1'b0}}};

endmodule
