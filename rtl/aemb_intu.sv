// aemb_intu: integer unit of the execute stage, holding the Machine Status Register
// (MSR) and the exception status and address registers (ESR, EAR).
// Operations (combinational result on `res`):
//   add/rsub family  sum = (sub ? ~A : A) + B + cin, cin = MSR[C] when the C option is
//                    set, otherwise 1 for subtracts and 0 for adds; carry out updates
//                    MSR[C] unless the K option is set. cmp/cmpu replace the MSB of
//                    B - A with (A > B), signed or unsigned.
//   or/and/xor/andn  logic on A and B.
//   sra/src/srl      one-bit right shift of A; the MSB is A[31], MSR[C] or 0; the bit
//                    shifted out goes to MSR[C].
//   sext8/sext16     sign extension of A.
//   msrset/msrclr    return the MSR and set/clear the bits of the 15-bit immediate.
//   mts / mfs        write the MSR from A / read PC, MSR, EAR or ESR.
//   link             return the instruction's own PC (branch and link).
// MSR reads show the thread of the executing instruction in bit 29 and a copy of the
// carry in bit 31. Program flow side effects: brk sets BIP, rtid sets IE, rtbd clears
// BIP, rted sets EE and clears EIP, an injected interrupt clears IE.
// Exceptions (when MSR[EE] is set and MSR[EIP] clear): floating point or other
// undefined opcodes, and misaligned half-word or word accesses. `exc` is
// combinational; at the clock edge ESR and EAR are written, EIP is set and EE cleared.
// All state changes happen on enabled clock edges for valid instructions.
//
// Origin: the add/subtract options (carry in, keep carry), compare, one-bit shifts,
// sign extension, the MSR instructions, the four readable special registers and the
// thread phase in MSR bit 29 follow AEMB; exceptions for floating point and misaligned
// data follow AEMB. The EE/EIP gating and the ESR layout follow MicroBlaze and are
// choices of this implementation.
module aemb_intu
  import aemb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ena,
  input  xctl_t       x,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic [31:0] res,
  output logic        exc,
  output logic [31:0] msr
);

  logic [31:0] msr_q;
  logic [31:0] esr_q, ear_q;

  always_comb begin
    msr          = msr_q;
    msr[MSR_PHA] = x.thr;
    msr[MSR_CC]  = msr_q[MSR_C];
  end

  // Adder
  logic [31:0] add_a;
  logic        cin;
  logic [32:0] sum;
  assign add_a = x.sub ? ~opa : opa;
  assign cin   = x.cin_msr ? msr_q[MSR_C] : x.sub;
  assign sum   = {1'b0, add_a} + {1'b0, opb} + 33'(cin);

  logic gt_s, gt_u;
  assign gt_s = $signed(opa) > $signed(opb);
  assign gt_u = opa > opb;

  // Effective address for the alignment check
  logic [31:0] ea;
  logic        misal;
  assign ea    = opa + opb;
  assign misal = (x.ld || x.st) && ((x.size == 2'd2 && ea[1:0] != 2'b00) ||
                                     (x.size == 2'd1 && ea[0]));

  assign exc = x.valid && msr_q[MSR_EE] && !msr_q[MSR_EIP] && (x.illegal || misal);

  always_comb begin
    res = 32'd0;
    if (x.res == RES_SPR) begin
      unique case (x.spr)
        SPR_PC:  res = x.pc;
        SPR_MSR: res = msr;
        SPR_EAR: res = ear_q;
        SPR_ESR: res = esr_q;
        default: res = 32'd0;
      endcase
    end else begin
      unique case (x.alu)
        ALU_ADD: begin
          res = sum[31:0];
          if (x.cmp) res[31] = x.cmpu ? gt_u : gt_s;
        end
        ALU_OR:     res = opa | opb;
        ALU_AND:    res = opa & opb;
        ALU_XOR:    res = opa ^ opb;
        ALU_ANDN:   res = opa & ~opb;
        ALU_SRA:    res = {opa[31], opa[31:1]};
        ALU_SRC:    res = {msr_q[MSR_C], opa[31:1]};
        ALU_SRL:    res = {1'b0, opa[31:1]};
        ALU_SEXT8:  res = {{24{opa[7]}}, opa[7:0]};
        ALU_SEXT16: res = {{16{opa[15]}}, opa[15:0]};
        ALU_MSR:    res = msr;
        ALU_LINK:   res = x.pc;
        default:    res = 32'd0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      msr_q <= 32'd0;
      esr_q <= 32'd0;
      ear_q <= 32'd0;
    end else if (ena && x.valid) begin
      if (exc) begin
        esr_q <= {20'd0, x.size == 2'd2, x.st, x.rd,
                  x.illegal ? (x.fpu ? EC_FPU : EC_ILLEGAL) : EC_UNALIGNED};
        ear_q <= ea;
        msr_q[MSR_EIP] <= 1'b1;
        msr_q[MSR_EE]  <= 1'b0;
      end else begin
        if (x.alu == ALU_ADD && !x.keep) msr_q[MSR_C] <= sum[32];
        if (x.alu == ALU_SRA || x.alu == ALU_SRC || x.alu == ALU_SRL) msr_q[MSR_C] <= opa[0];
        if (x.msrset) msr_q[14:0] <= msr_q[14:0] | opb[14:0];
        if (x.msrclr) msr_q[14:0] <= msr_q[14:0] & ~opb[14:0];
        if (x.mts) begin
          msr_q <= opa;
          msr_q[MSR_PHA] <= 1'b0;
          msr_q[MSR_CC]  <= 1'b0;
        end
        if (x.brk && !x.inj) msr_q[MSR_BIP] <= 1'b1;
        if (x.inj)           msr_q[MSR_IE]  <= 1'b0;
        if (x.br == BR_RET) begin
          if (x.rti) msr_q[MSR_IE]  <= 1'b1;
          if (x.rtb) msr_q[MSR_BIP] <= 1'b0;
          if (x.rte) begin
            msr_q[MSR_EE]  <= 1'b1;
            msr_q[MSR_EIP] <= 1'b0;
          end
        end
      end
    end
  end

endmodule
