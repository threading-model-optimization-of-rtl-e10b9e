// aemb_ctrl: decode stage (CTRL) of the coarse-grained AEMB core.
// It decodes the instruction in the decode stage into an xctl_t record, reads the
// three register operands (rA, rB, rD) of the instruction's own thread and registers
// record and operands into the execute stage at each enabled clock edge.
// Forwarding: because instructions of one thread now follow each other with no gap,
// an operand is taken, in order of priority, from
//   1. the result of the instruction in the execute stage (ALU-class results only:
//      arithmetic, logic, shifts, sign extension, msrset/msrclr, link address),
//   2. the value being written back by the instruction in the write-back stage,
//   3. the register file,
// each only when the producer belongs to the same thread and writes that register.
// Hazard: when the instruction in the execute stage has a 2-cycle result (multiply,
// barrel shift, load, GET, mfs) and the decode instruction of the same thread reads
// its destination, `hold` is raised for one cycle: a bubble enters the execute stage
// and the fetch unit re-fetches the decode instruction.
// Immediate prefix: an `imm` instruction stores its 16 bits per thread; the next
// type-B instruction of that thread uses them as the upper half of its immediate,
// otherwise the 16-bit immediate is sign extended. `imm_busy` tells the fetch unit
// not to inject an interrupt between the prefix and its instruction.
//
// Origin: decoding in CTRL, forwarding from the ALU back into decode and the bubble
// with re-fetch for 2-cycle results follow the modified AEMB. Forwarding of the
// write-back value (so a gap of two never stalls) and the per-thread imm prefix are
// choices of this implementation.
module aemb_ctrl
  import aemb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ena,
  // decode stage
  input  logic        d_valid,
  input  logic        d_thr,
  input  logic        d_inj,
  input  logic [31:0] d_pc,
  input  logic [31:0] d_insn,
  // register file read ports {thread, register}
  output logic [5:0]  ra_adr,
  output logic [5:0]  rb_adr,
  output logic [5:0]  rd_adr,
  input  logic [31:0] ra_dat,
  input  logic [31:0] rb_dat,
  input  logic [31:0] rd_dat,
  // producer in the execute stage
  input  logic        x_wr,
  input  logic [4:0]  x_wrd,
  input  logic        x_late,
  input  logic [31:0] x_res,
  // producer in the write-back stage
  input  logic        w_wr,
  input  logic        w_thr,
  input  logic [4:0]  w_rd,
  input  logic [31:0] w_res,
  // control
  output logic        hold,
  output logic [1:0]  imm_busy,
  output logic        fwd_x,     // a forward from the execute stage happened
  output logic        fwd_w,     // a forward from the write-back stage happened
  // execute stage
  output xctl_t       x,
  output logic [31:0] x_opa,
  output logic [31:0] x_opb,
  output logic [31:0] x_opd
);

  logic [15:0] imm_hi [2];
  logic [1:0]  imm_v;

  logic [5:0] op;
  logic [4:0] fa, fb, fd;
  assign op = d_insn[31:26];
  assign fd = d_insn[25:21];
  assign fa = d_insn[20:16];
  assign fb = d_insn[15:11];

  assign ra_adr = {d_thr, fa};
  assign rb_adr = {d_thr, fb};
  assign rd_adr = {d_thr, fd};

  // ---------------------------------------------------------------- decode
  xctl_t dec;
  logic  use_a, use_b, use_d, is_imm, typeb;

  always_comb begin
    dec       = '0;
    dec.valid = d_valid;
    dec.thr   = d_thr;
    dec.pc    = d_pc;
    dec.rd    = fd;
    dec.inj   = d_inj;
    dec.res   = RES_ALU;
    dec.alu   = ALU_NONE;
    dec.br    = BR_NONE;
    use_a = 1'b1;
    use_b = 1'b0;
    use_d = 1'b0;
    is_imm = 1'b0;
    typeb = op[3];
    casez (op)
      6'b00????: begin                         // add, rsub, addc, ..., cmp, cmpu
        dec.we = 1'b1;  dec.alu = ALU_ADD;
        dec.sub = op[0]; dec.cin_msr = op[1]; dec.keep = op[2];
        if (op == 6'h05 && d_insn[0]) begin dec.cmp = 1'b1; dec.cmpu = d_insn[1]; end
        use_b = !typeb;
      end
      6'b010000, 6'b011000: begin              // mul, muli
        dec.we = 1'b1; dec.res = RES_MUL; use_b = !typeb;
      end
      6'b010001, 6'b011001: begin              // bsrl, bsra, bsll (+ immediate)
        dec.we = 1'b1; dec.res = RES_BSF; use_b = !typeb;
        dec.bs_left = d_insn[10]; dec.bs_arith = d_insn[9];
      end
      6'b011011: begin                         // get, put (blocking)
        dec.put = d_insn[15]; dec.get = !d_insn[15];
        dec.we = !d_insn[15]; dec.res = RES_GET;
        dec.xctl = d_insn[13]; dec.xadr = d_insn[3:0];
        use_a = d_insn[15];
      end
      6'b10?0??: begin                         // or, and, xor, andn (+ immediate)
        dec.we = 1'b1; use_b = !typeb;
        unique case (op[1:0])
          2'b00: dec.alu = ALU_OR;
          2'b01: dec.alu = ALU_AND;
          2'b10: dec.alu = ALU_XOR;
          default: dec.alu = ALU_ANDN;
        endcase
      end
      6'b100100: begin                         // sra, src, srl, sext8, sext16, cache ops
        dec.we = 1'b1;
        unique case (d_insn[15:0])
          16'h0001: dec.alu = ALU_SRA;
          16'h0021: dec.alu = ALU_SRC;
          16'h0041: dec.alu = ALU_SRL;
          16'h0060: dec.alu = ALU_SEXT8;
          16'h0061: dec.alu = ALU_SEXT16;
          16'h0064, 16'h0068: dec.we = 1'b0;   // wdc, wic: no cache to manage, no-op
          default: begin dec.we = 1'b0; dec.illegal = 1'b1; end
        endcase
      end
      6'b100101: begin                         // mts, mfs, msrset, msrclr
        if (d_insn[15]) begin
          if (d_insn[14]) begin dec.mts = 1'b1; end
          else begin
            dec.we = 1'b1; dec.res = RES_SPR; dec.spr = d_insn[3:0]; use_a = 1'b0;
          end
        end else begin
          dec.we = 1'b1; dec.alu = ALU_MSR; use_a = 1'b0;
          dec.msrclr = d_insn[17]; dec.msrset = !d_insn[17];
        end
      end
      6'b100110, 6'b101110: begin              // br, bra, brd, brad, brld, brald, brk
        dec.br = BR_UNC; dec.ds = d_insn[20]; dec.absol = d_insn[19];
        dec.we = d_insn[18]; dec.alu = ALU_LINK;
        dec.brk = d_insn[19] && d_insn[18] && !d_insn[20];
        use_a = 1'b0; use_b = !typeb;
      end
      6'b100111, 6'b101111: begin              // beq, bne, blt, ble, bgt, bge (+d, +i)
        dec.br = BR_CND; dec.ds = d_insn[25]; dec.cond = d_insn[23:21];
        use_b = !typeb;
      end
      6'b101101: begin                         // rtsd, rtid, rtbd, rted
        dec.br = BR_RET; dec.ds = 1'b1;
        dec.rti = d_insn[21]; dec.rtb = d_insn[22]; dec.rte = d_insn[23];
      end
      6'b101100: begin                         // imm
        is_imm = 1'b1; use_a = 1'b0;
      end
      6'b110000, 6'b110001, 6'b110010, 6'b111000, 6'b111001, 6'b111010: begin
        dec.ld = 1'b1; dec.we = 1'b1; dec.res = RES_LD; dec.size = op[1:0];
        use_b = !typeb;
      end
      6'b110100, 6'b110101, 6'b110110, 6'b111100, 6'b111101, 6'b111110: begin
        dec.st = 1'b1; dec.size = op[1:0]; use_b = !typeb; use_d = 1'b1;
      end
      default: begin                           // floating point and undefined opcodes
        dec.illegal = 1'b1; dec.fpu = (op == 6'h16); use_a = 1'b0;
      end
    endcase
    if (dec.rd == 5'd0) dec.we = 1'b0;
  end

  // ---------------------------------------------------------------- operands
  logic [31:0] immv;
  assign immv = imm_v[d_thr] ? {imm_hi[d_thr], d_insn[15:0]} : {{16{d_insn[15]}}, d_insn[15:0]};

  // x.thr is the thread of the execute-stage producer
  logic x_hit_a, x_hit_b, x_hit_d, w_hit_a, w_hit_b, w_hit_d;
  assign x_hit_a = x_wr && x.thr == d_thr && x_wrd == fa && fa != 5'd0;
  assign x_hit_b = x_wr && x.thr == d_thr && x_wrd == fb && fb != 5'd0;
  assign x_hit_d = x_wr && x.thr == d_thr && x_wrd == fd && fd != 5'd0;
  assign w_hit_a = w_wr && w_thr == d_thr && w_rd == fa && fa != 5'd0;
  assign w_hit_b = w_wr && w_thr == d_thr && w_rd == fb && fb != 5'd0;
  assign w_hit_d = w_wr && w_thr == d_thr && w_rd == fd && fd != 5'd0;

  logic [31:0] ra_f, rb_f, rd_f;
  assign ra_f = x_hit_a ? x_res : w_hit_a ? w_res : ra_dat;
  assign rb_f = x_hit_b ? x_res : w_hit_b ? w_res : rb_dat;
  assign rd_f = x_hit_d ? x_res : w_hit_d ? w_res : rd_dat;

  assign hold = d_valid && x_late &&
                ((use_a && x_hit_a) || (use_b && x_hit_b) || (use_d && x_hit_d));

  assign fwd_x = d_valid && !hold && ((use_a && x_hit_a) || (use_b && x_hit_b) || (use_d && x_hit_d));
  assign fwd_w = d_valid && !hold && ((use_a && w_hit_a && !x_hit_a) ||
                                      (use_b && w_hit_b && !x_hit_b) ||
                                      (use_d && w_hit_d && !x_hit_d));

  logic [31:0] opb_n;
  always_comb begin
    if (op == OP_MSR) opb_n = {17'd0, d_insn[14:0]};
    else if (typeb)   opb_n = immv;
    else              opb_n = rb_f;
  end

  assign imm_busy[0] = imm_v[0] || (d_valid && is_imm && !d_thr);
  assign imm_busy[1] = imm_v[1] || (d_valid && is_imm &&  d_thr);

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      x      <= '0;
      x_opa  <= '0;
      x_opb  <= '0;
      x_opd  <= '0;
      imm_v  <= '0;
      imm_hi[0] <= '0;
      imm_hi[1] <= '0;
    end else if (ena) begin
      x       <= dec;
      x.valid <= d_valid && !hold && !is_imm;
      x_opa   <= ra_f;
      x_opb   <= opb_n;
      x_opd   <= rd_f;
      if (d_valid && !hold) begin
        imm_v[d_thr] <= is_imm;
        if (is_imm) imm_hi[d_thr] <= d_insn[15:0];
      end
    end
  end

endmodule
