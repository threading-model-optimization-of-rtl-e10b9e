// tb_aemb_intu: random operations of the integer unit (add and subtract with every
// carry option, compare, logic, one-bit shifts, sign extension, msrset/msrclr, mts,
// mfs of PC/MSR/EAR/ESR, branch-and-link, break, injected interrupt, returns,
// illegal and floating-point opcodes, aligned and misaligned loads and stores) with
// random operands, random stalls and random empty slots. A reference model of the
// status registers (MSR, ESR, EAR), written from the instruction-set rules, gives the
// expected result, exception flag and MSR view (thread bit and carry copy included)
// in every cycle; the status registers are also read back through mfs.
module tb_aemb_intu;
  import aemb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        ena, exc;
  xctl_t       x;
  logic [31:0] opa, opb, res, msr;

  aemb_intu dut (.clk(clk), .rst(rst), .ena(ena), .x(x), .opa(opa), .opb(opb),
                 .res(res), .exc(exc), .msr(msr));

  int checks = 0, failures = 0, n_exc = 0;
  logic [31:0] m_msr, m_esr, m_ear;

  task automatic check(input logic ok, input string what, input logic [31:0] got, exp);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t got %h exp %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] view(input logic thr);
    logic [31:0] v;
    v = m_msr;
    v[MSR_PHA] = thr;
    v[MSR_CC]  = m_msr[MSR_C];
    return v;
  endfunction

  initial begin
    int          op, sel;
    logic        has_res, e_exc, cy, misal;
    logic [31:0] e_res, n_msr, ea;
    logic [32:0] s;
    m_msr = 0; m_esr = 0; m_ear = 0;
    x = '0; opa = 0; opb = 0; ena = 1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 40000; n++) begin
      op  = $urandom_range(0, 21);
      opa = $urandom; opb = $urandom;
      if ($urandom_range(0, 3) == 0) opa = 32'(opb + $urandom_range(0, 2));
      x = '0;
      x.valid = $urandom_range(0, 7) != 0;
      x.thr   = 1'($urandom);
      x.pc    = {$urandom} & 32'hFFFF_FFFC;
      x.rd    = 5'($urandom);
      ena     = $urandom_range(0, 4) != 0;
      has_res = 1'b1; e_res = 0; n_msr = m_msr; e_exc = 1'b0;
      ea = opa + opb;
      unique case (op)
        0, 1, 2: begin
          x.alu = ALU_ADD; x.we = 1'b1;
          x.sub = op != 0; x.cin_msr = (op != 2) && $urandom_range(0, 1); x.keep = (op == 2) || $urandom_range(0, 1);
          x.cmp = op == 2; x.cmpu = 1'($urandom);
          cy = x.cin_msr ? m_msr[MSR_C] : x.sub;
          s = x.sub ? {1'b0, ~opa} + {1'b0, opb} + 33'(cy) : {1'b0, opa} + {1'b0, opb} + 33'(cy);
          e_res = s[31:0];
          if (x.cmp) e_res[31] = x.cmpu ? (opa > opb) : ($signed(opa) > $signed(opb));
          if (!x.keep) n_msr[MSR_C] = s[32];
        end
        3: begin x.alu = ALU_OR;   e_res = opa | opb; end
        4: begin x.alu = ALU_AND;  e_res = opa & opb; end
        5: begin x.alu = ALU_XOR;  e_res = opa ^ opb; end
        6: begin x.alu = ALU_ANDN; e_res = opa & ~opb; end
        7: begin x.alu = ALU_SRA;  e_res = $signed(opa) >>> 1; n_msr[MSR_C] = opa[0]; end
        8: begin x.alu = ALU_SRC;  e_res = {m_msr[MSR_C], opa[31:1]}; n_msr[MSR_C] = opa[0]; end
        9: begin x.alu = ALU_SRL;  e_res = opa >> 1; n_msr[MSR_C] = opa[0]; end
        10: begin x.alu = ALU_SEXT8;  e_res = 32'($signed(opa[7:0])); end
        11: begin x.alu = ALU_SEXT16; e_res = 32'($signed(opa[15:0])); end
        12, 13: begin
          x.alu = ALU_MSR; x.msrset = op == 12; x.msrclr = op == 13;
          opb = {17'd0, 15'($urandom)};
          e_res = view(x.thr);
          if (op == 12) n_msr[14:0] = m_msr[14:0] | opb[14:0];
          else          n_msr[14:0] = m_msr[14:0] & ~opb[14:0];
        end
        14: begin
          x.mts = 1'b1; has_res = 1'b0;
          n_msr = opa; n_msr[MSR_PHA] = 1'b0; n_msr[MSR_CC] = 1'b0;
        end
        15: begin
          x.res = RES_SPR;
          sel = $urandom_range(0, 3);
          unique case (sel)
            0: begin x.spr = SPR_PC;  e_res = x.pc; end
            1: begin x.spr = SPR_MSR; e_res = view(x.thr); end
            2: begin x.spr = SPR_EAR; e_res = m_ear; end
            default: begin x.spr = SPR_ESR; e_res = m_esr; end
          endcase
        end
        16: begin x.alu = ALU_LINK; x.br = BR_UNC; e_res = x.pc; end
        17: begin
          x.illegal = 1'b1; x.fpu = 1'($urandom); has_res = 1'b0;
          e_exc = m_msr[MSR_EE] && !m_msr[MSR_EIP];
        end
        18: begin
          has_res = 1'b0;
          if ($urandom_range(0, 1)) x.ld = 1'b1; else x.st = 1'b1;
          x.size = 2'($urandom_range(0, 2));
          misal = (x.size == 2 && ea[1:0] != 0) || (x.size == 1 && ea[0]);
          e_exc = misal && m_msr[MSR_EE] && !m_msr[MSR_EIP];
        end
        19: begin x.alu = ALU_LINK; x.br = BR_UNC; x.brk = 1'b1; e_res = x.pc; n_msr[MSR_BIP] = 1'b1; end
        20: begin x.alu = ALU_LINK; x.br = BR_UNC; x.inj = 1'b1; e_res = x.pc; n_msr[MSR_IE] = 1'b0; end
        default: begin
          has_res = 1'b0; x.br = BR_RET;
          x.rti = 1'($urandom); x.rtb = 1'($urandom); x.rte = 1'($urandom);
          if (x.rti) n_msr[MSR_IE] = 1'b1;
          if (x.rtb) n_msr[MSR_BIP] = 1'b0;
          if (x.rte) begin n_msr[MSR_EE] = 1'b1; n_msr[MSR_EIP] = 1'b0; end
        end
      endcase
      if (!x.valid) e_exc = 1'b0;
      if (e_exc) begin
        n_msr = m_msr; n_msr[MSR_EIP] = 1'b1; n_msr[MSR_EE] = 1'b0;
      end
      #3;
      check(msr == view(x.thr), "msr view", msr, view(x.thr));
      check(exc == e_exc, "exception flag", 32'(exc), 32'(e_exc));
      if (has_res && x.valid) check(res == e_res, $sformatf("result of op %0d", op), res, e_res);
      @(posedge clk);
      if (ena && x.valid) begin
        if (e_exc) begin
          n_exc++;
          m_esr = {20'd0, x.size == 2'd2, x.st, x.rd, x.illegal ? (x.fpu ? EC_FPU : EC_ILLEGAL) : EC_UNALIGNED};
          m_ear = ea;
        end
        m_msr = n_msr;
      end
      #1;
    end
    checks++;
    if (n_exc == 0) begin failures++; $display("FAIL no exception was taken"); end
    $display("intu: %0d exceptions", n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
