// tb_aemb_ctrl: the decode stage gets a random stream of instructions of both threads
// (arithmetic, logic, multiply, barrel shift, loads, stores, branches, returns, imm
// prefixes, get/put, mfs and an illegal floating-point opcode), with random producers
// in the execute and write-back stages, random stalls and random empty decode slots.
// A reference decoder written from the instruction formats, independent of the
// block, gives for every instruction which operands it reads, whether it writes, its
// result class, load/store size and branch kind. The testbench checks the
// register-file addresses, the decoded record entering the execute stage, the three
// operands with the forwarding priority execute > write-back > register file, the
// hold for a 2-cycle producer of the same thread, the forwarding flags, and the
// immediate prefix kept per thread until the next instruction of that thread.
module tb_aemb_ctrl;
  import aemb_pkg::*;
  import aemb_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        ena, d_valid, d_thr, d_inj;
  logic [31:0] d_pc, d_insn;
  logic [5:0]  ra_adr, rb_adr, rd_adr;
  logic [31:0] ra_dat, rb_dat, rd_dat;
  logic        x_wr, x_late, w_wr, w_thr;
  logic [4:0]  x_wrd, w_rd;
  logic [31:0] x_res, w_res;
  logic        hold, fwd_x, fwd_w;
  logic [1:0]  imm_busy;
  xctl_t       x;
  logic [31:0] x_opa, x_opb, x_opd;

  logic [31:0] rf [64];
  assign ra_dat = rf[ra_adr];
  assign rb_dat = rf[rb_adr];
  assign rd_dat = rf[rd_adr];

  aemb_ctrl dut (
    .clk(clk), .rst(rst), .ena(ena), .d_valid(d_valid), .d_thr(d_thr), .d_inj(d_inj),
    .d_pc(d_pc), .d_insn(d_insn), .ra_adr(ra_adr), .rb_adr(rb_adr), .rd_adr(rd_adr),
    .ra_dat(ra_dat), .rb_dat(rb_dat), .rd_dat(rd_dat), .x_wr(x_wr), .x_wrd(x_wrd),
    .x_late(x_late), .x_res(x_res), .w_wr(w_wr), .w_thr(w_thr), .w_rd(w_rd),
    .w_res(w_res), .hold(hold), .imm_busy(imm_busy), .fwd_x(fwd_x), .fwd_w(fwd_w),
    .x(x), .x_opa(x_opa), .x_opb(x_opb), .x_opd(x_opd));

  int checks = 0, failures = 0;
  int n_hold = 0, n_fx = 0, n_fw = 0, n_imm = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t insn %h", what, $time, d_insn);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference decode of the current instruction
  int          ty;
  logic        e_ua, e_ub, e_ud, e_we, e_ld, e_st, e_ds, e_ill, e_fpu, e_imm, e_tb, e_chkb;
  res_e        e_res;
  br_e         e_br;
  logic [1:0]  e_size;

  task automatic make(input int t);
    logic [4:0] d, a, b;
    logic [15:0] i;
    d = 5'($urandom_range(0, 7)); a = 5'($urandom_range(0, 7)); b = 5'($urandom_range(0, 7));
    i = 16'($urandom);
    e_ua = 0; e_ub = 0; e_ud = 0; e_we = 0; e_ld = 0; e_st = 0; e_ds = 0; e_ill = 0;
    e_fpu = 0; e_imm = 0; e_tb = 0; e_chkb = 1; e_res = RES_ALU; e_br = BR_NONE; e_size = 2'd0;
    unique case (t)
      0:  begin d_insn = add(d, a, b);     e_ua = 1; e_ub = 1; e_we = 1; end
      1:  begin d_insn = addik(d, a, i);   e_ua = 1; e_tb = 1; e_we = 1; end
      2:  begin d_insn = mul(d, a, b);     e_ua = 1; e_ub = 1; e_we = 1; e_res = RES_MUL; end
      3:  begin d_insn = bsrli(d, a, b);   e_ua = 1; e_tb = 1; e_we = 1; e_res = RES_BSF; end
      4:  begin d_insn = lwi(d, a, i);     e_ua = 1; e_tb = 1; e_we = 1; e_res = RES_LD; e_ld = 1; e_size = 2; end
      5:  begin d_insn = sbi(d, a, i);     e_ua = 1; e_tb = 1; e_ud = 1; e_st = 1; e_size = 0; end
      6:  begin d_insn = lw(d, a, b);      e_ua = 1; e_ub = 1; e_we = 1; e_res = RES_LD; e_ld = 1; e_size = 2; end
      7:  begin d_insn = sw(d, a, b);      e_ua = 1; e_ub = 1; e_ud = 1; e_st = 1; e_size = 2; end
      8:  begin d_insn = brlid(d, i);      e_tb = 1; e_we = 1; e_br = BR_UNC; e_ds = 1; end
      9:  begin e_ds = 1'($urandom); d_insn = bcci(3'($urandom_range(0, 5)), e_ds, a, i);
                e_ua = 1; e_tb = 1; e_br = BR_CND; end
      10: begin d_insn = rtsd(a, i);       e_ua = 1; e_tb = 1; e_br = BR_RET; e_ds = 1; end
      11: begin d_insn = imm(i);           e_imm = 1; e_chkb = 0; end
      12: begin d_insn = get(d, 1'b0, 4'(i)); e_we = 1; e_res = RES_GET; e_chkb = 0; end
      13: begin d_insn = put(a, 1'b0, 4'(i)); e_ua = 1; e_chkb = 0; end
      14: begin d_insn = mfs(d, 14'h0001); e_we = 1; e_res = RES_SPR; e_chkb = 0; end
      15: begin d_insn = fadd(d, a, b);    e_ill = 1; e_fpu = 1; e_chkb = 0; end
      16: begin d_insn = or_(d, a, b);     e_ua = 1; e_ub = 1; e_we = 1; end
      17: begin d_insn = sext8(d, a);      e_ua = 1; e_we = 1; e_chkb = 0; end
      default: begin d_insn = muli(d, a, i); e_ua = 1; e_tb = 1; e_we = 1; e_res = RES_MUL; end
    endcase
    if (d_insn[25:21] == 5'd0) e_we = 0;
    if (!e_tb && !e_ub) e_chkb = 0;
  endtask

  // reference state
  logic        m_imm [2];
  logic [15:0] m_hi  [2];
  logic        m_xthr;

  // expectations for the record registered at the next enabled edge
  logic        s_valid, s_we, s_ld, s_st, s_ds, s_ill, s_fpu, s_thr, s_ua, s_ub, s_ud, s_chkb;
  logic [4:0]  s_rd;
  res_e        s_res;
  br_e         s_br;
  logic [1:0]  s_size;
  logic [31:0] s_opa, s_opb, s_opd, s_pc;
  logic        s_any;

  function automatic logic [31:0] pick(input logic xh, wh, input logic [31:0] rv);
    return xh ? x_res : wh ? w_res : rv;
  endfunction

  initial begin
    logic [4:0]  fa, fb, fd;
    logic        xha, xhb, xhd, wha, whb, whd, e_hold, acc;
    ena = 1; d_valid = 0; d_thr = 0; d_inj = 0; d_pc = 0; d_insn = 0;
    x_wr = 0; x_late = 0; x_res = 0; x_wrd = 0; w_wr = 0; w_thr = 0; w_rd = 0; w_res = 0;
    s_any = 0; m_xthr = 0;
    for (int t = 0; t < 2; t++) begin m_imm[t] = 0; m_hi[t] = 0; end
    for (int r = 0; r < 64; r++) rf[r] = (r % 32 == 0) ? 32'd0 : $urandom;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 30000; n++) begin
      // drive the decode stage and the producers
      ty = $urandom_range(0, 18);
      make(ty);
      d_valid = $urandom_range(0, 7) != 0;
      d_thr   = 1'($urandom);
      d_pc    = {20'd0, 10'($urandom), 2'b00};
      x_wr    = 1'($urandom);  x_wrd = 5'($urandom_range(0, 7)); x_late = 1'($urandom);
      x_res   = $urandom;
      w_wr    = 1'($urandom);  w_thr = 1'($urandom); w_rd = 5'($urandom_range(0, 7));
      w_res   = $urandom;
      ena     = $urandom_range(0, 5) != 0;
      for (int r = 1; r < 64; r++) if (r != 32 && $urandom_range(0, 9) == 0) rf[r] = $urandom;
      #3;
      fa = d_insn[20:16]; fb = d_insn[15:11]; fd = d_insn[25:21];
      check(ra_adr == {d_thr, fa} && rb_adr == {d_thr, fb} && rd_adr == {d_thr, fd}, "register file address");
      xha = x_wr && m_xthr == d_thr && x_wrd == fa && fa != 0;
      xhb = x_wr && m_xthr == d_thr && x_wrd == fb && fb != 0;
      xhd = x_wr && m_xthr == d_thr && x_wrd == fd && fd != 0;
      wha = w_wr && w_thr == d_thr && w_rd == fa && fa != 0;
      whb = w_wr && w_thr == d_thr && w_rd == fb && fb != 0;
      whd = w_wr && w_thr == d_thr && w_rd == fd && fd != 0;
      e_hold = d_valid && x_late && ((e_ua && xha) || (e_ub && xhb) || (e_ud && xhd));
      check(hold == e_hold, "hold");
      check(fwd_x == (d_valid && !e_hold && ((e_ua && xha) || (e_ub && xhb) || (e_ud && xhd))), "execute forward flag");
      check(fwd_w == (d_valid && !e_hold && ((e_ua && wha && !xha) || (e_ub && whb && !xhb) ||
                                             (e_ud && whd && !xhd))), "write-back forward flag");
      check(imm_busy[d_thr] == (m_imm[d_thr] || (d_valid && e_imm)), "imm busy");
      if (hold) n_hold++;
      if (fwd_x) n_fx++;
      if (fwd_w) n_fw++;
      acc = d_valid && !e_hold;
      // expectations
      s_valid = acc && !e_imm;
      s_thr = d_thr; s_rd = fd; s_we = e_we; s_res = e_res; s_ld = e_ld; s_st = e_st;
      s_size = e_size; s_br = e_br; s_ds = e_ds; s_ill = e_ill; s_fpu = e_fpu; s_pc = d_pc;
      s_ua = e_ua; s_ub = e_ub; s_ud = e_ud; s_chkb = e_chkb;
      s_opa = pick(xha, wha, rf[{d_thr, fa}]);
      s_opd = pick(xhd, whd, rf[{d_thr, fd}]);
      if (e_tb) s_opb = m_imm[d_thr] ? {m_hi[d_thr], d_insn[15:0]} : {{16{d_insn[15]}}, d_insn[15:0]};
      else      s_opb = pick(xhb, whb, rf[{d_thr, fb}]);
      @(posedge clk);
      if (ena) begin
        m_xthr = d_thr;
        if (acc) begin
          if (e_imm) n_imm++;
          m_imm[d_thr] = e_imm;
          if (e_imm) m_hi[d_thr] = d_insn[15:0];
        end
        s_any = 1;
      end else s_any = 0;
      #1;
      if (s_any) begin
        check(x.valid == s_valid, "execute valid");
        if (s_valid) begin
          check(x.thr == s_thr && x.pc == s_pc && x.rd == s_rd, "thread, pc or destination");
          check(x.we == s_we, "write enable");
          if (s_we) check(x.res == s_res, "result class");
          check(x.ld == s_ld && x.st == s_st, "load/store");
          if (s_ld || s_st) check(x.size == s_size, "access size");
          check(x.br == s_br, "branch kind");
          if (s_br != BR_NONE) check(x.ds == s_ds, "delay slot flag");
          check(x.illegal == s_ill && x.fpu == s_fpu, "illegal opcode");
          if (s_ua) check(x_opa == s_opa, "operand A");
          if (s_chkb) check(x_opb == s_opb, "operand B");
          if (s_ud) check(x_opd == s_opd, "operand D");
        end
      end
    end
    checks++;
    if (n_hold == 0 || n_fx == 0 || n_fw == 0 || n_imm == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("ctrl: %0d holds, %0d execute forwards, %0d write-back forwards, %0d imm prefixes",
             n_hold, n_fx, n_fw, n_imm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
