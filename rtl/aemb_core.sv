// aemb_core: two-thread AEMB core (MicroBlaze EDK 6.3 instruction set) with a
// coarse-grained threading model: the core runs one thread until that thread fetches
// a branch or return, then switches to the other thread. While the other thread runs,
// the branch of the first thread resolves, so a taken branch costs no stall cycles;
// the first thread resumes exactly at its branch target (or fall-through) when the
// other thread branches in turn. Each thread has its own 32 registers in a 64-entry
// register file addressed with the thread bit (GPHA) as MSB; the MSR is shared, and
// its bit 29 reads as the thread executing the instruction.
//
// Pipeline (4 stages, one global enable, frozen while any bus waits):
//   fetch     aemb_bpcu picks thread and address; aemb_iwbif + aemb_iche look it up
//   decode    aemb_ctrl decodes, reads and forwards operands, detects hazards
//   execute   aemb_intu, aemb_brcc, first half of aemb_mult / aemb_bsft, data and
//             accelerator bus accesses (aemb_dwbif, aemb_xslif); branches resolve here
//   write-back second half of multiply / barrel shift, load and GET data alignment,
//             register file write
// Forwarding goes from the execute result and from the write-back value straight into
// the decode stage's operand registers. Instructions with 2-cycle results (mul, barrel
// shift, load, get, mfs) stall a dependent successor of the same thread for one cycle.
// Exceptions and the interrupt follow MicroBlaze: link registers r17 and r14, vectors
// 0x20 and 0x10. Reset is released synchronously; both threads start at address 0.
// All three buses are Wishbone classic masters with 32-bit data.
// The status signals sw, br_stall, fwd_x and fwd_w (thread switch, branch bubble,
// forwards) drive no logic here; they are kept so simulations can count events.
//
// Origin: the coarse-grained model, the per-thread register halves, the shared MSR with
// the mutex split, the three Wishbone buses and the instruction set follow AEMB and
// its modification. The 4-stage structure, the write-back forwarding, the single
// enable and the exception/interrupt details are choices of this implementation.
module aemb_core
  import aemb_pkg::*;
#(
  parameter int unsigned ICH_LINES = 32,   // instruction cache lines
  parameter int unsigned ICH_WORDS = 16    // words per cache line
) (
  input  logic        sys_clk_i,
  input  logic        sys_rst_i,
  input  logic        sys_int_i,
  // instruction bus
  output logic [31:0] iwb_adr_o,
  output logic        iwb_cyc_o,
  output logic        iwb_stb_o,
  output logic        iwb_we_o,
  output logic [3:0]  iwb_sel_o,
  input  logic [31:0] iwb_dat_i,
  input  logic        iwb_ack_i,
  // data bus
  output logic [31:0] dwb_adr_o,
  output logic        dwb_cyc_o,
  output logic        dwb_stb_o,
  output logic        dwb_we_o,
  output logic [3:0]  dwb_sel_o,
  output logic [31:0] dwb_dat_o,
  input  logic [31:0] dwb_dat_i,
  input  logic        dwb_ack_i,
  // accelerator bus
  output logic [3:0]  xwb_adr_o,
  output logic        xwb_tag_o,
  output logic        xwb_cyc_o,
  output logic        xwb_stb_o,
  output logic        xwb_we_o,
  output logic [31:0] xwb_dat_o,
  input  logic [31:0] xwb_dat_i,
  input  logic        xwb_ack_i,
  // thread being fetched
  output logic        gpha_o
);

  logic clk;
  assign clk = sys_clk_i;

  logic rst, ena, int_flag;
  logic istall, dstall, xstall;

  aemb_pipe u_pipe (
    .sys_clk_i (sys_clk_i),
    .sys_rst_i (sys_rst_i),
    .sys_int_i (sys_int_i),
    .istall    (istall),
    .dstall    (dstall),
    .xstall    (xstall),
    .rst       (rst),
    .ena       (ena),
    .int_flag  (int_flag)
  );

  // ------------------------------------------------------------------ fetch
  logic        i_req;
  logic [31:0] i_adr, i_dat;
  logic        d_valid, d_thr, d_inj;
  logic [31:0] d_pc, d_insn;
  logic        hold;
  logic        redir_v, redir_kill;
  logic [31:0] redir_pc;
  logic        int_req;
  logic [1:0]  imm_busy;
  logic        sw, br_stall;

  aemb_iwbif #(.AW(32), .LINES(ICH_LINES), .WORDS(ICH_WORDS)) u_iwbif (
    .clk       (clk),
    .rst       (rst),
    .ena       (ena),
    .i_req     (i_req),
    .i_adr     (i_adr),
    .i_dat     (i_dat),
    .istall    (istall),
    .iwb_adr_o (iwb_adr_o),
    .iwb_cyc_o (iwb_cyc_o),
    .iwb_stb_o (iwb_stb_o),
    .iwb_we_o  (iwb_we_o),
    .iwb_sel_o (iwb_sel_o),
    .iwb_dat_i (iwb_dat_i),
    .iwb_ack_i (iwb_ack_i)
  );

  xctl_t x;

  aemb_bpcu u_bpcu (
    .clk        (clk),
    .rst        (rst),
    .ena        (ena),
    .i_req      (i_req),
    .i_adr      (i_adr),
    .i_dat      (i_dat),
    .d_valid    (d_valid),
    .d_thr      (d_thr),
    .d_inj      (d_inj),
    .d_pc       (d_pc),
    .d_insn     (d_insn),
    .hold       (hold),
    .redir_v    (redir_v),
    .redir_thr  (x.thr),
    .redir_kill (redir_kill),
    .redir_pc   (redir_pc),
    .int_req    (int_req),
    .imm_busy   (imm_busy),
    .gpha       (gpha_o),
    .sw         (sw),
    .br_stall   (br_stall)
  );

  // ------------------------------------------------------------------ decode
  logic [5:0]  ra_adr, rb_adr, rd_adr;
  logic [31:0] ra_dat, rb_dat, rd_dat;
  logic        x_wr, x_late;
  logic [4:0]  x_wrd;
  logic [31:0] x_res;
  logic        w_we, w_thr;
  logic [4:0]  w_rd;
  res_e        w_src;
  logic [31:0] w_alu, w_res;
  logic [31:0] x_opa, x_opb, x_opd;
  logic        fwd_x, fwd_w;

  aemb_ctrl u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .ena      (ena),
    .d_valid  (d_valid),
    .d_thr    (d_thr),
    .d_inj    (d_inj),
    .d_pc     (d_pc),
    .d_insn   (d_insn),
    .ra_adr   (ra_adr),
    .rb_adr   (rb_adr),
    .rd_adr   (rd_adr),
    .ra_dat   (ra_dat),
    .rb_dat   (rb_dat),
    .rd_dat   (rd_dat),
    .x_wr     (x_wr),
    .x_wrd    (x_wrd),
    .x_late   (x_late),
    .x_res    (x_res),
    .w_wr     (w_we),
    .w_thr    (w_thr),
    .w_rd     (w_rd),
    .w_res    (w_res),
    .hold     (hold),
    .imm_busy (imm_busy),
    .fwd_x    (fwd_x),
    .fwd_w    (fwd_w),
    .x        (x),
    .x_opa    (x_opa),
    .x_opb    (x_opb),
    .x_opd    (x_opd)
  );

  aemb_regf #(.DW(32), .AW(6)) u_regf (
    .clk    (clk),
    .ena    (ena),
    .ra_adr (ra_adr),
    .rb_adr (rb_adr),
    .rd_adr (rd_adr),
    .ra_dat (ra_dat),
    .rb_dat (rb_dat),
    .rd_dat (rd_dat),
    .we     (w_we),
    .w_adr  ({w_thr, w_rd}),
    .w_dat  (w_res)
  );

  // ------------------------------------------------------------------ execute
  logic [31:0] alu_res, msr;
  logic        exc;

  aemb_intu u_intu (
    .clk (clk),
    .rst (rst),
    .ena (ena),
    .x   (x),
    .opa (x_opa),
    .opb (x_opb),
    .res (alu_res),
    .exc (exc),
    .msr (msr)
  );

  logic        taken;
  logic [31:0] target;

  aemb_brcc u_brcc (
    .br     (x.br),
    .cond   (x.cond),
    .absol  (x.absol),
    .pc     (x.pc),
    .opa    (x_opa),
    .opb    (x_opb),
    .taken  (taken),
    .target (target)
  );

  logic [31:0] mul_res, bsf_res, ld_dat, get_dat;

  aemb_mult #(.DW(32)) u_mult (
    .clk (clk),
    .ena (ena),
    .a   (x_opa),
    .b   (x_opb),
    .res (mul_res)
  );

  aemb_bsft #(.DW(32)) u_bsft (
    .clk   (clk),
    .ena   (ena),
    .a     (x_opa),
    .amt   (x_opb[4:0]),
    .left  (x.bs_left),
    .arith (x.bs_arith),
    .res   (bsf_res)
  );

  logic x_ok;   // valid and not turned into an exception
  assign x_ok = x.valid && !exc;

  aemb_dwbif u_dwbif (
    .clk       (clk),
    .rst       (rst),
    .ena       (ena),
    .ld        (x_ok && x.ld),
    .st        (x_ok && x.st),
    .size      (x.size),
    .adr       (x_opa + x_opb),
    .sdat      (x_opd),
    .dstall    (dstall),
    .ld_dat    (ld_dat),
    .dwb_adr_o (dwb_adr_o),
    .dwb_cyc_o (dwb_cyc_o),
    .dwb_stb_o (dwb_stb_o),
    .dwb_we_o  (dwb_we_o),
    .dwb_sel_o (dwb_sel_o),
    .dwb_dat_o (dwb_dat_o),
    .dwb_dat_i (dwb_dat_i),
    .dwb_ack_i (dwb_ack_i)
  );

  aemb_xslif u_xslif (
    .clk       (clk),
    .rst       (rst),
    .ena       (ena),
    .get       (x_ok && x.get),
    .put       (x_ok && x.put),
    .ctl       (x.xctl),
    .xadr      (x.xadr),
    .pdat      (x_opa),
    .xstall    (xstall),
    .get_dat   (get_dat),
    .xwb_adr_o (xwb_adr_o),
    .xwb_tag_o (xwb_tag_o),
    .xwb_cyc_o (xwb_cyc_o),
    .xwb_stb_o (xwb_stb_o),
    .xwb_we_o  (xwb_we_o),
    .xwb_dat_o (xwb_dat_o),
    .xwb_dat_i (xwb_dat_i),
    .xwb_ack_i (xwb_ack_i)
  );

  // An exception turns the instruction into a link write of its PC to r17.
  assign x_wr   = x.valid && (exc || x.we);
  assign x_wrd  = exc ? 5'd17 : x.rd;
  assign x_late = !exc && x.res != RES_ALU;
  assign x_res  = exc ? x.pc : alu_res;

  // Branch resolution and exception redirect for the execute-stage thread.
  assign redir_kill = exc;
  assign redir_v    = exc || (x.valid && x.br != BR_NONE);
  always_comb begin
    if (exc)        redir_pc = VEC_EXC;
    else if (taken) redir_pc = target;
    else            redir_pc = x.pc + (x.ds ? 32'd8 : 32'd4);
  end

  // Interrupts are taken when enabled and no MSR-changing instruction is in flight.
  logic d_msrop, x_msrop;
  assign d_msrop = d_valid && (d_inj || d_insn[31:26] == OP_MSR || d_insn[31:26] == OP_RET);
  assign x_msrop = x.valid && (x.inj || x.mts || x.msrset || x.msrclr || x.br == BR_RET);
  assign int_req = int_flag && msr[MSR_IE] && !msr[MSR_BIP] && !msr[MSR_EIP] &&
                   !d_msrop && !x_msrop;

  // ------------------------------------------------------------------ write-back
  always_ff @(posedge clk) begin
    if (rst) begin
      w_we  <= 1'b0;
      w_thr <= 1'b0;
      w_rd  <= '0;
      w_src <= RES_ALU;
      w_alu <= '0;
    end else if (ena) begin
      w_we  <= x_wr;
      w_thr <= x.thr;
      w_rd  <= x_wrd;
      w_src <= exc ? RES_ALU : x.res;
      w_alu <= x_res;
    end
  end

  always_comb begin
    unique case (w_src)
      RES_MUL: w_res = mul_res;
      RES_BSF: w_res = bsf_res;
      RES_LD:  w_res = ld_dat;
      RES_GET: w_res = get_dat;
      default: w_res = w_alu;
    endcase
  end

endmodule
