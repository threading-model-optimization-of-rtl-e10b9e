// aemb_bpcu: address unit of the coarse-grained two-thread AEMB core.
// It keeps one program counter per thread (`pc`) and a flag (`ok`) telling whether
// that counter is known, and each enabled cycle chooses the next address to fetch.
// The instruction returned by the instruction interface in the following cycle sits
// in the decode stage; the address unit predecodes it at once, so the thread can be
// switched in the very next fetch:
//   - branch or return without delay slot in decode: fetch from the other thread;
//   - branch or return with delay slot: fetch the delay slot from the same thread,
//     then switch to the other thread when the delay slot reaches decode;
//   - otherwise continue the current thread at pc + 4.
// A thread that switched on a branch without delay slot (or an interrupt) has `ok`
// cleared until that branch resolves in the execute
// stage (`redir_*` from the execute stage sets the counter to the target or the
// fall-through address). If the thread to be fetched is not yet resolved, a bubble is
// fetched (`br_stall`): this happens only when a branch of the other thread follows
// immediately. When the decode stage must hold (`hold`), its own instruction is
// fetched again. An exception in the execute stage (`redir_kill`) also cancels the
// decode instruction and the fetch of that thread. An interrupt (`int_req`) is taken
// by fetching, in place of the next instruction, a branch-and-link to the interrupt
// vector (never in a delay slot or after an `imm` prefix); its link address is the
// address of the instruction it replaced. Both threads start at RST_PC after reset,
// thread 0 first. `gpha` is the thread being fetched.
//
// Origin: the switch on every branch, conditional branch or return, both threads
// starting at address 0 and branch detection right at fetch follow the modified AEMB.
// Bubbles only for back-to-back branches of the two threads, and the interrupt
// injection, are choices of this implementation (see the core for the reason).
module aemb_bpcu
  import aemb_pkg::*;
#(
  parameter logic [31:0] RST_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ena,
  // fetch request to the instruction interface
  output logic        i_req,
  output logic [31:0] i_adr,
  input  logic [31:0] i_dat,
  // decode stage
  output logic        d_valid,
  output logic        d_thr,
  output logic        d_inj,
  output logic [31:0] d_pc,
  output logic [31:0] d_insn,
  // control
  input  logic        hold,
  input  logic        redir_v,
  input  logic        redir_thr,
  input  logic        redir_kill,
  input  logic [31:0] redir_pc,
  input  logic        int_req,
  input  logic [1:0]  imm_busy,
  output logic        gpha,
  output logic        sw,        // thread switch in this cycle
  output logic        br_stall   // fetch bubble: next thread's branch unresolved
);

  logic [31:0] pc [2];
  logic [1:0]  ok;
  logic        fth;
  logic        dv_q, dthr_q, dds_q, dinj_q;
  logic [31:0] dpc_q;

  // decode stage view
  assign d_thr   = dthr_q;
  assign d_pc    = dpc_q;
  assign d_inj   = dinj_q;
  assign d_valid = dv_q && !(redir_kill && redir_thr == dthr_q);
  assign d_insn  = dinj_q ? INSN_INT : i_dat;
  assign gpha    = fth;

  logic d_br, d_ds;
  assign d_br = is_branch(d_insn);
  assign d_ds = has_dslot(d_insn);

  logic dsnext;
  assign sw     = d_valid && !hold && (dinj_q || dds_q || (d_br && !d_ds));
  assign dsnext = d_valid && !hold && !dinj_q && !dds_q && d_br && d_ds;

  // next fetch
  logic        n_valid, n_thr, n_ds, n_inj, n_fth, s;
  logic [31:0] n_pc;
  logic [31:0] pc_n [2];
  logic [1:0]  ok_n;

  always_comb begin
    n_valid = 1'b0;
    n_thr   = fth;
    n_pc    = pc[fth];
    n_ds    = 1'b0;
    n_inj   = 1'b0;
    n_fth   = fth;
    pc_n    = pc;
    ok_n    = ok;
    br_stall = 1'b0;
    s       = fth;
    if (hold) begin
      n_valid = 1'b1;
      n_thr   = dthr_q;
      n_pc    = dpc_q;
      n_ds    = dds_q;
      n_inj   = dinj_q;
    end else begin
      if (sw)           s = !dthr_q;
      else if (d_valid) s = dthr_q;
      else              s = fth;
      if (sw && !dds_q) ok_n[dthr_q] = 1'b0;   // a delay slot's branch has already resolved
      n_fth = s;
      n_thr = s;
      n_pc  = pc[s];
      if (ok[s] && !(redir_kill && redir_thr == s)) begin
        n_valid = 1'b1;
        n_ds    = dsnext;
        n_inj   = int_req && !dsnext && !imm_busy[s];
        pc_n[s] = pc[s] + 32'd4;
      end else if (!ok[s]) begin
        br_stall = 1'b1;
      end
    end
    if (redir_v) begin
      pc_n[redir_thr] = redir_pc;
      ok_n[redir_thr] = 1'b1;
    end
  end

  assign i_req = n_valid;
  assign i_adr = n_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc[0]  <= RST_PC;
      pc[1]  <= RST_PC;
      ok     <= 2'b11;
      fth    <= 1'b0;
      dv_q   <= 1'b0;
      dthr_q <= 1'b0;
      dds_q  <= 1'b0;
      dinj_q <= 1'b0;
      dpc_q  <= RST_PC;
    end else if (ena) begin
      pc[0]  <= pc_n[0];
      pc[1]  <= pc_n[1];
      ok     <= ok_n;
      fth    <= n_fth;
      dv_q   <= n_valid;
      dthr_q <= n_thr;
      dds_q  <= n_ds;
      dinj_q <= n_inj;
      dpc_q  <= n_pc;
    end
  end

endmodule
