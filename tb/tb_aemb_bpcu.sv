// tb_aemb_bpcu: the address unit runs a random program of plain instructions, branches
// without delay slot and branches with delay slot, with random pipeline stalls, random
// decode holds and random interrupt requests. The testbench plays the instruction
// memory (one-cycle read) and the execute stage: one cycle after a branch or an
// injected interrupt leaves decode it redirects that thread to a target taken from a
// table. A reference model, kept per thread, checks that every instruction accepted by
// decode is the one program order asks for, that the switch flag is raised exactly for
// a branch without delay slot, a delay slot or an injected interrupt, that the thread
// changes after a switch and only then, and that a fetch bubble appears exactly in the
// cycle after two switching instructions of the two threads follow each other
// (zero-cycle switch otherwise). It also checks that an interrupt is never injected in
// place of a delay slot and that the injected word is the branch-and-link to the vector.
module tb_aemb_bpcu;
  import aemb_pkg::*;
  import aemb_asm_pkg::*;

  localparam int NW = 1024;
  localparam logic [31:0] VEC = 32'h10;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        ena, i_req, d_valid, d_thr, d_inj, hold, redir_v, redir_thr, int_req;
  logic        gpha, sw, br_stall;
  logic [31:0] i_adr, i_dat, d_pc, d_insn, redir_pc;
  logic [31:0] adr_q;

  logic [31:0] mem  [NW];
  logic [1:0]  kind [NW];   // 0 plain, 1 branch without delay slot, 2 branch with delay slot
  logic [31:0] tgt  [NW];

  int checks = 0, failures = 0;
  int bubbles = 0, stalls = 0, switches = 0, injects = 0, holds = 0;

  aemb_bpcu dut (
    .clk(clk), .rst(rst), .ena(ena), .i_req(i_req), .i_adr(i_adr), .i_dat(i_dat),
    .d_valid(d_valid), .d_thr(d_thr), .d_inj(d_inj), .d_pc(d_pc), .d_insn(d_insn),
    .hold(hold), .redir_v(redir_v), .redir_thr(redir_thr), .redir_kill(1'b0),
    .redir_pc(redir_pc), .int_req(int_req), .imm_busy(2'b00), .gpha(gpha), .sw(sw),
    .br_stall(br_stall));

  // instruction memory with one cycle of read latency
  always_ff @(posedge clk) if (ena && i_req) adr_q <= i_adr;
  assign i_dat = mem[adr_q[11:2]];

  // execute stage model
  logic        x_v, x_thr, x_inj;
  logic [31:0] x_pc;
  logic        acc;
  assign acc = d_valid && !hold;
  always_ff @(posedge clk) begin
    if (rst) x_v <= 1'b0;
    else if (ena) begin
      x_v   <= acc;
      x_thr <= d_thr;
      x_inj <= d_inj;
      x_pc  <= d_pc;
    end
  end
  function automatic logic [31:0] target(input logic t, input logic [31:0] pc);
    return tgt[pc[11:2]] ^ (t ? 32'h800 : 32'h0);
  endfunction
  assign redir_v   = x_v && (x_inj || kind[x_pc[11:2]] != 2'd0);
  assign redir_thr = x_thr;
  assign redir_pc  = x_inj ? VEC : target(x_thr, x_pc);

  // reference model
  logic [31:0] exp_pc [2];
  logic [31:0] pend   [2];
  logic        in_ds  [2];
  logic        started;
  // the two previous enabled cycles: accepted, thread, switch of any kind, switch
  // that leaves the thread unresolved (branch without delay slot or interrupt)
  logic        h1_acc, h1_thr, h1_sw, h2_acc, h2_thr, h2_nods, h1_nods;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (thr %0d pc %h)", what, $time, d_thr, d_pc);
    end
  endtask

  always @(posedge clk) begin
    logic k_sw, k_nods, bub_exp;
    logic [1:0] k;
    if (!rst && ena) begin
      bub_exp = h1_acc && h1_sw && h2_acc && h2_nods && (h1_thr != h2_thr);
      if (started) begin
        check(d_valid == !bub_exp, bub_exp ? "expected fetch bubble missing" : "unexpected fetch bubble");
        if (!d_valid) bubbles++;
      end
      if (br_stall) stalls++;
      if (hold && d_valid) begin
        holds++;
        check(!sw, "switch raised while decode holds");
      end
      k_sw = 1'b0; k_nods = 1'b0;
      if (acc) begin
        k = kind[d_pc[11:2]];
        if (started) check(d_pc == exp_pc[d_thr], "instruction out of program order");
        if (started && h1_acc) check((d_thr != h1_thr) == h1_sw, "thread change does not follow the switch rule");
        if (d_inj) begin
          injects++;
          check(d_insn == INSN_INT, "injected word is not the interrupt branch");
          check(!in_ds[d_thr], "interrupt injected in a delay slot");
          k_sw = 1'b1; k_nods = 1'b1;
          exp_pc[d_thr] = VEC;
          in_ds[d_thr]  = 1'b0;
        end else begin
          check(d_insn == mem[d_pc[11:2]], "decode word differs from memory");
          if (in_ds[d_thr]) begin
            k_sw = 1'b1;
            exp_pc[d_thr] = pend[d_thr];
            in_ds[d_thr]  = 1'b0;
          end else if (k == 2'd1) begin
            k_sw = 1'b1; k_nods = 1'b1;
            exp_pc[d_thr] = target(d_thr, d_pc);
          end else if (k == 2'd2) begin
            exp_pc[d_thr] = d_pc + 32'd4;
            pend[d_thr]   = target(d_thr, d_pc);
            in_ds[d_thr]  = 1'b1;
          end else begin
            exp_pc[d_thr] = d_pc + 32'd4;
          end
        end
        check(sw == k_sw, "switch flag wrong");
        if (sw) switches++;
        started = 1'b1;
      end
      h2_acc = h1_acc; h2_thr = h1_thr; h2_nods = h1_nods;
      h1_acc = acc; h1_thr = d_thr; h1_sw = k_sw; h1_nods = k_nods;
    end
  end

  initial begin
    int r;
    ena = 1'b1; hold = 1'b0; int_req = 1'b0; adr_q = 32'h0;
    started = 1'b0;
    h1_acc = 0; h2_acc = 0; h1_thr = 0; h2_thr = 0; h1_sw = 0; h1_nods = 0; h2_nods = 0;
    for (int t = 0; t < 2; t++) begin exp_pc[t] = 32'h0; in_ds[t] = 1'b0; pend[t] = 32'h0; end
    for (int a = 0; a < NW; a++) begin
      r = $urandom_range(0, 99);
      tgt[a] = {20'd0, 10'($urandom), 2'b00};
      if (a > 0 && kind[a-1] == 2'd2) r = 0;      // a delay slot holds no branch
      if (r < 65)      begin kind[a] = 2'd0; mem[a] = add(5'(a), 5'(a + 1), 5'(a + 2)); end
      else if (r < 75) begin kind[a] = 2'd1; mem[a] = brai(16'(a)); end
      else if (r < 82) begin kind[a] = 2'd1; mem[a] = bcci(3'($urandom_range(0, 5)), 1'b0, 5'd3, 16'(a)); end
      else if (r < 90) begin kind[a] = 2'd2; mem[a] = brlid(5'd15, 16'(a)); end
      else if (r < 95) begin kind[a] = 2'd2; mem[a] = bcci(3'($urandom_range(0, 5)), 1'b1, 5'd3, 16'(a)); end
      else             begin kind[a] = 2'd2; mem[a] = rtsd(5'd15, 16'd8); end
    end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (20000) begin
      @(posedge clk); #1;
      ena     = $urandom_range(0, 4) != 0;
      hold    = d_valid && $urandom_range(0, 5) == 0;
      int_req = $urandom_range(0, 29) == 0;
    end
    checks++;
    if (bubbles == 0 || stalls == 0 || switches == 0 || injects == 0 || holds == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: bubbles %0d stalls %0d switches %0d injects %0d holds %0d",
               bubbles, stalls, switches, injects, holds);
    end
    $display("bpcu: %0d switches, %0d fetch bubbles, %0d stall flags, %0d interrupts, %0d holds",
             switches, bubbles, stalls, injects, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
