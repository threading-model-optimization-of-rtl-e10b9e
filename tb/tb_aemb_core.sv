// tb_aemb_core: end-to-end test of the two-thread coarse-grained AEMB core.
// A small MicroBlaze program is built in memory with the encoders of aemb_asm_pkg.
// Both threads start at address 0; the MSR mutex bit splits them: the thread that
// sets it first (thread 0) runs an arithmetic / forwarding / load / multiply /
// barrel-shift / accelerator / exception / interrupt sequence, the other runs a
// byte-load loop, sub-word stores and a subroutine call. Each thread stores its
// results to memory and sets a done flag. The testbench supplies Wishbone memories
// with random wait states and a small accelerator, raises the interrupt when the
// program asks for it, then compares every stored result with values computed here.
// It also counts how often each pipeline mechanism occurred (thread switch, branch
// target stall, hazard stall, forwarding from execute and from write-back, delay
// slot, imm prefix, cache miss, bus wait, interrupt, exception, GET/PUT) and counts a
// failure for any mechanism that never happened.
module tb_aemb_core;
  import aemb_asm_pkg::*;

  localparam int MW = 4096;            // memory words (16 KB)

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic irq = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] iwb_adr, dwb_adr, dwb_dat_o, xwb_dat_o;
  logic        iwb_cyc, iwb_stb, iwb_we, dwb_cyc, dwb_stb, dwb_we, xwb_cyc, xwb_stb, xwb_we, xwb_tag;
  logic [3:0]  iwb_sel, dwb_sel, xwb_adr;
  logic [31:0] iwb_dat_i, dwb_dat_i, xwb_dat_i;
  logic        iwb_ack, dwb_ack, xwb_ack, gpha;

  aemb_core dut (
    .sys_clk_i (clk), .sys_rst_i (rst), .sys_int_i (irq),
    .iwb_adr_o (iwb_adr), .iwb_cyc_o (iwb_cyc), .iwb_stb_o (iwb_stb), .iwb_we_o (iwb_we),
    .iwb_sel_o (iwb_sel), .iwb_dat_i (iwb_dat_i), .iwb_ack_i (iwb_ack),
    .dwb_adr_o (dwb_adr), .dwb_cyc_o (dwb_cyc), .dwb_stb_o (dwb_stb), .dwb_we_o (dwb_we),
    .dwb_sel_o (dwb_sel), .dwb_dat_o (dwb_dat_o), .dwb_dat_i (dwb_dat_i), .dwb_ack_i (dwb_ack),
    .xwb_adr_o (xwb_adr), .xwb_tag_o (xwb_tag), .xwb_cyc_o (xwb_cyc), .xwb_stb_o (xwb_stb),
    .xwb_we_o (xwb_we), .xwb_dat_o (xwb_dat_o), .xwb_dat_i (xwb_dat_i), .xwb_ack_i (xwb_ack),
    .gpha_o (gpha)
  );

  logic [31:0] mem [MW];
  logic [31:0] acc [16];
  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- bus models
  assign iwb_dat_i = mem[iwb_adr[13:2]];
  assign dwb_dat_i = mem[dwb_adr[13:2]];
  assign xwb_dat_i = acc[xwb_adr] + (xwb_tag ? 32'h100 : 32'h0);

  int n_put = 0, n_get = 0, put_ok = 0;
  always_ff @(posedge clk) begin
    iwb_ack <= iwb_stb && !iwb_ack && ($urandom_range(0, 2) != 0);
    dwb_ack <= dwb_stb && !dwb_ack && ($urandom_range(0, 2) != 0);
    xwb_ack <= xwb_stb && !xwb_ack && ($urandom_range(0, 3) == 0);
    if (dwb_stb && dwb_ack && dwb_we) begin
      for (int j = 0; j < 4; j++)
        if (dwb_sel[j]) mem[dwb_adr[13:2]][8*j +: 8] <= dwb_dat_o[8*j +: 8];
      if (dwb_adr == 32'h1F00) irq <= 1'b1;
      if (dwb_adr == 32'h1178) irq <= 1'b0;
    end
    if (xwb_stb && xwb_ack) begin
      if (xwb_we) begin
        acc[xwb_adr] <= xwb_dat_o;
        n_put++;
        if (xwb_adr == 4'd1 && !xwb_tag && xwb_dat_o == 32'd100) put_ok++;
      end else n_get++;
    end
  end

  // ---------------------------------------------------------------- program
  int unsigned pc;
  task automatic emit(input logic [31:0] w);
    mem[pc >> 2] = w;
    pc += 4;
  endtask

  int unsigned l0, l1, lw0, t0_lwi, t0_fadd;

  task automatic build();
    for (int k = 0; k < MW; k++) mem[k] = 32'h0;
    for (int k = 0; k < 16; k++) acc[k] = 32'h0;
    // vectors
    pc = 32'h00; emit(brai(16'h0040));
    pc = 32'h10; emit(brai(16'h0300));
    pc = 32'h20; emit(brai(16'h0380));
    // common start, thread split with the MSR mutex bit
    pc = 32'h40;
    emit(msrset(5'd3, 15'h0010));
    emit(andi(5'd3, 5'd3, 16'h0010));
    emit(bcci(3'd1, 1'b1, 5'd3, 16'(32'h200 - pc)));      // bneid r3, thread1
    emit(addik(5'd2, 5'd0, 16'h1100));                    // delay slot: result base
    // ---------------- thread 0
    emit(addik(5'd5, 5'd0, 16'd100));
    emit(addik(5'd6, 5'd5, 16'd23));
    emit(addk(5'd7, 5'd5, 5'd6));
    emit(lwi(5'd8, 5'd0, 16'h1000));
    emit(addk(5'd9, 5'd8, 5'd7));
    emit(mul(5'd10, 5'd9, 5'd6));
    emit(swi(5'd10, 5'd2, 16'd0));
    emit(imm(16'h1234));
    emit(ori(5'd11, 5'd0, 16'h5678));
    emit(bslli(5'd12, 5'd11, 5'd4));
    emit(addik(5'd16, 5'd0, 16'hFFE0));
    emit(bsrai(5'd13, 5'd16, 5'd2));
    emit(swi(5'd12, 5'd2, 16'd4));
    emit(swi(5'd13, 5'd2, 16'd8));
    emit(cmp(5'd18, 5'd5, 5'd6));
    emit(cmp(5'd19, 5'd6, 5'd5));
    emit(cmpu(5'd20, 5'd16, 5'd5));
    emit(swi(5'd18, 5'd2, 16'd12));
    emit(swi(5'd19, 5'd2, 16'd16));
    emit(swi(5'd20, 5'd2, 16'd20));
    emit(addik(5'd22, 5'd0, 16'd3));
    emit(sra(5'd21, 5'd22));                              // C = 1
    emit(src(5'd23, 5'd22));                              // uses C = 1
    emit(srl(5'd24, 5'd16));
    emit(addik(5'd25, 5'd0, 16'h0080));
    emit(sext8(5'd25, 5'd25));
    emit(swi(5'd21, 5'd2, 16'd24));
    emit(swi(5'd23, 5'd2, 16'd28));
    emit(swi(5'd24, 5'd2, 16'd32));
    emit(swi(5'd25, 5'd2, 16'd36));
    emit(addik(5'd28, 5'd0, 16'hFFFF));
    emit(addi(5'd29, 5'd28, 16'd1));                      // carry out 1
    emit(addc(5'd29, 5'd0, 5'd0));
    emit(swi(5'd29, 5'd2, 16'd40));
    emit(addik(5'd20, 5'd0, 16'd10));
    emit(addk(5'd21, 5'd0, 5'd0));
    emit(addk(5'd30, 5'd0, 5'd0));
    l0 = pc;
    emit(addk(5'd21, 5'd21, 5'd20));
    emit(addik(5'd20, 5'd20, 16'hFFFF));
    emit(bcci(3'd1, 1'b1, 5'd20, 16'(l0 - pc)));          // bneid r20, l0
    emit(addik(5'd30, 5'd30, 16'd1));                     // delay slot
    emit(swi(5'd21, 5'd2, 16'd44));
    emit(swi(5'd30, 5'd2, 16'd48));
    emit(mfs(5'd22, 14'h1));
    emit(imm(16'h2000));
    emit(andi(5'd22, 5'd22, 16'h0010));
    emit(swi(5'd22, 5'd2, 16'd52));
    emit(put(5'd5, 1'b0, 4'd1));
    emit(get(5'd23, 1'b1, 4'd1));
    emit(swi(5'd23, 5'd2, 16'd56));
    emit(msrset(5'd0, 15'h0100));                         // EE
    t0_lwi = pc;
    emit(lwi(5'd24, 5'd0, 16'h1001));                     // misaligned
    t0_fadd = pc;
    emit(fadd(5'd0, 5'd0, 5'd0));                         // floating point
    emit(msrclr(5'd0, 15'h0100));
    emit(msrset(5'd0, 15'h0002));                         // IE
    emit(swi(5'd5, 5'd0, 16'h1F00));                      // ask for an interrupt
    lw0 = pc;
    emit(lwi(5'd4, 5'd0, 16'h1178));
    emit(bcci(3'd0, 1'b0, 5'd4, 16'(lw0 - pc)));          // beqi r4, lw0
    emit(addik(5'd4, 5'd0, 16'd1));
    emit(swi(5'd4, 5'd0, 16'h11F0));
    emit(bri(16'd0));
    // ---------------- thread 1
    pc = 32'h200;
    emit(addik(5'd5, 5'd0, 16'd7));
    emit(addik(5'd6, 5'd0, 16'd0));
    l1 = pc;
    emit(lbui(5'd7, 5'd5, 16'h1010));
    emit(addk(5'd6, 5'd6, 5'd7));
    emit(addik(5'd5, 5'd5, 16'hFFFF));
    emit(bcci(3'd1, 1'b0, 5'd5, 16'(l1 - pc)));           // bnei r5, l1
    emit(swi(5'd6, 5'd2, 16'd64));
    emit(lhui(5'd8, 5'd0, 16'h1012));
    emit(swi(5'd8, 5'd2, 16'd68));
    emit(addik(5'd9, 5'd0, 16'h00AB));
    emit(sbi(5'd9, 5'd2, 16'd73));
    emit(addik(5'd10, 5'd0, 16'h1234));
    emit(shi(5'd10, 5'd2, 16'd74));
    emit(mfs(5'd11, 14'h1));
    emit(imm(16'h2000));
    emit(andi(5'd11, 5'd11, 16'h0000));
    emit(swi(5'd11, 5'd2, 16'd76));
    emit(muli(5'd12, 5'd6, 16'hFFFD));
    emit(swi(5'd12, 5'd2, 16'd80));
    emit(brlid(5'd15, 16'(32'h2C0 - pc)));
    emit(addik(5'd13, 5'd0, 16'd5));                      // delay slot
    emit(swi(5'd13, 5'd2, 16'd84));
    emit(addik(5'd4, 5'd0, 16'd1));
    emit(swi(5'd4, 5'd0, 16'h11F4));
    emit(bri(16'd0));
    pc = 32'h2C0;                                         // subroutine
    emit(addk(5'd13, 5'd13, 5'd13));
    emit(rtsd(5'd15, 16'd8));
    emit(addik(5'd13, 5'd13, 16'd1));                     // delay slot
    // ---------------- interrupt handler
    pc = 32'h300;
    emit(swi(5'd14, 5'd0, 16'h1174));
    emit(addik(5'd26, 5'd0, 16'd1));
    emit(swi(5'd26, 5'd0, 16'h1178));
    emit(rtid(5'd14, 16'd0));
    emit(nop());
    // ---------------- exception handler
    pc = 32'h380;
    emit(lwi(5'd27, 5'd0, 16'h117C));
    emit(addik(5'd27, 5'd27, 16'd4));
    emit(swi(5'd27, 5'd0, 16'h117C));
    emit(mfs(5'd26, 14'h5));
    emit(swi(5'd26, 5'd27, 16'h1180));
    emit(mfs(5'd26, 14'h3));
    emit(swi(5'd26, 5'd27, 16'h1190));
    emit(swi(5'd17, 5'd27, 16'h11A0));
    emit(rted(5'd17, 16'd4));
    emit(nop());
    // ---------------- data
    mem[32'h1000 >> 2] = 32'h1111_1111;
    mem[32'h1010 >> 2] = 32'h1011_1213;
    mem[32'h1014 >> 2] = 32'h1415_1617;
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int c_sw, c_brst, c_hold, c_fx, c_fw, c_ds, c_imm, c_miss, c_dwait, c_int, c_exc, c_cyc;
  always_ff @(posedge clk) begin
    if (!dut.rst) begin
      c_cyc <= c_cyc + 1;
      if (iwb_stb && iwb_ack) c_miss <= c_miss + 1;
      if (dut.dstall) c_dwait <= c_dwait + 1;
      if (dut.ena) begin
        if (dut.u_bpcu.sw)       c_sw   <= c_sw + 1;
        if (dut.u_bpcu.br_stall) c_brst <= c_brst + 1;
        if (dut.u_ctrl.hold)     c_hold <= c_hold + 1;
        if (dut.u_ctrl.fwd_x)    c_fx   <= c_fx + 1;
        if (dut.u_ctrl.fwd_w)    c_fw   <= c_fw + 1;
        if (dut.u_bpcu.d_valid && dut.u_bpcu.dds_q) c_ds <= c_ds + 1;
        if (dut.u_bpcu.d_valid && dut.d_insn[31:26] == 6'h2C) c_imm <= c_imm + 1;
        if (dut.x.valid && dut.x.inj) c_int <= c_int + 1;
        if (dut.exc) c_exc <= c_exc + 1;
      end
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic mech(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  function automatic logic [31:0] rd(input int unsigned a);
    return mem[a >> 2];
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- main
  logic [31:0] e_r9, e_r6;
  initial begin
    {c_sw, c_brst, c_hold, c_fx, c_fw, c_ds, c_imm, c_miss, c_dwait, c_int, c_exc, c_cyc} = '0;
    iwb_ack = 1'b0; dwb_ack = 1'b0; xwb_ack = 1'b0;
    build();
    repeat (4) @(posedge clk);
    rst = 1'b0;
    while (!(rd(32'h11F0) == 32'd1 && rd(32'h11F4) == 32'd1)) @(posedge clk);
    repeat (10) @(posedge clk);
    $display("finished after %0d cycles", c_cyc);
    // thread 0
    e_r6 = 32'd123;
    e_r9 = 32'h1111_1111 + 32'd223;
    check("mul after load",    rd(32'h1100), e_r9 * e_r6);
    check("bslli imm",         rd(32'h1104), 32'h2345_6780);
    check("bsrai",             rd(32'h1108), 32'hFFFF_FFF8);
    check("cmp 100,123",       rd(32'h110C), 32'd23);
    check("cmp 123,100",       rd(32'h1110), 32'hFFFF_FFE9);
    check("cmpu",              rd(32'h1114), 32'h8000_0084);
    check("sra",               rd(32'h1118), 32'd1);
    check("src",               rd(32'h111C), 32'h8000_0001);
    check("srl",               rd(32'h1120), 32'h7FFF_FFF0);
    check("sext8",             rd(32'h1124), 32'hFFFF_FF80);
    check("addc",              rd(32'h1128), 32'd1);
    check("loop sum",          rd(32'h112C), 32'd55);
    check("delay slot count",  rd(32'h1130), 32'd10);
    check("msr thread0/mtx",   rd(32'h1134), 32'h0000_0010);
    check("get",               rd(32'h1138), 32'd356);
    check("put seen",          32'(put_ok), 32'd1);
    check("exception count",   rd(32'h117C), 32'd8);
    check("esr unaligned",     rd(32'h1184), 32'h0000_0B01);
    check("ear unaligned",     rd(32'h1194), 32'h0000_1001);
    check("r17 unaligned",     rd(32'h11A4), t0_lwi);
    check("esr fpu",           rd(32'h1188), 32'h0000_0006);
    check("r17 fpu",           rd(32'h11A8), t0_fadd);
    check("interrupt acked",   rd(32'h1178), 32'd1);
    check("r14 word aligned",  {30'd0, rd(32'h1174) & 32'h3}, 32'd0);
    // thread 1
    check("byte loop sum",     rd(32'h1140), 32'd140);
    check("lhu",               rd(32'h1144), 32'h0000_1213);
    check("sb/sh",             rd(32'h1148), 32'h00AB_1234);
    check("msr thread1",       rd(32'h114C), 32'h2000_0000);
    check("muli",              rd(32'h1150), 32'd140 * 32'hFFFF_FFFD);
    check("call/return",       rd(32'h1154), 32'd11);
    $display("mechanisms:");
    mech("thread switch",        c_sw);
    mech("branch target stall",  c_brst);
    mech("data hazard stall",    c_hold);
    mech("forward from execute", c_fx);
    mech("forward from wb",      c_fw);
    mech("delay slot",           c_ds);
    mech("imm prefix",           c_imm);
    mech("icache miss",          c_miss);
    mech("data bus wait",        c_dwait);
    mech("interrupt",            c_int);
    mech("exception",            c_exc);
    mech("get",                  n_get);
    mech("put",                  n_put);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
