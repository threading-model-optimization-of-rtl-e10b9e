// tb_aemb_dwbif: byte, half-word and word loads and stores through the data Wishbone
// interface against a memory model with random wait states. Checks the byte selects
// and lanes of the big-endian bus, the zero-extended load data, that the stall lasts
// until the acknowledge, and that an access acknowledged while the pipeline is held
// by another unit is not repeated.
module tb_aemb_dwbif;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        ld, st, ena, other_stall, dstall, cyc, stb, we, ack;
  logic [1:0]  size;
  logic [31:0] adr, sdat, ld_dat, wadr, wdat, rdat;
  logic [3:0]  sel;
  logic [31:0] mem [64];
  logic [31:0] refm [64];
  int checks = 0, failures = 0, acks = 0;

  assign ena = !dstall && !other_stall;
  aemb_dwbif dut (.clk(clk), .rst(rst), .ena(ena), .ld(ld), .st(st), .size(size), .adr(adr),
                  .sdat(sdat), .dstall(dstall), .ld_dat(ld_dat), .dwb_adr_o(wadr),
                  .dwb_cyc_o(cyc), .dwb_stb_o(stb), .dwb_we_o(we), .dwb_sel_o(sel),
                  .dwb_dat_o(wdat), .dwb_dat_i(rdat), .dwb_ack_i(ack));

  assign rdat = mem[wadr[7:2]];
  always_ff @(posedge clk) begin
    ack <= stb && !ack && ($urandom_range(0, 2) == 0);
    if (stb && ack) begin
      acks <= acks + 1;
      if (we) for (int j = 0; j < 4; j++) if (sel[j]) mem[wadr[7:2]][8*j +: 8] <= wdat[8*j +: 8];
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    logic [1:0]  o;
    int          n_prev, oc;
    bit          is_st;
    ack = 1'b0; ld = 0; st = 0; size = 0; adr = 0; sdat = 0; other_stall = 0;
    for (int k = 0; k < 64; k++) begin mem[k] = $urandom; refm[k] = mem[k]; end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      size = 2'($urandom_range(0, 2));
      adr = {24'd0, 6'($urandom), 2'b00};
      if (size == 0) adr[1:0] = 2'($urandom);
      if (size == 1) adr[1] = 1'($urandom);
      o = adr[1:0];
      is_st = $urandom_range(0, 1) == 1;
      st = is_st; ld = !is_st; sdat = $urandom;
      // another unit may hold the pipeline for a few cycles, past the acknowledge
      oc = $urandom_range(0, 1) ? $urandom_range(1, 6) : 0;
      other_stall = oc != 0;
      n_prev = acks;
      #1;
      while (dstall || other_stall) begin
        @(posedge clk); #1;
        if (oc > 0) oc--;
        other_stall = oc != 0;
      end
      @(posedge clk); #1;
      ld = 0; st = 0;
      checks++;
      if (acks != n_prev + 1) begin failures++; $display("FAIL %0d bus cycles for one access", acks - n_prev); end
      e = refm[adr[7:2]];
      if (!is_st) begin
        case (size)
          2'd0: e = {24'd0, e[8*(3-o) +: 8]};
          2'd1: e = {16'd0, o[1] ? e[15:0] : e[31:16]};
          default: ;
        endcase
        checks++;
        if (ld_dat !== e) begin failures++; $display("FAIL load size %0d adr %h got %h exp %h", size, adr, ld_dat, e); end
      end else begin
        case (size)
          2'd0: refm[adr[7:2]][8*(3-o) +: 8] = sdat[7:0];
          2'd1: if (o[1]) refm[adr[7:2]][15:0] = sdat[15:0]; else refm[adr[7:2]][31:16] = sdat[15:0];
          default: refm[adr[7:2]] = sdat;
        endcase
        checks++;
        if (mem[adr[7:2]] !== refm[adr[7:2]]) begin failures++; $display("FAIL store size %0d adr %h", size, adr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
