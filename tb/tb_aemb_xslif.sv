// tb_aemb_xslif: blocking PUT and GET transfers through the accelerator interface to
// a model of 16 accelerator registers with random, sometimes long, acknowledge delays.
// Checks address, control/data tag, write data, that the interface stalls until the
// acknowledge whatever the delay, exactly one bus transfer per instruction (also when
// the pipeline is held by another unit past the acknowledge), and the GET data in the
// following cycle.
module tb_aemb_xslif;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        get, put, ctl, xstall, other_stall, tag, cyc, stb, we, ack;
  logic [3:0]  xadr, adr;
  logic [31:0] pdat, get_dat, wdat, rdat;
  logic [31:0] regs [16];
  logic [31:0] refr [16];
  int checks = 0, failures = 0, acks = 0, delay = 0;

  aemb_xslif dut (.clk(clk), .rst(rst), .ena(!xstall && !other_stall), .get(get), .put(put), .ctl(ctl),
                  .xadr(xadr), .pdat(pdat), .xstall(xstall), .get_dat(get_dat),
                  .xwb_adr_o(adr), .xwb_tag_o(tag), .xwb_cyc_o(cyc), .xwb_stb_o(stb),
                  .xwb_we_o(we), .xwb_dat_o(wdat), .xwb_dat_i(rdat), .xwb_ack_i(ack));

  assign rdat = regs[adr] ^ (tag ? 32'hC0DE_0000 : 32'h0);
  always_ff @(posedge clk) begin
    if (stb && !ack) delay <= delay + 1; else delay <= 0;
    ack <= stb && !ack && (delay >= 3 || $urandom_range(0, 5) == 0);
    if (stb && ack) begin
      acks <= acks + 1;
      if (we) regs[adr] <= wdat ^ (tag ? 32'h0000_FFFF : 32'h0);
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_prev, oc;
    bit is_put;
    logic [31:0] e;
    ack = 1'b0; other_stall = 0; get = 0; put = 0; ctl = 0; xadr = 0; pdat = 0;
    for (int k = 0; k < 16; k++) begin regs[k] = 32'(k); refr[k] = 32'(k); end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      is_put = $urandom_range(0, 1) == 1;
      put = is_put; get = !is_put; ctl = 1'($urandom); xadr = 4'($urandom); pdat = $urandom;
      // another unit may hold the pipeline for a few cycles, past the acknowledge
      oc = $urandom_range(0, 1) ? $urandom_range(1, 6) : 0;
      other_stall = oc != 0;
      n_prev = acks;
      #1;
      while (xstall || other_stall) begin
        @(posedge clk); #1;
        if (oc > 0) oc--;
        other_stall = oc != 0;
      end
      @(posedge clk); #1;
      put = 0; get = 0;
      checks++;
      if (acks != n_prev + 1) begin failures++; $display("FAIL %0d transfers", acks - n_prev); end
      if (is_put) begin
        refr[xadr] = pdat ^ (ctl ? 32'h0000_FFFF : 32'h0);
        checks++;
        if (regs[xadr] !== refr[xadr]) begin failures++; $display("FAIL put %0d", xadr); end
      end else begin
        e = refr[xadr] ^ (ctl ? 32'hC0DE_0000 : 32'h0);
        checks++;
        if (get_dat !== e) begin failures++; $display("FAIL get %0d got %h exp %h", xadr, get_dat, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
