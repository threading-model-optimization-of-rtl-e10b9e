// tb_aemb_iche: fills and looks up the instruction cache against a reference model
// of a direct-mapped cache with 21-bit tags and one valid bit per word: hits only on
// words filled under the current tag of their line, and a fill with a new tag throws
// away the other words of that line. Addresses are drawn from a small set of tags so
// that conflicts happen often.
module tb_aemb_iche;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [31:0] lk_adr, fl_adr, fl_dat, lk_dat;
  logic        hit, fl_we;
  int checks = 0, failures = 0;

  aemb_iche dut (.clk(clk), .rst(rst), .lk_adr(lk_adr), .hit(hit), .lk_dat(lk_dat),
                 .fl_we(fl_we), .fl_adr(fl_adr), .fl_dat(fl_dat));

  // reference: per line a tag (-1 = none) and per word valid + data
  int          m_tag [32];
  logic [15:0] m_vld [32];
  logic [31:0] m_dat [512];

  function automatic logic [31:0] rnd_adr();
    logic [31:0] a;
    a = {$urandom_range(0, 2) == 0 ? 21'h1 : 21'h1FFFFF & 21'($urandom_range(0, 1) * 21'h100), 5'($urandom), 4'($urandom), 2'b00};
    return a;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fl_we = 1'b0; fl_adr = '0; fl_dat = '0; lk_adr = '0;
    for (int i = 0; i < 32; i++) begin m_tag[i] = -1; m_vld[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      logic [4:0] ln; logic [3:0] wd; logic exp_hit;
      lk_adr = rnd_adr();
      ln = lk_adr[10:6]; wd = lk_adr[5:2];
      #1;
      exp_hit = m_vld[ln][wd] && m_tag[ln] == int'(lk_adr[31:11]);
      checks++;
      if (hit !== exp_hit) begin failures++; $display("FAIL hit %h got %b exp %b", lk_adr, hit, exp_hit); end
      if (exp_hit) begin
        checks++;
        if (lk_dat !== m_dat[{ln, wd}]) begin failures++; $display("FAIL data %h", lk_adr); end
      end
      fl_we = $urandom_range(0, 1) == 1; fl_adr = lk_adr; fl_dat = $urandom;
      @(posedge clk);
      if (fl_we) begin
        if (m_tag[ln] != int'(fl_adr[31:11])) begin m_tag[ln] = int'(fl_adr[31:11]); m_vld[ln] = '0; end
        m_vld[ln][wd] = 1'b1;
        m_dat[{ln, wd}] = fl_dat;
      end
      #1 fl_we = 1'b0;
    end
    // reset invalidates
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    lk_adr = fl_adr; #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
