// aemb_asm_pkg: instruction encoders for writing MicroBlaze test programs inside
// testbenches. Each function returns one 32-bit instruction word; branch offsets are
// byte offsets relative to the branch unless the mnemonic is absolute.
package aemb_asm_pkg;

  function automatic logic [31:0] ta(input logic [5:0] op, input logic [4:0] rd,
                                     input logic [4:0] ra, input logic [4:0] rb,
                                     input logic [10:0] fn);
    return {op, rd, ra, rb, fn};
  endfunction

  function automatic logic [31:0] tb_(input logic [5:0] op, input logic [4:0] rd,
                                      input logic [4:0] ra, input logic [15:0] im);
    return {op, rd, ra, im};
  endfunction

  function automatic logic [31:0] add   (input logic [4:0] d, a, b); return ta(6'h00, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] rsub  (input logic [4:0] d, a, b); return ta(6'h01, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] addc  (input logic [4:0] d, a, b); return ta(6'h02, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] addk  (input logic [4:0] d, a, b); return ta(6'h04, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] rsubk (input logic [4:0] d, a, b); return ta(6'h05, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] cmp   (input logic [4:0] d, a, b); return ta(6'h05, d, a, b, 11'd1); endfunction
  function automatic logic [31:0] cmpu  (input logic [4:0] d, a, b); return ta(6'h05, d, a, b, 11'd3); endfunction
  function automatic logic [31:0] addi  (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h08, d, a, i); endfunction
  function automatic logic [31:0] addik (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h0C, d, a, i); endfunction
  function automatic logic [31:0] rsubik(input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h0D, d, a, i); endfunction
  function automatic logic [31:0] mul   (input logic [4:0] d, a, b); return ta(6'h10, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] muli  (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h18, d, a, i); endfunction
  function automatic logic [31:0] bsrl  (input logic [4:0] d, a, b); return ta(6'h11, d, a, b, 11'h000); endfunction
  function automatic logic [31:0] bsra  (input logic [4:0] d, a, b); return ta(6'h11, d, a, b, 11'h200); endfunction
  function automatic logic [31:0] bsll  (input logic [4:0] d, a, b); return ta(6'h11, d, a, b, 11'h400); endfunction
  function automatic logic [31:0] bsrli (input logic [4:0] d, a, input logic [4:0] s); return tb_(6'h19, d, a, 16'h0000 | 16'(s)); endfunction
  function automatic logic [31:0] bsrai (input logic [4:0] d, a, input logic [4:0] s); return tb_(6'h19, d, a, 16'h0200 | 16'(s)); endfunction
  function automatic logic [31:0] bslli (input logic [4:0] d, a, input logic [4:0] s); return tb_(6'h19, d, a, 16'h0400 | 16'(s)); endfunction
  function automatic logic [31:0] or_   (input logic [4:0] d, a, b); return ta(6'h20, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] and_  (input logic [4:0] d, a, b); return ta(6'h21, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] xor_  (input logic [4:0] d, a, b); return ta(6'h22, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] andn  (input logic [4:0] d, a, b); return ta(6'h23, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] ori   (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h28, d, a, i); endfunction
  function automatic logic [31:0] andi  (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h29, d, a, i); endfunction
  function automatic logic [31:0] xori  (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h2A, d, a, i); endfunction
  function automatic logic [31:0] sra   (input logic [4:0] d, a); return tb_(6'h24, d, a, 16'h0001); endfunction
  function automatic logic [31:0] src   (input logic [4:0] d, a); return tb_(6'h24, d, a, 16'h0021); endfunction
  function automatic logic [31:0] srl   (input logic [4:0] d, a); return tb_(6'h24, d, a, 16'h0041); endfunction
  function automatic logic [31:0] sext8 (input logic [4:0] d, a); return tb_(6'h24, d, a, 16'h0060); endfunction
  function automatic logic [31:0] sext16(input logic [4:0] d, a); return tb_(6'h24, d, a, 16'h0061); endfunction
  function automatic logic [31:0] get   (input logic [4:0] d, input logic c, input logic [3:0] id); return tb_(6'h1B, d, 5'd0, {2'b00, c, 9'd0, id}); endfunction
  function automatic logic [31:0] put   (input logic [4:0] a, input logic c, input logic [3:0] id); return tb_(6'h1B, 5'd0, a, {2'b10, c, 9'd0, id}); endfunction
  function automatic logic [31:0] msrset(input logic [4:0] d, input logic [14:0] i); return {6'h25, d, 5'b00000, 1'b0, i}; endfunction
  function automatic logic [31:0] msrclr(input logic [4:0] d, input logic [14:0] i); return {6'h25, d, 5'b00010, 1'b0, i}; endfunction
  function automatic logic [31:0] mfs   (input logic [4:0] d, input logic [13:0] s); return {6'h25, d, 5'd0, 2'b10, s}; endfunction
  function automatic logic [31:0] mts   (input logic [13:0] s, input logic [4:0] a); return {6'h25, 5'd0, a, 2'b11, s}; endfunction
  // unconditional branches: D = delay slot, A = absolute, L = link
  function automatic logic [31:0] br_   (input logic [4:0] d, input logic ds, ab, lk, input logic [4:0] b);
    return ta(6'h26, d, {ds, ab, lk, 2'b00}, b, 11'd0);
  endfunction
  function automatic logic [31:0] bri_  (input logic [4:0] d, input logic ds, ab, lk, input logic [15:0] i);
    return tb_(6'h2E, d, {ds, ab, lk, 2'b00}, i);
  endfunction
  function automatic logic [31:0] bri   (input logic [15:0] i); return bri_(5'd0, 1'b0, 1'b0, 1'b0, i); endfunction
  function automatic logic [31:0] brai  (input logic [15:0] i); return bri_(5'd0, 1'b0, 1'b1, 1'b0, i); endfunction
  function automatic logic [31:0] brlid (input logic [4:0] d, input logic [15:0] i); return bri_(d, 1'b1, 1'b0, 1'b1, i); endfunction
  // conditional branches, cond: 0 eq 1 ne 2 lt 3 le 4 gt 5 ge
  function automatic logic [31:0] bcc   (input logic [2:0] c, input logic ds, input logic [4:0] a, b);
    return ta(6'h27, {ds, 1'b0, c}, a, b, 11'd0);
  endfunction
  function automatic logic [31:0] bcci  (input logic [2:0] c, input logic ds, input logic [4:0] a, input logic [15:0] i);
    return tb_(6'h2F, {ds, 1'b0, c}, a, i);
  endfunction
  function automatic logic [31:0] rtsd  (input logic [4:0] a, input logic [15:0] i); return tb_(6'h2D, 5'b10000, a, i); endfunction
  function automatic logic [31:0] rtid  (input logic [4:0] a, input logic [15:0] i); return tb_(6'h2D, 5'b10001, a, i); endfunction
  function automatic logic [31:0] rted  (input logic [4:0] a, input logic [15:0] i); return tb_(6'h2D, 5'b10100, a, i); endfunction
  function automatic logic [31:0] imm   (input logic [15:0] i); return tb_(6'h2C, 5'd0, 5'd0, i); endfunction
  function automatic logic [31:0] lbui  (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h38, d, a, i); endfunction
  function automatic logic [31:0] lhui  (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h39, d, a, i); endfunction
  function automatic logic [31:0] lwi   (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h3A, d, a, i); endfunction
  function automatic logic [31:0] lw    (input logic [4:0] d, a, b); return ta(6'h32, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] sbi   (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h3C, d, a, i); endfunction
  function automatic logic [31:0] shi   (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h3D, d, a, i); endfunction
  function automatic logic [31:0] swi   (input logic [4:0] d, a, input logic [15:0] i); return tb_(6'h3E, d, a, i); endfunction
  function automatic logic [31:0] sw    (input logic [4:0] d, a, b); return ta(6'h36, d, a, b, 11'd0); endfunction
  function automatic logic [31:0] nop   (); return ta(6'h20, 5'd0, 5'd0, 5'd0, 11'd0); endfunction
  function automatic logic [31:0] fadd  (input logic [4:0] d, a, b); return ta(6'h16, d, a, b, 11'd0); endfunction

endpackage
