// aemb_regf: general purpose register file of the two-thread core.
// 64 registers of 32 bits: each thread owns 32 of them and the thread bit (GPHA)
// forms the most significant address bit, so an address is {thread, register}.
// Three asynchronous read ports serve operand A, operand B and the store/put data
// register in the decode stage; one synchronous write port serves write-back.
// Register 0 of either thread always reads as zero and is never written.
// Writes happen at the clock edge when `we` and `ena` are high; a read in the same
// cycle still returns the old value (the decoder forwards the write-back value).
//
// Origin: 64 registers, 32 per thread, with the thread bit as address MSB follow AEMB;
// the three asynchronous read ports are a choice of this implementation.
module aemb_regf #(
  parameter int unsigned DW = 32,   // data width
  parameter int unsigned AW = 6     // address width: thread bit + 5 register bits
) (
  input  logic          clk,
  input  logic          ena,
  input  logic [AW-1:0] ra_adr,
  input  logic [AW-1:0] rb_adr,
  input  logic [AW-1:0] rd_adr,
  output logic [DW-1:0] ra_dat,
  output logic [DW-1:0] rb_dat,
  output logic [DW-1:0] rd_dat,
  input  logic          we,
  input  logic [AW-1:0] w_adr,
  input  logic [DW-1:0] w_dat
);

  logic [DW-1:0] mem [2**AW];

  // Register 0 of each thread reads as zero.
  function automatic logic is_r0(input logic [AW-1:0] a);
    return a[AW-2:0] == '0;
  endfunction

  assign ra_dat = is_r0(ra_adr) ? '0 : mem[ra_adr];
  assign rb_dat = is_r0(rb_adr) ? '0 : mem[rb_adr];
  assign rd_dat = is_r0(rd_adr) ? '0 : mem[rd_adr];

  always_ff @(posedge clk) begin
    if (ena && we && !is_r0(w_adr)) mem[w_adr] <= w_dat;
  end

endmodule
