// aemb_pipe: pipeline housekeeping of the AEMB core.
// It turns the external reset into a reset that is released synchronously to the
// clock (two flip-flops, asserted asynchronously), samples the single external
// interrupt line through two flip-flops into the interrupt flag used by the fetch
// unit, and forms the global pipeline enable: every stage of the core advances only
// in cycles where no bus interface (instruction, data, accelerator) is waiting.
// The interrupt is level sensitive, as in the MicroBlaze it follows; the enable is
// combinational. The thread phase signal GPHA, generated here in the original
// fine-grained core, is produced by the fetch unit (aemb_bpcu) in this design because
// threads now switch on branches rather than on every cycle.
//
// Origin: AEMB generates reset, the interrupt flag and the thread signal in its PIPE
// module. Here the clock is used as is and the thread signal comes from the address
// unit, because threads now change on branches; the synchronisers and the single
// pipeline enable are choices of this implementation.
module aemb_pipe (
  input  logic sys_clk_i,
  input  logic sys_rst_i,   // asynchronous, active high
  input  logic sys_int_i,   // external interrupt, active high level
  input  logic istall,      // instruction fetch waits
  input  logic dstall,      // data bus waits
  input  logic xstall,      // accelerator bus waits
  output logic rst,         // synchronously released reset
  output logic ena,         // global pipeline enable
  output logic int_flag     // synchronised interrupt request
);

  logic [1:0] rst_q;
  logic [1:0] int_q;

  always_ff @(posedge sys_clk_i or posedge sys_rst_i) begin
    if (sys_rst_i) rst_q <= 2'b11;
    else           rst_q <= {rst_q[0], 1'b0};
  end
  assign rst = rst_q[1];

  always_ff @(posedge sys_clk_i) begin
    if (rst) int_q <= 2'b00;
    else     int_q <= {int_q[0], sys_int_i};
  end
  assign int_flag = int_q[1];

  assign ena = !(istall || dstall || xstall);

endmodule
