// aemb_xslif: accelerator bus interface (XSLIF) for the blocking GET and PUT
// instructions. While a GET or PUT is in the execute stage the request is driven on
// a Wishbone bus: the 4-bit accelerator address from the instruction immediate,
// `xwb_tag_o` set for the control/status register and clear for the data register,
// write enable for PUT with the value of rA. `xstall` freezes the pipeline for as many
// cycles as the accelerator takes to acknowledge, without limit. A GET's read data is
// latched at the acknowledge and presented on `get_dat` in the write-back cycle.
//
// Origin: blocking GET/PUT without a cycle limit, the register number from the
// immediate and the control/data bit follow AEMB's XSLIF; the 4-bit address and the
// tag output are choices of this implementation.
module aemb_xslif (
  input  logic        clk,
  input  logic        rst,
  input  logic        ena,
  input  logic        get,
  input  logic        put,
  input  logic        ctl,
  input  logic [3:0]  xadr,
  input  logic [31:0] pdat,
  output logic        xstall,
  output logic [31:0] get_dat,
  // Wishbone master
  output logic [3:0]  xwb_adr_o,
  output logic        xwb_tag_o,
  output logic        xwb_cyc_o,
  output logic        xwb_stb_o,
  output logic        xwb_we_o,
  output logic [31:0] xwb_dat_o,
  input  logic [31:0] xwb_dat_i,
  input  logic        xwb_ack_i
);

  logic done;
  logic req;

  assign req       = (get || put) && !done;
  assign xwb_cyc_o = req;
  assign xwb_stb_o = req;
  assign xwb_we_o  = put;
  assign xwb_adr_o = xadr;
  assign xwb_tag_o = ctl;
  assign xwb_dat_o = pdat;
  assign xstall    = req && !xwb_ack_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      done    <= 1'b0;
      get_dat <= '0;
    end else begin
      if (req && xwb_ack_i) get_dat <= xwb_dat_i;
      if (ena)                   done <= 1'b0;
      else if (req && xwb_ack_i) done <= 1'b1;
    end
  end

endmodule
