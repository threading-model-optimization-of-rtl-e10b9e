// aemb_dwbif: data Wishbone interface (DWBIF) for the 12 load and store instructions.
// While a load or store is in the execute stage (`ld` or `st` with `ena_x`), the
// request is driven on the bus: address = effective address, byte selects and write
// data placed on the byte lanes of a big-endian bus (byte 0 is bits 31:24).
// `dstall` freezes the pipeline until the acknowledge. The read word and the lane
// information are latched at the acknowledge, and `ld_dat` gives the zero-extended
// byte, half word or word in the following (write-back) cycle. If another unit keeps
// the pipeline frozen after the acknowledge, `done` stops the access being repeated.
// The cycle and strobe outputs are separate ports; both are asserted for the whole
// access. Sizes: 0 byte, 1 half word, 2 word.
//
// Origin: the latched read data and the load/store sizes follow AEMB's DWBIF and the
// MicroBlaze big-endian bus. AEMB keeps cycle and strobe apart on this bus; here both
// come from the same request, and the memory of an acknowledge taken during a stall is
// a choice of this implementation.
module aemb_dwbif (
  input  logic        clk,
  input  logic        rst,
  input  logic        ena,
  input  logic        ld,
  input  logic        st,
  input  logic [1:0]  size,
  input  logic [31:0] adr,
  input  logic [31:0] sdat,
  output logic        dstall,
  output logic [31:0] ld_dat,
  // Wishbone master
  output logic [31:0] dwb_adr_o,
  output logic        dwb_cyc_o,
  output logic        dwb_stb_o,
  output logic        dwb_we_o,
  output logic [3:0]  dwb_sel_o,
  output logic [31:0] dwb_dat_o,
  input  logic [31:0] dwb_dat_i,
  input  logic        dwb_ack_i
);

  logic        done;
  logic        req;
  logic [31:0] rdat_q;
  logic [1:0]  off_q;
  logic [1:0]  size_q;

  assign req       = (ld || st) && !done;
  assign dwb_cyc_o = req;
  assign dwb_stb_o = req;
  assign dwb_we_o  = st;
  assign dwb_adr_o = adr;
  assign dstall    = req && !dwb_ack_i;

  always_comb begin
    unique case (size)
      2'd0:    begin dwb_sel_o = 4'b1000 >> adr[1:0];            dwb_dat_o = {4{sdat[7:0]}};  end
      2'd1:    begin dwb_sel_o = adr[1] ? 4'b0011 : 4'b1100;     dwb_dat_o = {2{sdat[15:0]}}; end
      default: begin dwb_sel_o = 4'b1111;                        dwb_dat_o = sdat;            end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done   <= 1'b0;
      rdat_q <= '0;
      off_q  <= '0;
      size_q <= '0;
    end else begin
      if (req && dwb_ack_i) begin
        rdat_q <= dwb_dat_i;
        off_q  <= adr[1:0];
        size_q <= size;
      end
      if (ena)                         done <= 1'b0;
      else if (req && dwb_ack_i)       done <= 1'b1;
    end
  end

  always_comb begin
    unique case (size_q)
      2'd0:    ld_dat = {24'd0, rdat_q[{~off_q, 3'b000} +: 8]};
      2'd1:    ld_dat = {16'd0, off_q[1] ? rdat_q[15:0] : rdat_q[31:16]};
      default: ld_dat = rdat_q;
    endcase
  end

endmodule
