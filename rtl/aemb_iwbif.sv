// aemb_iwbif: instruction Wishbone interface (IWBIF) with the instruction cache.
// Each enabled cycle the fetch unit presents the next fetch address (`i_req`,
// `i_adr`); it is registered here, so the instruction appears on `i_dat` in the
// following cycle, which is the decode stage. The registered address is looked up in
// aemb_iche. On a miss `istall` is raised, which freezes the whole pipeline, and a
// single-word Wishbone read of that address is made (cyc and stb driven together);
// the acknowledged word is written into the cache and the next cycle hits.
// Wishbone classic, read only, 32-bit data, byte address on iwb_adr_o.
//
// Origin: look-up in the cache and a bus fetch on a miss follow AEMB's IWBIF. The
// single-word read per miss and the registered fetch address are choices of this
// implementation.
module aemb_iwbif #(
  parameter int unsigned AW    = 32,
  parameter int unsigned LINES = 32,
  parameter int unsigned WORDS = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ena,
  input  logic          i_req,
  input  logic [AW-1:0] i_adr,
  output logic [31:0]   i_dat,
  output logic          istall,
  // Wishbone master
  output logic [AW-1:0] iwb_adr_o,
  output logic          iwb_cyc_o,
  output logic          iwb_stb_o,
  output logic          iwb_we_o,
  output logic [3:0]    iwb_sel_o,
  input  logic [31:0]   iwb_dat_i,
  input  logic          iwb_ack_i
);

  logic          req_q;
  logic [AW-1:0] adr_q;
  logic          hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_q <= 1'b0;
      adr_q <= '0;
    end else if (ena) begin
      req_q <= i_req;
      adr_q <= {i_adr[AW-1:2], 2'b00};
    end
  end

  aemb_iche #(.AW(AW), .LINES(LINES), .WORDS(WORDS)) u_iche (
    .clk    (clk),
    .rst    (rst),
    .lk_adr (adr_q),
    .hit    (hit),
    .lk_dat (i_dat),
    .fl_we  (iwb_stb_o && iwb_ack_i),
    .fl_adr (adr_q),
    .fl_dat (iwb_dat_i)
  );

  assign istall    = req_q && !hit;
  assign iwb_cyc_o = istall;
  assign iwb_stb_o = istall;
  assign iwb_we_o  = 1'b0;
  assign iwb_sel_o = 4'hF;
  assign iwb_adr_o = adr_q;

endmodule
