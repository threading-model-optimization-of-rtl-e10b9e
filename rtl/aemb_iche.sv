// aemb_iche: direct-mapped instruction cache of the AEMB core.
// Default geometry: 512 words of 32 bits in 32 lines of 16 words. A byte address is
// split into tag (upper 21 bits), line index (next 5 bits), word in line (next 4 bits)
// and byte offset (2 bits). A look-up table holds the tag of each line and one valid
// bit per word, so a line fills word by word as the words are fetched.
// Interface: `lk_adr` is the address being looked up (held stable by the caller);
// `hit` and `lk_dat` answer combinationally. A fill (`fl_we`, `fl_adr`, `fl_dat`) is
// written at the clock edge: when the line holds a different tag, the tag is replaced
// and all other valid bits of the line are cleared. Reset invalidates every word.
//
// Origin: the size (512 words), the line of 16 words, the 21-bit tag and one valid bit
// per word follow the AEMB edk63 instruction cache. The direct mapping with 5 index
// bits, the clearing of a line's valid bits on a new tag and the array style are
// choices of this implementation.
module aemb_iche #(
  parameter int unsigned AW    = 32,  // byte address width
  parameter int unsigned LINES = 32,  // number of lines
  parameter int unsigned WORDS = 16   // words per line
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] lk_adr,
  output logic          hit,
  output logic [31:0]   lk_dat,
  input  logic          fl_we,
  input  logic [AW-1:0] fl_adr,
  input  logic [31:0]   fl_dat
);
  localparam int unsigned WB = $clog2(WORDS);
  localparam int unsigned LB = $clog2(LINES);
  localparam int unsigned TW = AW - 2 - WB - LB;

  logic [TW-1:0]    tag [LINES];
  logic [WORDS-1:0] vld [LINES];
  logic [31:0]      dat [LINES*WORDS];

  logic [TW-1:0] lk_tag, fl_tag;
  logic [LB-1:0] lk_line, fl_line;
  logic [WB-1:0] lk_word, fl_word;

  assign {lk_tag, lk_line, lk_word} = lk_adr[AW-1:2];
  assign {fl_tag, fl_line, fl_word} = fl_adr[AW-1:2];

  assign hit    = vld[lk_line][lk_word] && (tag[lk_line] == lk_tag);
  assign lk_dat = dat[{lk_line, lk_word}];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINES; i++) vld[i] <= '0;
    end else if (fl_we) begin
      if (tag[fl_line] != fl_tag) begin
        vld[fl_line] <= WORDS'(1) << fl_word;
      end else begin
        vld[fl_line][fl_word] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fl_we) begin
      tag[fl_line]          <= fl_tag;
      dat[{fl_line, fl_word}] <= fl_dat;
    end
  end

endmodule
