// One way of the way-halting cache.
//
// A way is a column of the cache: its halt tag array, its word line drivers,
// its main tag array, its data array and its tag comparator. An access runs
// over two clock cycles:
//
//   cycle 0  The shared decoder output (dec) and the desired halt tag bits
//            arrive together. The halt tag array compares all its rows at
//            once; the word line driver ANDs each decoder line with that
//            row's match. If the selected row matched, its word line rises and
//            the main tag and the selected data word are latched at the clock
//            edge. If not, the way is halted: no word line rises, nothing is
//            read, and opened is low in the next cycle.
//   cycle 1  opened tells whether the way was accessed; the comparator checks
//            the latched main tag against cmp_mtag (the desired tag without
//            its halt bits) and raises hit.
//
// The halt bits are the low HALT_BITS of the tag, the main tag the rest. The
// write ports are used for refills and stores: tag_we writes both tag parts
// and the valid bit of one row; d_we writes one word with byte enables.
module cache_way #(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned TAG_W     = 21,
  parameter int unsigned HALT_BITS = 4,
  parameter int unsigned WORDS     = 8,
  parameter int unsigned WORD_W    = 32,
  localparam int unsigned ROW_W    = $clog2(ROWS),
  localparam int unsigned SEL_W    = $clog2(WORDS),
  localparam int unsigned MTAG_W   = TAG_W - HALT_BITS,
  localparam int unsigned BE_W     = WORD_W / 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // cycle 0 of a lookup
  input  logic [ROWS-1:0]      dec,
  input  logic [HALT_BITS-1:0] desired_halt,
  input  logic [SEL_W-1:0]     rd_word,
  // cycle 1 of a lookup
  input  logic [MTAG_W-1:0]    cmp_mtag,
  output logic                 opened,      // the arrays were read in cycle 0
  output logic                 hit,
  output logic [WORD_W-1:0]    rdata,
  // valid bits of all rows
  output logic [ROWS-1:0]      valid,
  // tag write (refill)
  input  logic                 tag_we,
  input  logic [ROW_W-1:0]     tag_row,
  input  logic [TAG_W-1:0]     tag_wdata,
  input  logic                 tag_wvalid,
  // data write (refill or store)
  input  logic                 d_we,
  input  logic [ROW_W-1:0]     d_row,
  input  logic [SEL_W-1:0]     d_word,
  input  logic [WORD_W-1:0]    d_wdata,
  input  logic [BE_W-1:0]      d_wbe
);

  logic [ROWS-1:0]   halt_match;
  logic [ROWS-1:0]   wl;
  logic [MTAG_W-1:0] mtag_rd;
  logic              open_now;  // a word line of this way is high

  halt_tag_array #(.ROWS(ROWS), .HALT_BITS(HALT_BITS)) u_halt (
    .clk     (clk),
    .rst_n   (rst_n),
    .desired (desired_halt),
    .match   (halt_match),
    .wr_en   (tag_we),
    .wr_row  (tag_row),
    .wr_tag  (tag_wdata[HALT_BITS-1:0]),
    .wr_valid(tag_wvalid),
    .valid   (valid)
  );

  word_line_driver #(.ROWS(ROWS)) u_wld (
    .dec       (dec),
    .halt_match(halt_match),
    .wl        (wl)
  );

  tag_sram #(.ROWS(ROWS), .W(MTAG_W)) u_tag (
    .clk  (clk),
    .wl   (wl),
    .rdata(mtag_rd),
    .we   (tag_we),
    .waddr(tag_row),
    .wdata(tag_wdata[TAG_W-1:HALT_BITS])
  );

  data_sram #(.ROWS(ROWS), .WORDS(WORDS), .WORD_W(WORD_W)) u_data (
    .clk    (clk),
    .wl     (wl),
    .rd_word(rd_word),
    .rdata  (rdata),
    .we     (d_we),
    .wrow   (d_row),
    .wword  (d_word),
    .wdata  (d_wdata),
    .wbe    (d_wbe)
  );

  assign open_now = |wl;

  always_ff @(posedge clk) begin
    if (!rst_n) opened <= 1'b0;
    else        opened <= open_now;
  end

  tag_comparator #(.W(MTAG_W)) u_cmp (
    .opened (opened),
    .stored (mtag_rd),
    .desired(cmp_mtag),
    .hit    (hit)
  );

endmodule
