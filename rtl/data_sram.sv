// Data array of one way.
//
// Holds ROWS lines of WORDS words of WORD_W bits (64 lines of 8 x 32-bit
// words by default). Word line segmentation is modelled by the word select:
// a read latches only one word of the row whose word line is high, at the
// rising clock edge; with every word line low nothing is read and rdata holds.
// Writes address a row and word directly and honour per-byte enables, so a
// store can change part of a word and a refill writes one word per cycle.
// The one-cycle read latency, the byte enables and the separate write port
// are this implementation's choices.
module data_sram #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned WORDS  = 8,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned ROW_W = $clog2(ROWS),
  localparam int unsigned SEL_W = $clog2(WORDS),
  localparam int unsigned BE_W  = WORD_W / 8
) (
  input  logic              clk,
  input  logic [ROWS-1:0]   wl,       // one-hot (or all-low) read word lines
  input  logic [SEL_W-1:0]  rd_word,  // word of the line to read
  output logic [WORD_W-1:0] rdata,
  input  logic              we,
  input  logic [ROW_W-1:0]  wrow,
  input  logic [SEL_W-1:0]  wword,
  input  logic [WORD_W-1:0] wdata,
  input  logic [BE_W-1:0]   wbe
);

  logic [WORD_W-1:0] mem [ROWS*WORDS];
  logic [WORD_W-1:0] bitline;

  always_comb begin
    bitline = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) bitline |= mem[r*WORDS + int'(rd_word)];
  end

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < BE_W; b++)
        if (wbe[b]) mem[int'(wrow)*WORDS + int'(wword)][b*8 +: 8] <= wdata[b*8 +: 8];
    if (|wl) rdata <= bitline;
  end

endmodule
