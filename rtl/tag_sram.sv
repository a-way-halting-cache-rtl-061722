// Main tag array of one way.
//
// A ROWS x W static memory holding, per set, the tag bits that are not in
// the halt tag array (17 bits by default). A read is driven by the one-hot
// word lines: at a rising clock edge on which some word line is high, the
// addressed row is latched into rdata, which then holds until the next read.
// With every word line low (the way is halted or idle) nothing is read and
// rdata keeps its value. Writes use a separate row-index port and take effect
// at the clock edge. Sense amplifiers, precharge and write drivers are
// folded into this behaviour; the one-cycle read latency and the separate
// write port are this implementation's choices.
module tag_sram #(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned W     = 17,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic [ROWS-1:0]  wl,      // one-hot (or all-low) read word lines
  output logic [W-1:0]     rdata,
  input  logic             we,
  input  logic [ROW_W-1:0] waddr,
  input  logic [W-1:0]     wdata
);

  logic [W-1:0] mem [ROWS];
  logic [W-1:0] bitline;  // OR of the rows whose word line is high

  always_comb begin
    bitline = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) bitline |= mem[r];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (|wl) rdata <= bitline;
  end

endmodule
