// Halt tag array of one way: a small fully associative memory.
//
// Each of the ROWS rows (one per set) stores the HALT_BITS lowest tag bits of
// the line that the way holds in that set, plus a valid bit. Every row has its
// own static comparator (halt_tag_comparator), so all rows are compared with
// the desired tag bits at once, before the set index has been decoded. The
// result, match[r], is high when row r is valid and its halt tag equals the
// desired bits; a low match[r] halts the access of row r of this way.
//
// Storage is ordinary flip-flops written through one write port (row index,
// tag bits, valid), standing in for the standard SRAM cells of the array.
// Keeping the valid bit here, so that empty lines are halted too, and the
// reset that clears all valid bits are this implementation's choices.
// Timing: match is combinational from desired; a write takes effect at the
// next rising clock edge.
module halt_tag_array #(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned HALT_BITS = 4,
  localparam int unsigned ROW_W    = $clog2(ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // associative search
  input  logic [HALT_BITS-1:0] desired,
  output logic [ROWS-1:0]      match,
  // write port (line fill)
  input  logic                 wr_en,
  input  logic [ROW_W-1:0]     wr_row,
  input  logic [HALT_BITS-1:0] wr_tag,
  input  logic                 wr_valid,
  // valid bits, for the replacement choice
  output logic [ROWS-1:0]      valid
);

  logic [HALT_BITS-1:0] tag_q [ROWS];
  logic [ROWS-1:0]      row_match;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      for (int r = 0; r < ROWS; r++) tag_q[r] <= '0;
    end else if (wr_en) begin
      tag_q[wr_row] <= wr_tag;
      valid[wr_row] <= wr_valid;
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    halt_tag_comparator #(.HALT_BITS(HALT_BITS)) u_cmp (
      .stored (tag_q[r]),
      .desired(desired),
      .match  (row_match[r])
    );
  end

  assign match = row_match & valid;

endmodule
