// Word line drivers of one way.
//
// A conventional driver is two cascaded inverters after each decoder output.
// Here the first inverter is a NAND gate whose second input is the row's halt
// tag match, so the pair forms an AND: the word line of row r rises only when
// the decoder selects row r and the halt tag array did not rule the row out.
// A halted row's word line stays low, and neither the main tag array nor the
// data array of that way is accessed. Combinational, one gate pair per row.
module word_line_driver #(
  parameter int unsigned ROWS = 64
) (
  input  logic [ROWS-1:0] dec,         // decoder outputs
  input  logic [ROWS-1:0] halt_match,  // halt tag array match lines
  output logic [ROWS-1:0] wl           // word lines
);

  logic [ROWS-1:0] wl_n;  // NAND outputs

  always_comb begin
    wl_n = ~(dec & halt_match);  // NAND (replaces the first inverter)
    wl   = ~wl_n;                // second, larger inverter
  end

endmodule
