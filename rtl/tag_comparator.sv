// Tag comparator of one way.
//
// Compares the main tag read from the way with the main tag bits of the
// desired address. The low-order bits were already checked by the halt tag
// array, and a way whose access was halted (opened low) cannot hit, so
// hit = opened and (stored == desired). Combinational.
module tag_comparator #(
  parameter int unsigned W = 17
) (
  input  logic         opened,   // the way's arrays were read for this access
  input  logic [W-1:0] stored,
  input  logic [W-1:0] desired,
  output logic         hit
);

  assign hit = opened && (stored == desired);

endmodule
