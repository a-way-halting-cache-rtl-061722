// Static comparator of one halt tag word.
//
// One XOR gate per bit compares a stored halt tag bit with the matching bit
// of the desired address tag; a NOR gate over the XOR outputs is high only
// when every bit agrees. With the default 4 bits that is the 4 XOR + 1 NOR
// static comparator of the halt tag array. Combinational, no clock.
module halt_tag_comparator #(
  parameter int unsigned HALT_BITS = 4
) (
  input  logic [HALT_BITS-1:0] stored,   // halt tag held in the row's SRAM cells
  input  logic [HALT_BITS-1:0] desired,  // low-order tag bits of the address
  output logic                 match
);

  logic [HALT_BITS-1:0] diff;  // XOR gate outputs

  always_comb begin
    diff  = stored ^ desired;
    match = ~(|diff);          // NOR
  end

endmodule
