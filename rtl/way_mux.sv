// Way multiplexor and output driver.
//
// Passes the word of the hit way to the processor. The hit vector is at most
// one-hot, so the multiplexor is an AND-OR over the ways; with no hit the
// output is zero. Combinational.
module way_mux #(
  parameter int unsigned WAYS   = 4,
  parameter int unsigned WORD_W = 32
) (
  input  logic [WAYS-1:0]   hit,
  input  logic [WORD_W-1:0] data [WAYS],
  output logic [WORD_W-1:0] out
);

  always_comb begin
    out = '0;
    for (int w = 0; w < WAYS; w++)
      if (hit[w]) out |= data[w];
  end

endmodule
