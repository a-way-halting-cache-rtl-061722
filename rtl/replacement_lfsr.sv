// Pseudo-random source for the replacement choice.
//
// A 16-bit Fibonacci LFSR (taps 16, 14, 13, 11) that steps every clock cycle
// and resets to a fixed non-zero seed. Its low bits pick the victim way when
// every way of a set is valid. The generator and its polynomial are this
// implementation's choice; the cache only calls for random replacement.
module replacement_lfsr (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] value
);

  always_ff @(posedge clk) begin
    if (!rst_n) value <= 16'hACE1;
    else        value <= {value[14:0], value[15] ^ value[13] ^ value[12] ^ value[10]};
  end

endmodule
