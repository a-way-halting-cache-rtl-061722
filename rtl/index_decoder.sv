// Set-index decoder (the 6x64 decoder of the cache).
//
// Turns the IDX_W-bit set index into 2**IDX_W one-hot row lines in two gate
// levels: the index is split into a low and a high field, each field is
// predecoded to one-hot (3 -> 8 lines for the default 6-bit index), and each
// row line is the AND of one low and one high predecoder line. The halt tag
// comparison, also two gate levels deep, runs in parallel with it. The two-
// level depth follows the published design; the split into two equal
// predecoders is this implementation's choice of such a structure. With en
// low no predecoder line, and so no row line, is high; the enable is this
// implementation's addition. Combinational.
module index_decoder #(
  parameter int unsigned IDX_W = 6,
  localparam int unsigned LO_W = IDX_W - IDX_W / 2,
  localparam int unsigned HI_W = IDX_W / 2
) (
  input  logic                en,
  input  logic [IDX_W-1:0]    index,
  output logic [2**IDX_W-1:0] row
);

  logic [2**LO_W-1:0] pre_lo;
  logic [2**HI_W-1:0] pre_hi;

  // first level: predecoders
  always_comb begin
    pre_lo = '0;
    pre_hi = '0;
    if (en) begin
      pre_lo[index[LO_W-1:0]] = 1'b1;
      pre_hi[index[IDX_W-1 -: HI_W]] = 1'b1;
    end
  end

  // second level: one AND per row
  for (genvar r = 0; r < 2**IDX_W; r++) begin : g_row
    assign row[r] = pre_lo[r % (2**LO_W)] & pre_hi[r / (2**LO_W)];
  end

endmodule
