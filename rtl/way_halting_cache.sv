// Way-halting set-associative cache (top level).
//
// A four-way set-associative cache (8 KB, 32-byte lines, 64 sets by default)
// in which most accesses to ways that cannot hit are stopped before they
// reach the tag and data SRAMs. The four lowest tag bits of every line of
// every way are kept in a per-way halt tag array, a small fully associative
// memory. While the set index is decoded, each halt tag array compares all
// of its rows with the low tag bits of the address; the word line driver of
// each row ANDs the decoder line with the row's match. A way whose selected
// row mismatches is halted: its main tag array and data array are not read.
// Because tags of one set usually differ in their low bits, a hit normally
// opens only the one way that holds the line, and a miss usually opens none.
// Halting never changes which way hits, so the hit rate and the timing equal
// those of a plain four-way cache.
//
// Address split (defaults): tag [31:11] (21 bits; halt tag [14:11]),
// index [10:5], offset [4:0], of which [4:2] picks the 32-bit word read.
//
// Interfaces, all on the rising edge of clk with an active-low synchronous reset:
//   processor  cpu_req_valid/cpu_req_ready handshake with we, addr, wdata,
//              be; one cpu_resp_valid pulse per request (load data or store
//              acknowledge), in order. A load hit responds one cycle after
//              acceptance and back-to-back hits flow at one per cycle.
//   memory     mem_req_valid/mem_req_ready handshake; a line read returns
//              LINE_BYTES/4 words on mem_resp_valid in word order; stores
//              are written through.
//   activity   lookup_done marks the cycle in which a lookup's hit is known;
//              ways_opened then shows which ways' tag and data arrays were
//              actually read for it, which is what the cache saves energy on.
// The lookup path follows the published way-halting organisation; the
// controller (refill, write-through, valid bits, replacement) is this
// implementation's own.
module way_halting_cache
#(
  parameter int unsigned ADDR_W      = whc_pkg::DEF_ADDR_W,
  parameter int unsigned WORD_W      = whc_pkg::DEF_WORD_W,
  parameter int unsigned WAYS        = whc_pkg::DEF_WAYS,
  parameter int unsigned CACHE_BYTES = whc_pkg::DEF_CACHE_BYTES,
  parameter int unsigned LINE_BYTES  = whc_pkg::DEF_LINE_BYTES,
  parameter int unsigned HALT_BITS   = whc_pkg::DEF_HALT_BITS,
  localparam int unsigned SETS       = CACHE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned IDX_W      = $clog2(SETS),
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W      = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned MTAG_W     = TAG_W - HALT_BITS,
  localparam int unsigned BE_W       = WORD_W / 8,
  localparam int unsigned LINE_WORDS = LINE_BYTES / BE_W,
  localparam int unsigned SEL_W      = $clog2(LINE_WORDS),
  localparam int unsigned BOFF_W     = $clog2(BE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic              cpu_req_we,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [WORD_W-1:0] cpu_req_wdata,
  input  logic [BE_W-1:0]   cpu_req_be,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata,
  // memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [WORD_W-1:0] mem_req_wdata,
  output logic [BE_W-1:0]   mem_req_be,
  input  logic              mem_resp_valid,
  input  logic [WORD_W-1:0] mem_resp_rdata,
  // activity
  output logic              lookup_done,
  output logic              lookup_hit,
  output logic [WAYS-1:0]   ways_opened
);

  logic [SETS-1:0]   dec;
  logic              lookup_en, s1_valid;
  logic [ADDR_W-1:0] s1_addr;
  logic [WAYS-1:0]   way_hit, set_valid;
  logic [WORD_W-1:0] way_rdata [WAYS];
  logic [SETS-1:0]   way_valid [WAYS];
  logic [WORD_W-1:0] hit_data;
  logic [WAYS-1:0]   tag_we, d_we;
  logic [IDX_W-1:0]  tag_row, d_row;
  logic [TAG_W-1:0]  tag_wdata;
  logic [SEL_W-1:0]  d_word;
  logic [WORD_W-1:0] d_wdata;
  logic [BE_W-1:0]   d_wbe;

  index_decoder #(.IDX_W(IDX_W)) u_dec (
    .en   (lookup_en),
    .index(cpu_req_addr[OFF_W +: IDX_W]),
    .row  (dec)
  );

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    cache_way #(
      .ROWS(SETS), .TAG_W(TAG_W), .HALT_BITS(HALT_BITS),
      .WORDS(LINE_WORDS), .WORD_W(WORD_W)
    ) u_way (
      .clk         (clk),
      .rst_n       (rst_n),
      .dec         (dec),
      .desired_halt(cpu_req_addr[OFF_W + IDX_W +: HALT_BITS]),
      .rd_word     (cpu_req_addr[BOFF_W +: SEL_W]),
      .cmp_mtag    (s1_addr[ADDR_W-1 -: MTAG_W]),
      .opened      (ways_opened[w]),
      .hit         (way_hit[w]),
      .rdata       (way_rdata[w]),
      .valid       (way_valid[w]),
      .tag_we      (tag_we[w]),
      .tag_row     (tag_row),
      .tag_wdata   (tag_wdata),
      .tag_wvalid  (1'b1),        // refills always write a valid line
      .d_we        (d_we[w]),
      .d_row       (d_row),
      .d_word      (d_word),
      .d_wdata     (d_wdata),
      .d_wbe       (d_wbe)
    );
    assign set_valid[w] = way_valid[w][s1_addr[OFF_W +: IDX_W]];
  end

  way_mux #(.WAYS(WAYS), .WORD_W(WORD_W)) u_mux (
    .hit (way_hit),
    .data(way_rdata),
    .out (hit_data)
  );

  cache_controller #(
    .ADDR_W(ADDR_W), .WORD_W(WORD_W), .WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LINE_BYTES)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .cpu_req_valid (cpu_req_valid),
    .cpu_req_ready (cpu_req_ready),
    .cpu_req_we    (cpu_req_we),
    .cpu_req_addr  (cpu_req_addr),
    .cpu_req_wdata (cpu_req_wdata),
    .cpu_req_be    (cpu_req_be),
    .cpu_resp_valid(cpu_resp_valid),
    .cpu_resp_rdata(cpu_resp_rdata),
    .lookup_en     (lookup_en),
    .s1_valid      (s1_valid),
    .s1_addr       (s1_addr),
    .way_hit       (way_hit),
    .hit_data      (hit_data),
    .set_valid     (set_valid),
    .tag_we        (tag_we),
    .tag_row       (tag_row),
    .tag_wdata     (tag_wdata),
    .d_we          (d_we),
    .d_row         (d_row),
    .d_word        (d_word),
    .d_wdata       (d_wdata),
    .d_wbe         (d_wbe),
    .mem_req_valid (mem_req_valid),
    .mem_req_ready (mem_req_ready),
    .mem_req_we    (mem_req_we),
    .mem_req_addr  (mem_req_addr),
    .mem_req_wdata (mem_req_wdata),
    .mem_req_be    (mem_req_be),
    .mem_resp_valid(mem_resp_valid),
    .mem_resp_rdata(mem_resp_rdata)
  );

  assign lookup_done = s1_valid;
  assign lookup_hit  = s1_valid && (|way_hit);

endmodule
