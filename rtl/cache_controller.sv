// Control of the way-halting cache: request handshake, miss handling,
// refill, replacement and store write-through.
//
// Lookups are pipelined over two cycles (see cache_way). In cycle 0 the
// controller accepts a processor request and enables the decoder
// (lookup_en); in cycle 1 it sees the ways' hit lines:
//   load hit   the hit way's word is returned (cpu_resp_valid) in cycle 1,
//              and a new request can be accepted in that same cycle, so hits
//              flow at one per cycle whether or not ways were halted;
//   load miss  the victim way is chosen (first invalid way of the set, else
//              pseudo-random), the line is read from memory word 0 first, each
//              word is written into the victim's data array as it arrives,
//              and with the last word the tag, halt tag and valid bit are
//              written and the requested word is returned;
//   store      a hit updates the word in the hit way (byte enables); hit or
//              miss, the store is then written through to memory, with no
//              allocation on a miss, and acknowledged with cpu_resp_valid.
// A load hit takes 1 cycle from acceptance to response; a miss takes
// 2 cycles plus the memory's grant delay plus the LINE_WORDS response beats.
//
// Memory interface: mem_req_valid/mem_req_ready is a valid/ready handshake;
// a line read (mem_req_we low) is answered by LINE_WORDS mem_resp_valid
// beats in word order. Everything here except the random replacement
// policy is this implementation's own choice: the cache's published
// description covers the lookup path only.
module cache_controller
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W     = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned BE_W      = WORD_W / 8,
  localparam int unsigned LINE_WORDS = LINE_BYTES / BE_W,
  localparam int unsigned SEL_W     = $clog2(LINE_WORDS),
  localparam int unsigned BOFF_W    = $clog2(BE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic              cpu_req_we,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [WORD_W-1:0] cpu_req_wdata,
  input  logic [BE_W-1:0]   cpu_req_be,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata,
  // lookup control
  output logic              lookup_en,    // cycle 0: enable the decoder
  output logic              s1_valid,     // cycle 1: a lookup is being checked
  output logic [ADDR_W-1:0] s1_addr,      // cycle 1: its address
  input  logic [WAYS-1:0]   way_hit,
  input  logic [WORD_W-1:0] hit_data,
  input  logic [WAYS-1:0]   set_valid,    // valid bits of the set of s1_addr
  // array writes
  output logic [WAYS-1:0]   tag_we,
  output logic [IDX_W-1:0]  tag_row,
  output logic [TAG_W-1:0]  tag_wdata,
  output logic [WAYS-1:0]   d_we,
  output logic [IDX_W-1:0]  d_row,
  output logic [SEL_W-1:0]  d_word,
  output logic [WORD_W-1:0] d_wdata,
  output logic [BE_W-1:0]   d_wbe,
  // memory side
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [WORD_W-1:0] mem_req_wdata,
  output logic [BE_W-1:0]   mem_req_be,
  input  logic              mem_resp_valid,
  input  logic [WORD_W-1:0] mem_resp_rdata
);

  whc_pkg::ctrl_state_t state;
  logic              s1_we;
  logic [WORD_W-1:0] s1_wdata;
  logic [BE_W-1:0]   s1_be;
  logic [WAYS-1:0]   victim, victim_q;
  logic [SEL_W-1:0]  beat_q;
  logic [WORD_W-1:0] word_q;
  logic [15:0]       rnd;
  logic              accept, any_hit, last_beat;
  logic [IDX_W-1:0]  s1_idx;
  logic [SEL_W-1:0]  s1_word;

  replacement_lfsr u_lfsr (.clk(clk), .rst_n(rst_n), .value(rnd));

  assign s1_idx  = s1_addr[OFF_W +: IDX_W];
  assign s1_word = s1_addr[BOFF_W +: SEL_W];
  assign any_hit = |way_hit;
  assign cpu_req_ready = (state == whc_pkg::ST_IDLE) && !(s1_valid && (s1_we || !any_hit));
  assign accept    = cpu_req_valid && cpu_req_ready;
  assign lookup_en = accept;
  assign last_beat = (state == whc_pkg::ST_FILL) && mem_resp_valid && (beat_q == SEL_W'(LINE_WORDS - 1));

  // Victim: the first invalid way of the set, otherwise a random way.
  always_comb begin
    victim = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!set_valid[w]) victim = WAYS'(1) << w;
    if (victim == '0) victim = WAYS'(1) << (int'(rnd) % WAYS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= whc_pkg::ST_IDLE;
      s1_valid <= 1'b0;
      s1_we    <= 1'b0;
      s1_addr  <= '0;
      s1_wdata <= '0;
      s1_be    <= '0;
      victim_q <= '0;
      beat_q   <= '0;
      word_q   <= '0;
    end else begin
      s1_valid <= accept;
      if (accept) begin
        s1_we    <= cpu_req_we;
        s1_addr  <= cpu_req_addr;
        s1_wdata <= cpu_req_wdata;
        s1_be    <= cpu_req_be;
      end
      unique case (state)
        whc_pkg::ST_IDLE:
          if (s1_valid) begin
            if (s1_we) state <= whc_pkg::ST_WRITE;
            else if (!any_hit) begin
              state    <= whc_pkg::ST_FILL_REQ;
              victim_q <= victim;
            end
          end
        whc_pkg::ST_FILL_REQ:
          if (mem_req_ready) begin
            state  <= whc_pkg::ST_FILL;
            beat_q <= '0;
          end
        whc_pkg::ST_FILL:
          if (mem_resp_valid) begin
            beat_q <= beat_q + 1'b1;
            if (beat_q == s1_word) word_q <= mem_resp_rdata;
            if (last_beat) state <= whc_pkg::ST_IDLE;
          end
        whc_pkg::ST_WRITE:
          if (mem_req_ready) state <= whc_pkg::ST_IDLE;
        default: state <= whc_pkg::ST_IDLE;
      endcase
    end
  end

  always_comb begin
    // array writes
    tag_we     = last_beat ? victim_q : '0;
    tag_row    = s1_idx;
    tag_wdata  = s1_addr[ADDR_W-1 -: TAG_W];
    d_row      = s1_idx;
    if (state == whc_pkg::ST_FILL) begin
      d_we    = mem_resp_valid ? victim_q : '0;
      d_word  = beat_q;
      d_wdata = mem_resp_rdata;
      d_wbe   = '1;
    end else begin
      d_we    = (state == whc_pkg::ST_IDLE && s1_valid && s1_we) ? way_hit : '0;
      d_word  = s1_word;
      d_wdata = s1_wdata;
      d_wbe   = s1_be;
    end
    // memory requests
    mem_req_valid = (state == whc_pkg::ST_FILL_REQ) || (state == whc_pkg::ST_WRITE);
    mem_req_we    = (state == whc_pkg::ST_WRITE);
    mem_req_addr  = (state == whc_pkg::ST_WRITE) ? s1_addr
                                        : {s1_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    mem_req_wdata = s1_wdata;
    mem_req_be    = s1_be;
    // responses
    cpu_resp_valid = 1'b0;
    cpu_resp_rdata = '0;
    if (state == whc_pkg::ST_IDLE && s1_valid && !s1_we && any_hit) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_rdata = hit_data;
    end else if (last_beat) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_rdata = (s1_word == SEL_W'(LINE_WORDS - 1)) ? mem_resp_rdata : word_q;
    end else if (state == whc_pkg::ST_WRITE && mem_req_ready) begin
      cpu_resp_valid = 1'b1;
    end
  end

  // At most one way can hit.
  a_hit_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> $onehot0(way_hit));
  // A request that is not yet accepted must be held unchanged.
  a_cpu_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req_valid && !cpu_req_ready |=> cpu_req_valid && $stable(cpu_req_addr)
                                        && $stable(cpu_req_we));
  // The controller holds a memory request until it is accepted.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
  // Memory words arrive only while a refill is waiting for them.
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> state == whc_pkg::ST_FILL);

endmodule
