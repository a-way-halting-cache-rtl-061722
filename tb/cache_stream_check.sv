// Workload driver and checker for one way_halting_cache instance.
//
// Runs N_OPS requests through the cache from a deterministic address
// generator and checks every load against a reference memory. MODE 0 is a
// synthetic stream with spatial locality over a pool of tags (runs of
// sequential words, jumps between lines and tags, 1 in 5 accesses a store).
// MODE 1 is the data stream of the loop
//   for (i = 1; i < 1000; i++) { x[i] = y[i] + z[i]; a[i] = b * c[i]; }
// with 4-byte elements and the arrays x, y, z, a, c laid out one after the
// other from 0x1000_0000 and the scalar b after them: per iteration it loads
// y[i], z[i], stores x[i], loads b and c[i] and stores a[i].
// The memory is deterministic (grant at once, one refill word per cycle), so
// instances that differ only in HALT_BITS run cycle for cycle alike and hold
// the same lines; only the number of ways opened differs.
// Results: lookups, hits, the sum over lookups of ways opened, cycles, and
// the checks and failures of the data comparison, and how often the tag
// changed from one request to the next (the input activity of the halt tag
// comparators); done rises at the end.
module cache_stream_check #(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned HALT_BITS   = 4,
  parameter int unsigned MODE        = 0,
  parameter int unsigned N_OPS       = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   lookups,
  output int   hits,
  output int   opened_sum,
  output int   cycles,
  output int   tag_changes   // accepted requests whose tag differs from the previous one
);
  logic        cpu_req_valid, cpu_req_ready, cpu_req_we;
  logic [31:0] cpu_req_addr, cpu_req_wdata;
  logic [3:0]  cpu_req_be;
  logic        cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_we;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [3:0]  mem_req_be;
  logic        mem_resp_valid;
  logic [31:0] mem_resp_rdata;
  logic        lookup_done, lookup_hit;
  logic [3:0]  ways_opened;

  way_halting_cache #(.CACHE_BYTES(CACHE_BYTES), .HALT_BITS(HALT_BITS)) dut (.*);

  function automatic logic [31:0] init_word(logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'hC0DE_0001;
  endfunction
  logic [31:0] mem_ovl [int unsigned];
  logic [31:0] arch_ovl [int unsigned];
  function automatic logic [31:0] mem_word(logic [31:0] a);
    return mem_ovl.exists(a[31:2]) ? mem_ovl[a[31:2]] : init_word({a[31:2], 2'b00});
  endfunction
  function automatic logic [31:0] arch_word(logic [31:0] a);
    return arch_ovl.exists(a[31:2]) ? arch_ovl[a[31:2]] : init_word({a[31:2], 2'b00});
  endfunction

  // ---- deterministic memory ----
  logic        m_busy;
  logic [31:0] m_line;
  int          m_beat;
  assign mem_req_ready  = !m_busy;
  assign mem_resp_valid = m_busy;
  assign mem_resp_rdata = mem_word(m_line + 32'(m_beat * 4));
  always @(posedge clk) begin
    if (!rst_n) begin
      m_busy <= 1'b0; m_beat <= 0; m_line <= '0;
    end else begin
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) mem_ovl[mem_req_addr[31:2]] = mem_req_wdata;  // full-word stores only
        else begin
          m_busy <= 1'b1; m_beat <= 0; m_line <= mem_req_addr;
        end
      end
      if (mem_resp_valid) begin
        if (m_beat == 7) m_busy <= 1'b0;
        m_beat <= m_beat + 1;
      end
    end
  end

  // ---- deterministic address generator ----
  logic [31:0] rng, cur;
  int          op_i;
  logic [31:0] tag_pool [12];
  function automatic logic [31:0] xorshift(logic [31:0] s);
    s ^= s << 13; s ^= s >> 17; s ^= s << 5;
    return s;
  endfunction
  localparam int unsigned TAG_LSB = $clog2(CACHE_BYTES / 4);  // tag starts above index and offset
  localparam logic [31:0] X = 32'h1000_0000, Y = X + 4000, Z = Y + 4000,
                          A = Z + 4000, C = A + 4000, B = C + 4000;
  // next request of the loop stream: iteration i = 1 + op/6, step op%6
  function automatic void loop_req(int op, output logic we, output logic [31:0] addr);
    int i, k;
    i = 1 + (op / 6) % 999; k = op % 6;
    case (k)
      0: begin we = 1'b0; addr = Y + 32'(4 * i); end
      1: begin we = 1'b0; addr = Z + 32'(4 * i); end
      2: begin we = 1'b1; addr = X + 32'(4 * i); end
      3: begin we = 1'b0; addr = B; end
      4: begin we = 1'b0; addr = C + 32'(4 * i); end
      default: begin we = 1'b1; addr = A + 32'(4 * i); end
    endcase
  endfunction

  logic        pend_valid, pend_we;
  logic [31:0] pend_addr, pend_exp, last_addr;
  int          ops_done;

  always @(posedge clk) begin
    if (!rst_n) begin
      cpu_req_valid <= 1'b0; cpu_req_we <= 1'b0; cpu_req_addr <= '0; cpu_req_wdata <= '0;
      cpu_req_be <= 4'hF; rng <= 32'h2545_F491; cur <= 32'h0002_B000; op_i <= 0;
      pend_valid = 1'b0; ops_done <= 0; done <= 1'b0;
      checks <= 0; failures <= 0; lookups <= 0; hits <= 0; opened_sum <= 0; cycles <= 0;
      tag_changes <= 0; last_addr <= '0;
    end else begin
      if (!done) cycles <= cycles + 1;
      if (lookup_done) begin
        lookups    <= lookups + 1;
        hits       <= hits + int'(lookup_hit);
        opened_sum <= opened_sum + $countones(ways_opened);
      end
      if (cpu_resp_valid) begin
        checks <= checks + 1;
        if (!pend_valid || (!pend_we && cpu_resp_rdata !== pend_exp)) begin
          failures <= failures + 1;
          $display("FAIL %m: load %h returned %h expected %h", pend_addr, cpu_resp_rdata, pend_exp);
        end
        pend_valid = 1'b0;
        ops_done <= ops_done + 1;
        if (ops_done + 1 == N_OPS) done <= 1'b1;
      end
      if (cpu_req_valid && cpu_req_ready) begin
        cpu_req_valid <= 1'b0;
        if ((cpu_req_addr >> TAG_LSB) != (last_addr >> TAG_LSB)) tag_changes <= tag_changes + 1;
        last_addr <= cpu_req_addr;
        pend_valid = 1'b1; pend_we = cpu_req_we; pend_addr = cpu_req_addr;
        if (cpu_req_we) arch_ovl[cpu_req_addr[31:2]] = cpu_req_wdata;
        pend_exp = arch_word(cpu_req_addr);
      end else if (!cpu_req_valid && !pend_valid && op_i < N_OPS) begin
        logic        we;
        logic [31:0] addr, r;
        r = xorshift(rng); rng <= r;
        if (MODE == 1) loop_req(op_i, we, addr);
        else begin
          // locality: mostly the next word, sometimes another line or tag
          if (r[3:0] < 4'd10) addr = cur + 32'd4;
          else if (r[3:0] < 4'd14) addr = {cur[31:11], r[15:10], r[20:18], 2'b00};
          else addr = {tag_pool[r[27:24] % 12][20:0], r[15:10], r[20:18], 2'b00};
          we = (r[31:29] == 3'd0);
        end
        cur <= addr;
        op_i <= op_i + 1;
        cpu_req_valid <= 1'b1; cpu_req_we <= we; cpu_req_addr <= addr;
        cpu_req_wdata <= r ^ 32'hA5A5_0000; cpu_req_be <= 4'hF;
      end
    end
  end

  initial begin
    tag_pool[0] = 32'h056; tag_pool[1]  = 32'h124; tag_pool[2]  = 32'h072; tag_pool[3]  = 32'h323;
    tag_pool[4] = 32'h057; tag_pool[5]  = 32'h125; tag_pool[6]  = 32'h1072; tag_pool[7] = 32'h2156;
    tag_pool[8] = 32'h058; tag_pool[9]  = 32'h0AB; tag_pool[10] = 32'h331; tag_pool[11] = 32'h05E;
  end
endmodule
