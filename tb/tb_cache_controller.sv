// Self-checking testbench of cache_controller on its own. The testbench
// models the ways behaviourally (tag, valid and data arrays written through
// the controller's write ports, hit lines computed from the controller's
// cycle-1 address), a random processor and a behavioural memory with random
// stalls and gaps. It checks load data against a reference memory, the
// one-cycle load-hit latency, the response with the last refill word,
// line-aligned refill requests, refill data landing in the victim way,
// invalid-way-first replacement, write-through of every store, no
// allocation on a store miss and a stalled request port during refills.
module tb_cache_controller;
  localparam int unsigned WAYS = 4, SETS = 64, N_OPS = 20000;
  logic        clk = 1'b0, rst_n;
  logic        cpu_req_valid, cpu_req_ready, cpu_req_we;
  logic [31:0] cpu_req_addr, cpu_req_wdata;
  logic [3:0]  cpu_req_be;
  logic        cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic        lookup_en, s1_valid;
  logic [31:0] s1_addr;
  logic [3:0]  way_hit, set_valid, tag_we, d_we;
  logic [31:0] hit_data, d_wdata;
  logic [5:0]  tag_row, d_row;
  logic [20:0] tag_wdata;
  logic [2:0]  d_word;
  logic [3:0]  d_wbe;
  logic        mem_req_valid, mem_req_ready, mem_req_we;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [3:0]  mem_req_be;
  logic        mem_resp_valid;
  logic [31:0] mem_resp_rdata;

  cache_controller #(.ADDR_W(32), .WORD_W(32), .WAYS(WAYS), .SETS(SETS), .LINE_BYTES(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_st = 0, n_full = 0;
  longint ops_done = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  function automatic logic [31:0] init_word(logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h1234_5678;
  endfunction
  logic [31:0] mem_ovl [int unsigned];
  logic [31:0] arch_ovl [int unsigned];
  function automatic logic [31:0] mem_word(logic [31:0] a);
    return mem_ovl.exists(a[31:2]) ? mem_ovl[a[31:2]] : init_word({a[31:2], 2'b00});
  endfunction
  function automatic logic [31:0] arch_word(logic [31:0] a);
    return arch_ovl.exists(a[31:2]) ? arch_ovl[a[31:2]] : init_word({a[31:2], 2'b00});
  endfunction
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[b*8 +: 8] = nw[b*8 +: 8];
    return old;
  endfunction

  // ---- behavioural ways ----
  logic        w_valid [WAYS][SETS];
  logic [20:0] w_tag   [WAYS][SETS];
  logic [31:0] w_data  [WAYS][SETS][8];
  always_comb begin
    hit_data = '0;
    for (int w = 0; w < WAYS; w++) begin
      set_valid[w] = w_valid[w][s1_addr[10:5]];
      way_hit[w]   = s1_valid && w_valid[w][s1_addr[10:5]] && w_tag[w][s1_addr[10:5]] == s1_addr[31:11];
      if (way_hit[w]) hit_data = w_data[w][s1_addr[10:5]][s1_addr[4:2]];
    end
  end

  // ---- behavioural memory ----
  logic        m_busy;
  logic [31:0] m_line;
  int          m_beat;
  always @(negedge clk) begin
    mem_req_ready  <= !m_busy && ($urandom_range(2) != 0);
    mem_resp_valid <= m_busy && ($urandom_range(3) != 0);
    mem_resp_rdata <= mem_word(m_line + 32'(m_beat * 4));
  end

  // ---- processor ----
  logic        pend_valid, pend_we, pend_hit;
  logic [31:0] pend_addr, pend_exp;
  int          pend_age;
  logic [3:0]  fill_way;

  function automatic logic [31:0] gen_addr();
    return {21'($urandom_range(5) * 21'h111), 6'($urandom_range(7)), 3'($urandom), 2'b00};
  endfunction

  always @(negedge clk)
    if (rst_n && !cpu_req_valid && ops_done + 2 < N_OPS && $urandom_range(7) != 0) begin
      cpu_req_valid <= 1'b1;
      cpu_req_we    <= ($urandom_range(3) == 0);
      cpu_req_addr  <= gen_addr();
      cpu_req_wdata <= $urandom;
      cpu_req_be    <= 4'($urandom);
    end

  always @(posedge clk) begin
    if (!rst_n) begin
      m_busy <= 1'b0; m_beat <= 0; m_line <= '0; pend_valid = 1'b0; fill_way = '0;
    end else begin
      // memory
      if (mem_req_valid && mem_req_ready) begin
        checks++;
        if (!pend_valid || mem_req_we != pend_we) fail("unexpected memory request");
        if (mem_req_we) begin
          if (mem_req_addr != pend_addr) fail("store written to the wrong address");
          mem_ovl[mem_req_addr[31:2]] = merge(mem_word(mem_req_addr), mem_req_wdata, mem_req_be);
        end else begin
          if (mem_req_addr != {pend_addr[31:5], 5'd0}) fail("refill address wrong");
          m_busy <= 1'b1; m_beat <= 0; m_line <= mem_req_addr;
        end
      end
      if (m_busy) begin
        checks++;
        if (cpu_req_ready) fail("request accepted during a refill");
      end
      if (mem_resp_valid) begin
        checks++;
        if ($countones(d_we) != 1 || d_row != pend_addr[10:5] || d_word != 3'(m_beat) ||
            d_wdata != mem_resp_rdata || d_wbe != 4'hF)
          fail("refill word not written into the victim");
        if (m_beat == 0) begin
          // the victim: the first invalid way, else any way
          logic [3:0] first_free;
          first_free = '0;
          for (int w = WAYS - 1; w >= 0; w--) if (!w_valid[w][pend_addr[10:5]]) first_free = 4'(1 << w);
          checks++;
          if (first_free != 0 && d_we != first_free) fail("invalid way not chosen as victim");
          if (first_free == 0) n_full++;
          fill_way = d_we;
        end else begin
          checks++;
          if (d_we != fill_way) fail("refill switched ways");
        end
        if (m_beat == 7) begin
          m_busy <= 1'b0;
          checks++;
          if (!cpu_resp_valid || tag_we != fill_way || tag_wdata != pend_addr[31:11])
            fail("last refill word without tag write and response");
        end
        m_beat <= m_beat + 1;
      end
      if (|tag_we && pend_we) fail("store miss allocated a line");
      // array writes into the behavioural ways
      for (int w = 0; w < WAYS; w++) begin
        if (tag_we[w]) begin
          w_valid[w][tag_row] = 1'b1; w_tag[w][tag_row] = tag_wdata;
        end
        if (d_we[w])
          w_data[w][d_row][d_word] = merge(w_data[w][d_row][d_word], d_wdata, d_wbe);
      end
      // responses
      if (pend_valid) pend_age++;
      if (cpu_resp_valid) begin
        checks++;
        if (!pend_valid) fail("response with nothing outstanding");
        else begin
          if (!pend_we && cpu_resp_rdata !== pend_exp)
            fail($sformatf("load %h returned %h expected %h", pend_addr, cpu_resp_rdata, pend_exp));
          if (pend_hit && !pend_we && pend_age != 1) fail("load hit latency is not one cycle");
          if (pend_hit && !pend_we) n_hit++;
          if (!pend_hit && !pend_we) n_miss++;
          if (pend_we) n_st++;
          pend_valid = 1'b0;
          ops_done++;
        end
      end
      if (s1_valid && pend_valid) pend_hit = |way_hit;
      // acceptance
      checks++;
      if (lookup_en !== (cpu_req_valid && cpu_req_ready)) fail("lookup_en does not mark acceptance");
      if (cpu_req_valid && cpu_req_ready) begin
        if (pend_valid) fail("request accepted with one outstanding");
        cpu_req_valid <= 1'b0;
        pend_valid = 1'b1; pend_we = cpu_req_we; pend_addr = cpu_req_addr; pend_age = 0;
        if (cpu_req_we)
          arch_ovl[cpu_req_addr[31:2]] = merge(arch_word(cpu_req_addr), cpu_req_wdata, cpu_req_be);
        pend_exp = arch_word(cpu_req_addr);
      end
    end
  end

  initial begin
    repeat (N_OPS * 15) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d operations", ops_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin
        w_valid[w][s] = 1'b0; w_tag[w][s] = '0;
        for (int k = 0; k < 8; k++) w_data[w][s][k] = '0;
      end
    rst_n = 1'b0; cpu_req_valid = 1'b0; cpu_req_we = 1'b0; cpu_req_addr = '0;
    cpu_req_wdata = '0; cpu_req_be = '0; mem_req_ready = 1'b0; mem_resp_valid = 1'b0;
    mem_resp_rdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (ops_done >= N_OPS - 2 && !cpu_req_valid && !pend_valid);
    repeat (3) @(posedge clk);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_st == 0 || n_full == 0) fail("a case never occurred");
    $display("load hits=%0d load misses=%0d stores=%0d refills into full sets=%0d", n_hit, n_miss, n_st, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
