// End-to-end testbench of way_halting_cache at its default size (8 KB,
// four ways, 32-byte lines, 4 halt bits).
//
// A random processor issues loads and stores with spatial locality over a
// pool of tags that, like typical program tags, mostly differ in their low
// bits, plus a few that share low bits with another tag. A behavioural
// memory answers line reads word by word with random gaps and accepts
// writes, stalling its ready line at random. The testbench checks:
//   * every load returns the value of an architectural reference memory,
//     and stores reach the behavioural memory (write-through);
//   * every lookup opens exactly the ways whose valid line in the set has the
//     same halt tag bits as the address (computed from a shadow copy of the
//     tags written by refills) and hits exactly when the full tag is present;
//   * a load hit responds one cycle after acceptance, and a miss responds in
//     the cycle of the last refill word.
// It counts how often each mechanism happened and fails on one that never
// did: load hit, load miss with refill, store hit, store miss, eviction of a
// valid line, ways halted on a hit, all ways halted on a miss, a way opened
// without a hit, back-to-back hits and memory stalls.
module tb_way_halting_cache;
  localparam int unsigned WAYS = 4, SETS = 64, HB = 4, N_OPS = 30000;

  logic        clk = 1'b0, rst_n;
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

  way_halting_cache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load_hit = 0, n_load_miss = 0, n_store_hit = 0, n_store_miss = 0, n_evict = 0;
  int n_halt_on_hit = 0, n_all_halted_miss = 0, n_false_open = 0, n_b2b = 0, n_mem_stall = 0;
  longint opened_sum = 0, lookups = 0, ops_done = 0, cycles = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ---------------- memory contents ----------------
  // Initial value of every word is a hash of its address; stores overlay it.
  function automatic logic [31:0] init_word(logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A_0F0F;
  endfunction
  logic [31:0] mem_ovl [int unsigned];   // behavioural memory
  logic [31:0] arch_ovl [int unsigned];  // architectural reference
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

  // ---------------- shadow of the tags ----------------
  logic        sh_valid [WAYS][SETS];
  logic [20:0] sh_tag   [WAYS][SETS];

  // ---------------- behavioural memory ----------------
  logic        m_busy;
  logic [31:0] m_line;
  int          m_beat;
  always @(negedge clk) begin
    mem_req_ready  <= !m_busy && ($urandom_range(3) != 0);
    mem_resp_valid <= m_busy && ($urandom_range(4) != 0);
    mem_resp_rdata <= mem_word(m_line + 32'(m_beat * 4));
  end
  always @(posedge clk) begin
    if (!rst_n) begin
      m_busy <= 1'b0; m_beat <= 0; m_line <= '0;
    end else begin
      if (mem_req_valid && !mem_req_ready) n_mem_stall++;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) mem_ovl[mem_req_addr[31:2]] = merge(mem_word(mem_req_addr), mem_req_wdata, mem_req_be);
        else begin
          m_busy <= 1'b1; m_beat <= 0; m_line <= mem_req_addr;
          checks++;
          if (mem_req_addr[4:0] != 0) fail("line read not line aligned");
        end
      end
      if (mem_resp_valid) begin
        if (m_beat == 7) begin
          m_busy <= 1'b0;
          checks++;
          if (!cpu_resp_valid) fail("miss not answered with the last refill word");
        end
        m_beat <= m_beat + 1;
      end
    end
  end

  // ---------------- processor ----------------
  logic [20:0] tag_pool [10];
  logic        s1_valid, s1_we, s1_exp_hit;
  logic [31:0] s1_addr, s1_exp;
  logic [3:0]  s1_exp_open;
  logic        pend_valid, pend_we;    // an accepted request awaiting its response
  logic [31:0] pend_addr, pend_exp;
  logic        resp_now;

  function automatic logic [31:0] gen_addr();
    logic [20:0] t;
    t = tag_pool[$urandom_range(9)];
    return {t, 6'($urandom_range(15) + 16 * $urandom_range(3)), 3'($urandom), 2'b00};
  endfunction

  always @(negedge clk) begin
    if (rst_n && !cpu_req_valid) begin
      // issue a new request (a request not yet accepted stays unchanged)
      if (ops_done + 2 < N_OPS && $urandom_range(9) != 0) begin
        cpu_req_valid <= 1'b1;
        cpu_req_we    <= ($urandom_range(4) == 0);
        cpu_req_addr  <= gen_addr();
        cpu_req_wdata <= $urandom;
        cpu_req_be    <= ($urandom_range(1) == 1) ? 4'hF : 4'($urandom);
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; pend_valid = 1'b0;
    end else begin
      cycles++;
      // ---- response checks ----
      resp_now = cpu_resp_valid;
      if (cpu_resp_valid) begin
        checks++;
        if (!pend_valid) fail("response with no request outstanding");
        else begin
          if (!pend_we && cpu_resp_rdata !== pend_exp)
            fail($sformatf("load %h returned %h expected %h", pend_addr, cpu_resp_rdata, pend_exp));
          if (pend_we && mem_word(pend_addr) !== arch_word(pend_addr) && !(mem_req_valid && mem_req_ready))
            fail("store not written through");
          pend_valid = 1'b0;
          ops_done++;
        end
      end
      // ---- lookup checks (cycle after acceptance) ----
      checks++;
      if (lookup_done !== s1_valid) fail("lookup_done does not follow acceptance");
      if (s1_valid) begin
        lookups++;
        opened_sum += $countones(ways_opened);
        checks++;
        if (ways_opened !== s1_exp_open || lookup_hit !== s1_exp_hit)
          fail($sformatf("addr %h opened %b expected %b hit %b expected %b", s1_addr,
                         ways_opened, s1_exp_open, lookup_hit, s1_exp_hit));
        if (s1_exp_hit && !s1_we) begin
          n_load_hit++;
          checks++;
          if (!resp_now) fail("load hit not answered one cycle after acceptance");
          if (cpu_req_valid && cpu_req_ready) n_b2b++;
        end
        if (!s1_exp_hit && !s1_we) n_load_miss++;
        if (s1_exp_hit && s1_we) n_store_hit++;
        if (!s1_exp_hit && s1_we) n_store_miss++;
        if (s1_exp_hit && $countones(s1_exp_open) == 1) begin
          int nv;
          nv = 0;
          for (int w = 0; w < WAYS; w++) nv += int'(sh_valid[w][s1_addr[10:5]]);
          if (nv > 1) n_halt_on_hit++;
        end
        if (!s1_exp_hit && s1_exp_open == 0) n_all_halted_miss++;
        if ($countones(s1_exp_open) > (s1_exp_hit ? 1 : 0)) n_false_open++;
      end
      // ---- refills seen through the controller's tag write ----
      for (int w = 0; w < WAYS; w++)
        if (dut.u_ctrl.tag_we[w]) begin
          int nv;
          nv = 0;
          for (int v = 0; v < WAYS; v++) nv += int'(sh_valid[v][dut.u_ctrl.tag_row]);
          if (nv == WAYS) n_evict++;
          checks++;
          if (sh_valid[w][dut.u_ctrl.tag_row] && nv < WAYS) fail("valid line replaced while a way was free");
          sh_valid[w][dut.u_ctrl.tag_row] = 1'b1;
          sh_tag[w][dut.u_ctrl.tag_row]   = dut.u_ctrl.tag_wdata;
        end
      // ---- acceptance ----
      s1_valid <= 1'b0;
      if (cpu_req_valid && cpu_req_ready) begin
        logic [20:0] t;
        logic [5:0]  idx;
        logic [3:0]  eo;
        logic        eh;
        t = cpu_req_addr[31:11]; idx = cpu_req_addr[10:5];
        eo = '0; eh = 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          eo[w] = sh_valid[w][idx] && (sh_tag[w][idx][HB-1:0] == t[HB-1:0]);
          if (eo[w] && sh_tag[w][idx] == t) eh = 1'b1;
        end
        checks++;
        if (pend_valid) fail("request accepted before the previous one was answered");
        cpu_req_valid <= 1'b0;
        s1_valid <= 1'b1; s1_we <= cpu_req_we; s1_addr <= cpu_req_addr;
        s1_exp_open <= eo; s1_exp_hit <= eh;
        pend_valid = 1'b1; pend_we = cpu_req_we; pend_addr = cpu_req_addr;
        if (cpu_req_we)
          arch_ovl[cpu_req_addr[31:2]] = merge(arch_word(cpu_req_addr), cpu_req_wdata, cpu_req_be);
        pend_exp = arch_word(cpu_req_addr);
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (N_OPS * 12) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d operations", ops_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Tags 0x56, 0x124, 0x72, 0x323 differ in their low bits; 0x1072 and
    // 0x2156 share low bits with 0x72 and 0x56.
    tag_pool[0] = 21'h000056; tag_pool[1] = 21'h000124; tag_pool[2] = 21'h000072;
    tag_pool[3] = 21'h000323; tag_pool[4] = 21'h001072; tag_pool[5] = 21'h002156;
    tag_pool[6] = 21'h00004B; tag_pool[7] = 21'h00012D; tag_pool[8] = 21'h000320;
    tag_pool[9] = 21'h000079;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin
        sh_valid[w][s] = 1'b0; sh_tag[w][s] = '0;
      end
    rst_n = 1'b0; cpu_req_valid = 1'b0; cpu_req_we = 1'b0; cpu_req_addr = '0;
    cpu_req_wdata = '0; cpu_req_be = '0; mem_req_ready = 1'b0; mem_resp_valid = 1'b0;
    mem_resp_rdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (ops_done >= N_OPS - 2 && !cpu_req_valid && !pend_valid);
    repeat (5) @(posedge clk);
    begin
      int mech [10];
      string names [10];
      mech = '{n_load_hit, n_load_miss, n_store_hit, n_store_miss, n_evict,
               n_halt_on_hit, n_all_halted_miss, n_false_open, n_b2b, n_mem_stall};
      names = '{"load_hit", "load_miss_refill", "store_hit", "store_miss", "eviction",
                "ways_halted_on_hit", "all_ways_halted_on_miss", "way_opened_without_hit",
                "back_to_back_hits", "memory_stall"};
      for (int i = 0; i < 10; i++) begin
        $display("  %-24s %0d", names[i], mech[i]);
        checks++;
        if (mech[i] == 0) fail($sformatf("mechanism %s never happened", names[i]));
      end
    end
    $display("operations=%0d cycles=%0d lookups=%0d average ways opened per lookup=%0.3f",
             ops_done, cycles, lookups, real'(opened_sum) / real'(lookups));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
