// Workload testbench: the cache organisations that the way-halting design
// was evaluated with, run on the same synthetic stream, plus the small loop
// of x[i] = y[i] + z[i]; a[i] = b * c[i] at the default size.
//
//   8 KB with 2, 3 and 4 halt bits, 16 KB and 32 KB with 4 halt bits,
//   and the loop at 8 KB with 4 halt bits.
//
// All loads are checked for correct data. Because halting never changes
// which lines are held or when, the three 8 KB halt widths must see the same
// lookups and hits, and each extra halt bit may only open fewer ways. No
// configuration may open more ways than four per lookup or fewer than one
// per hit. The share of requests whose tag differs from the previous
// request's is printed too. The average number of ways opened per lookup is printed for each,
// next to the ideal (the hit rate: one way per hit, none per miss).
module tb_cache_workloads;
  localparam int unsigned N = 20000;
  localparam int NC = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NC];
  int   ck [NC], fl [NC], lk [NC], ht [NC], op [NC], cy [NC], tc [NC];
  int   checks = 0, failures = 0;
  string names [NC] = '{"8KB  halt=2 stream", "8KB  halt=3 stream", "8KB  halt=4 stream",
                        "16KB halt=4 stream", "32KB halt=4 stream", "8KB  halt=4 loop  "};

  always #5 clk = ~clk;

  cache_stream_check #(.CACHE_BYTES(8192),  .HALT_BITS(2), .MODE(0), .N_OPS(N)) u0 (clk, rst_n, done[0], ck[0], fl[0], lk[0], ht[0], op[0], cy[0], tc[0]);
  cache_stream_check #(.CACHE_BYTES(8192),  .HALT_BITS(3), .MODE(0), .N_OPS(N)) u1 (clk, rst_n, done[1], ck[1], fl[1], lk[1], ht[1], op[1], cy[1], tc[1]);
  cache_stream_check #(.CACHE_BYTES(8192),  .HALT_BITS(4), .MODE(0), .N_OPS(N)) u2 (clk, rst_n, done[2], ck[2], fl[2], lk[2], ht[2], op[2], cy[2], tc[2]);
  cache_stream_check #(.CACHE_BYTES(16384), .HALT_BITS(4), .MODE(0), .N_OPS(N)) u3 (clk, rst_n, done[3], ck[3], fl[3], lk[3], ht[3], op[3], cy[3], tc[3]);
  cache_stream_check #(.CACHE_BYTES(32768), .HALT_BITS(4), .MODE(0), .N_OPS(N)) u4 (clk, rst_n, done[4], ck[4], fl[4], lk[4], ht[4], op[4], cy[4], tc[4]);
  cache_stream_check #(.CACHE_BYTES(8192),  .HALT_BITS(4), .MODE(1), .N_OPS(N)) u5 (clk, rst_n, done[5], ck[5], fl[5], lk[5], ht[5], op[5], cy[5], tc[5]);

  initial begin
    repeat (N * 12) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      checks += ck[c];
      failures += fl[c];
      $display("%s  lookups=%0d hit rate=%0.3f ways opened/lookup=%0.3f (ideal %0.3f) tag changes=%0.1f%% cycles=%0d",
               names[c], lk[c], real'(ht[c]) / real'(lk[c]), real'(op[c]) / real'(lk[c]),
               real'(ht[c]) / real'(lk[c]), 100.0 * real'(tc[c]) / real'(lk[c]), cy[c]);
      expect_true(lk[c] == int'(N) && op[c] >= ht[c] && op[c] <= 4 * lk[c], {names[c], ": ways opened out of range"});
    end
    for (int c = 1; c < 3; c++) begin
      expect_true(ht[c] == ht[0] && cy[c] == cy[0], "halt width changed hits or timing");
      expect_true(op[c] <= op[c-1], "a wider halt tag opened more ways");
    end
    expect_true(op[2] < op[0], "4 halt bits did not open fewer ways than 2");
    expect_true(ht[3] >= ht[2] && ht[4] >= ht[3], "a larger cache hit less often");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
