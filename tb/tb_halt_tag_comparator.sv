// Self-checking testbench of halt_tag_comparator: all 256 pairs of 4-bit
// stored and desired values; the match must be high exactly when they are equal.
module tb_halt_tag_comparator;
  logic       clk = 1'b0;
  logic [3:0] stored, desired;
  logic       match;
  int checks = 0, failures = 0;

  halt_tag_comparator #(.HALT_BITS(4)) dut (.stored(stored), .desired(desired), .match(match));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) begin
        stored = 4'(s); desired = 4'(d);
        @(posedge clk);
        checks++;
        if (match !== (s == d)) begin
          failures++;
          $display("FAIL stored=%h desired=%h match=%b", s, d, match);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
