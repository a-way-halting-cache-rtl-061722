// Self-checking testbench of tag_comparator: random stored and desired main
// tags, with equal pairs forced often, and the opened input toggled; hit must
// be high only for an opened way with equal tags.
module tb_tag_comparator;
  localparam int unsigned W = 17;
  logic         clk = 1'b0;
  logic         opened, hit;
  logic [W-1:0] stored, desired;
  int checks = 0, failures = 0;

  tag_comparator #(.W(W)) dut (.opened(opened), .stored(stored), .desired(desired), .hit(hit));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      opened  = 1'($urandom);
      stored  = W'($urandom);
      desired = ($urandom_range(1) == 1) ? stored : W'($urandom);
      if (n % 7 == 0) desired = stored ^ (W'(1) << $urandom_range(W - 1));  // one-bit difference
      @(posedge clk);
      checks++;
      if (hit !== (opened && stored == desired)) begin
        failures++;
        $display("FAIL opened=%b stored=%h desired=%h hit=%b", opened, stored, desired, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
