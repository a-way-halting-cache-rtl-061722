// Self-checking testbench of word_line_driver: a one-hot (or empty) decoder
// vector against random halt match vectors; each word line must be the AND
// of its decoder line and its match line, so a mismatching row stays low.
module tb_word_line_driver;
  localparam int unsigned ROWS = 64;
  logic            clk = 1'b0;
  logic [ROWS-1:0] dec, hm, wl;
  int checks = 0, failures = 0, halted = 0, passed = 0;

  word_line_driver #(.ROWS(ROWS)) dut (.dec(dec), .halt_match(hm), .wl(wl));

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
      int r;
      r   = $urandom_range(ROWS);  // ROWS means no row selected
      dec = (r == ROWS) ? '0 : (64'd1 << r);
      hm  = {$urandom, $urandom};
      @(posedge clk);
      checks++;
      if (wl !== (dec & hm)) begin
        failures++;
        $display("FAIL dec=%h hm=%h wl=%h", dec, hm, wl);
      end
      if (r < ROWS) begin
        if (hm[r]) passed++; else halted++;
      end
    end
    checks++;
    if (halted == 0 || passed == 0) begin
      failures++;
      $display("FAIL stimulus did not both halt and pass rows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
