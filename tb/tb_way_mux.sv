// Self-checking testbench of way_mux: random words on the four ways and a
// one-hot or empty hit vector; the output must be the hit way's word, or zero.
module tb_way_mux;
  localparam int unsigned WAYS = 4, WORD_W = 32;
  logic              clk = 1'b0;
  logic [WAYS-1:0]   hit;
  logic [WORD_W-1:0] data [WAYS];
  logic [WORD_W-1:0] out, exp_out;
  int checks = 0, failures = 0;

  way_mux #(.WAYS(WAYS), .WORD_W(WORD_W)) dut (.hit(hit), .data(data), .out(out));

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
      int h;
      for (int w = 0; w < WAYS; w++) data[w] = $urandom;
      h   = $urandom_range(WAYS);  // WAYS means no hit
      hit = (h == WAYS) ? '0 : WAYS'(1) << h;
      exp_out = (h == WAYS) ? '0 : data[h];
      @(posedge clk);
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL hit=%b out=%h expected=%h", hit, out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
