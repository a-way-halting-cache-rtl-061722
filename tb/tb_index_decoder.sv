// Self-checking testbench of index_decoder: every index with the enable high
// and low, compared with a one-hot value built from a shift.
module tb_index_decoder;
  localparam int unsigned IDX_W = 6;
  logic                clk = 1'b0;
  logic                en;
  logic [IDX_W-1:0]    index;
  logic [2**IDX_W-1:0] row;
  int checks = 0, failures = 0;

  index_decoder #(.IDX_W(IDX_W)) dut (.en(en), .index(index), .row(row));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 2**IDX_W; i++) begin
        en = e[0]; index = IDX_W'(i);
        @(posedge clk);
        checks++;
        if (row !== (e[0] ? (64'd1 << i) : 64'd0)) begin
          failures++;
          $display("FAIL en=%0d index=%0d row=%h", e, i, row);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
