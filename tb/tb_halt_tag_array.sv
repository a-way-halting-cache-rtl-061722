// Self-checking testbench of halt_tag_array. A reference copy of the tags
// and valid bits is kept beside the array. After reset every match line must
// be low; then rows are written (and some invalidated) at random, and after
// every write all 16 desired values are searched, each search compared row
// by row with the reference. The valid vector is checked too.
module tb_halt_tag_array;
  localparam int unsigned ROWS = 64, HB = 4;
  logic            clk = 1'b0, rst_n;
  logic [HB-1:0]   desired, wr_tag;
  logic [ROWS-1:0] match, valid, exp_match;
  logic            wr_en, wr_valid;
  logic [5:0]      wr_row;
  logic [HB-1:0]   ref_tag [ROWS];
  logic [ROWS-1:0] ref_valid;
  int checks = 0, failures = 0;

  halt_tag_array #(.ROWS(ROWS), .HALT_BITS(HB)) dut (
    .clk(clk), .rst_n(rst_n), .desired(desired), .match(match),
    .wr_en(wr_en), .wr_row(wr_row), .wr_tag(wr_tag), .wr_valid(wr_valid), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search_all();
    for (int d = 0; d < 16; d++) begin
      desired = HB'(d);
      #1;
      for (int r = 0; r < ROWS; r++) exp_match[r] = ref_valid[r] && (ref_tag[r] == HB'(d));
      checks++;
      if (match !== exp_match || valid !== ref_valid) begin
        failures++;
        $display("FAIL desired=%h match=%h expected=%h valid=%h", d, match, exp_match, valid);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_row = '0; wr_tag = '0; wr_valid = 1'b0; desired = '0;
    ref_valid = '0;
    for (int r = 0; r < ROWS; r++) ref_tag[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    search_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      wr_en    = 1'b1;
      wr_row   = 6'($urandom);
      wr_tag   = HB'($urandom);
      wr_valid = ($urandom_range(7) != 0);
      @(posedge clk);
      ref_tag[wr_row]   = wr_tag;
      ref_valid[wr_row] = wr_valid;
      @(negedge clk);
      wr_en = 1'b0;
      if (n % 8 == 0 || n > 390) search_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
