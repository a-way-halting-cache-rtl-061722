// Self-checking testbench of tag_sram. Every row is written with a random
// tag, then read back through a one-hot word line: the data must appear one
// clock edge after the word line and must hold while all word lines are low.
// Random overwrites are checked against a reference copy.
module tb_tag_sram;
  localparam int unsigned ROWS = 64, W = 17;
  logic            clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [W-1:0]    rdata, wdata;
  logic            we;
  logic [5:0]      waddr;
  logic [W-1:0]    ref_mem [ROWS];
  int checks = 0, failures = 0;

  tag_sram #(.ROWS(ROWS), .W(W)) dut (
    .clk(clk), .wl(wl), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int r, logic [W-1:0] v);
    @(negedge clk);
    we = 1'b1; waddr = 6'(r); wdata = v; wl = '0;
    @(posedge clk);
    ref_mem[r] = v;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic read_row(int r);
    @(negedge clk);
    wl = 64'd1 << r;
    @(posedge clk);
    @(negedge clk);
    wl = '0;
    checks++;
    if (rdata !== ref_mem[r]) begin
      failures++;
      $display("FAIL row %0d read %h expected %h", r, rdata, ref_mem[r]);
    end
    // hold while no word line is high
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (rdata !== ref_mem[r]) begin
      failures++;
      $display("FAIL row %0d data not held", r);
    end
  endtask

  initial begin
    we = 1'b0; wl = '0; waddr = '0; wdata = '0;
    for (int r = 0; r < ROWS; r++) write_row(r, W'($urandom));
    for (int r = 0; r < ROWS; r++) read_row(r);
    for (int n = 0; n < 200; n++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      if ($urandom_range(1) == 1) write_row(r, W'($urandom));
      read_row($urandom_range(ROWS - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
