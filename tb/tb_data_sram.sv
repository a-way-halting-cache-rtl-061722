// Self-checking testbench of data_sram. Every word of every line is written,
// then random partial-word writes with byte enables are mixed with reads;
// a read latches one word of the line whose word line is high, one clock
// edge later, and holds while no word line is high. All compared with a
// reference copy of the array.
module tb_data_sram;
  localparam int unsigned ROWS = 64, WORDS = 8, WORD_W = 32;
  logic              clk = 1'b0;
  logic [ROWS-1:0]   wl;
  logic [2:0]        rd_word, wword;
  logic [WORD_W-1:0] rdata, wdata;
  logic              we;
  logic [5:0]        wrow;
  logic [3:0]        wbe;
  logic [WORD_W-1:0] ref_mem [ROWS][WORDS];
  int checks = 0, failures = 0;

  data_sram #(.ROWS(ROWS), .WORDS(WORDS), .WORD_W(WORD_W)) dut (
    .clk(clk), .wl(wl), .rd_word(rd_word), .rdata(rdata), .we(we), .wrow(wrow),
    .wword(wword), .wdata(wdata), .wbe(wbe));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int r, int w, logic [WORD_W-1:0] v, logic [3:0] be);
    @(negedge clk);
    we = 1'b1; wrow = 6'(r); wword = 3'(w); wdata = v; wbe = be; wl = '0;
    @(posedge clk);
    for (int b = 0; b < 4; b++) if (be[b]) ref_mem[r][w][b*8 +: 8] = v[b*8 +: 8];
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic read_word(int r, int w);
    @(negedge clk);
    wl = 64'd1 << r; rd_word = 3'(w);
    @(posedge clk);
    @(negedge clk);
    wl = '0; rd_word = 3'($urandom);
    checks++;
    if (rdata !== ref_mem[r][w]) begin
      failures++;
      $display("FAIL row %0d word %0d read %h expected %h", r, w, rdata, ref_mem[r][w]);
    end
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (rdata !== ref_mem[r][w]) begin
      failures++;
      $display("FAIL row %0d word %0d not held", r, w);
    end
  endtask

  initial begin
    we = 1'b0; wl = '0; rd_word = '0; wrow = '0; wword = '0; wdata = '0; wbe = '0;
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < WORDS; w++) write_word(r, w, $urandom, 4'hF);
    for (int r = 0; r < ROWS; r++) read_word(r, $urandom_range(WORDS - 1));
    for (int n = 0; n < 500; n++) begin
      int r, w;
      r = $urandom_range(ROWS - 1); w = $urandom_range(WORDS - 1);
      write_word(r, w, $urandom, 4'($urandom));
      read_word(r, w);
      read_word($urandom_range(ROWS - 1), $urandom_range(WORDS - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
