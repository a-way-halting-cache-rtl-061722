// Self-checking testbench of cache_way. The testbench plays the decoder and
// the controller: it fills rows through the write ports, keeping a reference
// copy, then issues lookups. Tags are drawn from a small pool so that all
// four outcomes occur: a row that is invalid, a row whose halt tag differs
// (the way must be halted: opened low), a row whose halt tag matches but whose
// main tag differs (opened, no hit), and a hit with the right word. Lookups
// are issued back to back, one per cycle, with opened/hit/rdata checked in
// the following cycle.
module tb_cache_way;
  localparam int unsigned ROWS = 64, TAG_W = 21, HB = 4, WORDS = 8, WORD_W = 32;
  localparam int unsigned MTAG_W = TAG_W - HB;
  logic              clk = 1'b0, rst_n;
  logic [ROWS-1:0]   dec;
  logic [HB-1:0]     desired_halt;
  logic [2:0]        rd_word, d_word;
  logic [MTAG_W-1:0] cmp_mtag;
  logic              opened, hit;
  logic [WORD_W-1:0] rdata, d_wdata;
  logic [ROWS-1:0]   valid;
  logic              tag_we, tag_wvalid, d_we;
  logic [5:0]        tag_row, d_row;
  logic [TAG_W-1:0]  tag_wdata;
  logic [3:0]        d_wbe;

  logic              ref_valid [ROWS];
  logic [TAG_W-1:0]  ref_tag   [ROWS];
  logic [WORD_W-1:0] ref_data  [ROWS][WORDS];
  logic [TAG_W-1:0]  pool [6];
  int checks = 0, failures = 0;
  int n_invalid = 0, n_halted = 0, n_false_open = 0, n_hit = 0;

  cache_way #(.ROWS(ROWS), .TAG_W(TAG_W), .HALT_BITS(HB), .WORDS(WORDS), .WORD_W(WORD_W)) dut (
    .clk(clk), .rst_n(rst_n), .dec(dec), .desired_halt(desired_halt), .rd_word(rd_word),
    .cmp_mtag(cmp_mtag), .opened(opened), .hit(hit), .rdata(rdata), .valid(valid),
    .tag_we(tag_we), .tag_row(tag_row), .tag_wdata(tag_wdata), .tag_wvalid(tag_wvalid),
    .d_we(d_we), .d_row(d_row), .d_word(d_word), .d_wdata(d_wdata), .d_wbe(d_wbe));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Tags of a set typically differ in their low bits (0x56, 0x124, 0x72,
    // 0x323); two pool entries share low bits but differ above them.
    pool[0] = 21'h000056; pool[1] = 21'h000124; pool[2] = 21'h000072;
    pool[3] = 21'h000323; pool[4] = 21'h001072; pool[5] = 21'h000156;
    rst_n = 1'b0; dec = '0; desired_halt = '0; rd_word = '0; cmp_mtag = '0;
    tag_we = 1'b0; tag_row = '0; tag_wdata = '0; tag_wvalid = 1'b0;
    d_we = 1'b0; d_row = '0; d_word = '0; d_wdata = '0; d_wbe = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) ref_valid[r] = 1'b0;
    // fill: most rows valid with a pool tag
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      tag_we = 1'b1; tag_row = 6'(r); tag_wdata = pool[$urandom_range(5)];
      tag_wvalid = ($urandom_range(5) != 0);
      for (int w = 0; w < WORDS; w++) begin
        ref_data[r][w] = $urandom;
        d_we = 1'b1; d_row = 6'(r); d_word = 3'(w); d_wdata = ref_data[r][w]; d_wbe = 4'hF;
        @(posedge clk);
        if (w == 0) begin
          ref_valid[r] = tag_wvalid; ref_tag[r] = tag_wdata;
        end
        @(negedge clk);
        tag_we = 1'b0;
      end
      d_we = 1'b0;
    end
    // back-to-back lookups
    begin
      int r_prev, w_prev;
      logic [TAG_W-1:0] t_prev;
      logic prev = 1'b0;
      for (int n = 0; n < 3000; n++) begin
        int r, w;
        logic [TAG_W-1:0] t;
        r = $urandom_range(ROWS - 1); w = $urandom_range(WORDS - 1); t = pool[$urandom_range(5)];
        @(negedge clk);
        // check the previous lookup
        if (prev) begin
          logic e_open, e_hit;
          e_open = ref_valid[r_prev] && (ref_tag[r_prev][HB-1:0] == t_prev[HB-1:0]);
          e_hit  = e_open && (ref_tag[r_prev] == t_prev);
          checks++;
          if (opened !== e_open || hit !== e_hit || (e_hit && rdata !== ref_data[r_prev][w_prev])) begin
            failures++;
            $display("FAIL row %0d tag %h: opened %b/%b hit %b/%b data %h/%h", r_prev, t_prev,
                     opened, e_open, hit, e_hit, rdata, ref_data[r_prev][w_prev]);
          end
          if (!ref_valid[r_prev]) n_invalid++;
          else if (!e_open) n_halted++;
          else if (!e_hit) n_false_open++;
          else n_hit++;
        end
        dec = 64'd1 << r; desired_halt = t[HB-1:0]; rd_word = 3'(w);
        r_prev = r; w_prev = w; t_prev = t; prev = 1'b1;
        @(posedge clk);
        // the main tag for the comparison is presented in the next cycle
        #1 cmp_mtag = t[TAG_W-1:HB];
      end
    end
    checks++;
    if (n_invalid == 0 || n_halted == 0 || n_false_open == 0 || n_hit == 0) begin
      failures++;
      $display("FAIL an outcome never occurred");
    end
    $display("invalid=%0d halted=%0d opened_no_hit=%0d hit=%0d", n_invalid, n_halted, n_false_open, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
