// tb_tag_cam: self-checking test of the interleaved CAM tag memory.
// A word-level reference model (tag + parity per word) is updated by random
// writes and by random cell upsets on physical rows, mapped to words through
// the column interleave (column c of row r is bit c/2 of word 2r + c%2).
// After every operation the per-word error vector, both read ports and the
// match lines of a searched set are compared with the model.
module tb_tag_cam;
  localparam int SETS = 4, WAYS = 4, TAG_W = 8;
  localparam int R = cache_pkg::hamming_r(TAG_W);
  localparam int N = SETS * WAYS, ROWS = N / 2, AW = $clog2(N), RW = $clog2(ROWS);
  localparam int SW = $clog2(SETS), COLS = 2 * (TAG_W + 1);

  logic clk = 0, rst_n = 0;
  logic [SW-1:0] srch_set; logic [TAG_W-1:0] srch_tag; logic [WAYS-1:0] match;
  logic [AW-1:0] rda_addr, rdb_addr; logic [TAG_W-1:0] rda_tag, rdb_tag;
  logic rda_par, rdb_par; logic [R-1:0] rda_chk, rdb_chk;
  logic wr_en; logic [AW-1:0] wr_addr; logic [TAG_W-1:0] wr_tag; logic wr_par; logic [R-1:0] wr_chk;
  logic inj_en; logic [RW-1:0] inj_row; logic [COLS-1:0] inj_mask;
  logic [N-1:0] err;

  tag_cam #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.clk, .rst_n,
    .srch_set_i(srch_set), .srch_tag_i(srch_tag), .match_o(match),
    .rda_addr_i(rda_addr), .rda_tag_o(rda_tag), .rda_par_o(rda_par), .rda_chk_o(rda_chk),
    .rdb_addr_i(rdb_addr), .rdb_tag_o(rdb_tag), .rdb_par_o(rdb_par), .rdb_chk_o(rdb_chk),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_tag_i(wr_tag), .wr_par_i(wr_par), .wr_chk_i(wr_chk),
    .inj_en_i(inj_en), .inj_row_i(inj_row), .inj_mask_i(inj_mask), .err_o(err));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [TAG_W:0] mw [N];   // {parity, tag}
  logic [R-1:0]   mc [N];

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  task automatic compare_all();
    logic [N-1:0] exp_err;
    for (int w = 0; w < N; w++) exp_err[w] = ^mw[w];
    chk(err == exp_err, "err vector");
    for (int w = 0; w < N; w++) begin
      rda_addr = AW'(w); rdb_addr = AW'(N - 1 - w); #1;
      chk({rda_par, rda_tag} == mw[w] && rda_chk == mc[w], "read port a");
      chk({rdb_par, rdb_tag} == mw[N-1-w] && rdb_chk == mc[N-1-w], "read port b");
    end
    for (int s = 0; s < SETS; s++) begin
      logic [WAYS-1:0] em;
      srch_set = SW'(s);
      srch_tag = mw[s*WAYS + $urandom_range(0, WAYS-1)][TAG_W-1:0];
      for (int w = 0; w < WAYS; w++) em[w] = (mw[s*WAYS+w][TAG_W-1:0] == srch_tag);
      #1; chk(match == em, "match lines");
    end
  endtask

  initial begin
    wr_en = 0; inj_en = 0; wr_addr = 0; wr_tag = 0; wr_par = 0; wr_chk = 0;
    inj_row = 0; inj_mask = 0; srch_set = 0; srch_tag = 0; rda_addr = 0; rdb_addr = 0;
    for (int w = 0; w < N; w++) begin mw[w] = '0; mc[w] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); compare_all();
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 2) != 0);
      inj_en = ($urandom_range(0, 3) == 0);
      wr_addr = AW'($urandom_range(0, N-1));
      wr_tag = TAG_W'($urandom); wr_par = ^wr_tag; wr_chk = R'($urandom);
      inj_row = RW'($urandom_range(0, ROWS-1));
      // one cell, or two or three neighbouring cells of the row
      inj_mask = COLS'((1 << $urandom_range(1, 3)) - 1) << $urandom_range(0, COLS-3);
      @(posedge clk); #1;
      if (wr_en) begin mw[wr_addr] = {wr_par, wr_tag}; mc[wr_addr] = wr_chk; end
      if (inj_en)
        for (int c = 0; c < COLS; c++)
          if (inj_mask[c]) mw[2*inj_row + c%2][c/2] = ~mw[2*inj_row + c%2][c/2];
      wr_en = 0; inj_en = 0;
      compare_all();
    end
    // two adjacent cells of one row flag both words of the row
    @(negedge clk);
    wr_addr = 6; wr_tag = 8'h5a; wr_par = ^wr_tag; wr_chk = '0; wr_en = 1;
    @(negedge clk); wr_addr = 7; @(negedge clk); wr_en = 0;
    inj_en = 1; inj_row = 3; inj_mask = COLS'(3) << 4; @(negedge clk); inj_en = 0;
    chk(err[6] && err[7] && $countones(err & ~(N'(3) << 6)) == $countones(err) - 2, "adjacent double upset");
    rda_addr = 6; #1; chk(rda_tag == (8'h5a ^ 8'h04), "single flipped bit in word 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
