// tb_corr_ctrl: checks the background correction engine in its real
// surroundings (tag_cam and err_addr_gen). All words are loaded with random
// tags and matching parity and check bits; some lines are marked valid.
// Each trial corrupts a run of adjacent words with one flipped cell each
// (rows hit from the top down, one row per cycle), then checks that
//   - every word is restored and no error remains;
//   - one repair is made per corrupted word;
//   - an MSHR search {tag, set} is issued for exactly the corrupted valid
//     lines (parity-cell upsets included), with the corrected tag;
//   - the walk ends 2 + 2*K cycles after the first upset, K being the
//     number of words read: from the top word of the flagged group down to
//     the first clean word below it (or word 0).
module tb_corr_ctrl;
  localparam int SETS = 4, WAYS = 8, TAG_W = 8;
  localparam int R = cache_pkg::hamming_r(TAG_W);
  localparam int N = SETS * WAYS, AW = $clog2(N), RW = AW - 1, SW = $clog2(SETS);
  localparam int COLS = 2 * (TAG_W + 1), LW = TAG_W + SW;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] rd_addr, wr_addr, ld_addr; logic [TAG_W-1:0] rd_tag, wr_tag, ld_tag;
  logic rd_par, wr_par, wr_en, ld_en; logic [R-1:0] rd_chk, wr_chk, ld_chk;
  logic c_wr_en; logic [AW-1:0] c_wr_addr; logic [TAG_W-1:0] c_wr_tag; logic c_wr_par;
  logic [R-1:0] c_wr_chk;
  logic inj_en; logic [RW-1:0] inj_row; logic [COLS-1:0] inj_mask;
  logic [N-1:0] err; logic gerr; logic [AW-2:0] gaddr; logic gvalid;
  logic cancel_en; logic [LW-1:0] cancel_line; logic busy, fix, done;
  logic [N-1:0] lvalid;
  logic [TAG_W-1:0] dummy_tag; logic dummy_par; logic [R-1:0] dummy_chk; logic [WAYS-1:0] match;

  assign wr_en   = c_wr_en | ld_en;
  assign wr_addr = c_wr_en ? c_wr_addr : ld_addr;
  assign wr_tag  = c_wr_en ? c_wr_tag : ld_tag;
  assign wr_par  = c_wr_en ? c_wr_par : ^ld_tag;
  assign wr_chk  = c_wr_en ? c_wr_chk : ld_chk;

  tag_cam #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tag (.clk, .rst_n,
    .srch_set_i('0), .srch_tag_i('0), .match_o(match),
    .rda_addr_i('0), .rda_tag_o(dummy_tag), .rda_par_o(dummy_par), .rda_chk_o(dummy_chk),
    .rdb_addr_i(rd_addr), .rdb_tag_o(rd_tag), .rdb_par_o(rd_par), .rdb_chk_o(rd_chk),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_tag_i(wr_tag), .wr_par_i(wr_par), .wr_chk_i(wr_chk),
    .inj_en_i(inj_en), .inj_row_i(inj_row), .inj_mask_i(inj_mask), .err_o(err));
  err_addr_gen #(.N(N)) u_eag (.clk, .rst_n, .err_i(err), .global_err_o(gerr),
    .grp_addr_o(gaddr), .grp_valid_o(gvalid));
  corr_ctrl #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.clk, .rst_n,
    .grp_addr_i(gaddr), .grp_valid_i(gvalid),
    .rd_addr_o(rd_addr), .rd_tag_i(rd_tag), .rd_par_i(rd_par), .rd_chk_i(rd_chk),
    .rd_line_valid_i(lvalid[rd_addr]),
    .wr_en_o(c_wr_en), .wr_addr_o(c_wr_addr), .wr_tag_o(c_wr_tag), .wr_par_o(c_wr_par),
    .wr_chk_o(c_wr_chk), .cancel_en_o(cancel_en), .cancel_line_o(cancel_line),
    .busy_o(busy), .fix_o(fix), .done_o(done));

  // reference Hamming encoder, written independently of hamming_enc
  function automatic logic [R-1:0] ref_chk(input logic [TAG_W-1:0] d);
    logic [R-1:0] c; int pos, i;
    c = '0; pos = 0; i = 0;
    while (i < TAG_W) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        for (int j = 0; j < R; j++) if ((pos >> j) & 1) c[j] ^= d[i];
        i++;
      end
    end
    return c;
  endfunction

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycles); end
  endtask

  logic [TAG_W-1:0] gold [N];
  int n_fix, n_cancel, n_cancel_bad, done_cycle;
  logic [N-1:0] exp_cancel;
  always @(posedge clk) if (rst_n) begin
    if (fix) n_fix++;
    if (cancel_en) begin
      n_cancel++;
      if (!exp_cancel[rd_addr] || cancel_line != {gold[rd_addr], rd_addr[AW-1 -: SW]}) n_cancel_bad++;
    end
  end
  always @(negedge clk) if (rst_n && done) done_cycle = cycles;

  initial begin
    ld_en = 0; ld_addr = 0; ld_tag = 0; ld_chk = 0; inj_en = 0; inj_row = 0; inj_mask = 0;
    lvalid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < N; w++) begin
      gold[w] = TAG_W'($urandom); lvalid[w] = $urandom_range(0, 1);
      @(negedge clk); ld_en = 1; ld_addr = AW'(w); ld_tag = gold[w]; ld_chk = ref_chk(gold[w]);
    end
    @(negedge clk); ld_en = 0;
    repeat (4) @(negedge clk);
    chk(err == '0 && !busy, "clean after load");
    for (int trial = 0; trial < 60; trial++) begin
      int lo, hi, top, k, start;
      int bitsel [N];
      hi = $urandom_range(0, N-1);
      lo = hi - $urandom_range(0, 4); if (lo < 0) lo = 0;
      top = hi | 1;
      k = (lo == 0) ? top + 1 : top - lo + 2;
      exp_cancel = '0;
      for (int w = lo; w <= hi; w++) begin
        bitsel[w] = $urandom_range(0, TAG_W);   // TAG_W = the parity cell
        exp_cancel[w] = lvalid[w];   // also for a parity-cell upset
      end
      n_fix = 0; n_cancel = 0; n_cancel_bad = 0; done_cycle = -1;
      // upsets, top row first, one row per cycle
      for (int r = hi / 2; r >= lo / 2; r--) begin
        @(negedge clk);
        inj_en = 1; inj_row = RW'(r); inj_mask = '0;
        for (int w = 2*r; w <= 2*r + 1; w++)
          if (w >= lo && w <= hi) inj_mask[2*bitsel[w] + w%2] = 1'b1;
        if (r == hi / 2) start = cycles;
        @(negedge clk); inj_en = 0;
      end
      wait (done_cycle >= 0);
      repeat (4) @(negedge clk);
      chk(!busy && err == '0, "no error left");
      chk(n_fix == hi - lo + 1, $sformatf("one repair per word (%0d vs %0d)", n_fix, hi - lo + 1));
      chk(n_cancel == $countones(exp_cancel) && n_cancel_bad == 0, "MSHR searches");
      chk(done_cycle - start == 2 + 2*k,
          $sformatf("correction time %0d, expected %0d (lo=%0d hi=%0d)", done_cycle - start, 2 + 2*k, lo, hi));
      for (int w = 0; w < N; w++)
        chk(u_tag.word_of(u_tag.cells[w/2], w%2) == {^gold[w], gold[w]}, "tag restored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
