// tb_mshr: random allocate / fill / cancel traffic on a small MSHR,
// compared every cycle with an associative-array model of the pending
// misses: merge (hit), full, alloc_ok (including the same-cycle cancel
// rule), fill lookup and freeing, false-miss cancel and the entry count.
// Line addresses come from a small range so that merges and cancels of
// pending lines happen often.
module tb_mshr;
  localparam int E = 4, LW = 8, WYW = 3;
  logic clk = 0, rst_n = 0;
  logic alloc_en, fill_en, cancel_en; logic [LW-1:0] alloc_line, fill_line, cancel_line;
  logic [WYW-1:0] alloc_way, fill_way, cancel_way;
  logic hit, full, alloc_ok, fill_hit, cancel_hit; logic [$clog2(E+1)-1:0] count;
  mshr #(.ENTRIES(E), .LW(LW), .WYW(WYW)) dut (.clk, .rst_n,
    .alloc_en_i(alloc_en), .alloc_line_i(alloc_line), .alloc_way_i(alloc_way),
    .hit_o(hit), .full_o(full), .alloc_ok_o(alloc_ok),
    .fill_en_i(fill_en), .fill_line_i(fill_line), .fill_hit_o(fill_hit), .fill_way_o(fill_way),
    .cancel_en_i(cancel_en), .cancel_line_i(cancel_line),
    .cancel_hit_o(cancel_hit), .cancel_way_o(cancel_way), .count_o(count));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_merge = 0, n_full = 0, n_fill = 0, n_drop = 0, n_cancel = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [WYW-1:0] model [logic [LW-1:0]];

  initial begin
    alloc_en = 0; fill_en = 0; cancel_en = 0;
    alloc_line = 0; fill_line = 0; cancel_line = 0; alloc_way = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      bit e_hit, e_full, e_ok, e_fh, e_ch;
      @(negedge clk);
      alloc_en = $urandom_range(0, 1); alloc_line = LW'($urandom_range(0, 11));
      alloc_way = WYW'($urandom);
      fill_en = ($urandom_range(0, 3) == 0); fill_line = LW'($urandom_range(0, 11));
      cancel_en = ($urandom_range(0, 5) == 0); cancel_line = LW'($urandom_range(0, 11));
      if (cancel_line == fill_line) cancel_en = 0;
      #1;
      e_hit  = model.exists(alloc_line);
      e_full = (model.num() == E);
      e_ok   = alloc_en && !e_hit && !e_full && !(cancel_en && cancel_line == alloc_line);
      e_fh   = fill_en && model.exists(fill_line);
      e_ch   = cancel_en && model.exists(cancel_line);
      chk(hit == e_hit, "merge hit");
      chk(full == e_full, "full");
      chk(alloc_ok == e_ok, "alloc_ok");
      chk(count == model.num(), "count");
      chk(fill_hit == e_fh && (!e_fh || fill_way == model[fill_line]), "fill lookup");
      chk(cancel_hit == e_ch && (!e_ch || cancel_way == model[cancel_line]), "cancel lookup");
      if (alloc_en && e_hit) n_merge++;
      if (alloc_en && e_full) n_full++;
      if (fill_en) begin if (e_fh) n_fill++; else n_drop++; end
      if (e_ch) n_cancel++;
      if (e_fh) model.delete(fill_line);
      if (e_ch) model.delete(cancel_line);
      if (e_ok) begin model[alloc_line] = alloc_way; n_alloc++; end
    end
    chk(n_alloc > 0 && n_merge > 0 && n_full > 0 && n_fill > 0 && n_drop > 0 && n_cancel > 0,
        "every case exercised");
    $display("alloc=%0d merge=%0d full=%0d fill=%0d drop=%0d cancel=%0d",
             n_alloc, n_merge, n_full, n_fill, n_drop, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
