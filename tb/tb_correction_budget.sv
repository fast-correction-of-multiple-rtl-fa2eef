// tb_correction_budget: correction time against the miss penalty, at the
// cache's default size. The evaluated operating point is a 2.933 GHz core
// with a 3.4 ns miss penalty, i.e. a refill 10 cycles after the request.
//
// Eight lines are brought into ways 0..7 of one set and the line in way 7
// (the upper word of its group) is made dirty. For M = 1..6 a strike then
// corrupts the tag words of ways 7, 6, ... 7-M+1 (one cell each, rows hit
// top first, one per cycle); one cycle after the first row is hit the CPU
// reads the way-7 line, which misses falsely. For every M the test checks:
//   - the walk ends 2 + 2*(M+1) cycles after the strike (M bad words plus
//     the clean word that stops it);
//   - the false miss is cancelled, its refill dropped, and the dirty data
//     are read back intact;
//   - the refill is held exactly when the correction outlasts the
//     10-cycle miss latency.
// It prints how many corrupted words are repaired within the miss penalty
// and checks that this is 3: (10 - 2) / 2 words read, minus the clean one.
module tb_correction_budget;
  import cache_pkg::*;
  localparam int SW = $clog2(SETS), N = SETS * WAYS;
  localparam int WORDS = LINE_BYTES * 8 / WORD_W, OFFW = $clog2(LINE_BYTES);
  localparam int ADDR_W = TAG_W + SW + OFFW, LW = TAG_W + SW;
  localparam int COLS = 2 * (TAG_W + 1), RW = $clog2(N) - 1;
  localparam int MISS_LAT = 10;
  localparam int SET = 9;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, req_we; logic [ADDR_W-1:0] req_addr; logic [WORD_W-1:0] req_wdata;
  logic resp_valid, resp_hit; logic [WORD_W-1:0] resp_rdata;
  logic mreq_valid, mreq_ready, mreq_wb; logic [LW-1:0] mreq_line, mreq_wb_line;
  logic [WORDS-1:0][WORD_W-1:0] mreq_wb_data, fill_data;
  logic fill_valid, fill_ready; logic [LW-1:0] fill_line;
  logic inj_en; logic [RW-1:0] inj_row; logic [COLS-1:0] inj_mask;
  logic global_err, corr_busy, corr_fix, false_miss, fill_drop;
  logic [$clog2(MSHR_ENTRIES+1)-1:0] mshr_count;

  mbc_cache dut (.clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we), .req_addr_i(req_addr),
    .req_wdata_i(req_wdata), .resp_valid_o(resp_valid), .resp_hit_o(resp_hit),
    .resp_rdata_o(resp_rdata),
    .mreq_valid_o(mreq_valid), .mreq_ready_i(mreq_ready), .mreq_line_o(mreq_line),
    .mreq_wb_o(mreq_wb), .mreq_wb_line_o(mreq_wb_line), .mreq_wb_data_o(mreq_wb_data),
    .fill_valid_i(fill_valid), .fill_ready_o(fill_ready), .fill_line_i(fill_line),
    .fill_data_i(fill_data),
    .inj_en_i(inj_en), .inj_row_i(inj_row), .inj_mask_i(inj_mask),
    .global_err_o(global_err), .corr_busy_o(corr_busy), .corr_fix_o(corr_fix),
    .false_miss_o(false_miss), .fill_drop_o(fill_drop), .mshr_count_o(mshr_count));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask
  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADDR_W-1:0] line_addr(input int k);
    return {TAG_W'(24'h0c0000 + k * 24'h000101), SW'(SET), OFFW'(0)};
  endfunction
  function automatic logic [WORD_W-1:0] mem_word(input logic [LW-1:0] l, input int w);
    return WORD_W'({l, 3'(w)} * 32'h2545f491);
  endfunction

  // lower level: every request is answered MISS_LAT cycles later
  typedef struct { logic [LW-1:0] line; int due; } fetch_t;
  fetch_t fq [$];
  int n_held = 0, n_drop = 0, n_cancel = 0, t_done = -1;
  always @(posedge clk) begin
    if (rst_n) cycle++;
    if (mreq_valid && mreq_ready) fq.push_back('{line: mreq_line, due: cycle + MISS_LAT});
    if (fill_valid && fill_ready) void'(fq.pop_front());
    if (fill_valid && !fill_ready) n_held++;
    if (fill_drop) n_drop++;
    if (false_miss) n_cancel++;
    if (fq.size() > 0 && fq[0].due <= cycle) begin
      fill_valid <= 1; fill_line <= fq[0].line;
      for (int w = 0; w < WORDS; w++) fill_data[w] <= mem_word(fq[0].line, w);
    end else fill_valid <= 0;
  end

  always @(negedge clk) if (rst_n && dut.c_done) t_done = cycle;

  // flip one cell in each word of row r of the struck run (M words below
  // and including way 7); nothing if the run does not reach row r
  task automatic strike(input int m, input int r);
    inj_en = 0; inj_mask = '0;
    inj_row = RW'((SET*WAYS + 7) / 2 - r);
    for (int j = 1; j >= 0; j--)
      if (2*r + (1 - j) < m) begin
        inj_mask[2 * (3 + r) + j] = 1'b1;
        inj_en = 1;
      end
  endtask

  // one CPU access; returns hit and read data
  task automatic cpu(input logic we, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] d,
                     output logic hit, output logic [WORD_W-1:0] q);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    @(negedge clk); req_valid = 0;
    hit = resp_hit; q = resp_rdata;
  endtask
  task automatic cpu_until_hit(input logic we, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] d,
                               output logic [WORD_W-1:0] q);
    logic hit;
    hit = 0;
    for (int i = 0; i < 100 && !hit; i++) begin
      cpu(we, a, d, hit, q);
      if (!hit) repeat (3) @(posedge clk);
    end
    chk(hit, "access eventually hits");
  endtask

  initial begin
    logic [WORD_W-1:0] q;
    logic hit;
    int fits;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; mreq_ready = 1;
    fill_valid = 0; fill_line = 0; fill_data = '0; inj_en = 0; inj_row = 0; inj_mask = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) cpu_until_hit(0, line_addr(k), 0, q);
    cpu_until_hit(1, line_addr(7), 32'hd1a7_0007, q);
    chk(dut.valid[SET*WAYS + 7] && dut.dirty[SET*WAYS + 7], "line 7 dirty in way 7");
    fits = 0;
    for (int m = 1; m <= 6; m++) begin
      int t0, held0, drop0, canc0, expect_t;
      repeat (20) @(posedge clk);
      held0 = n_held; drop0 = n_drop; canc0 = n_cancel; t_done = -1;
      // strike: rows top first, one per cycle; the CPU reads line 7 in
      // the cycle after the first row is hit
      @(negedge clk); t0 = cycle; strike(m, 0);
      @(negedge clk); inj_en = 0; strike(m, 1);
      req_valid = 1; req_we = 0; req_addr = line_addr(7);
      @(posedge clk); chk(req_ready, "struck read accepted");
      @(negedge clk); req_valid = 0; inj_en = 0; strike(m, 2);
      chk(resp_valid && !resp_hit, "read misses falsely");
      @(negedge clk); inj_en = 0;
      wait (t_done >= 0);
      expect_t = 2 + 2 * (m + 1);
      chk(t_done - t0 == expect_t, $sformatf("M=%0d: correction ends after %0d cycles, expected %0d",
                                            m, t_done - t0, expect_t));
      if (t_done - t0 <= MISS_LAT) fits = m;
      repeat (30) @(posedge clk);
      chk(n_cancel == canc0 + 1, "false miss cancelled");
      chk(n_drop == drop0 + 1, "its refill dropped");
      chk((n_held > held0) == (expect_t > MISS_LAT), "refill held only when over the budget");
      cpu_until_hit(0, line_addr(7), 0, q);
      chk(q == 32'hd1a7_0007, "dirty data survive");
      chk(!global_err && !corr_busy, "all repaired");
      $display("M=%0d corrupted words: corrected in %0d cycles, refill %0s", m, t_done - t0,
               (n_held > held0) ? "held" : "not delayed");
    end
    $display("corrupted words repaired within the %0d-cycle miss penalty: %0d", MISS_LAT, fits);
    chk(fits == 3, "three words fit the budget");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
