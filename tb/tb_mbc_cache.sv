// tb_mbc_cache: end-to-end test of the cache at its default size
// (32 sets x 32 ways, 24-bit tags, 32-byte lines).
//
// Surroundings: a CPU model issuing random reads and writes to a pool of
// line addresses that maps 48 lines onto each of two sets (forcing
// evictions), and a lower-level memory model that takes fetch / write-back
// requests and returns each refill MISS_LAT cycles later (10 cycles: a
// 3.4 ns miss penalty at 2.933 GHz). A golden word image holds the
// architectural data: every read hit is compared with it, every write-back
// must carry it, and at the end every line of the pool is read back.
//
// Soft-error scenarios: at chosen times a valid, dirty line A is struck
// (one tag cell, or adjacent cells of one to three physical rows, so up to
// six words), and in the same cycle the CPU reads A, which then misses
// falsely. The correction engine must repair the tags, cancel A's MSHR
// entry and the refill of A must be dropped; the dirty data of A must
// survive (checked by the golden image).
//
// Mechanisms counted, each must occur: hit, miss, secondary miss (merge),
// dirty write-back, refill taken, refill dropped, false-miss cancel,
// tag word repaired, refill held by the correction, CPU held by a refill,
// CPU held by a waiting memory request, MSHR full, and the correction of a
// single-word upset finishing within the miss latency.
module tb_mbc_cache;
  import cache_pkg::*;
  localparam int SW = $clog2(SETS), WYW = $clog2(WAYS), N = SETS * WAYS;
  localparam int WORDS = LINE_BYTES * 8 / WORD_W, OFFW = $clog2(LINE_BYTES);
  localparam int ADDR_W = TAG_W + SW + OFFW, LW = TAG_W + SW;
  localparam int COLS = 2 * (TAG_W + 1), RW = $clog2(N) - 1;
  localparam int MISS_LAT = 10;
  localparam int POOL = 96;
  localparam int RANDOM_CYCLES = 6000;

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
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  task automatic finish_now();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    finish_now();
  end

  // ------------------------------------------------------------ models
  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-1:0] wa);
    return WORD_W'(wa * 32'h9e3779b1 + 32'h1234567);
  endfunction
  logic [WORD_W-1:0] gold   [logic [ADDR_W-1:0]];   // by word address (addr >> 2)
  logic [WORD_W-1:0] memimg [logic [ADDR_W-1:0]];   // lower level, by word address

  function automatic logic [WORD_W-1:0] gold_rd(input logic [ADDR_W-1:0] wa);
    return gold.exists(wa) ? gold[wa] : init_word(wa);
  endfunction
  function automatic logic [WORD_W-1:0] mem_rd(input logic [ADDR_W-1:0] wa);
    return memimg.exists(wa) ? memimg[wa] : init_word(wa);
  endfunction
  function automatic logic [ADDR_W-1:0] pool_addr(input int p, input int word);
    logic [SW-1:0] set; logic [TAG_W-1:0] tag;
    set = SW'(3 + 7 * (p % 2));
    tag = TAG_W'(24'h00a000 + p * 24'h0111);
    return {tag, set, WORDS == 1 ? OFFW'(0) : OFFW'(word * (WORD_W / 8))};
  endfunction
  function automatic logic [ADDR_W-1:0] waddr(input logic [ADDR_W-1:0] a);
    return a >> $clog2(WORD_W / 8);
  endfunction
  function automatic logic [ADDR_W-1:0] line_waddr(input logic [LW-1:0] l, input int w);
    return waddr({l, OFFW'(w * (WORD_W / 8))});
  endfunction

  typedef struct { logic we; logic [ADDR_W-1:0] addr; logic [WORD_W-1:0] wdata; } op_t;
  op_t pend [$];
  typedef struct { logic [LW-1:0] line; int due; } fetch_t;
  fetch_t fq [$];

  // ------------------------------------------------------- counters
  int n_hit = 0, n_miss = 0, n_merge = 0, n_wb = 0, n_fill = 0, n_drop = 0, n_cancel = 0;
  int n_fix = 0, n_fill_held = 0, n_cpu_fill = 0, n_cpu_mreq = 0, n_full = 0, n_fast = 0;
  int n_scen = 0, n_false_resp = 0;

  // --------------------------------------------------------- scenario
  int phase = 0;            // 0 random, 1 strike pending, 2 wait, 3 final sweep, 4 done
  int strike_rows = 0, strike_row0 = 0, strike_double = 0, strike_left = 0;
  int t_strike = 0, words_hit = 0;
  logic [ADDR_W-1:0] victim_a;
  bit force_rd = 0;
  int sweep_p = 0, sweep_w = 0;
  int scen_cycle = 0;

  // find a valid dirty line of the pool, return its CAM word index or -1
  function automatic int find_dirty(output logic [ADDR_W-1:0] a);
    for (int k = 0; k < POOL; k++) begin
      int p;
      p = (k + cycle) % POOL;
      a = pool_addr(p, 0);
      for (int w = 0; w < WAYS; w++) begin
        int idx;
        idx = int'(a[OFFW +: SW]) * WAYS + w;
        if (dut.valid[idx] && dut.dirty[idx] && !dut.global_err_o &&
            dut.u_tag.word_of(dut.u_tag.cells[idx / 2], idx[0]) == {^a[ADDR_W-1 -: TAG_W], a[ADDR_W-1 -: TAG_W]})
          return idx;
      end
    end
    return -1;
  endfunction

  task automatic new_op();
    int p, w;
    if (phase == 3) begin
      req_valid <= 1; req_we <= 0; req_addr <= pool_addr(sweep_p, sweep_w);
      return;
    end
    if (force_rd) begin
      req_valid <= 1; req_we <= 0; req_addr <= victim_a; force_rd = 0;
      return;
    end
    req_valid <= ($urandom_range(0, 9) != 0);
    p = (phase == 0 && cycle % 1000 < 200) ? $urandom_range(0, POOL - 1)    // thrash
                                          : $urandom_range(0, 39);          // mostly resident
    w = $urandom_range(0, WORDS - 1);
    req_we <= $urandom_range(0, 1);
    req_addr <= pool_addr(p, w);
    req_wdata <= $urandom;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      // --------------------------------------------- mechanism counters
      if (fill_valid && !fill_ready && (corr_busy || global_err)) n_fill_held++;
      if (req_valid && !req_ready && fill_valid && fill_ready) n_cpu_fill++;
      if (req_valid && !req_ready && mreq_valid && !mreq_ready) n_cpu_mreq++;
      if (dut.alloc_en && dut.m_hit) n_merge++;
      if (dut.alloc_en && dut.m_full) n_full++;
      if (corr_fix) n_fix++;
      if (false_miss) n_cancel++;
      if (fill_drop) n_drop++;
      if (dut.c_done && phase == 2 && words_hit == 1 && cycle - t_strike <= MISS_LAT) n_fast++;
      // ------------------------------------------------------ responses
      if (resp_valid) begin
        op_t o;
        o = pend.pop_front();
        if (resp_hit) begin
          n_hit++;
          if (o.we) gold[waddr(o.addr)] = o.wdata;
          else chk(resp_rdata == gold_rd(waddr(o.addr)), "read data matches golden image");
          if (phase == 3 && o.addr == pool_addr(sweep_p, sweep_w)) begin
            if (sweep_w == WORDS - 1) begin sweep_w = 0; sweep_p++; end
            else sweep_w++;
            if (sweep_p == POOL) phase = 4;
          end
        end else begin
          n_miss++;
          if (o.addr == victim_a && phase == 2 && cycle - t_strike <= 4) n_false_resp++;
        end
      end
      // -------------------------------------------------- CPU request
      if (req_valid && req_ready) begin
        pend.push_back('{we: req_we, addr: req_addr, wdata: req_wdata});
        new_op();
      end else if (!req_valid) new_op();
      // ------------------------------------------------- memory side
      if (mreq_valid && mreq_ready) begin
        if (mreq_wb) begin
          n_wb++;
          for (int w = 0; w < WORDS; w++) begin
            chk(mreq_wb_data[w] == gold_rd(line_waddr(mreq_wb_line, w)), "write-back carries latest data");
            memimg[line_waddr(mreq_wb_line, w)] = mreq_wb_data[w];
          end
        end
        fq.push_back('{line: mreq_line, due: cycle + MISS_LAT});
      end
      mreq_ready <= ($urandom_range(0, 7) != 0);
      if (fill_valid && fill_ready) begin
        void'(fq.pop_front());
        if (!fill_drop) n_fill++;
      end
      if (fq.size() > 0 && fq[0].due <= cycle) begin
        fill_valid <= 1;
        fill_line  <= fq[0].line;
        for (int w = 0; w < WORDS; w++) fill_data[w] <= mem_rd(line_waddr(fq[0].line, w));
      end else fill_valid <= 0;
      // -------------------------------------------------- soft errors
      inj_en <= 0;
      if (strike_left > 0) begin
        strike_left--;
        inj_en   <= 1;
        inj_row  <= RW'(strike_row0 - (strike_rows - 1 - strike_left));
        inj_mask <= strike_double ? COLS'(3) << (2 * (cycle % TAG_W)) : COLS'(1) << (2 * 5 + victim_a[OFFW]);
      end
      case (phase)
        0: if (cycle > 300 && cycle % 600 == 0 && cycle < RANDOM_CYCLES) phase = 1;
           else if (cycle >= RANDOM_CYCLES) phase = 3;
        1: begin
          int idx;
          idx = find_dirty(victim_a);
          if (idx >= 0 && req_valid && req_ready && !corr_busy) begin
            // strike idx's row now; the CPU reads the line next
            n_scen++;
            strike_double = (n_scen % 2 == 0);
            strike_rows   = strike_double ? 1 + (n_scen / 2) % 3 : 1;
            strike_row0   = idx / 2;
            if (strike_row0 - strike_rows + 1 < 0) strike_rows = strike_row0 + 1;
            words_hit     = strike_double ? 2 * strike_rows : 1;
            inj_en   <= 1;
            inj_row  <= RW'(strike_row0);
            inj_mask <= strike_double ? COLS'(3) << (2 * (cycle % TAG_W)) : COLS'(1) << (2 * 5 + idx % 2);
            strike_left = strike_rows - 1;
            req_valid <= 1; req_we <= 0; req_addr <= victim_a;
            t_strike = cycle;
            phase = 2;
          end else if (cycle >= RANDOM_CYCLES) phase = 3;
        end
        2: if (cycle - t_strike > 40) phase = 0;
        3: ;
        4: begin
          scen_cycle = cycle;
        end
      endcase
    end
  end

  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    mreq_ready = 1; fill_valid = 0; fill_line = 0; fill_data = '0;
    inj_en = 0; inj_row = 0; inj_mask = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (phase == 4);
    repeat (50) @(posedge clk);
    chk(global_err == 0 && corr_busy == 0, "no tag error left");
    $display("hit=%0d miss=%0d merge=%0d wb=%0d fill=%0d drop=%0d cancel=%0d fix=%0d",
             n_hit, n_miss, n_merge, n_wb, n_fill, n_drop, n_cancel, n_fix);
    $display("fill_held=%0d cpu_held_fill=%0d cpu_held_mreq=%0d mshr_full=%0d fast=%0d strikes=%0d false_resp=%0d cycles=%0d",
             n_fill_held, n_cpu_fill, n_cpu_mreq, n_full, n_fast, n_scen, n_false_resp, cycle);
    chk(n_hit > 0, "hits happened");
    chk(n_miss > 0, "misses happened");
    chk(n_merge > 0, "secondary misses merged");
    chk(n_wb > 0, "dirty write-backs happened");
    chk(n_fill > 0, "refills taken");
    chk(n_drop > 0, "refills of false misses dropped");
    chk(n_cancel > 0, "false misses cancelled in the MSHR");
    chk(n_false_resp > 0, "struck line missed falsely");
    chk(n_fix > 0, "tag words repaired");
    chk(n_fill_held > 0, "refill held during correction");
    chk(n_cpu_fill > 0, "CPU held by a refill");
    chk(n_cpu_mreq > 0, "CPU held by a waiting memory request");
    chk(n_full > 0, "MSHR full");
    chk(n_fast > 0, "single-word correction within the miss latency");
    finish_now();
  end
endmodule
