// mbc_cache: non-blocking, write-back CAM-RAM cache whose CAM tag memory
// detects and corrects multi-bit soft errors in the background, and whose
// MSHR drops the refill caused by a false miss.
//
// A soft error in a CAM tag word makes an access to that line miss even
// though the line is present (a false miss). If the line is dirty, the
// refill would bring stale data from the lower level over it. Here every
// tag word carries a parity bit whose chain drives a per-word error signal
// (tag_cam, two words interleaved per physical row). The error address
// generator (err_addr_gen: pre-coder plus plain encoder) points at the
// highest corrupted word group, and the correction engine (corr_ctrl)
// repairs words one by one downwards with a per-word Hamming code. Each
// repaired valid tag is looked up in the MSHR: a pending miss on that line
// was a false miss and is cancelled, so its refill is dropped when it
// arrives. None of this stalls CPU accesses.
//
// CPU port: one request per cycle (req_valid/req_ready; byte address,
// write enable, one WORD_W-bit word). The CAM is searched in the accept
// cycle; resp_valid follows one cycle later with resp_hit and, for reads,
// the ECC-corrected word. A miss is answered with resp_hit=0 and the
// requester retries later (hit-under-miss; the retry policy is this
// design's choice). A primary miss takes an MSHR entry and a victim way
// (a free way, else a per-set round-robin way, never one reserved by
// another miss); the victim is invalidated at once and, if dirty, its
// corrected tag and data are sent along with the fetch on the memory
// request port (mreq_*, valid/ready; the CPU port stalls while a request
// waits). The refill arrives on fill_*; a line with a live MSHR entry is
// written into its victim way, any other is dropped (fill_drop_o).
//
// Fills are accepted only while no tag error is present and the correction
// engine is idle. This makes the correction finish before the refill of a
// false miss can be taken, which the original scheme requires as "correction time
// < miss penalty"; holding the fill is this design's way of guaranteeing
// it. Fills take priority over CPU requests for the data-memory line port.
//
// inj_* flips cells of one physical tag row (soft-error injection for
// test); global_err_o, corr_busy_o, corr_fix_o, false_miss_o, fill_drop_o
// and mshr_count_o expose the error-handling activity.
module mbc_cache #(
  parameter int SETS         = cache_pkg::SETS,
  parameter int WAYS         = cache_pkg::WAYS,
  parameter int TAG_W        = cache_pkg::TAG_W,
  parameter int LINE_BYTES   = cache_pkg::LINE_BYTES,
  parameter int WORD_W       = cache_pkg::WORD_W,
  parameter int MSHR_ENTRIES = cache_pkg::MSHR_ENTRIES,
  localparam int N      = SETS * WAYS,
  localparam int AW     = $clog2(N),
  localparam int SW     = $clog2(SETS),
  localparam int WYW    = $clog2(WAYS),
  localparam int WORDS  = LINE_BYTES * 8 / WORD_W,
  localparam int WOW    = $clog2(WORDS),
  localparam int OFFW   = $clog2(LINE_BYTES),
  localparam int ADDR_W = TAG_W + SW + OFFW,
  localparam int LW     = TAG_W + SW,
  localparam int RT     = cache_pkg::hamming_r(TAG_W),
  localparam int CW     = WORD_W + cache_pkg::hamming_r(WORD_W),
  localparam int RW     = AW - 1,
  localparam int COLS   = 2 * (TAG_W + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // CPU side
  input  logic                         req_valid_i,
  output logic                         req_ready_o,
  input  logic                         req_we_i,
  input  logic [ADDR_W-1:0]            req_addr_i,
  input  logic [WORD_W-1:0]            req_wdata_i,
  output logic                         resp_valid_o,
  output logic                         resp_hit_o,
  output logic [WORD_W-1:0]            resp_rdata_o,
  // lower level: fetch request with optional write-back
  output logic                         mreq_valid_o,
  input  logic                         mreq_ready_i,
  output logic [LW-1:0]                mreq_line_o,
  output logic                         mreq_wb_o,
  output logic [LW-1:0]                mreq_wb_line_o,
  output logic [WORDS-1:0][WORD_W-1:0] mreq_wb_data_o,
  // lower level: refill
  input  logic                         fill_valid_i,
  output logic                         fill_ready_o,
  input  logic [LW-1:0]                fill_line_i,
  input  logic [WORDS-1:0][WORD_W-1:0] fill_data_i,
  // soft-error injection into one physical tag row
  input  logic                         inj_en_i,
  input  logic [RW-1:0]                inj_row_i,
  input  logic [COLS-1:0]              inj_mask_i,
  // error-handling status
  output logic                         global_err_o,
  output logic                         corr_busy_o,
  output logic                         corr_fix_o,
  output logic                         false_miss_o,
  output logic                         fill_drop_o,
  output logic [$clog2(MSHR_ENTRIES+1)-1:0] mshr_count_o
);
  // ---------------------------------------------------------------- state
  logic [N-1:0]   valid, dirty, rsv;
  logic [WYW-1:0] rr [SETS];

  // ------------------------------------------------------- request decode
  logic [TAG_W-1:0] q_tag;
  logic [SW-1:0]    q_set;
  logic [WOW-1:0]   q_word;
  assign q_tag  = req_addr_i[ADDR_W-1 -: TAG_W];
  assign q_set  = req_addr_i[OFFW +: SW];
  assign q_word = req_addr_i[OFFW-1 -: WOW];

  logic fill_go, accept, b_hold;

  // ---------------------------------------------------------- tag memory
  logic [WAYS-1:0]  match;
  logic [AW-1:0]    vt_addr;
  logic [TAG_W-1:0] vt_tag_raw, vt_tag;
  logic             vt_par;
  logic [RT-1:0]    vt_chk;
  logic [AW-1:0]    c_rd_addr;
  logic [TAG_W-1:0] c_rd_tag;
  logic             c_rd_par;
  logic [RT-1:0]    c_rd_chk;
  logic             t_wr_en, c_wr_en;
  logic [AW-1:0]    t_wr_addr, c_wr_addr;
  logic [TAG_W-1:0] t_wr_tag, c_wr_tag;
  logic             t_wr_par, c_wr_par;
  logic [RT-1:0]    t_wr_chk, c_wr_chk, fill_chk;
  logic [N-1:0]     err;

  tag_cam #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .R(RT)) u_tag (
    .clk, .rst_n,
    .srch_set_i(q_set), .srch_tag_i(q_tag), .match_o(match),
    .rda_addr_i(vt_addr), .rda_tag_o(vt_tag_raw), .rda_par_o(vt_par), .rda_chk_o(vt_chk),
    .rdb_addr_i(c_rd_addr), .rdb_tag_o(c_rd_tag), .rdb_par_o(c_rd_par), .rdb_chk_o(c_rd_chk),
    .wr_en_i(t_wr_en), .wr_addr_i(t_wr_addr), .wr_tag_i(t_wr_tag), .wr_par_i(t_wr_par),
    .wr_chk_i(t_wr_chk),
    .inj_en_i, .inj_row_i, .inj_mask_i,
    .err_o(err));

  // ------------------------------------- error address generation + engine
  logic [AW-2:0] grp_addr;
  logic          grp_valid, c_cancel_en, c_done;
  logic [LW-1:0] c_cancel_line;

  err_addr_gen #(.N(N)) u_eag (
    .clk, .rst_n, .err_i(err), .global_err_o(global_err_o),
    .grp_addr_o(grp_addr), .grp_valid_o(grp_valid));

  corr_ctrl #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .R(RT)) u_corr (
    .clk, .rst_n, .grp_addr_i(grp_addr), .grp_valid_i(grp_valid),
    .rd_addr_o(c_rd_addr), .rd_tag_i(c_rd_tag), .rd_par_i(c_rd_par), .rd_chk_i(c_rd_chk),
    .rd_line_valid_i(valid[c_rd_addr]),
    .wr_en_o(c_wr_en), .wr_addr_o(c_wr_addr), .wr_tag_o(c_wr_tag), .wr_par_o(c_wr_par),
    .wr_chk_o(c_wr_chk),
    .cancel_en_o(c_cancel_en), .cancel_line_o(c_cancel_line),
    .busy_o(corr_busy_o), .fix_o(corr_fix_o), .done_o(c_done));

  // ------------------------------------------------- hit/miss, victim, ECC
  logic             hit;
  logic [WYW-1:0]   hit_way, victim;
  logic             victim_ok, victim_rr;
  logic [WAYS-1:0]  set_valid, set_rsv, set_free;
  logic [CW-1:0]    a_rdata, wr_cw;
  logic [WORDS-1:0][CW-1:0]     b_rdata, fill_cw;
  logic [WORDS-1:0][WORD_W-1:0] wb_line;
  logic             rd_corrected;

  assign set_valid = valid[int'(q_set) * WAYS +: WAYS];
  assign set_rsv   = rsv[int'(q_set) * WAYS +: WAYS];
  assign set_free  = ~set_valid & ~set_rsv;

  always_comb begin
    victim    = rr[q_set];
    victim_rr = 1'b1;
    for (int w = WAYS - 1; w >= 0; w--)
      if (set_free[w]) begin
        victim    = WYW'(w);
        victim_rr = 1'b0;
      end
    victim_ok = !set_rsv[victim];
  end
  assign vt_addr = {q_set, victim};

  hit_miss_ecc #(.WAYS(WAYS), .TAG_W(TAG_W), .WORD_W(WORD_W), .WORDS(WORDS)) u_hme (
    .match_i(match), .valid_i(set_valid), .hit_o(hit), .hit_way_o(hit_way),
    .vt_tag_i(vt_tag_raw), .vt_chk_i(vt_chk), .vt_tag_o(vt_tag),
    .fill_tag_i(fill_line_i[LW-1 -: TAG_W]), .fill_chk_o(fill_chk),
    .rd_cw_i(a_rdata), .rd_word_o(resp_rdata_o), .rd_corrected_o(rd_corrected),
    .wr_word_i(req_wdata_i), .wr_cw_o(wr_cw),
    .wb_cw_i(b_rdata), .wb_line_o(wb_line),
    .fill_line_i(fill_data_i), .fill_cw_o(fill_cw));

  // ----------------------------------------------------------------- MSHR
  logic           alloc_en, alloc_ok, m_hit, m_full, fill_hit, cancel_hit;
  logic [WYW-1:0] fill_way, cancel_way;

  assign alloc_en = accept && !hit && victim_ok;

  mshr #(.ENTRIES(MSHR_ENTRIES), .LW(LW), .WYW(WYW)) u_mshr (
    .clk, .rst_n,
    .alloc_en_i(alloc_en), .alloc_line_i({q_tag, q_set}), .alloc_way_i(victim),
    .hit_o(m_hit), .full_o(m_full), .alloc_ok_o(alloc_ok),
    .fill_en_i(fill_go), .fill_line_i(fill_line_i), .fill_hit_o(fill_hit), .fill_way_o(fill_way),
    .cancel_en_i(c_cancel_en), .cancel_line_i(c_cancel_line),
    .cancel_hit_o(cancel_hit), .cancel_way_o(cancel_way),
    .count_o(mshr_count_o));

  // ------------------------------------------------------------ handshakes
  assign fill_ready_o = !global_err_o && !corr_busy_o;
  assign fill_go      = fill_valid_i && fill_ready_o;
  assign req_ready_o  = !b_hold && !fill_go;
  assign accept       = req_valid_i && req_ready_o;

  // ---------------------------------------------------------- data memory
  logic [SW-1:0] fill_set;
  logic [AW-1:0] fill_w;
  assign fill_set = fill_line_i[SW-1:0];
  assign fill_w   = {fill_set, fill_way};

  data_mem #(.LINES(N), .WORDS(WORDS), .CW(CW)) u_data (
    .clk,
    .a_en_i(accept && hit), .a_we_i(req_we_i), .a_line_i({q_set, hit_way}), .a_word_i(q_word),
    .a_wdata_i(wr_cw), .a_rdata_o(a_rdata),
    .b_en_i((fill_go && fill_hit) || (accept && alloc_ok)), .b_we_i(fill_go),
    .b_line_i(fill_go ? fill_w : {q_set, victim}), .b_wdata_i(fill_cw), .b_rdata_o(b_rdata));

  // tag write port: correction engine first, refills otherwise
  always_comb begin
    if (c_wr_en) begin
      t_wr_en = 1'b1;      t_wr_addr = c_wr_addr;
      t_wr_tag = c_wr_tag; t_wr_par = c_wr_par; t_wr_chk = c_wr_chk;
    end else begin
      t_wr_en  = fill_go && fill_hit;
      t_wr_addr = fill_w;
      t_wr_tag = fill_line_i[LW-1 -: TAG_W];
      t_wr_par = ^fill_line_i[LW-1 -: TAG_W];
      t_wr_chk = fill_chk;
    end
  end

  // ---------------------------------------------- line state and stage B
  logic          b_resp, b_hit, b_mreq, b_wb;
  logic [LW-1:0] b_line, b_wb_line;
  logic [AW-1:0] victim_w, hit_w;
  assign victim_w = {q_set, victim};
  assign hit_w    = {q_set, hit_way};
  assign b_hold   = b_mreq && !mreq_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= '0;
      dirty     <= '0;
      rsv       <= '0;
      for (int s = 0; s < SETS; s++) rr[s] <= '0;
      b_resp    <= 1'b0;
      b_hit     <= 1'b0;
      b_mreq    <= 1'b0;
      b_wb      <= 1'b0;
      b_line    <= '0;
      b_wb_line <= '0;
    end else begin
      b_resp <= accept;
      if (accept) b_hit <= hit;
      if (accept && hit && req_we_i) dirty[hit_w] <= 1'b1;
      if (alloc_ok) begin
        valid[victim_w] <= 1'b0;
        dirty[victim_w] <= 1'b0;
        rsv[victim_w]   <= 1'b1;
        if (victim_rr) rr[q_set] <= rr[q_set] + 1'b1;
        b_line    <= {q_tag, q_set};
        b_wb      <= valid[victim_w] && dirty[victim_w];
        b_wb_line <= {vt_tag, q_set};
      end
      if (alloc_ok)          b_mreq <= 1'b1;
      else if (mreq_ready_i) b_mreq <= 1'b0;
      if (fill_go && fill_hit) begin
        valid[fill_w] <= 1'b1;
        dirty[fill_w] <= 1'b0;
        rsv[fill_w]   <= 1'b0;
      end
      if (cancel_hit) rsv[{c_cancel_line[SW-1:0], cancel_way}] <= 1'b0;
    end
  end

  assign resp_valid_o   = b_resp;
  assign resp_hit_o     = b_hit;
  assign mreq_valid_o   = b_mreq;
  assign mreq_line_o    = b_line;
  assign mreq_wb_o      = b_wb;
  assign mreq_wb_line_o = b_wb_line;
  assign mreq_wb_data_o = wb_line;
  assign false_miss_o   = cancel_hit;
  assign fill_drop_o    = fill_go && !fill_hit;

  logic unused;
  assign unused = vt_par ^ m_hit ^ m_full ^ c_done ^ rd_corrected ^ (|req_addr_i[OFFW-WOW-1:0]);

  // A refill is never taken while the correction engine owns the tag port.
  a_tag_port: assert property (@(posedge clk) disable iff (!rst_n)
    !(c_wr_en && fill_go && fill_hit))
    else $error("mbc_cache: tag write port conflict");
endmodule
