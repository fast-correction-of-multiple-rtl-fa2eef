// hit_miss_ecc: hit/miss and ECC logic of the cache.
// Hit/miss: the match lines of the searched set are qualified by the line
// valid bits; hit_o is their OR and hit_way_o the binary index of the
// matching way (the lowest, if a corrupted tag ever made two match).
// ECC: single-error-correcting Hamming codes, one per tag word and one per
// CPU word of a data line. This block encodes what is written (CPU word,
// fill line, fill tag) and corrects what is read (CPU word, write-back line,
// victim tag), so that everything leaving the cache is error corrected.
// All combinational. The original scheme names this block only; its contents are
// this design's.
module hit_miss_ecc #(
  parameter int WAYS   = cache_pkg::WAYS,
  parameter int TAG_W  = cache_pkg::TAG_W,
  parameter int WORD_W = cache_pkg::WORD_W,
  parameter int WORDS  = cache_pkg::LINE_BYTES * 8 / cache_pkg::WORD_W,
  localparam int RT  = cache_pkg::hamming_r(TAG_W),
  localparam int RD  = cache_pkg::hamming_r(WORD_W),
  localparam int CW  = WORD_W + RD,
  localparam int WYW = $clog2(WAYS)
) (
  // hit / miss
  input  logic [WAYS-1:0]              match_i,
  input  logic [WAYS-1:0]              valid_i,
  output logic                         hit_o,
  output logic [WYW-1:0]               hit_way_o,
  // tag ECC
  input  logic [TAG_W-1:0]             vt_tag_i,
  input  logic [RT-1:0]                vt_chk_i,
  output logic [TAG_W-1:0]             vt_tag_o,
  input  logic [TAG_W-1:0]             fill_tag_i,
  output logic [RT-1:0]                fill_chk_o,
  // data ECC
  input  logic [CW-1:0]                rd_cw_i,
  output logic [WORD_W-1:0]            rd_word_o,
  output logic                         rd_corrected_o,
  input  logic [WORD_W-1:0]            wr_word_i,
  output logic [CW-1:0]                wr_cw_o,
  input  logic [WORDS-1:0][CW-1:0]     wb_cw_i,
  output logic [WORDS-1:0][WORD_W-1:0] wb_line_o,
  input  logic [WORDS-1:0][WORD_W-1:0] fill_line_i,
  output logic [WORDS-1:0][CW-1:0]     fill_cw_o
);
  logic [WAYS-1:0] hv;
  always_comb begin
    hv        = match_i & valid_i;
    hit_o     = |hv;
    hit_way_o = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (hv[w]) hit_way_o = WYW'(w);
  end

  logic vt_err;
  hamming_dec #(.K(TAG_W), .R(RT)) u_vt_dec (
    .data_i(vt_tag_i), .chk_i(vt_chk_i), .data_o(vt_tag_o), .err_o(vt_err));
  hamming_enc #(.K(TAG_W), .R(RT)) u_ft_enc (.data_i(fill_tag_i), .chk_o(fill_chk_o));

  hamming_dec #(.K(WORD_W), .R(RD)) u_rd_dec (
    .data_i(rd_cw_i[WORD_W-1:0]), .chk_i(rd_cw_i[CW-1:WORD_W]),
    .data_o(rd_word_o), .err_o(rd_corrected_o));
  hamming_enc #(.K(WORD_W), .R(RD)) u_wr_enc (.data_i(wr_word_i), .chk_o(wr_cw_o[CW-1:WORD_W]));
  assign wr_cw_o[WORD_W-1:0] = wr_word_i;

  logic [WORDS-1:0] wb_err;
  for (genvar i = 0; i < WORDS; i++) begin : g_line
    hamming_dec #(.K(WORD_W), .R(RD)) u_wb_dec (
      .data_i(wb_cw_i[i][WORD_W-1:0]), .chk_i(wb_cw_i[i][CW-1:WORD_W]),
      .data_o(wb_line_o[i]), .err_o(wb_err[i]));
    hamming_enc #(.K(WORD_W), .R(RD)) u_fl_enc (
      .data_i(fill_line_i[i]), .chk_o(fill_cw_o[i][CW-1:WORD_W]));
    assign fill_cw_o[i][WORD_W-1:0] = fill_line_i[i];
  end

  logic unused;
  assign unused = vt_err ^ (|wb_err);
endmodule
