// tb_hit_miss_ecc: checks the hit/miss and ECC logic. Hit/miss: random
// match and valid vectors against the lowest qualified way. ECC: words and
// tags are encoded by the block, one random bit of the data or check part
// is flipped (or none), and the block's corrector must return the original
// value; every encoded check bit is also compared with a reference Hamming
// encoder written here independently.
module tb_hit_miss_ecc;
  localparam int WAYS = 8, TAG_W = 24, WORD_W = 32, WORDS = 4;
  localparam int RT = cache_pkg::hamming_r(TAG_W), RD = cache_pkg::hamming_r(WORD_W);
  localparam int CW = WORD_W + RD;
  logic [WAYS-1:0] match, valid; logic hit; logic [2:0] hit_way;
  logic [TAG_W-1:0] vt_tag, vt_tag_o, fill_tag; logic [RT-1:0] vt_chk, fill_chk;
  logic [CW-1:0] rd_cw, wr_cw; logic [WORD_W-1:0] rd_word, wr_word; logic rd_corr;
  logic [WORDS-1:0][CW-1:0] wb_cw, fill_cw; logic [WORDS-1:0][WORD_W-1:0] wb_line, fill_line;
  hit_miss_ecc #(.WAYS(WAYS), .TAG_W(TAG_W), .WORD_W(WORD_W), .WORDS(WORDS)) dut (
    .match_i(match), .valid_i(valid), .hit_o(hit), .hit_way_o(hit_way),
    .vt_tag_i(vt_tag), .vt_chk_i(vt_chk), .vt_tag_o(vt_tag_o),
    .fill_tag_i(fill_tag), .fill_chk_o(fill_chk),
    .rd_cw_i(rd_cw), .rd_word_o(rd_word), .rd_corrected_o(rd_corr),
    .wr_word_i(wr_word), .wr_cw_o(wr_cw), .wb_cw_i(wb_cw), .wb_line_o(wb_line),
    .fill_line_i(fill_line), .fill_cw_o(fill_cw));
  int checks = 0, failures = 0;
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
  function automatic logic [7:0] ref_chk(input logic [63:0] d, input int k, input int r);
    logic [7:0] c; int pos, i;
    c = '0; pos = 0; i = 0;
    while (i < k) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        for (int j = 0; j < r; j++) if ((pos >> j) & 1) c[j] ^= d[i];
        i++;
      end
    end
    return c;
  endfunction
  initial begin
    match = 0; valid = 0; vt_tag = 0; vt_chk = 0; fill_tag = 0; rd_cw = 0; wr_word = 0;
    wb_cw = '0; fill_line = '0;
    for (int it = 0; it < 1000; it++) begin
      logic [WAYS-1:0] q; int ew; int fb;
      logic [WORD_W-1:0] w0; logic [TAG_W-1:0] t0;
      match = WAYS'($urandom); valid = WAYS'($urandom); #1;
      q = match & valid; ew = 0;
      for (int i = WAYS - 1; i >= 0; i--) if (q[i]) ew = i;
      chk(hit == (q != 0) && (q == 0 || hit_way == 3'(ew)), "hit/miss");
      // data word: encode, flip one bit or none, correct
      w0 = $urandom; wr_word = w0; #1;
      chk(wr_cw[CW-1:WORD_W] == RD'(ref_chk(64'(w0), WORD_W, RD)), "word check bits");
      fb = $urandom_range(0, CW);
      rd_cw = wr_cw; if (fb < CW) rd_cw[fb] = ~rd_cw[fb]; #1;
      chk(rd_word == w0 && rd_corr == (fb < CW), "word corrected");
      // tag
      t0 = TAG_W'($urandom); fill_tag = t0; #1;
      chk(fill_chk == RT'(ref_chk(64'(t0), TAG_W, RT)), "tag check bits");
      fb = $urandom_range(0, TAG_W + RT);
      {vt_chk, vt_tag} = {fill_chk, t0};
      if (fb < TAG_W) vt_tag[fb] = ~vt_tag[fb];
      else if (fb < TAG_W + RT) vt_chk[fb - TAG_W] = ~vt_chk[fb - TAG_W];
      #1; chk(vt_tag_o == t0, "tag corrected");
      // line
      for (int i = 0; i < WORDS; i++) fill_line[i] = $urandom;
      #1; wb_cw = fill_cw;
      for (int i = 0; i < WORDS; i++) begin
        fb = $urandom_range(0, CW);
        if (fb < CW) wb_cw[i][fb] = ~wb_cw[i][fb];
      end
      #1; chk(wb_line == fill_line, "line corrected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
