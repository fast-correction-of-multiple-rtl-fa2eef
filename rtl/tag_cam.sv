// tag_cam: CAM tag memory of the cache, built from interleaved tag words
// that each carry one parity bit and drive their own error signal.
//
// Organisation: the SETS*WAYS tag words are stored two to a physical row.
// Row r holds words 2r and 2r+1 with their cells interleaved, C0m at
// column 2m and C1m at column 2m+1; each word's parity bit follows its
// TAG_W tag cells (P0 at column 2*TAG_W, P1 at 2*TAG_W+1), as drawn in the
// original scheme. Two neighbouring cells of a row therefore never belong to the
// same word, so a strike that flips two adjacent cells gives a single-bit
// error in each of two words, which per-word parity detects and the per-word
// single-error ECC corrects. Word address = set*WAYS + way.
//
// err_o[w] is the parity chain of word w: XOR of its tag cells and its
// parity bit, 1 when the word holds an odd number of flips. In silicon this
// is an NMOS pass-gate XOR chain ending in a skewed NAND gate; here it is
// plain combinational XOR, so only its logic function is modelled.
//
// The ECC check bits of every word are kept in a separate, non-searched
// column (chk); they are outside the CAM cells and are not subject to the
// injected upsets (this design's choice; the original scheme does not say where
// the ECC bits live).
//
// Ports: search (srch_set, srch_tag -> match_o, combinational match lines
// of the ways of one set; parity cells do not take part), two combinational
// read ports (a: cache controller, b: correction engine), one write port
// written on the clock edge, and an upset-injection port that XORs a mask
// into one physical row on the clock edge, after any write to it. Reset
// clears all words to tag 0 with correct parity and check bits.
module tag_cam #(
  parameter int SETS  = cache_pkg::SETS,
  parameter int WAYS  = cache_pkg::WAYS,
  parameter int TAG_W = cache_pkg::TAG_W,
  parameter int R     = cache_pkg::hamming_r(TAG_W),
  localparam int N      = SETS * WAYS,
  localparam int ROWS   = N / 2,
  localparam int AW     = $clog2(N),
  localparam int RW     = $clog2(ROWS),
  localparam int SW     = $clog2(SETS),
  localparam int COLS   = 2 * (TAG_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // associative search of one set
  input  logic [SW-1:0]    srch_set_i,
  input  logic [TAG_W-1:0] srch_tag_i,
  output logic [WAYS-1:0]  match_o,
  // read port a
  input  logic [AW-1:0]    rda_addr_i,
  output logic [TAG_W-1:0] rda_tag_o,
  output logic             rda_par_o,
  output logic [R-1:0]     rda_chk_o,
  // read port b
  input  logic [AW-1:0]    rdb_addr_i,
  output logic [TAG_W-1:0] rdb_tag_o,
  output logic             rdb_par_o,
  output logic [R-1:0]     rdb_chk_o,
  // write port
  input  logic             wr_en_i,
  input  logic [AW-1:0]    wr_addr_i,
  input  logic [TAG_W-1:0] wr_tag_i,
  input  logic             wr_par_i,
  input  logic [R-1:0]     wr_chk_i,
  // soft-error injection into the cells of one physical row
  input  logic             inj_en_i,
  input  logic [RW-1:0]    inj_row_i,
  input  logic [COLS-1:0]  inj_mask_i,
  // per-word parity error (Err)
  output logic [N-1:0]     err_o
);
  logic [COLS-1:0] cells [ROWS];
  logic [R-1:0]    chk   [N];

  // Tag (and parity, at index TAG_W) of word w, gathered from its row.
  function automatic logic [TAG_W:0] word_of(input logic [COLS-1:0] row, input logic odd);
    logic [TAG_W:0] v;
    for (int m = 0; m <= TAG_W; m++) v[m] = row[2*m + int'(odd)];
    return v;
  endfunction

  // Row with the cells of one of its words replaced.
  function automatic logic [COLS-1:0] put_word(input logic [COLS-1:0] row, input logic odd,
                                               input logic [TAG_W:0] v);
    logic [COLS-1:0] r;
    r = row;
    for (int m = 0; m <= TAG_W; m++) r[2*m + int'(odd)] = v[m];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) cells[r] <= '0;
      for (int w = 0; w < N; w++)    chk[w]   <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        logic [COLS-1:0] nxt;
        nxt = cells[r];
        if (wr_en_i && wr_addr_i[AW-1:1] == RW'(r))
          nxt = put_word(nxt, wr_addr_i[0], {wr_par_i, wr_tag_i});
        if (inj_en_i && inj_row_i == RW'(r))
          nxt = nxt ^ inj_mask_i;
        cells[r] <= nxt;
      end
      if (wr_en_i) chk[wr_addr_i] <= wr_chk_i;
    end
  end

  // Match lines of the searched set.
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      logic [TAG_W:0] v;
      int unsigned a;
      a = int'(srch_set_i) * WAYS + w;
      v = word_of(cells[a / 2], a[0]);
      // parity cell v[TAG_W] does not take part in the match
      match_o[w] = (v == {v[TAG_W], srch_tag_i});
    end
  end

  // Read ports.
  always_comb begin
    logic [TAG_W:0] va, vb;
    va = word_of(cells[rda_addr_i[AW-1:1]], rda_addr_i[0]);
    vb = word_of(cells[rdb_addr_i[AW-1:1]], rdb_addr_i[0]);
    {rda_par_o, rda_tag_o} = va;
    {rdb_par_o, rdb_tag_o} = vb;
    rda_chk_o = chk[rda_addr_i];
    rdb_chk_o = chk[rdb_addr_i];
  end

  // Parity chains, one per word.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      err_o[2*r]     = ^word_of(cells[r], 1'b0);
      err_o[2*r + 1] = ^word_of(cells[r], 1'b1);
    end
  end
endmodule
