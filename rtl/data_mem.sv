// data_mem: data memory of the cache, one line per tag word
// (line index = set*WAYS + way). Each line holds WORDS codewords of CW bits
// (a CPU word plus its ECC check bits; encoding and correction are done in
// hit_miss_ecc). Two synchronous ports:
//   a  one codeword of one line, read or written (CPU hits);
//   b  a whole line, read or written (victim write-back read, fill write).
// Read data appears one cycle after the request and holds until the next
// read on that port. No reset: every line is written by a fill before it
// is read for use. The original scheme only names the data memory; the port
// structure is this design's.
module data_mem #(
  parameter int LINES = cache_pkg::SETS * cache_pkg::WAYS,
  parameter int WORDS = cache_pkg::LINE_BYTES * 8 / cache_pkg::WORD_W,
  parameter int CW    = cache_pkg::WORD_W + cache_pkg::hamming_r(cache_pkg::WORD_W),
  localparam int LAW  = $clog2(LINES),
  localparam int WAW  = $clog2(WORDS)
) (
  input  logic                      clk,
  // port a: one codeword
  input  logic                      a_en_i,
  input  logic                      a_we_i,
  input  logic [LAW-1:0]            a_line_i,
  input  logic [WAW-1:0]            a_word_i,
  input  logic [CW-1:0]             a_wdata_i,
  output logic [CW-1:0]             a_rdata_o,
  // port b: a whole line
  input  logic                      b_en_i,
  input  logic                      b_we_i,
  input  logic [LAW-1:0]            b_line_i,
  input  logic [WORDS-1:0][CW-1:0]  b_wdata_i,
  output logic [WORDS-1:0][CW-1:0]  b_rdata_o
);
  logic [WORDS-1:0][CW-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (a_en_i) begin
      if (a_we_i) mem[a_line_i][a_word_i] <= a_wdata_i;
      else        a_rdata_o <= mem[a_line_i][a_word_i];
    end
    if (b_en_i) begin
      if (b_we_i) mem[b_line_i] <= b_wdata_i;
      else        b_rdata_o <= mem[b_line_i];
    end
  end
endmodule
