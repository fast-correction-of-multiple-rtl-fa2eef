// hamming_dec: corrector of the single-error-correcting Hamming code made
// by hamming_enc. The syndrome is the stored check bits XOR the check bits
// recomputed from the data; a non-zero syndrome is the codeword position of
// the flipped bit, and a data bit at that position is inverted. A flipped
// check bit gives a syndrome that names no data bit and leaves the data
// alone. Purely combinational; err_o flags a non-zero syndrome.
module hamming_dec #(
  parameter int K = 24,
  parameter int R = cache_pkg::hamming_r(K)
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] chk_i,
  output logic [K-1:0] data_o,
  output logic         err_o
);
  logic [R-1:0] syn;
  for (genvar j = 0; j < R; j++) begin : g_syn
    localparam logic [K-1:0] MASK = K'(cache_pkg::hamming_mask(K, j));
    assign syn[j] = chk_i[j] ^ (^(data_i & MASK));
  end
  for (genvar i = 0; i < K; i++) begin : g_fix
    localparam logic [R-1:0] POS = R'(cache_pkg::hamming_pos(i));
    assign data_o[i] = data_i[i] ^ (syn == POS);
  end
  assign err_o = |syn;
endmodule
