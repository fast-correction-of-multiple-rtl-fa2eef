// hamming_enc: check-bit generator of a single-error-correcting Hamming
// code over K data bits (K <= 256). Data bit i sits at codeword position
// hamming_pos(i) (positions that are not powers of two); check bit j is the
// XOR of all data bits whose position has bit j set, i.e. the parity of
// the data under a constant mask computed at elaboration. Purely
// combinational. The original scheme only asks for an ECC that corrects one bit
// per tag; the choice of a Hamming code is this design's.
module hamming_enc #(
  parameter int K = 24,
  parameter int R = cache_pkg::hamming_r(K)
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] chk_o
);
  for (genvar j = 0; j < R; j++) begin : g_chk
    localparam logic [K-1:0] MASK = K'(cache_pkg::hamming_mask(K, j));
    assign chk_o[j] = ^(data_i & MASK);
  end
endmodule
