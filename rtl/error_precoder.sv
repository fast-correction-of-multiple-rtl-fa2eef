// error_precoder: pre-coder of the error address generator.
// Err signals of two adjacent tag words (2i, 2i+1) are ORed into a group
// error, which halves the size of the encoder that follows. Each group is
// then gated by the group above it: the active-low output gerr_n_o[i] is 0
// only when group i has an error and group i+1 has none; the topmost group
// is gated by a constant 1. Because an upset corrupts only adjacent words,
// the corrupted words form one run and exactly one output goes low: the
// group holding the highest corrupted word, where correction starts.
// Structure (OR, invert, 2-input gate per group; active-low GERR') follows
// the original scheme; the implementation is plain combinational logic.
module error_precoder #(
  parameter int N = cache_pkg::SETS * cache_pkg::WAYS,
  localparam int G = N / 2
) (
  input  logic [N-1:0] err_i,
  output logic [G-1:0] gerr_n_o
);
  logic [G-1:0] grp;
  always_comb begin
    for (int i = 0; i < G; i++) grp[i] = err_i[2*i] | err_i[2*i + 1];
    for (int i = 0; i < G - 1; i++) gerr_n_o[i] = ~(grp[i] & ~grp[i + 1]);
    gerr_n_o[G-1] = ~(grp[G-1] & 1'b1);
  end
endmodule
