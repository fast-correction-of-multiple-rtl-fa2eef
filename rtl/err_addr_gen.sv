// err_addr_gen: error signal / address generation block.
// Takes the per-word Err vector of the tag memory and gives the correction
// engine the address of the word group where correction must start.
// Two pipeline stages, matching the PAR and ENC stages of the correction
// timeline: the Err vector is registered (PAR, the parity chains settle),
// then passed through the pre-coder and the address encoder and registered
// again (ENC). grp_addr_o/grp_valid_o are therefore two cycles behind the
// tag cells. global_err_o is the unregistered OR of all Err signals, the
// global error signal of the block. Group g covers tag words 2g and 2g+1.
// One register per stage is this design's timing choice.
module err_addr_gen #(
  parameter int N = cache_pkg::SETS * cache_pkg::WAYS,
  localparam int G  = N / 2,
  localparam int GW = $clog2(G)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  err_i,
  output logic          global_err_o,
  output logic [GW-1:0] grp_addr_o,
  output logic          grp_valid_o
);
  logic [N-1:0]  err_q;
  logic [G-1:0]  gerr_n;
  logic [GW-1:0] enc_addr;
  logic          enc_valid;

  error_precoder #(.N(N)) u_pre (.err_i(err_q), .gerr_n_o(gerr_n));
  error_addr_encoder #(.G(G)) u_enc (.gerr_n_i(gerr_n), .addr_o(enc_addr), .valid_o(enc_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q       <= '0;
      grp_addr_o  <= '0;
      grp_valid_o <= 1'b0;
    end else begin
      err_q       <= err_i;
      grp_addr_o  <= enc_addr;
      grp_valid_o <= enc_valid;
    end
  end

  assign global_err_o = |err_i;
endmodule
