// error_addr_encoder: plain (non-priority) binary encoder of the active-low,
// at most one-hot group error vector produced by error_precoder. Output bit b
// is the OR of every active input whose index has bit b set, so a single
// active input gives its index; valid_o is the OR of all inputs. Priority is
// resolved earlier by the pre-coder, which is what keeps this encoder simple.
// Combinational.
module error_addr_encoder #(
  parameter int G = cache_pkg::SETS * cache_pkg::WAYS / 2,
  localparam int GW = $clog2(G)
) (
  input  logic [G-1:0]  gerr_n_i,
  output logic [GW-1:0] addr_o,
  output logic          valid_o
);
  always_comb begin
    addr_o = '0;
    for (int i = 0; i < G; i++)
      if (!gerr_n_i[i]) addr_o = addr_o | GW'(i);
    valid_o = ~&gerr_n_i;
  end
endmodule
