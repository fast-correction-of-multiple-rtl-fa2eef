// tb_error_addr_encoder: drives every one-hot active-low input of the
// address encoder and checks the encoded index and the valid flag; also
// the idle (all ones) input.
module tb_error_addr_encoder;
  localparam int G = 16, GW = $clog2(G);
  logic [G-1:0] gerr_n; logic [GW-1:0] addr; logic valid;
  error_addr_encoder #(.G(G)) dut (.gerr_n_i(gerr_n), .addr_o(addr), .valid_o(valid));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    gerr_n = '1; #1;
    checks++; if (valid !== 1'b0) begin failures++; $display("FAIL idle valid"); end
    for (int i = 0; i < G; i++) begin
      gerr_n = ~(G'(1) << i); #1;
      checks++;
      if (valid !== 1'b1 || addr !== GW'(i)) begin
        failures++; $display("FAIL i=%0d addr=%0d valid=%b", i, addr, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
