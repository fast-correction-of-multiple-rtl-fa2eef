// tb_err_addr_gen: checks the error signal / address generation block.
// For runs of adjacent corrupted words it expects, two clock edges after
// the Err vector is applied (PAR and ENC stages), the group address of the
// highest corrupted word and a valid flag; global_err must follow Err with
// no delay. Also checks that the output is not ready after only one edge.
module tb_err_addr_gen;
  localparam int N = 32, G = N / 2, GW = $clog2(G);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] err; logic gerr; logic [GW-1:0] addr; logic valid;
  err_addr_gen #(.N(N)) dut (.clk, .rst_n, .err_i(err), .global_err_o(gerr),
                              .grp_addr_o(addr), .grp_valid_o(valid));
  always #5 clk = ~clk;
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
  initial begin
    err = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); @(negedge clk);
    chk(!valid && !gerr, "idle");
    for (int lo = 0; lo < N; lo++)
      for (int len = 1; len <= 4 && lo + len <= N; len++) begin
        int top;
        top = lo + len - 1;
        @(negedge clk); err = ((N'(1) << len) - 1) << lo; #1;
        chk(gerr, "global error immediate");
        @(negedge clk);
        chk(!valid, "not valid after one edge");
        @(negedge clk);
        chk(valid && addr == GW'(top / 2), "group of highest corrupted word");
        err = '0; #1;
        chk(!gerr, "global error clears");
        @(negedge clk); @(negedge clk);
        chk(!valid, "valid clears");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
