// tb_error_precoder: checks the pre-coder against an independent model.
// The model finds each run of flagged groups (a group is flagged when
// either of its two words has an error) and expects the active-low output
// low exactly at the top group of each run. Covers the worked example
// (words 3 and 4 corrupted -> only group 2 low), every single run of
// adjacent corrupted words, and random patterns.
module tb_error_precoder;
  localparam int N = 16, G = N / 2;
  logic [N-1:0] err;
  logic [G-1:0] gerr_n;
  error_precoder #(.N(N)) dut (.err_i(err), .gerr_n_o(gerr_n));

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [G-1:0] model(input logic [N-1:0] e);
    logic [G-1:0] g, low;
    for (int i = 0; i < G; i++) g[i] = e[2*i] || e[2*i+1];
    for (int i = 0; i < G; i++) low[i] = g[i] && (i == G-1 || !g[i+1]);
    return ~low;
  endfunction

  task automatic apply(input logic [N-1:0] e);
    err = e; #1;
    checks++;
    if (gerr_n !== model(e)) begin
      failures++;
      $display("FAIL err=%b gerr_n=%b exp=%b", e, gerr_n, model(e));
    end
  endtask

  initial begin
    apply('0);
    apply(N'(1) << 3 | N'(1) << 4);
    checks++;
    if (gerr_n !== {{(G-3){1'b1}}, 1'b0, 2'b11}) begin failures++; $display("FAIL example"); end
    for (int lo = 0; lo < N; lo++)
      for (int len = 1; lo + len <= N; len++)
        apply(((N'(1) << len) - 1) << lo);
    repeat (500) apply(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
