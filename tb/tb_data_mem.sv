// tb_data_mem: random word writes/reads on port a and line writes/reads on
// port b of a small data memory, checked against a model array. Read data
// is checked one cycle after the read and must hold while the port is idle.
module tb_data_mem;
  localparam int LINES = 16, WORDS = 4, CW = 10;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we; logic [3:0] a_line, b_line; logic [1:0] a_word;
  logic [CW-1:0] a_wdata, a_rdata; logic [WORDS-1:0][CW-1:0] b_wdata, b_rdata;
  data_mem #(.LINES(LINES), .WORDS(WORDS), .CW(CW)) dut (.clk,
    .a_en_i(a_en), .a_we_i(a_we), .a_line_i(a_line), .a_word_i(a_word), .a_wdata_i(a_wdata),
    .a_rdata_o(a_rdata), .b_en_i(b_en), .b_we_i(b_we), .b_line_i(b_line),
    .b_wdata_i(b_wdata), .b_rdata_o(b_rdata));
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
  logic [WORDS-1:0][CW-1:0] m [LINES];
  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_line = 0; b_line = 0; a_word = 0;
    a_wdata = 0; b_wdata = 0;
    // fill every line through port b
    for (int l = 0; l < LINES; l++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_line = 4'(l);
      for (int w = 0; w < WORDS; w++) b_wdata[w] = CW'($urandom);
      m[l] = b_wdata;
    end
    @(negedge clk); b_en = 0;
    for (int it = 0; it < 2000; it++) begin
      logic [CW-1:0] ea; logic [WORDS-1:0][CW-1:0] eb; bit ra, rb;
      @(negedge clk);
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1);
      a_line = 4'($urandom); a_word = 2'($urandom); a_wdata = CW'($urandom);
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      b_line = 4'($urandom);
      if (a_en && a_we && b_en && b_we && a_line == b_line) b_we = 0;  // no write collision
      for (int w = 0; w < WORDS; w++) b_wdata[w] = CW'($urandom);
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = m[a_line][a_word]; eb = m[b_line];
      @(posedge clk); #1;
      if (ra) chk(a_rdata == ea, "port a read");
      if (rb) chk(b_rdata == eb, "port b read");
      if (a_en && a_we) m[a_line][a_word] = a_wdata;
      if (b_en && b_we) m[b_line] = b_wdata;
      if (ra) begin
        a_en = 0; b_en = 0;
        @(posedge clk); #1; chk(a_rdata == ea, "port a read data holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
