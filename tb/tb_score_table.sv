// tb_score_table: default contents (+1 on identical characters, -1
// otherwise) for DNA and for a 5-bit protein alphabet, then reload of
// entries through the write port and reset back to defaults.
module tb_score_table;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2; logic signed [7:0] s2;
  logic we2; logic [3:0] wa2; logic signed [7:0] ws2;
  score_table #(.CHAR_W(2)) u_dna (.clk, .rst_n, .a(a2), .b(b2), .score(s2),
                                   .wr_en(we2), .wr_addr(wa2), .wr_score(ws2));
  logic [4:0] a5, b5; logic signed [7:0] s5;
  score_table #(.CHAR_W(5), .MATCH(5), .MISMATCH(-4)) u_prot (.clk, .rst_n, .a(a5), .b(b5), .score(s5),
                                   .wr_en(1'b0), .wr_addr('0), .wr_score('0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    we2 = 0; wa2 = 0; ws2 = 0; a2 = 0; b2 = 0; a5 = 0; b5 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) begin
      a2 = 2'(x); b2 = 2'(y); #1;
      check(s2 == ((x == y) ? 8'sd1 : -8'sd1), $sformatf("dna %0d %0d -> %0d", x, y, s2));
    end
    for (int x = 0; x < 20; x++) for (int y = 0; y < 20; y++) begin
      a5 = 5'(x); b5 = 5'(y); #1;
      check(s5 == ((x == y) ? 8'sd5 : -8'sd4), $sformatf("protein %0d %0d -> %0d", x, y, s5));
    end
    // reload: a transition/transversion style matrix
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); we2 = 1; wa2 = 4'(k); ws2 = 8'(k - 8);
    end
    @(negedge clk); we2 = 0;
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) begin
      a2 = 2'(x); b2 = 2'(y); #1;
      check(s2 == 8'(x * 4 + y - 8), $sformatf("reloaded %0d %0d -> %0d", x, y, s2));
    end
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    a2 = 1; b2 = 1; #1; check(s2 == 8'sd1, "reset restores match");
    a2 = 1; b2 = 2; #1; check(s2 == -8'sd1, "reset restores mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
