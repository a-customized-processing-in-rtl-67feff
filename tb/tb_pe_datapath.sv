// tb_pe_datapath: drives the datapath cell by cell as the AGU does and
// checks every value and direction.
//  * The worked example of aligning "AND" (rows) with "SEND" (columns),
//    match +1, mismatch -1, gap -1, whose DP matrix ends in 0, on a 5-bit
//    alphabet instance.
//  * Random DNA pairs on the default instance against the reference model.
// The result must appear exactly one cycle after start.
module tb_pe_datapath;
  import nw_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // two instances sharing stimulus except the characters
  logic ld_a, ld_b, ld_north, row_init, start;
  logic [4:0] a5, b5;
  logic [1:0] a2, b2;
  logic signed [31:0] north_in, west_init, nw_init;
  logic v5, v2;
  logic signed [31:0] val5, val2;
  pim_pkg::dir_e dir5, dir2;

  pe_datapath #(.CHAR_W(5)) u5 (.clk, .rst_n, .ld_a, .a_in(a5), .ld_b, .b_in(b5),
    .ld_north, .north_in, .row_init, .west_init, .nw_init, .start,
    .valid(v5), .value(val5), .direction(dir5),
    .st_wr_en(1'b0), .st_wr_addr('0), .st_wr_score('0));
  pe_datapath u2 (.clk, .rst_n, .ld_a, .a_in(a2), .ld_b, .b_in(b2),
    .ld_north, .north_in, .row_init, .west_init, .nw_init, .start,
    .valid(v2), .value(val2), .direction(dir2),
    .st_wr_en(1'b0), .st_wr_addr('0), .st_wr_score('0));

  // Align a (rows) with b (columns); returns the DP matrix computed by the DUT.
  task automatic run(input int a[], input int b[], input bit use5, output int dp[], output int dr[]);
    int m = a.size(), n = b.size();
    dp = new[m*n]; dr = new[m*n];
    for (int i = 0; i < m; i++) for (int j = 0; j < n; j++) begin
      @(negedge clk);
      ld_a = (j == 0); ld_b = 1; row_init = (j == 0);
      a5 = 5'(a[i]); b5 = 5'(b[j]); a2 = 2'(a[i]); b2 = 2'(b[j]);
      west_init = -(i + 1); nw_init = -i;
      ld_north = 1;
      north_in = (i == 0) ? -(j + 1) : dp[(i-1)*n + j];
      @(negedge clk);
      ld_a = 0; ld_b = 0; row_init = 0; ld_north = 0;
      start = 1;
      #1; check(!(use5 ? v5 : v2), "valid before the clock edge");
      @(negedge clk);
      start = 0;
      check(use5 ? v5 : v2, "valid one cycle after start");
      dp[i*n + j] = use5 ? val5 : val2;
      dr[i*n + j] = use5 ? int'(dir5) : int'(dir2);
      @(negedge clk);
      check(!(use5 ? v5 : v2), "valid lasts one cycle");
    end
  endtask

  initial begin
    int a[], b[], dp[], dr[], rdp[], rdr[];
    int fig[12] = '{-1, -2, -3, -4, -2, -2, -1, -2, -3, -3, -2, 0};
    ld_a = 0; ld_b = 0; ld_north = 0; row_init = 0; start = 0;
    a5 = 0; b5 = 0; a2 = 0; b2 = 0; north_in = 0; west_init = 0; nw_init = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // "AND" vs "SEND" with letters as 5-bit codes (A=0 ... Z=25)
    a = '{0, 13, 3};
    b = '{18, 4, 13, 3};
    run(a, b, 1, dp, dr);
    for (int k = 0; k < 12; k++)
      check(dp[k] == fig[k], $sformatf("AND/SEND cell %0d: %0d expected %0d", k, dp[k], fig[k]));
    check(dr[11] == 0, "last cell comes from the diagonal (D matches D)");
    // random DNA
    for (int t = 0; t < 20; t++) begin
      automatic int m = $urandom_range(1, 9);
      automatic int n = $urandom_range(1, 9);
      a = new[m]; b = new[n];
      foreach (a[k]) a[k] = $urandom_range(3);
      foreach (b[k]) b[k] = $urandom_range(3);
      run(a, b, 0, dp, dr);
      nw_fill(a, b, 1, -1, -1, rdp, rdr);
      foreach (rdp[k]) begin
        check(dp[k] == rdp[k], $sformatf("t%0d cell %0d value %0d vs %0d", t, k, dp[k], rdp[k]));
        check(dr[k] == rdr[k], $sformatf("t%0d cell %0d dir %0d vs %0d", t, k, dr[k], rdr[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
