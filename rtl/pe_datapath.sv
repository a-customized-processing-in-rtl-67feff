// pe_datapath: one-cell Needleman-Wunsch datapath of a processing element.
//
// Computes one DP matrix cell per invocation following Eq. (1):
//   DP(i,j) = max( NW + T(a_i,b_j), North + gap, West + gap )
// Registers A, B and North are loaded from memory by the AGU. West holds the
// previous result of the same row (the Max output is fed back into it) and
// North-West receives the old North value each time a cell is computed, so
// only North, A and B come from memory. T comes from score_table through the
// hash of the two characters. The register set, the feedback paths and the
// one-cycle latency follow the design description; the gap value is a
// parameter (default -1 as in the description).
//
// Choices of this design: row_init loads West and North-West with the gap
// boundary of a new row (DP(i,-1) and DP(i-1,-1)), because the boundary row
// and column are not stored in memory. On equal candidates the diagonal wins
// over North, and North over West.
//
// Timing: loads (ld_a, ld_b, ld_north, row_init) take effect at the clock
// edge. A start pulse computes from the registers as they are in that cycle;
// value and direction are registered at that edge and valid is high for the
// following cycle (latency one cycle).
module pe_datapath #(
  parameter int unsigned CHAR_W  = pim_pkg::CHAR_W,
  parameter int unsigned DP_W    = pim_pkg::DP_W,
  parameter int unsigned SCORE_W = 8,
  parameter int          MATCH   = 1,
  parameter int          MISMATCH = -1,
  parameter int          GAP     = -1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // register loads from the AGU
  input  logic                      ld_a,
  input  logic [CHAR_W-1:0]         a_in,
  input  logic                      ld_b,
  input  logic [CHAR_W-1:0]         b_in,
  input  logic                      ld_north,
  input  logic signed [DP_W-1:0]    north_in,
  input  logic                      row_init,
  input  logic signed [DP_W-1:0]    west_init,
  input  logic signed [DP_W-1:0]    nw_init,
  // handshake
  input  logic                      start,     // data_ready from the AGU
  output logic                      valid,
  output logic signed [DP_W-1:0]    value,
  output pim_pkg::dir_e             direction,
  // score table programming
  input  logic                      st_wr_en,
  input  logic [2*CHAR_W-1:0]       st_wr_addr,
  input  logic signed [SCORE_W-1:0] st_wr_score
);

  logic [CHAR_W-1:0]         a_q, b_q;
  logic signed [DP_W-1:0]    north_q, west_q, nw_q;
  logic signed [SCORE_W-1:0] t_ij;
  logic signed [DP_W-1:0]    cand_diag, cand_north, cand_west, max_v;
  pim_pkg::dir_e             max_d;

  score_table #(
    .CHAR_W(CHAR_W), .SCORE_W(SCORE_W), .MATCH(MATCH), .MISMATCH(MISMATCH)
  ) u_score (
    .clk, .rst_n,
    .a(a_q), .b(b_q), .score(t_ij),
    .wr_en(st_wr_en), .wr_addr(st_wr_addr), .wr_score(st_wr_score)
  );

  // Three adders and the Max unit.
  always_comb begin
    cand_diag  = nw_q + DP_W'(t_ij);
    cand_north = north_q + DP_W'(GAP);
    cand_west  = west_q + DP_W'(GAP);
    max_v = cand_diag;
    max_d = pim_pkg::DIR_DIAG;
    if (cand_north > max_v) begin
      max_v = cand_north;
      max_d = pim_pkg::DIR_NORTH;
    end
    if (cand_west > max_v) begin
      max_v = cand_west;
      max_d = pim_pkg::DIR_WEST;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      north_q   <= '0;
      west_q    <= '0;
      nw_q      <= '0;
      value     <= '0;
      direction <= pim_pkg::DIR_DIAG;
      valid     <= 1'b0;
    end else begin
      valid <= start;
      if (ld_a)     a_q     <= a_in;
      if (ld_b)     b_q     <= b_in;
      if (ld_north) north_q <= north_in;
      if (row_init) begin
        west_q <= west_init;
        nw_q   <= nw_init;
      end
      if (start) begin
        value     <= max_v;
        direction <= max_d;
        west_q    <= max_v;     // Max output forwarded to West
        nw_q      <= north_q;   // old North becomes North-West
      end
    end
  end

  a_no_load_during_start: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && (row_init || ld_north || ld_a || ld_b)));

endmodule
