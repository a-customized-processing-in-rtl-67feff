// score_table: substitution score T(i,j) for a pair of sequence characters.
//
// The two head characters are combined by a hash into one table address and
// the table returns the score of that pair. As in the design description,
// the table is filled with +1 for a match (identical characters) and -1 for a
// mismatch; for a 20-letter protein alphabet CHAR_W is raised to 5 and the
// table can be reloaded with any substitution matrix through the write port.
// The hash is the concatenation {a, b}, which is collision free; the write
// port and the concatenation hash are this design's choices.
//
// Interface: score is combinational from a and b. A write (wr_en, wr_addr,
// wr_score) takes effect at the next clock edge. Reset restores the
// match/mismatch contents.
module score_table #(
  parameter int unsigned CHAR_W   = 2,
  parameter int unsigned SCORE_W  = 8,
  parameter int          MATCH    = 1,
  parameter int          MISMATCH = -1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [CHAR_W-1:0]         a,
  input  logic [CHAR_W-1:0]         b,
  output logic signed [SCORE_W-1:0] score,
  input  logic                      wr_en,
  input  logic [2*CHAR_W-1:0]       wr_addr,
  input  logic signed [SCORE_W-1:0] wr_score
);

  localparam int unsigned ENTRIES = 1 << (2 * CHAR_W);

  logic signed [SCORE_W-1:0] table_q [ENTRIES];
  logic [2*CHAR_W-1:0]       addr;

  // Hash function: pack the two characters into one table address.
  assign addr  = {a, b};
  assign score = table_q[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < ENTRIES; k++) begin
        table_q[k] <= ((k >> CHAR_W) == (k % (1 << CHAR_W))) ? SCORE_W'(MATCH)
                                                              : SCORE_W'(MISMATCH);
      end
    end else if (wr_en) begin
      table_q[wr_addr] <= wr_score;
    end
  end

endmodule
