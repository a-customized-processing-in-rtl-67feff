// agu: address generation unit of a processing element.
//
// Programmed with one alignment task (start addresses of sequences A and B,
// of the DP matrix and of the direction matrix, and the two lengths), the AGU
// walks the DP matrix row by row (i over A) and column by column (j over B),
// as in the nested loops of the design description: for every cell it
// fetches the A character (once per row), the B character and the North cell
// DP(i-1,j), pulses data_ready (start) to the datapath, and one cycle later
// writes the result to DP(i,j) and the direction to Dir(i,j). agu_ready is
// high while no task is held. Matrices are row-major; DP cells are one 32-bit
// word; Dir is packed 16 two-bit entries per word, entry k of a word in bits
// [2k+1:2k], each row starting a new word. A and B are packed
// CPW = 32 / CHAR_BITS characters per word, character k in bits
// [CHAR_BITS*k +: CHAR_BITS]: 16 for DNA (CHAR_BITS = 2, the default) and 6
// for a 20-letter protein alphabet (CHAR_BITS = 5). A word of A is read once
// per CPW rows, a word of B once per CPW columns and a word of Dir is written
// once per 16 columns or at the end of a row, which is the reduced sequence
// access rate the description asks for. The gap row and column are not stored: the AGU
// supplies those boundary values (multiples of GAP) to the datapath itself.
//
// Structure (this design's own): a read-issue side runs ahead of the compute
// side, pushing read requests into the PE address queue while the read data
// buffer has room (RESP_DEPTH credits); a read of North DP(i-1,j) is only
// issued after the write of DP(i-1,j) has been queued, so the in-order vault
// controller returns the new value. The compute side pops read data in the
// order it was requested, loads the datapath, pulses start and queues the
// write-back. Writes take priority over reads for the single queue slot per
// cycle; both stall while the address or store queue is full. A cell takes
// two cycles (fetch, execute) when data are waiting.
//
// Interface: task_valid/task are taken when agu_ready is high. done pulses
// for one cycle when the last write of the task has been queued; score then
// holds DP(m-1,n-1), the global alignment score.
module agu
  import pim_pkg::*;
#(
  parameter int unsigned CHAR_BITS  = pim_pkg::CHAR_W,
  parameter int unsigned RESP_DEPTH = 8,
  parameter int          GAP        = -1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // task from the scheduler
  input  logic                   task_valid,
  input  pim_task_t              task_in,
  output logic                   agu_ready,
  output logic                   done,
  output logic signed [DP_W-1:0] score,
  // address queue and store queue
  output logic                   rq_push,
  output pe_req_t                rq_data,
  input  logic                   rq_full,
  output logic                   sq_push,
  output logic [WORD_W-1:0]      sq_data,
  input  logic                   sq_full,
  // read data buffer
  input  logic                   rd_valid,
  input  logic [WORD_W-1:0]      rd_data,
  output logic                   rd_pop,
  // datapath
  output logic                   ld_a,
  output logic [CHAR_BITS-1:0]   a_char,
  output logic                   ld_b,
  output logic [CHAR_BITS-1:0]   b_char,
  output logic                   ld_north,
  output logic signed [DP_W-1:0] north,
  output logic                   row_init,
  output logic signed [DP_W-1:0] west_init,
  output logic signed [DP_W-1:0] nw_init,
  output logic                   start,
  input  logic                   dp_valid,
  input  logic signed [DP_W-1:0] dp_value,
  input  dir_e                   dp_dir
);

  localparam int unsigned CW = $clog2(RESP_DEPTH + 1);
  localparam int unsigned CPW    = WORD_W / CHAR_BITS;        // characters per word
  localparam int unsigned PW     = (CPW > 1) ? $clog2(CPW) : 1;
  localparam int unsigned DSEL_W = $clog2(DIRS_PER_WORD);

  function automatic logic [PW-1:0] wrap_inc(input logic [PW-1:0] x);
    return (x == PW'(CPW - 1)) ? '0 : x + 1'b1;
  endfunction

  typedef enum logic [1:0] {C_IDLE, C_FETCH, C_EXEC, C_DRAIN} cstate_e;
  typedef enum logic [1:0] {K_A, K_B, K_N, K_NONE} kind_e;

  // task registers
  logic [LEN_W-1:0]  len_a, len_b;
  logic [ADDR_W-1:0] base_b;

  // ---------------- issue side ----------------
  logic              iss_active;
  logic [LEN_W-1:0]  iss_i, iss_j;
  logic              iss_got_a, iss_got_b;
  logic [PW-1:0]     iss_ai, iss_bj;   // position of i and j inside their words
  logic [63:0]       iss_k;          // linear index of the cell being issued
  logic [ADDR_W-1:0] a_ptr, b_ptr, n_ptr;
  logic [CW-1:0]     outstanding;    // reads issued and not yet popped
  kind_e             iss_kind;
  logic              iss_fire, iss_adv;

  // ---------------- compute side ----------------
  cstate_e           cst;
  logic [LEN_W-1:0]  ci, cj;
  logic              c_got_a, c_got_b, c_got_n;
  logic [PW-1:0]     c_ai, c_bj;
  logic [WORD_W-1:0] a_word, b_word;
  logic signed [DP_W-1:0] row_west, row_nw, col_north;
  kind_e             c_kind;
  logic              c_all;

  // ---------------- write-back ----------------
  logic [ADDR_W-1:0] dp_wptr, dir_wptr;
  logic [63:0]       dp_pushed;
  logic              wb_dp_pending, wb_dir_pending;
  logic [WORD_W-1:0] dir_word;
  logic [LEN_W-1:0]  ex_j;           // column of the cell in the datapath
  logic              ex_last;        // that cell is the last of the task
  logic              wb_dp_want, wb_fire_dp, wb_fire_dir, wq_ok;

  logic task_take;
  logic last_cell_c;

  assign agu_ready = (cst == C_IDLE);
  assign task_take = task_valid && agu_ready;

  // ---------------- write-back pushes ----------------
  assign wq_ok       = !rq_full && !sq_full;
  assign wb_dp_want  = dp_valid || wb_dp_pending;
  assign wb_fire_dp  = wb_dp_want && wq_ok;
  assign wb_fire_dir = !wb_dp_want && wb_dir_pending && wq_ok;

  // ---------------- issue side: which read is next ----------------
  always_comb begin
    iss_kind = K_NONE;
    if (iss_j == '0 && iss_ai == '0 && !iss_got_a) iss_kind = K_A;
    else if (iss_bj == '0 && !iss_got_b)           iss_kind = K_B;
    else if (iss_i != '0)                                     iss_kind = K_N;
  end

  // A read of North DP(i-1,j) waits for the write of that cell: k - n < pushed.
  logic raw_ok;
  assign raw_ok = (iss_k < dp_pushed + 64'(len_b));

  assign iss_fire = iss_active && (iss_kind != K_NONE) && !wb_dp_want && !wb_dir_pending
                    && !rq_full && (outstanding < CW'(RESP_DEPTH))
                    && ((iss_kind != K_N) || raw_ok);
  assign iss_adv  = iss_active && ((iss_kind == K_NONE) || (iss_fire && iss_kind == K_N));

  // ---------------- compute side: which datum is next ----------------
  always_comb begin
    c_kind = K_NONE;
    if (cj == '0 && c_ai == '0 && !c_got_a) c_kind = K_A;
    else if (c_bj == '0 && !c_got_b)        c_kind = K_B;
    else if (ci != '0 && !c_got_n)                  c_kind = K_N;
  end

  assign rd_pop = (cst == C_FETCH) && (c_kind != K_NONE) && rd_valid;
  // All data of the cell present after this cycle's pop.
  always_comb begin
    c_all = 1'b0;
    if (cst == C_FETCH) begin
      if (c_kind == K_NONE) c_all = 1'b1;
      else if (rd_pop) begin
        // the popped datum was the last one needed?
        unique case (c_kind)
          K_A:     c_all = (c_bj != '0) && (ci == '0);
          K_B:     c_all = (ci == '0);
          K_N:     c_all = 1'b1;
          default: c_all = 1'b1;
        endcase
      end
    end
  end
  // note: when cj == 0 the B word is always needed after A, so a popped A is
  // never the last datum of a cell; the K_A term above is therefore 0.

  assign last_cell_c = (ci == len_a - 1) && (cj == len_b - 1);

  // datapath loads
  logic [WORD_W-1:0] a_src, b_src;
  assign a_src  = (rd_pop && c_kind == K_A) ? rd_data : a_word;
  assign b_src  = (rd_pop && c_kind == K_B) ? rd_data : b_word;
  assign a_char = CHAR_BITS'(a_src >> (CHAR_BITS * c_ai));
  assign b_char = CHAR_BITS'(b_src >> (CHAR_BITS * c_bj));
  assign ld_a   = c_all && (cj == '0);
  assign ld_b   = c_all;
  assign row_init  = c_all && (cj == '0);
  assign west_init = row_west;
  assign nw_init   = row_nw;
  assign ld_north  = (rd_pop && c_kind == K_N) || (c_all && ci == '0);
  assign north     = (ci == '0) ? col_north : signed'(rd_data);

  logic exec_ok;
  assign exec_ok = !wb_dp_want && (!wb_dir_pending || wb_fire_dir);
  assign start   = (cst == C_EXEC) && exec_ok;

  // ---------------- request queue outputs ----------------
  always_comb begin
    rq_push = 1'b0;
    rq_data = '0;
    sq_push = 1'b0;
    sq_data = '0;
    if (wb_fire_dp) begin
      rq_push = 1'b1;
      rq_data = '{we: 1'b1, addr: dp_wptr};
      sq_push = 1'b1;
      sq_data = dp_value;
    end else if (wb_fire_dir) begin
      rq_push = 1'b1;
      rq_data = '{we: 1'b1, addr: dir_wptr};
      sq_push = 1'b1;
      sq_data = dir_word;
    end else if (iss_fire) begin
      rq_push = 1'b1;
      unique case (iss_kind)
        K_A:     rq_data = '{we: 1'b0, addr: a_ptr};
        K_B:     rq_data = '{we: 1'b0, addr: b_ptr};
        default: rq_data = '{we: 1'b0, addr: n_ptr};
      endcase
    end
  end

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_a <= '0; len_b <= '0; base_b <= '0;
      iss_active <= 1'b0; iss_i <= '0; iss_j <= '0; iss_k <= '0;
      iss_got_a <= 1'b0; iss_got_b <= 1'b0;
      iss_ai <= '0; iss_bj <= '0; c_ai <= '0; c_bj <= '0;
      a_ptr <= '0; b_ptr <= '0; n_ptr <= '0;
      outstanding <= '0;
      cst <= C_IDLE; ci <= '0; cj <= '0;
      c_got_a <= 1'b0; c_got_b <= 1'b0; c_got_n <= 1'b0;
      a_word <= '0; b_word <= '0;
      row_west <= '0; row_nw <= '0; col_north <= '0;
      dp_wptr <= '0; dir_wptr <= '0; dp_pushed <= '0;
      wb_dp_pending <= 1'b0; wb_dir_pending <= 1'b0; dir_word <= '0;
      ex_j <= '0; ex_last <= 1'b0;
      done <= 1'b0; score <= '0;
    end else begin
      done <= 1'b0;

      // read credit accounting
      outstanding <= outstanding + CW'(iss_fire) - CW'(rd_pop);

      if (task_take) begin
        len_a  <= task_in.len_a;
        len_b  <= task_in.len_b;
        base_b <= task_in.addr_b;
        a_ptr  <= task_in.addr_a;
        b_ptr  <= task_in.addr_b;
        n_ptr  <= task_in.addr_dp;
        dp_wptr  <= task_in.addr_dp;
        dir_wptr <= task_in.addr_dir;
        dp_pushed <= '0;
        iss_i <= '0; iss_j <= '0; iss_k <= '0;
        iss_got_a <= 1'b0; iss_got_b <= 1'b0;
        iss_ai <= '0; iss_bj <= '0; c_ai <= '0; c_bj <= '0;
        ci <= '0; cj <= '0;
        c_got_a <= 1'b0; c_got_b <= 1'b0; c_got_n <= 1'b0;
        row_west  <= DP_W'(GAP);
        row_nw    <= '0;
        col_north <= DP_W'(GAP);
        dir_word  <= '0;
        if (task_in.len_a == '0 || task_in.len_b == '0) begin
          // empty task: nothing to align
          done  <= 1'b1;
          score <= '0;
        end else begin
          iss_active <= 1'b1;
          cst <= C_FETCH;
        end
      end

      // ---- issue side ----
      if (iss_fire) begin
        unique case (iss_kind)
          K_A: begin a_ptr <= a_ptr + ADDR_W'(WORD_BYTES); iss_got_a <= 1'b1; end
          K_B: begin b_ptr <= b_ptr + ADDR_W'(WORD_BYTES); iss_got_b <= 1'b1; end
          default: n_ptr <= n_ptr + ADDR_W'(WORD_BYTES);
        endcase
      end
      if (iss_adv) begin
        iss_got_a <= 1'b0;
        iss_got_b <= 1'b0;
        iss_k     <= iss_k + 64'd1;
        if (iss_j == len_b - 1) begin
          iss_j  <= '0;
          iss_bj <= '0;
          iss_ai <= wrap_inc(iss_ai);
          b_ptr  <= base_b;
          if (iss_i == len_a - 1) iss_active <= 1'b0;
          else iss_i <= iss_i + 1'b1;
        end else begin
          iss_j  <= iss_j + 1'b1;
          iss_bj <= wrap_inc(iss_bj);
        end
      end

      // ---- compute side ----
      if (rd_pop) begin
        unique case (c_kind)
          K_A:     begin a_word <= rd_data; c_got_a <= 1'b1; end
          K_B:     begin b_word <= rd_data; c_got_b <= 1'b1; end
          default: c_got_n <= 1'b1;
        endcase
      end
      if (c_all) begin
        cst <= C_EXEC;
        if (ci == '0) col_north <= col_north + DP_W'(GAP);
      end
      if (start) begin
        ex_j    <= cj;
        ex_last <= last_cell_c;
        c_got_a <= 1'b0; c_got_b <= 1'b0; c_got_n <= 1'b0;
        if (last_cell_c) begin
          cst <= C_DRAIN;
        end else begin
          cst <= C_FETCH;
          if (cj == len_b - 1) begin
            cj   <= '0;
            c_bj <= '0;
            ci   <= ci + 1'b1;
            c_ai <= wrap_inc(c_ai);
            row_nw   <= row_west;
            row_west <= row_west + DP_W'(GAP);
          end else begin
            cj   <= cj + 1'b1;
            c_bj <= wrap_inc(c_bj);
          end
        end
      end

      // ---- write-back ----
      if (dp_valid) begin
        dir_word[DIR_W*ex_j[DSEL_W-1:0] +: DIR_W] <= dp_dir;
        if (ex_j[DSEL_W-1:0] == DSEL_W'(DIRS_PER_WORD - 1) || ex_j == len_b - 1)
          wb_dir_pending <= 1'b1;
        if (ex_last) score <= dp_value;
      end
      if (wb_fire_dp) begin
        dp_wptr       <= dp_wptr + ADDR_W'(WORD_BYTES);
        dp_pushed     <= dp_pushed + 64'd1;
        wb_dp_pending <= 1'b0;
      end else if (dp_valid) begin
        wb_dp_pending <= 1'b1;
      end
      if (wb_fire_dir) begin
        dir_wptr       <= dir_wptr + ADDR_W'(WORD_BYTES);
        wb_dir_pending <= 1'b0;
        dir_word       <= '0;
      end

      if (cst == C_DRAIN && !dp_valid && !wb_dp_pending && !wb_dir_pending) begin
        cst  <= C_IDLE;
        done <= 1'b1;
      end
    end
  end

  a_start_needs_idle_wb: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !dp_valid);
  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    outstanding <= CW'(RESP_DEPTH));

endmodule
