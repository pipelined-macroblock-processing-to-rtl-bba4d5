// pmp_controller: dataflow control of pipelined macroblock processing.
//
// The search runs as a sequence of column steps s = 0, 1, ... Each step
// takes the same time T and searches one column of 2M vertical search
// positions (dy = -M .. M-1, top to bottom) for all S = 2M/N buffer
// positions at once. Position p holds macroblock i = floor(s/N) - S + p in
// raster order (over the whole frame, across macroblock rows) and searches
// it at horizontal displacement dx = -M + (s mod N) + N(S-1-p): the newest
// block (p = S-1) is at the left end of its range, the oldest (p = 0) at
// the right end, and all of them use the same strip of the previous frame.
// After every N steps the oldest block has seen all 2M columns and leaves
// (retire, its motion vector is emitted) and the next block enters.
//
// A search position is operated only if its candidate block lies inside
// the frame; otherwise the position is skipped and its SAD ignored. Near
// the right frame edge this leaves N-1 consecutive steps in which nothing
// is operated while the strip is refilled for the next macroblock row, so
// the frame boundary costs no extra time.
//
// While step s runs, the fetch unit imports the strip column needed from
// step s+1 on (previous-frame column q = s - M, taken as band floor(q/W)
// and column q mod W, W the frame width) and row (s mod N) of macroblock
// floor(s/N), the next one to enter. A step ends when its search is done
// and its imports have arrived; if the imports are late the step stalls.
//
// Per step: cycle 0 starts the fetch and the search, 2M*N/R search cycles
// (each feeds R rows of one candidate to every processing element), one
// cycle for the last SAD to reach the decision unit, waiting for the fetch
// if needed, one advance cycle. A frame takes N*(NMB + S) steps,
// NMB = (FRAME_W/N)*(FRAME_H/N).
//
// The step order, the displacement assignment, the skipping at the frame
// boundary and the import amounts follow the document. The exact cycle
// budget of a step and the start-of-frame prologue (the first N steps only
// load the first macroblock) are choices of this design. The start-rule
// assertion is disabled during reset, which is why lint reports the reset as
// used both synchronously and asynchronously.
module pmp_controller
  import me_pkg::*;
#(
  parameter int N       = 16,
  parameter int M       = 64,
  parameter int R       = 8,
  parameter int FRAME_W = 720,
  parameter int FRAME_H = 480,
  localparam int S      = 2*M/N,
  localparam int ROWS   = 2*M + N - 1,
  localparam int MBW    = FRAME_W / N,
  localparam int MBH    = FRAME_H / N,
  localparam int NMB    = MBW * MBH,
  localparam int GROUPS = N / R,
  localparam int CW     = $clog2(N + 1),
  localparam int RW     = $clog2(ROWS),
  localparam int NW     = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,        // pulse: search one frame
  output logic            busy,
  output logic            done,         // pulse: frame finished
  // fetch unit
  output logic            f_start,
  output logic            f_sw_en,
  output coord_t          f_sw_x,
  output logic signed [COORD_W:0] f_sw_y0,
  output logic [CW-1:0]   f_sw_col,
  output logic            f_rb_en,
  output coord_t          f_rb_x,
  output coord_t          f_rb_y,
  output logic [NW-1:0]   f_rb_row,
  input  logic            f_busy,
  // search window buffer read
  output logic [CW-1:0]   sw_rd_base,
  output logic [RW-1:0]   sw_rd_row,
  // reference block buffer
  output logic            rb_shift,
  output logic [NW-1:0]   rb_rd_row,
  // processing elements
  output logic            pe_valid,
  output logic            pe_first,
  output logic            pe_last,
  // decision unit (aligned with the processing elements' outputs)
  output logic            d_op  [S],
  output mv_comp_t        d_mvx [S],
  output mv_comp_t        d_mvy,
  output logic            retire,
  output logic            retire_mb_valid,
  output coord_t          retire_mb_col,
  output coord_t          retire_mb_row,
  // observation
  output logic            stall,        // step waiting for its imports
  output logic            step_idle     // no position is operated in this step
);

  typedef enum logic [1:0] {ST_IDLE, ST_SEARCH, ST_WAIT, ST_ADVANCE} state_t;

  localparam int S_LAST = N * (NMB + S) - 1;

  state_t          state;
  int unsigned     s;            // column step
  logic [NW-1:0]   s_mod;        // s mod N
  logic [CW-1:0]   base;         // strip read base column
  int unsigned     cand;         // candidate index, dy = cand - M
  int unsigned     grp;          // row group within a candidate
  logic            first_wait;

  // macroblocks at the buffer positions
  logic            pos_valid [S];
  coord_t          pos_col   [S];
  coord_t          pos_row   [S];
  // next macroblock to be loaded
  logic            nxt_valid;
  coord_t          nxt_col, nxt_row;
  // search window import position
  coord_t          q_col, q_band;

  // displacement and horizontal validity of each position in this step
  mv_comp_t        dx     [S];
  logic            h_op   [S];

  always_comb begin
    step_idle = 1'b1;
    for (int p = 0; p < S; p++) begin
      int sx;
      dx[p]   = mv_comp_t'(-M + int'(s_mod) + N*(S-1-p));
      sx      = N*int'(pos_col[p]) + int'(dx[p]);
      h_op[p] = pos_valid[p] && sx >= 0 && sx <= FRAME_W - N;
      if (h_op[p]) step_idle = 1'b0;
    end
  end

  // vertical validity of the current candidate for each position
  function automatic logic v_ok(coord_t row, int unsigned c);
    int top;
    top = N*int'(row) + int'(c) - M;
    return top >= 0 && top + N <= FRAME_H;
  endfunction

  // --- outputs towards the datapath -------------------------------------
  assign busy       = (state != ST_IDLE);
  assign sw_rd_base = base;
  assign sw_rd_row  = RW'(cand + grp*R);
  assign rb_rd_row  = NW'(grp*R);
  assign pe_valid   = (state == ST_SEARCH);
  assign pe_first   = (grp == 0);
  assign pe_last    = (grp == GROUPS - 1);
  assign stall      = (state == ST_WAIT) && !first_wait && f_busy;

  // fetch job of this step
  assign f_start  = (state == ST_SEARCH) && cand == 0 && grp == 0;
  assign f_sw_en  = (s >= M) && int'(q_band) < MBH;
  assign f_sw_x   = q_col;
  assign f_sw_y0  = (COORD_W+1)'(N*int'(q_band) - M);
  assign f_sw_col = CW'((int'(base) + N) % (N + 1));
  assign f_rb_en  = nxt_valid;
  assign f_rb_x   = coord_t'(N*int'(nxt_col));
  assign f_rb_y   = coord_t'(N*int'(nxt_row) + int'(s_mod));
  assign f_rb_row = s_mod;

  assign retire          = (state == ST_ADVANCE) && s_mod == NW'(N - 1);
  assign retire_mb_valid = pos_valid[0];
  assign retire_mb_col   = pos_col[0];
  assign retire_mb_row   = pos_row[0];
  assign rb_shift        = retire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      s          <= 0;
      s_mod      <= '0;
      base       <= '0;
      cand       <= 0;
      grp        <= 0;
      first_wait <= 1'b0;
      done       <= 1'b0;
      nxt_valid  <= 1'b0;
      nxt_col    <= '0;
      nxt_row    <= '0;
      q_col      <= '0;
      q_band     <= '0;
      d_mvy      <= '0;
      for (int p = 0; p < S; p++) begin
        pos_valid[p] <= 1'b0;
        pos_col[p]   <= '0;
        pos_row[p]   <= '0;
        d_op[p]      <= 1'b0;
        d_mvx[p]     <= '0;
      end
    end else begin
      done <= 1'b0;
      // one-cycle delayed tags for the SADs leaving the processing elements
      d_mvy <= mv_comp_t'(int'(cand) - M);
      for (int p = 0; p < S; p++) begin
        d_op[p]  <= h_op[p] && v_ok(pos_row[p], cand);
        d_mvx[p] <= dx[p];
      end

      case (state)
        ST_IDLE: begin
          if (start) begin
            state     <= ST_SEARCH;
            s         <= 0;
            s_mod     <= '0;
            cand      <= 0;
            grp       <= 0;
            nxt_valid <= 1'b1;
            nxt_col   <= '0;
            nxt_row   <= '0;
            q_col     <= '0;
            q_band    <= '0;
            for (int p = 0; p < S; p++) pos_valid[p] <= 1'b0;
          end
        end
        ST_SEARCH: begin
          if (grp == GROUPS - 1) begin
            grp <= 0;
            if (cand == 2*M - 1) begin
              cand       <= 0;
              state      <= ST_WAIT;
              first_wait <= 1'b1;
            end else begin
              cand <= cand + 1;
            end
          end else begin
            grp <= grp + 1;
          end
        end
        ST_WAIT: begin
          first_wait <= 1'b0;
          if (!f_busy) state <= ST_ADVANCE;
        end
        ST_ADVANCE: begin
          // macroblock change: oldest leaves, the loaded one enters
          if (retire) begin
            for (int p = 0; p < S - 1; p++) begin
              pos_valid[p] <= pos_valid[p+1];
              pos_col[p]   <= pos_col[p+1];
              pos_row[p]   <= pos_row[p+1];
            end
            pos_valid[S-1] <= nxt_valid;
            pos_col[S-1]   <= nxt_col;
            pos_row[S-1]   <= nxt_row;
            if (int'(nxt_col) == MBW - 1) begin
              nxt_col <= '0;
              nxt_row <= nxt_row + 1'b1;
              if (int'(nxt_row) == MBH - 1) nxt_valid <= 1'b0;
            end else begin
              nxt_col <= nxt_col + 1'b1;
            end
          end
          // next strip column to import
          if (s >= M) begin
            if (int'(q_col) == FRAME_W - 1) begin
              q_col  <= '0;
              q_band <= q_band + 1'b1;
            end else begin
              q_col <= q_col + 1'b1;
            end
          end
          base  <= CW'((int'(base) + 1) % (N + 1));
          s_mod <= (s_mod == NW'(N - 1)) ? '0 : s_mod + 1'b1;
          s     <= s + 1;
          if (s == S_LAST) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end else begin
            state <= ST_SEARCH;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == ST_IDLE)
    else $error("pmp_controller: start while busy");

endmodule
