// pmp_motion_estimator: full-search motion estimator with pipelined
// macroblock processing.
//
// Instead of keeping a whole (2M+N) x (2M+N) search window per macroblock,
// S = 2M/N consecutive macroblocks of the frame being coded are searched in
// parallel. Their search windows overlap so much that, if each macroblock
// is searched one column of search positions at a time and the macroblocks
// are staggered by N columns, all of them need the same N-pixel-wide strip
// of the previous frame at the same moment. The on-chip storage is then the
// strip (N+1 columns of 2M+N-1 pixels, one column being imported) plus S+1
// macroblocks, about (2N+1)(2M+N) pixels instead of 2{N^2+(M+N)(2M+N)},
// while the pixels read from frame memory stay the same.
//
// Blocks: pmp_controller (column-step schedule), fetch_unit (imports one
// strip column and one macroblock row per step), search_window_buffer,
// reference_block_buffer, S sad_pe processing elements (one per buffer
// position, all fed the same strip rows) and mv_decision (minimum SAD per
// macroblock). Every full search position inside the frame, dx and dy in
// -M .. M-1, is evaluated for every macroblock.
//
// Interface: `start` pulses to search one frame; `busy` is high until
// `done` pulses. Frame memory reads use a valid/ready request carrying
// (frame, x, y) of one pixel and in-order responses without back-pressure.
// Each macroblock's result (position, motion vector, SAD) appears on `mv`
// for one cycle with `mv_valid`, in raster order. `stall` is high while a
// column step waits for late frame-memory data; `step_idle` is high during
// column steps in which no search position is inside the frame.
//
// Timing: a column step takes 2M*N/R + 3 cycles if memory keeps up
// (259 cycles with the defaults), a frame N*(NMB+S) steps with NMB the
// number of macroblocks (21,728 steps for 720x480).
module pmp_motion_estimator
  import me_pkg::*;
#(
  parameter int N       = 16,    // macroblock size
  parameter int M       = 64,    // search range +-M
  parameter int R       = 8,     // rows per cycle in each processing element
  parameter int FRAME_W = 720,
  parameter int FRAME_H = 480,
  localparam int S      = 2*M/N,
  localparam int ROWS   = 2*M + N - 1,
  localparam int CW     = $clog2(N + 1),
  localparam int RW     = $clog2(ROWS),
  localparam int NW     = $clog2(N)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // frame memory
  output logic       mem_req_valid,
  input  logic       mem_req_ready,
  output mem_req_t   mem_req,
  input  logic       mem_rsp_valid,
  input  pixel_t     mem_rsp_data,
  // motion vectors
  output logic       mv_valid,
  output mv_result_t mv,
  output logic       stall,
  output logic       step_idle
);

  // fetch job
  logic                    f_start, f_sw_en, f_rb_en, f_busy;
  coord_t                  f_sw_x, f_rb_x, f_rb_y;
  logic signed [COORD_W:0] f_sw_y0;
  logic [CW-1:0]           f_sw_col;
  logic [NW-1:0]           f_rb_row;
  // buffer ports
  logic                    sw_wr_en, rb_wr_en;
  logic [CW-1:0]           sw_wr_col, sw_rd_base;
  logic [RW-1:0]           sw_wr_row, sw_rd_row;
  logic [NW-1:0]           rb_wr_row, rb_wr_col, rb_rd_row;
  pixel_t                  wr_data;
  logic                    rb_shift;
  pixel_t                  strip_rows [R][N];
  pixel_t                  block_rows [S][R][N];
  // processing elements and decision
  logic                    pe_valid, pe_first, pe_last;
  logic                    pe_sad_valid [S];
  sad_t                    pe_sad [S];
  logic                    d_op [S];
  mv_comp_t                d_mvx [S];
  mv_comp_t                d_mvy;
  logic                    retire, retire_mb_valid;
  coord_t                  retire_mb_col, retire_mb_row;

  pmp_controller #(.N(N), .M(M), .R(R), .FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .f_start, .f_sw_en, .f_sw_x, .f_sw_y0, .f_sw_col,
    .f_rb_en, .f_rb_x, .f_rb_y, .f_rb_row, .f_busy,
    .sw_rd_base, .sw_rd_row, .rb_shift, .rb_rd_row,
    .pe_valid, .pe_first, .pe_last,
    .d_op, .d_mvx, .d_mvy,
    .retire, .retire_mb_valid, .retire_mb_col, .retire_mb_row,
    .stall, .step_idle
  );

  fetch_unit #(.N(N), .M(M), .FRAME_H(FRAME_H)) u_fetch (
    .clk, .rst_n,
    .start(f_start), .sw_en(f_sw_en), .sw_x(f_sw_x), .sw_y0(f_sw_y0), .sw_col(f_sw_col),
    .rb_en(f_rb_en), .rb_x(f_rb_x), .rb_y(f_rb_y), .rb_row(f_rb_row), .busy(f_busy),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .sw_wr_en, .sw_wr_col, .sw_wr_row,
    .rb_wr_en, .rb_wr_row, .rb_wr_col, .wr_data
  );

  search_window_buffer #(.N(N), .M(M), .R(R)) u_swb (
    .clk,
    .wr_en(sw_wr_en), .wr_col(sw_wr_col), .wr_row(sw_wr_row), .wr_data,
    .rd_base(sw_rd_base), .rd_row(sw_rd_row), .rd_data(strip_rows)
  );

  reference_block_buffer #(.N(N), .S(S), .R(R)) u_rbb (
    .clk, .rst_n, .shift(rb_shift),
    .wr_en(rb_wr_en), .wr_row(rb_wr_row), .wr_col(rb_wr_col), .wr_data,
    .rd_row(rb_rd_row), .rd_data(block_rows)
  );

  for (genvar p = 0; p < S; p++) begin : g_pe
    sad_pe #(.N(N), .R(R)) u_pe (
      .clk, .rst_n,
      .in_valid(pe_valid), .in_first(pe_first), .in_last(pe_last),
      .cand(strip_rows), .refb(block_rows[p]),
      .sad_valid(pe_sad_valid[p]), .sad(pe_sad[p])
    );
  end

  mv_decision #(.S(S)) u_dec (
    .clk, .rst_n,
    .sad_valid(pe_sad_valid[0]), .sad_op(d_op), .sad(pe_sad),
    .sad_mvx(d_mvx), .sad_mvy(d_mvy),
    .retire, .retire_mb_valid, .retire_mb_col, .retire_mb_row,
    .result_valid(mv_valid), .result(mv)
  );

endmodule
