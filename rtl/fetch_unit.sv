// fetch_unit: imports search-window and macroblock pixels from frame memory.
//
// During every column step of the search the buffers must receive the data
// needed from the next step on: one new column of the search-window strip
// (2M+N-1 pixels of the previous frame, read top to bottom, i.e. in 1 x 143
// order for M = 64, N = 16) and one row of N pixels of the next macroblock
// of the frame being coded, so that a whole macroblock arrives every N steps.
// A pulse on `start` latches the job for one step; `busy` stays high until
// the last response has been written into a buffer.
//
// Rows of the strip that lie above or below the frame are not read (the
// search positions that would use them are never operated). The job
// therefore reads strip rows lo..hi, then the macroblock row.
//
// Frame memory interface: requests with a valid/ready handshake, one pixel
// each; responses return in request order, one per cycle at most, with no
// back-pressure. Any latency is allowed. The import amounts and the
// column-wise order follow the document; the pixel-wide handshake and the
// order "strip column first, then macroblock row" are choices of this design.
// The protocol assertions at the end are disabled during reset, which is why
// lint reports the reset as used both synchronously and asynchronously.
module fetch_unit
  import me_pkg::*;
#(
  parameter int N       = 16,
  parameter int M       = 64,
  parameter int FRAME_H = 480,
  localparam int ROWS = 2*M + N - 1,
  localparam int CW   = $clog2(N + 1),
  localparam int RW   = $clog2(ROWS),
  localparam int NW   = $clog2(N),
  localparam int IW   = $clog2(ROWS + N)
) (
  input  logic            clk,
  input  logic            rst_n,
  // job for one column step
  input  logic            start,
  input  logic            sw_en,       // import a search-window column
  input  coord_t          sw_x,        // its frame column
  input  logic signed [COORD_W:0] sw_y0, // frame row of strip row 0 (may be < 0)
  input  logic [CW-1:0]   sw_col,      // physical buffer column to fill
  input  logic            rb_en,       // import a macroblock row
  input  coord_t          rb_x,        // frame column of the macroblock's left pixel
  input  coord_t          rb_y,        // frame row to read
  input  logic [NW-1:0]   rb_row,      // row within the macroblock
  output logic            busy,
  // frame memory
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output mem_req_t        mem_req,
  input  logic            mem_rsp_valid,
  input  pixel_t          mem_rsp_data,
  // search window buffer write port
  output logic            sw_wr_en,
  output logic [CW-1:0]   sw_wr_col,
  output logic [RW-1:0]   sw_wr_row,
  // reference block buffer write port
  output logic            rb_wr_en,
  output logic [NW-1:0]   rb_wr_row,
  output logic [NW-1:0]   rb_wr_col,
  output pixel_t          wr_data
);

  typedef enum logic [1:0] {PH_SW, PH_RB, PH_DONE} phase_t;

  typedef struct packed {
    phase_t     phase;
    logic [IW-1:0] idx;
  } cursor_t;

  // latched job
  logic                    j_rb_en;
  coord_t                  j_sw_x, j_rb_x, j_rb_y;
  logic signed [COORD_W:0] j_sw_y0;
  logic [CW-1:0]           j_sw_col;
  logic [NW-1:0]           j_rb_row;
  int                      hi;

  cursor_t req_c, rsp_c;
  int      new_lo, new_hi;

  // first and last strip row inside the frame for a job being started
  always_comb begin
    new_lo = (sw_y0 < 0) ? -int'(sw_y0) : 0;
    new_hi = (int'(sw_y0) + ROWS - 1 > FRAME_H - 1) ? FRAME_H - 1 - int'(sw_y0) : ROWS - 1;
  end

  // last row of the strip inside the frame
  always_comb begin
    hi = (int'(j_sw_y0) + ROWS - 1 > FRAME_H - 1) ? FRAME_H - 1 - int'(j_sw_y0) : ROWS - 1;
  end

  function automatic cursor_t first_cursor(logic swe, logic rbe, int l, int h);
    if (swe && l <= h) return '{phase: PH_SW, idx: IW'(l)};
    if (rbe)           return '{phase: PH_RB, idx: '0};
    return '{phase: PH_DONE, idx: '0};
  endfunction

  function automatic cursor_t next_cursor(cursor_t c, logic rbe, int h);
    cursor_t n;
    n = c;
    case (c.phase)
      PH_SW: if (int'(c.idx) == h) n = rbe ? '{phase: PH_RB, idx: '0} : '{phase: PH_DONE, idx: '0};
             else n.idx = c.idx + 1'b1;
      PH_RB: if (int'(c.idx) == N - 1) n = '{phase: PH_DONE, idx: '0};
             else n.idx = c.idx + 1'b1;
      default: n = c;
    endcase
    return n;
  endfunction

  assign busy          = (rsp_c.phase != PH_DONE);
  assign mem_req_valid = (req_c.phase != PH_DONE);

  always_comb begin
    mem_req = '0;
    if (req_c.phase == PH_SW) begin
      mem_req.frame = FRAME_REF;
      mem_req.x     = j_sw_x;
      mem_req.y     = coord_t'(int'(j_sw_y0) + int'(req_c.idx));
    end else begin
      mem_req.frame = FRAME_CUR;
      mem_req.x     = coord_t'(int'(j_rb_x) + int'(req_c.idx));
      mem_req.y     = j_rb_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_c    <= '{phase: PH_DONE, idx: '0};
      rsp_c    <= '{phase: PH_DONE, idx: '0};
      j_rb_en  <= 1'b0;
      j_sw_x   <= '0;
      j_sw_y0  <= '0;
      j_sw_col <= '0;
      j_rb_x   <= '0;
      j_rb_y   <= '0;
      j_rb_row <= '0;
    end else if (start) begin
      j_rb_en  <= rb_en;
      j_sw_x   <= sw_x;
      j_sw_y0  <= sw_y0;
      j_sw_col <= sw_col;
      j_rb_x   <= rb_x;
      j_rb_y   <= rb_y;
      j_rb_row <= rb_row;
      req_c    <= first_cursor(sw_en, rb_en, new_lo, new_hi);
      rsp_c    <= first_cursor(sw_en, rb_en, new_lo, new_hi);
    end else begin
      if (mem_req_valid && mem_req_ready) req_c <= next_cursor(req_c, j_rb_en, hi);
      if (mem_rsp_valid && busy)          rsp_c <= next_cursor(rsp_c, j_rb_en, hi);
    end
  end

  // write the response into the buffer it belongs to
  assign wr_data   = mem_rsp_data;
  assign sw_wr_en  = mem_rsp_valid && rsp_c.phase == PH_SW;
  assign sw_wr_col = j_sw_col;
  assign sw_wr_row = RW'(rsp_c.idx);
  assign rb_wr_en  = mem_rsp_valid && rsp_c.phase == PH_RB;
  assign rb_wr_row = j_rb_row;
  assign rb_wr_col = NW'(rsp_c.idx);

  // protocol rules
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("fetch_unit: new job started while busy");
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> busy)
    else $error("fetch_unit: unexpected memory response");

endmodule
