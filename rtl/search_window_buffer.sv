// search_window_buffer: the shared search-window strip of pipelined
// macroblock processing.
//
// All 2M/N macroblocks in the pipeline are matched against the same strip of
// the previous frame: N pixel columns, each 2M+N-1 pixels tall (rows
// -M .. M+N-2 relative to the macroblock row). One further column is
// imported while the current column of search positions is searched, so the
// buffer holds N+1 columns and is used circularly: a column is stored at
// physical column (base + k) mod (N+1) and the controller advances `rd_base`
// by one per column step. The strip moves by one pixel per step, so only
// one new column of 2M+N-1 pixels enters per step, in top-to-bottom order.
//
// Interface: one pixel write port (column, row, data) and one read port that
// returns R consecutive rows (starting at `rd_row`) of the N strip columns
// in x order, combinationally. Rows read beyond the last row return 0.
// The strip size (N+1 columns by 2M+N-1 rows) follows the document; the
// flop array, the combinational read and the R-row read width are choices
// of this design.
module search_window_buffer
  import me_pkg::*;
#(
  parameter int N = 16,            // macroblock size
  parameter int M = 64,            // search range +-M
  parameter int R = 8,             // rows delivered per read
  localparam int ROWS = 2*M + N - 1,
  localparam int COLS = N + 1,
  localparam int CW   = $clog2(COLS),
  localparam int RW   = $clog2(ROWS)
) (
  input  logic            clk,
  // write port: one pixel of the column being imported
  input  logic            wr_en,
  input  logic [CW-1:0]   wr_col,
  input  logic [RW-1:0]   wr_row,
  input  pixel_t          wr_data,
  // read port: R rows x N columns of the current strip
  input  logic [CW-1:0]   rd_base,
  input  logic [RW-1:0]   rd_row,
  output pixel_t          rd_data [R][N]
);

  pixel_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_col] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < R; r++) begin
      for (int k = 0; k < N; k++) begin
        int unsigned row;
        logic [CW-1:0] col;
        row = int'(rd_row) + r;
        col = CW'((int'(rd_base) + k) % COLS);
        rd_data[r][k] = (row < ROWS) ? mem[row][col] : '0;
      end
    end
  end

endmodule
