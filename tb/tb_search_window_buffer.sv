// tb_search_window_buffer: fills the strip buffer (+-8 search range, so 31
// rows by 17 columns) with random pixels, keeping a copy, then reads it
// with random base columns and start rows. Every pixel of every read must
// equal the copy at row (start + r) and column (base + k) mod 17, and rows
// past the last one must read as 0. Writes are also interleaved with reads
// to check that a write lands only in its own cell.
module tb_search_window_buffer;
  import me_pkg::*;

  localparam int N = 16, M = 8, R = 4;
  localparam int ROWS = 2*M + N - 1, COLS = N + 1;
  localparam int CW = $clog2(COLS), RW = $clog2(ROWS);

  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [CW-1:0] wr_col = '0, rd_base = '0;
  logic [RW-1:0] wr_row = '0, rd_row = '0;
  pixel_t wr_data = '0;
  pixel_t rd_data [R][N];
  pixel_t model [ROWS][COLS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  search_window_buffer #(.N(N), .M(M), .R(R)) dut (.*);

  task automatic write_px(int row, int col, pixel_t d);
    @(negedge clk);
    wr_en = 1'b1; wr_row = RW'(row); wr_col = CW'(col); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    model[row][col] = d;
  endtask

  task automatic check_read(int base, int row);
    rd_base = CW'(base); rd_row = RW'(row);
    #1;
    for (int r = 0; r < R; r++)
      for (int k = 0; k < N; k++) begin
        pixel_t exp;
        exp = (row + r < ROWS) ? model[row + r][(base + k) % COLS] : '0;
        checks++;
        if (rd_data[r][k] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL base %0d row %0d [%0d][%0d]: %0h vs %0h",
                                      base, row, r, k, rd_data[r][k], exp);
        end
      end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) write_px(r, c, 8'($urandom));
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      check_read($urandom_range(COLS - 1), $urandom_range(ROWS - 1));
      if (i % 3 == 0) write_px($urandom_range(ROWS - 1), $urandom_range(COLS - 1), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
