// tb_reference_block_buffer: loads macroblocks one after another into the
// next-block slot of a buffer with eight positions, performing a
// macroblock change after each, and checks after every change that
// position p holds the block loaded (S-1-p) changes ago, for every row
// group and pixel. Blocks are filled with random pixels; a model keeps the
// last S blocks. Position contents before S loads are not checked.
module tb_reference_block_buffer;
  import me_pkg::*;

  localparam int N = 16, S = 8, R = 4;
  localparam int NW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1;
  logic shift = 1'b0, wr_en = 1'b0;
  logic [NW-1:0] wr_row = '0, wr_col = '0, rd_row = '0;
  pixel_t wr_data = '0;
  pixel_t rd_data [S][R][N];
  int checks = 0, failures = 0;

  typedef pixel_t blk_t [N][N];
  blk_t hist [$];

  always #5 clk = ~clk;

  reference_block_buffer #(.N(N), .S(S), .R(R)) dut (.*);

  task automatic load_block();
    blk_t b;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        b[r][c] = 8'($urandom);
        @(negedge clk);
        wr_en = 1'b1; wr_row = NW'(r); wr_col = NW'(c); wr_data = b[r][c];
      end
    @(negedge clk);
    wr_en = 1'b0;
    shift = 1'b1;
    @(negedge clk);
    shift = 1'b0;
    hist.push_back(b);
    if (hist.size() > S) void'(hist.pop_front());
  endtask

  task automatic check_all();
    for (int g = 0; g < N; g += R) begin
      rd_row = NW'(g);
      #1;
      for (int p = 0; p < S; p++)
        for (int r = 0; r < R; r++)
          for (int k = 0; k < N; k++) begin
            checks++;
            if (rd_data[p][r][k] !== hist[p][g + r][k]) begin
              failures++;
              if (failures < 10) $display("FAIL pos %0d row %0d col %0d", p, g + r, k);
            end
          end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int n = 0; n < 3 * S; n++) begin
      load_block();
      if (hist.size() == S) check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
