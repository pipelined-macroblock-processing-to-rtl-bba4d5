// tb_fetch_unit: runs import jobs against the behavioural frame memory with
// random ready and latency (+-16 search range, 64 x 48 frame, so strips
// start above the frame, inside it, or run past its bottom). For each job
// it checks that exactly the strip rows inside the frame are written, in
// order, into the requested buffer column with the previous frame's pixels,
// followed by the N pixels of the requested macroblock row, and that busy
// stays high until the last write and then drops.
module tb_fetch_unit;
  import me_pkg::*;
  import tb_frame_pkg::*;

  localparam int N = 16, M = 16, FW = 64, FH = 48;
  localparam int ROWS = 2*M + N - 1;
  localparam int CW = $clog2(N + 1), RW = $clog2(ROWS), NW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, sw_en = 1'b0, rb_en = 1'b0;
  coord_t sw_x = '0, rb_x = '0, rb_y = '0;
  logic signed [COORD_W:0] sw_y0 = '0;
  logic [CW-1:0] sw_col = '0;
  logic [NW-1:0] rb_row = '0;
  logic busy, mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  pixel_t mem_rsp_data, wr_data;
  logic sw_wr_en, rb_wr_en;
  logic [CW-1:0] sw_wr_col;
  logic [RW-1:0] sw_wr_row;
  logic [NW-1:0] rb_wr_row, rb_wr_col;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fetch_unit #(.N(N), .M(M), .FRAME_H(FH)) dut (.*);

  frame_memory_model #(.N(N), .M(M), .FRAME_W(FW), .FRAME_H(FH)) u_mem (
    .clk, .slow(1'b1), .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  // expected writes of the running job
  typedef struct { bit sw; int row; int col; pixel_t data; } wr_t;
  wr_t exp_q [$];

  always @(posedge clk) begin
    if (rst_n && (sw_wr_en || rb_wr_en)) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected write");
      end else begin
        wr_t e;
        e = exp_q.pop_front();
        if (e.sw != sw_wr_en || e.sw == rb_wr_en || wr_data != e.data ||
            (e.sw && (int'(sw_wr_row) != e.row || int'(sw_wr_col) != e.col)) ||
            (!e.sw && (int'(rb_wr_row) != e.row || int'(rb_wr_col) != e.col))) begin
          failures++;
          $display("FAIL write: sw %0b row %0d col %0d data %0h, expected sw %0b row %0d col %0d data %0h",
                   sw_wr_en, sw_wr_en ? int'(sw_wr_row) : int'(rb_wr_row),
                   sw_wr_en ? int'(sw_wr_col) : int'(rb_wr_col), wr_data, e.sw, e.row, e.col, e.data);
        end
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int job = 0; job < 60; job++) begin
      int band, bx, by;
      @(negedge clk);
      band  = $urandom_range(FH / N - 1);
      sw_en = (job % 5 != 4);
      sw_x  = coord_t'($urandom_range(FW - 1));
      sw_y0 = (COORD_W+1)'(N * band - M);
      sw_col = CW'($urandom_range(N));
      rb_en = (job % 7 != 3);
      bx = $urandom_range(FW / N - 1);
      by = $urandom_range(FH / N - 1);
      rb_row = NW'($urandom_range(N - 1));
      rb_x = coord_t'(bx * N);
      rb_y = coord_t'(by * N + int'(rb_row));
      if (sw_en)
        for (int r = 0; r < ROWS; r++) begin
          int y;
          y = int'(sw_y0) + r;
          if (y >= 0 && y < FH) exp_q.push_back('{1, r, int'(sw_col), prev_pix(int'(sw_x), y)});
        end
      if (rb_en)
        for (int c = 0; c < N; c++)
          exp_q.push_back('{0, int'(rb_row), c, cur_pix(bx * N + c, int'(rb_y), N, M, FW, FH)});
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (busy) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("FAIL job %0d: busy dropped with %0d writes missing", job, exp_q.size());
        exp_q.delete();
      end
    end
    checks++;
    if (u_mem.bad_addr != 0) begin
      failures++;
      $display("FAIL: reads outside the frame");
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
