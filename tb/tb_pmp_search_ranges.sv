// tb_pmp_search_ranges: the two search ranges the method is sized for,
// +-64 (eight macroblocks in flight) and +-128 (sixteen), side by side on a
// 176 x 112 frame (11 x 7 macroblocks). Each estimator reads its own frame
// memory, which keeps up, and every macroblock's vector and SAD is compared
// with an independent exhaustive search at that range; the frame must take
// exactly N*(NMB+S) steps of 2M*N/R + 2 cycles.
module tb_pmp_search_ranges;
  import me_pkg::*;
  import tb_frame_pkg::*;

  localparam int N = 16, R = 8, FW = 176, FH = 112;
  localparam int MBW = FW/N, MBH = FH/N, NMB = MBW*MBH;
  localparam int MS [2] = '{64, 128};

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  int checks = 0, failures = 0;
  logic done_all [2];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_range
    localparam int M = MS[g];
    logic busy, done, mem_req_valid, mem_req_ready, mem_rsp_valid, mv_valid, stall, step_idle;
    mem_req_t   mem_req;
    pixel_t     mem_rsp_data;
    mv_result_t mv;
    ref_result_t expect_r [NMB];
    int n_results = 0;
    longint cycles = 0;

    pmp_motion_estimator #(.N(N), .M(M), .R(R), .FRAME_W(FW), .FRAME_H(FH)) dut (
      .clk, .rst_n, .start, .busy, .done, .mem_req_valid, .mem_req_ready, .mem_req,
      .mem_rsp_valid, .mem_rsp_data, .mv_valid, .mv, .stall, .step_idle
    );

    frame_memory_model #(.N(N), .M(M), .FRAME_W(FW), .FRAME_H(FH)) u_mem (
      .clk, .slow(1'b0), .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
      .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
    );

    initial begin
      done_all[g] = 1'b0;
      for (int i = 0; i < NMB; i++) expect_r[i] = ref_search(i % MBW, i / MBW, N, M, FW, FH);
    end

    always @(posedge clk) begin
      if (busy) cycles++;
      if (rst_n && mv_valid) begin
        int i;
        i = n_results;
        checks++;
        if (i >= NMB || int'(mv.mb_col) != i % MBW || int'(mv.mb_row) != i / MBW ||
            int'(mv.mvx) != expect_r[i].mvx || int'(mv.mvy) != expect_r[i].mvy ||
            int'(mv.sad) != expect_r[i].sad) begin
          failures++;
          $display("FAIL +-%0d MB %0d: got (%0d,%0d) at (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d",
                   M, i, mv.mvx, mv.mvy, mv.mb_col, mv.mb_row, mv.sad,
                   expect_r[i].mvx, expect_r[i].mvy, expect_r[i].sad);
        end
        n_results++;
      end
      if (done) done_all[g] <= 1'b1;
    end

  end

  task automatic check_range(int m, int n, longint cyc, longint exp_cyc);
    checks++;
    if (n != NMB || cyc != exp_cyc) begin
      failures++;
      $display("FAIL +-%0d: %0d results, %0d cycles, expected %0d and %0d", m, n, cyc, NMB, exp_cyc);
    end else $display("  +-%0d: %0d macroblocks, %0d cycles", m, n, cyc);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done_all[0] && done_all[1]);
    repeat (3) @(negedge clk);
    check_range(64, g_range[0].n_results, g_range[0].cycles, longint'(N*(NMB + 8)) * (2*64*N/R + 2));
    check_range(128, g_range[1].n_results, g_range[1].cycles, longint'(N*(NMB + 16)) * (2*128*N/R + 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
