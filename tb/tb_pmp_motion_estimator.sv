// tb_pmp_motion_estimator: end-to-end test of the pipelined-macroblock motion
// estimator at a reduced size (+-32 search range, four macroblocks in
// flight, 128 x 96 frame of 8 x 6 macroblocks).
//
// Two frames are searched. The first uses a slow frame memory (random
// ready, random latency), so column steps stall; the second a memory that
// keeps up, and its length must be exactly N*(NMB+S) steps of
// 2M*N/R + 2 cycles. Every macroblock's motion vector and SAD are compared
// with an independent exhaustive search, and results must come out in
// raster order. The test also counts how often each mechanism of the
// design happened: macroblock changes, stalled steps, idle steps at the
// frame edge, search positions skipped because they cross the top or
// bottom frame edge, and the jump of the strip to the next macroblock row.
module tb_pmp_motion_estimator;
  import me_pkg::*;
  import tb_frame_pkg::*;

  localparam int N = 16, M = 32, R = 8, FW = 128, FH = 96;
  localparam int S = 2*M/N, MBW = FW/N, MBH = FH/N, NMB = MBW*MBH;
  localparam int STEPS = N*(NMB + S);
  localparam int T = 2*M*N/R + 2;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, slow = 1'b0;
  logic busy, done, mem_req_valid, mem_req_ready, mem_rsp_valid, mv_valid, stall, step_idle;
  mem_req_t   mem_req;
  pixel_t     mem_rsp_data;
  mv_result_t mv;

  int checks = 0, failures = 0;
  int n_results, n_stall_cycles, n_idle_steps, n_vskip, n_band_jumps, n_retire;
  longint cycles;

  always #5 clk = ~clk;

  pmp_motion_estimator #(.N(N), .M(M), .R(R), .FRAME_W(FW), .FRAME_H(FH)) dut (.*);

  frame_memory_model #(.N(N), .M(M), .FRAME_W(FW), .FRAME_H(FH)) u_mem (
    .clk, .slow, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  ref_result_t expect_r [NMB];

  // result checking
  always @(posedge clk) begin
    if (rst_n && mv_valid) begin
      int i;
      i = n_results;
      checks++;
      if (i >= NMB || int'(mv.mb_col) != i % MBW || int'(mv.mb_row) != i / MBW) begin
        failures++;
        $display("FAIL order: result %0d is for MB (%0d,%0d)", i, mv.mb_col, mv.mb_row);
      end else begin
        checks++;
        if (int'(mv.mvx) != expect_r[i].mvx || int'(mv.mvy) != expect_r[i].mvy ||
            int'(mv.sad) != expect_r[i].sad) begin
          failures++;
          $display("FAIL MB %0d: got (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d", i,
                   mv.mvx, mv.mvy, mv.sad, expect_r[i].mvx, expect_r[i].mvy, expect_r[i].sad);
        end
      end
      n_results++;
    end
  end

  // mechanism counters
  logic prev_idle = 1'b0;
  logic [COORD_W-1:0] prev_band = '0;
  always @(posedge clk) begin
    if (busy) cycles++;
    if (stall) n_stall_cycles++;
    if (2'(dut.u_ctrl.state) == 2'd3) begin
      if (step_idle) n_idle_steps++;
      if (dut.u_ctrl.q_band != prev_band) n_band_jumps++;
      prev_band = dut.u_ctrl.q_band;
      if (dut.retire) n_retire++;
    end
    if (2'(dut.u_ctrl.state) == 2'd1)
      for (int p = 0; p < S; p++)
        if (dut.u_ctrl.h_op[p] && dut.u_ctrl.pe_last) begin
          int top;
          top = N*int'(dut.u_ctrl.pos_row[p]) + int'(dut.u_ctrl.cand) - M;
          if (top < 0 || top + N > FH) n_vskip++;
        end
  end

  task automatic run_frame(input logic use_slow);
    n_results = 0; n_stall_cycles = 0; n_idle_steps = 0; n_vskip = 0; n_band_jumps = 0;
    n_retire = 0; cycles = 0; prev_band = '0;
    slow = use_slow;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    repeat (2) @(negedge clk);
    checks++;
    if (n_results != NMB) begin
      failures++;
      $display("FAIL: %0d results, expected %0d", n_results, NMB);
    end
  endtask

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end else $display("  %s: %0d", what, n);
  endtask

  initial begin
    for (int i = 0; i < NMB; i++) expect_r[i] = ref_search(i % MBW, i / MBW, N, M, FW, FH);
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    $display("frame 1: slow memory");
    run_frame(1'b1);
    expect_count("macroblock changes", n_retire);
    expect_count("stall cycles", n_stall_cycles);
    expect_count("steps with no position inside the frame", n_idle_steps);
    // N+M steps before the first block reaches dx = 0, N-1 at every change of
    // macroblock row (the strip refill), M-1 after the last position
    checks++;
    if (n_idle_steps != N + M + (MBH - 1) * (N - 1) + M - 1) begin
      failures++;
      $display("FAIL: %0d idle steps, expected %0d", n_idle_steps, N + M + (MBH - 1) * (N - 1) + M - 1);
    end
    expect_count("positions skipped at top/bottom edge", n_vskip);
    expect_count("strip jumps to the next macroblock row", n_band_jumps);

    $display("frame 2: memory keeps up");
    run_frame(1'b0);
    checks++;
    if (n_stall_cycles != 0 || cycles != longint'(STEPS) * T) begin
      failures++;
      $display("FAIL timing: %0d cycles (%0d stalled), expected %0d", cycles, n_stall_cycles,
               STEPS * T);
    end else $display("  %0d cycles = %0d steps x %0d", cycles, STEPS, T);
    checks++;
    if (u_mem.bad_addr != 0) begin
      failures++;
      $display("FAIL: %0d reads outside the frame", u_mem.bad_addr);
    end

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
