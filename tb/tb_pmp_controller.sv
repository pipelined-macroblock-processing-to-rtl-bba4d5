// tb_pmp_controller: runs the controller alone through a frame of 6 x 3
// macroblocks with the default +-64 range (eight positions), with a fetch
// unit replaced by a busy signal of random length, and checks against an
// independent model of the schedule:
//  - the displacement of every position in every step, including the rows
//    of the published schedule (step 0: 48, 32, 16, 0, -16, -32, -48, -64;
//    step 15: 63, 47, ..., -49);
//  - the operated flag and vertical displacement delivered with each SAD;
//  - the fetch job of every step (strip column, band, buffer column,
//    macroblock row);
//  - retire pulses with macroblocks in raster order;
//  - the length of every step: 2M*N/R + 2 cycles, or 2 cycles more than the
//    fetch was busy if that is longer, with `stall` high in the extra cycles.
module tb_pmp_controller;
  import me_pkg::*;

  localparam int N = 16, M = 64, R = 8, FW = 96, FH = 48;
  localparam int S = 2*M/N, MBW = FW/N, MBH = FH/N, NMB = MBW*MBH;
  localparam int ROWS = 2*M + N - 1, G = N/R, T = 2*M*N/R + 2;
  localparam int STEPS = N*(NMB + S);
  localparam int CW = $clog2(N + 1), RW = $clog2(ROWS), NW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic busy, done, f_start, f_sw_en, f_rb_en, f_busy;
  coord_t f_sw_x, f_rb_x, f_rb_y;
  logic signed [COORD_W:0] f_sw_y0;
  logic [CW-1:0] f_sw_col, sw_rd_base;
  logic [NW-1:0] f_rb_row, rb_rd_row;
  logic [RW-1:0] sw_rd_row;
  logic rb_shift, pe_valid, pe_first, pe_last, retire, retire_mb_valid, stall, step_idle;
  logic d_op [S];
  mv_comp_t d_mvx [S];
  mv_comp_t d_mvy;
  coord_t retire_mb_col, retire_mb_row;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pmp_controller #(.N(N), .M(M), .R(R), .FRAME_W(FW), .FRAME_H(FH)) dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // model of the schedule
  function automatic int mb_of(int s, int p);
    return s / N - S + p;
  endfunction
  function automatic int dx_of(int s, int p);
    return -M + (s % N) + N * (S - 1 - p);
  endfunction
  function automatic bit op_of(int s, int p, int dy);
    int i, sx, sy;
    i = mb_of(s, p);
    if (i < 0 || i >= NMB) return 0;
    sx = N * (i % MBW) + dx_of(s, p);
    sy = N * (i / MBW) + dy;
    return sx >= 0 && sx + N <= FW && sy >= 0 && sy + N <= FH;
  endfunction

  int s = -1, busy_left = 0, busy_len = 0, cand = 0, grp = 0, n_retired = 0;
  int step_cycles = 0, stall_cycles = 0, n_stall_steps = 0;
  bit tag_due = 0;
  int tag_cand;
  longint unsigned cyc = 0;

  assign f_busy = busy_left > 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      step_cycles++;
      if (stall) stall_cycles++;
      if (busy_left > 0) busy_left--;
      if (f_start) begin
        // length of the previous step
        if (s >= 0) begin
          int exp_len;
          exp_len = (busy_len + 2 > T) ? busy_len + 2 : T;
          checks++;
          if (step_cycles != exp_len) fail($sformatf("step %0d took %0d cycles, expected %0d", s, step_cycles, exp_len));
          checks++;
          if ((stall_cycles != 0) != (busy_len + 2 > T)) fail($sformatf("step %0d stall %0d", s, stall_cycles));
          if (stall_cycles != 0) n_stall_steps++;
        end
        s++;
        step_cycles = 0;
        stall_cycles = 0;
        cand = 0;
        grp = 0;
        // fetch job of this step
        begin
          int q, band, mbi;
          bit exp_sw;
          q = s - M;
          band = (q >= 0) ? q / FW : 0;
          exp_sw = q >= 0 && band < MBH;
          mbi = s / N;
          checks++;
          if (f_sw_en != exp_sw || (exp_sw && (int'(f_sw_x) != q % FW || int'(f_sw_y0) != N * band - M)))
            fail($sformatf("step %0d sw job %0b x %0d y0 %0d", s, f_sw_en, f_sw_x, f_sw_y0));
          if (int'(f_sw_col) != (int'(sw_rd_base) + N) % (N + 1)) fail("sw buffer column");
          if (f_rb_en != (mbi < NMB) || (mbi < NMB && (int'(f_rb_x) != N * (mbi % MBW) ||
              int'(f_rb_y) != N * (mbi / MBW) + s % N || int'(f_rb_row) != s % N)))
            fail($sformatf("step %0d rb job", s));
        end
        // displacements printed for the first steps of macroblock L
        if (s == N * S) begin
          for (int p = 0; p < S; p++)
            if (++checks && int'(dut.dx[p]) != 48 - 16 * p) fail($sformatf("column 0 pos %0d dx %0d", p, dut.dx[p]));
        end
        if (s == N * S + 15) begin
          for (int p = 0; p < S; p++)
            if (++checks && int'(dut.dx[p]) != 63 - 16 * p) fail($sformatf("column 15 pos %0d dx %0d", p, dut.dx[p]));
        end
        busy_len = (s % 4 == 0) ? $urandom_range(2 * T) : $urandom_range(T / 2);
        busy_left = busy_len;
      end
      // SAD tags arrive one cycle after the last row group
      if (tag_due) begin
        checks++;
        if (int'(d_mvy) != tag_cand - M) fail($sformatf("step %0d: mvy %0d", s, d_mvy));
        for (int p = 0; p < S; p++) begin
          checks++;
          if (d_op[p] != op_of(s, p, tag_cand - M) || int'(d_mvx[p]) != dx_of(s, p))
            fail($sformatf("step %0d cand %0d pos %0d: op %0b dx %0d", s, tag_cand, p, d_op[p], d_mvx[p]));
        end
        tag_due = 0;
      end
      if (pe_valid) begin
        checks++;
        if (int'(sw_rd_row) != cand + grp * R || int'(rb_rd_row) != grp * R ||
            pe_first != (grp == 0) || pe_last != (grp == G - 1))
          fail($sformatf("step %0d: read rows %0d/%0d", s, sw_rd_row, rb_rd_row));
        if (pe_last) begin
          tag_due = 1;
          tag_cand = cand;
        end
        if (grp == G - 1) begin grp = 0; cand++; end else grp++;
      end
      if (retire) begin
        int i;
        i = mb_of(s, 0);
        checks++;
        if (s % N != N - 1 || !rb_shift) fail($sformatf("retire in step %0d", s));
        if (retire_mb_valid != (i >= 0 && i < NMB)) fail($sformatf("retire valid step %0d", s));
        if (retire_mb_valid) begin
          if (int'(retire_mb_col) != i % MBW || int'(retire_mb_row) != i / MBW)
            fail($sformatf("retired MB (%0d,%0d), expected %0d", retire_mb_col, retire_mb_row, i));
          n_retired++;
        end
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    repeat (2) @(negedge clk);
    checks++;
    if (s != STEPS - 1 || n_retired != NMB || n_stall_steps == 0) begin
      failures++;
      $display("FAIL: %0d steps, %0d retired, %0d stalled steps", s + 1, n_retired, n_stall_steps);
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
