// tb_mv_decision: drives the decision unit with four positions the way the
// pipeline does: rounds of SADs for all positions (each with a random
// operated flag and displacement, SADs drawn from a small range so that
// ties are frequent), and every few rounds a retire. A model tracks the
// first strictly smallest operated SAD per macroblock as it moves down the
// positions and checks each emitted result (coordinates, vector, SAD) and
// that nothing is emitted for a retire without a valid macroblock.
module tb_mv_decision;
  import me_pkg::*;

  localparam int S = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic sad_valid = 1'b0, retire = 1'b0, retire_mb_valid = 1'b0;
  logic sad_op [S];
  sad_t sad [S];
  mv_comp_t sad_mvx [S];
  mv_comp_t sad_mvy = '0;
  coord_t retire_mb_col = '0, retire_mb_row = '0;
  logic result_valid;
  mv_result_t result;
  int checks = 0, failures = 0;

  typedef struct { bit found; int sad, mvx, mvy; } mdl_t;
  mdl_t mdl [S];
  mdl_t exp_r;
  int exp_pending = 0;
  bit exp_valid;
  int exp_col, exp_row, n_results = 0, n_ties = 0;

  always #5 clk = ~clk;

  mv_decision #(.S(S)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && exp_pending == 2) begin
      exp_pending = 1;
    end else if (rst_n && exp_pending == 1) begin
      checks++;
      if (result_valid !== exp_valid ||
          (exp_valid && (int'(result.mvx) != exp_r.mvx || int'(result.mvy) != exp_r.mvy ||
                         int'(result.sad) != exp_r.sad || int'(result.mb_col) != exp_col ||
                         int'(result.mb_row) != exp_row))) begin
        failures++;
        $display("FAIL result: valid %0b (%0d,%0d) sad %0d, expected %0b (%0d,%0d) sad %0d",
                 result_valid, result.mvx, result.mvy, result.sad, exp_valid, exp_r.mvx,
                 exp_r.mvy, exp_r.sad);
      end
      if (result_valid) n_results++;
      exp_pending = 0;
    end else if (rst_n && result_valid) begin
      checks++;
      failures++;
      $display("FAIL: unexpected result");
    end
  end

  initial begin
    for (int p = 0; p < S; p++) begin
      sad_op[p] = 1'b0; sad[p] = '0; sad_mvx[p] = '0; mdl[p] = '{0, 0, 0, 0};
    end
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int round = 0; round < 2000; round++) begin
      @(negedge clk);
      if (round % 9 == 8) begin
        retire = 1'b1;
        retire_mb_valid = ($urandom_range(9) != 0);
        retire_mb_col = coord_t'($urandom_range(44));
        retire_mb_row = coord_t'($urandom_range(29));
        exp_r = mdl[0]; exp_valid = retire_mb_valid;
        exp_col = int'(retire_mb_col); exp_row = int'(retire_mb_row);
        exp_pending = 2;
        for (int p = 0; p < S - 1; p++) mdl[p] = mdl[p+1];
        mdl[S-1] = '{0, 0, 0, 0};
        sad_valid = 1'b0;
      end else begin
        retire = 1'b0;
        sad_valid = 1'b1;
        sad_mvy = mv_comp_t'($urandom_range(127) - 64);
        for (int p = 0; p < S; p++) begin
          sad_op[p]  = ($urandom_range(3) != 0);
          sad[p]     = sad_t'($urandom_range(40) + 100);
          sad_mvx[p] = mv_comp_t'($urandom_range(127) - 64);
          if (sad_op[p]) begin
            if (mdl[p].found && int'(sad[p]) == mdl[p].sad) n_ties++;
            if (!mdl[p].found || int'(sad[p]) < mdl[p].sad)
              mdl[p] = '{1, int'(sad[p]), int'(sad_mvx[p]), int'(sad_mvy)};
          end
        end
      end
    end
    @(negedge clk);
    retire = 1'b0; sad_valid = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_results == 0 || n_ties == 0) begin
      failures++;
      $display("FAIL: %0d results, %0d ties", n_results, n_ties);
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
