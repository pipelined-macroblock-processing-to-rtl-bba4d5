// tb_sad_pe: feeds random candidate/macroblock pairs back to back, R rows
// per cycle, and checks that each SAD appears exactly one cycle after the
// candidate's last row group, equal to a sum computed here. Includes the
// extreme cases all-0 against all-255 (the largest SAD, 65280) and equal
// blocks (SAD 0), and gaps with `in_valid` low in the middle of a candidate.
module tb_sad_pe;
  import me_pkg::*;

  localparam int N = 16, R = 8, G = N / R;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  pixel_t cand [R][N], refb [R][N];
  logic sad_valid;
  sad_t sad;
  int checks = 0, failures = 0;
  int exp_q [$];
  int n_valid = 0;

  always #5 clk = ~clk;

  sad_pe #(.N(N), .R(R)) dut (.*);

  // every sad_valid must match the oldest expected value, one cycle late
  int due_q [$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && sad_valid) begin
      checks++;
      if (exp_q.size() == 0 || due_q[0] != cyc || int'(sad) != exp_q[0]) begin
        failures++;
        $display("FAIL: sad %0d at cycle %0d, expected %0d at %0d", sad, cyc,
                 exp_q.size() ? exp_q[0] : -1, due_q.size() ? due_q[0] : -1);
      end
      if (exp_q.size()) begin
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

  task automatic candidate(int mode, bit gaps);
    int sum = 0;
    for (int g = 0; g < G; g++) begin
      if (gaps && $urandom_range(1)) begin
        @(negedge clk);
        in_valid = 1'b0;
        for (int r = 0; r < R; r++) for (int k = 0; k < N; k++) cand[r][k] = 8'($urandom);
      end
      @(negedge clk);
      for (int r = 0; r < R; r++)
        for (int k = 0; k < N; k++) begin
          case (mode)
            0: begin cand[r][k] = 8'($urandom); refb[r][k] = 8'($urandom); end
            1: begin cand[r][k] = 8'd0;         refb[r][k] = 8'd255;        end
            default: begin cand[r][k] = 8'($urandom); refb[r][k] = cand[r][k]; end
          endcase
          sum += (cand[r][k] > refb[r][k]) ? int'(cand[r][k]) - int'(refb[r][k])
                                           : int'(refb[r][k]) - int'(cand[r][k]);
        end
      in_valid = 1'b1;
      in_first = (g == 0);
      in_last  = (g == G - 1);
      if (g == G - 1) begin
        exp_q.push_back(sum);
        due_q.push_back(int'(cyc) + 2);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++) for (int k = 0; k < N; k++) begin cand[r][k] = '0; refb[r][k] = '0; end
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    candidate(1, 0);
    candidate(2, 0);
    for (int i = 0; i < 200; i++) candidate(0, i >= 100);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d SADs never appeared", exp_q.size());
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
