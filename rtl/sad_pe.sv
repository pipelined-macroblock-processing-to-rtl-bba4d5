// sad_pe: sum-of-absolute-differences processing element.
//
// Matches one macroblock against one candidate block, R rows per cycle. On
// every cycle with `in_valid` it adds the absolute differences of the R x N
// pixel pairs presented to a running sum; `in_first` restarts the sum and
// `in_last` marks the final group of rows of a candidate. One cycle after
// the last group, `sad_valid` pulses with the candidate's complete SAD on
// `sad`. A candidate therefore takes N/R cycles and the element accepts a
// new candidate every N/R cycles with no gaps.
//
// The document names the processing elements of the basis full-search
// algorithm and keeps their number and type unchanged; the row-parallel
// organisation and the adder tree are choices of this design.
module sad_pe
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int R = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  logic   in_last,
  input  pixel_t cand [R][N],
  input  pixel_t refb [R][N],
  output logic   sad_valid,
  output sad_t   sad
);

  sad_t acc;
  sad_t group_sum;
  sad_t acc_next;

  always_comb begin
    group_sum = '0;
    for (int r = 0; r < R; r++) begin
      for (int k = 0; k < N; k++) begin
        pixel_t diff;
        diff = (cand[r][k] > refb[r][k]) ? cand[r][k] - refb[r][k] : refb[r][k] - cand[r][k];
        group_sum += sad_t'(diff);
      end
    end
    acc_next = (in_first ? '0 : acc) + group_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sad       <= '0;
      sad_valid <= 1'b0;
    end else begin
      sad_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) sad <= acc_next;
      end
    end
  end

endmodule
