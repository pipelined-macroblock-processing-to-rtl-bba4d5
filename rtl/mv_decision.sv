// mv_decision: minimum-SAD selection for the macroblocks in the pipeline.
//
// One record (best SAD, its displacement, a found flag) is kept per buffer
// position. When the processing element of position p reports a SAD for a
// search position that was actually operated (`sad_op[p]`), the record of
// p is replaced if no match was found yet or the new SAD is strictly lower:
// among equal SADs the first one in search order wins, i.e. the leftmost
// column and within it the topmost position. A pulse on `retire` ends the
// search of the macroblock at position 0: its record is emitted on `result`
// with `result_valid` (if `retire_mb_valid`), and the records move down one
// position like the blocks in the reference block buffer, the newest
// position starting empty. The macroblock coordinates come with `retire`.
//
// Full search picks the displacement with the least distortion; the
// tie-break rule and the record shifting are choices of this design.
module mv_decision
  import me_pkg::*;
#(
  parameter int S = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sad_valid,          // SADs of all positions arrive together
  input  logic       sad_op   [S],       // search position was operated
  input  sad_t       sad      [S],
  input  mv_comp_t   sad_mvx  [S],
  input  mv_comp_t   sad_mvy,
  input  logic       retire,
  input  logic       retire_mb_valid,
  input  coord_t     retire_mb_col,
  input  coord_t     retire_mb_row,
  output logic       result_valid,
  output mv_result_t result
);

  typedef struct packed {
    logic     found;
    sad_t     sad;
    mv_comp_t mvx;
    mv_comp_t mvy;
  } best_t;

  best_t best [S];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < S; p++) best[p] <= '0;
      result_valid <= 1'b0;
      result       <= '0;
    end else begin
      result_valid <= 1'b0;
      if (retire) begin
        result_valid  <= retire_mb_valid;
        result.mb_col <= retire_mb_col;
        result.mb_row <= retire_mb_row;
        result.mvx    <= best[0].mvx;
        result.mvy    <= best[0].mvy;
        result.sad    <= best[0].sad;
        for (int p = 0; p < S - 1; p++) best[p] <= best[p+1];
        best[S-1] <= '0;
      end else if (sad_valid) begin
        for (int p = 0; p < S; p++) begin
          if (sad_op[p] && (!best[p].found || sad[p] < best[p].sad)) begin
            best[p] <= '{found: 1'b1, sad: sad[p], mvx: sad_mvx[p], mvy: sad_mvy};
          end
        end
      end
    end
  end

  // a retire comes after the last SAD of a step, never with it
  a_retire_alone: assert property (@(posedge clk) disable iff (!rst_n) !(retire && sad_valid))
    else $error("mv_decision: retire together with SADs");

endmodule
