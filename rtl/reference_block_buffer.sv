// reference_block_buffer: the macroblocks being searched in parallel.
//
// Holds S = 2M/N macroblocks of the frame being coded (positions 0..S-1,
// position 0 the oldest, S-1 the newest) plus one further block, the "next
// reference block", which is filled while the others are searched. A pulse
// on `shift` performs the macroblock change: the block at position 0 leaves,
// every block moves down one position and the next block becomes position
// S-1. Physically the S+1 blocks stay where they are and a head pointer
// rotates, so position p lives in slot (head + p) mod (S+1) and the slot
// being loaded is (head + S) mod (S+1).
//
// Interface: a pixel write port into the loading slot (row, column), and a
// read port giving, for every position, R consecutive rows of its block
// starting at `rd_row`, combinationally. The S+1 block organisation and the
// shift on a macroblock change follow the document; the rotating pointer
// and the read width are choices of this design.
module reference_block_buffer
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int S = 8,                 // macroblocks searched in parallel (2M/N)
  parameter int R = 8,                 // rows delivered per read
  localparam int SLOTS = S + 1,
  localparam int SW = $clog2(SLOTS),
  localparam int NW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          wr_en,
  input  logic [NW-1:0] wr_row,
  input  logic [NW-1:0] wr_col,
  input  pixel_t        wr_data,
  input  logic [NW-1:0] rd_row,
  output pixel_t        rd_data [S][R][N]
);

  pixel_t          mem [SLOTS][N][N];
  logic [SW-1:0]   head;
  logic [SW-1:0]   load_slot;

  function automatic logic [SW-1:0] slot_of(logic [SW-1:0] h, int p);
    return SW'((int'(h) + p) % SLOTS);
  endfunction

  assign load_slot = slot_of(head, S);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     head <= '0;
    else if (shift) head <= slot_of(head, 1);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[load_slot][wr_row][wr_col] <= wr_data;
  end

  always_comb begin
    for (int p = 0; p < S; p++) begin
      for (int r = 0; r < R; r++) begin
        for (int k = 0; k < N; k++) begin
          rd_data[p][r][k] = mem[slot_of(head, p)][(int'(rd_row) + r) % N][k];
        end
      end
    end
  end

endmodule
