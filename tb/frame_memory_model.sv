// frame_memory_model: behavioural model of the external frame memory.
//
// Not synthesizable. Serves one-pixel read requests for the previous frame
// and the frame being coded, both computed from tb_frame_pkg. `ready` is
// high with probability READY_PCT percent each cycle; each accepted request
// is answered after 1 .. MAX_LAT cycles, in request order, at most one
// response per cycle. `slow` switches to the random behaviour; otherwise
// the memory is always ready and answers after one cycle.
module frame_memory_model
  import me_pkg::*;
  import tb_frame_pkg::*;
#(
  parameter int N         = 16,
  parameter int M         = 64,
  parameter int FRAME_W   = 720,
  parameter int FRAME_H   = 480,
  parameter int READY_PCT = 70,
  parameter int MAX_LAT   = 6
) (
  input  logic     clk,
  input  logic     slow,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output pixel_t   rsp_data
);

  typedef struct {
    longint due;
    pixel_t data;
  } rsp_t;

  rsp_t   q[$];
  longint now = 0;
  longint last_due = 0;
  int     bad_addr = 0;

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    rsp_t r;
    now <= now + 1;
    if (req_valid && req_ready) begin
      if (int'(req.x) >= FRAME_W || int'(req.y) >= FRAME_H) begin
        bad_addr++;
        $display("frame_memory_model: read outside the frame: frame %0d x %0d y %0d", req.frame, req.x, req.y);
      end
      r.data = (req.frame == FRAME_REF) ? prev_pix(int'(req.x), int'(req.y))
                                        : cur_pix(int'(req.x), int'(req.y), N, M, FRAME_W, FRAME_H);
      r.due  = now + (slow ? longint'($urandom_range(MAX_LAT, 1)) : 1);
      if (r.due <= last_due) r.due = last_due + 1;
      last_due = r.due;
      q.push_back(r);
    end
    if (q.size() > 0 && q[0].due <= now) begin
      rsp_valid <= 1'b1;
      rsp_data  <= q[0].data;
      void'(q.pop_front());
    end else begin
      rsp_valid <= 1'b0;
    end
    req_ready <= slow ? ($urandom_range(99) < READY_PCT) : 1'b1;
  end

endmodule
