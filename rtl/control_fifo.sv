// control_fifo: run-time FIFO of program-thread identifier tags.
//
// Each FIFO control logic raises its gn line with its thread tag when that
// thread has data waiting. The enqueue request is the OR of all gn lines; one
// requester is served per clock, the lowest-numbered first, and gets cf_ak in
// the cycle its tag is written. Nothing is written while the FIFO is full, so
// requesters simply wait. The processor side sees the oldest tag on head_id
// with empty low, and removes it with deq. Tags therefore leave in the order
// their data arrived, which is the scheduling policy of the design.
//
// Depth 3 and the 2-bit tag are those of the graphics controller example; the
// OR-ed enqueue request and the "not full" enqueue condition follow the
// original description. The fixed-priority choice between simultaneous
// requests, the acknowledge timing (combinational, same cycle as the write)
// and the reset to empty are this design's own.
module control_fifo
  import hwsw_pkg::*;
#(
  parameter int unsigned N_SRC = 2,
  parameter int unsigned DEPTH = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // enqueue side, one requester per FIFO control logic
  input  logic [N_SRC-1:0]           gn,
  input  thread_id_t                 gn_id [N_SRC],
  output logic [N_SRC-1:0]           cf_ak,
  // dequeue side, processor
  input  logic                       deq,
  output thread_id_t                 head_id,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  thread_id_t       mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             enqueue_rq, do_enq, do_deq;
  thread_id_t       enq_id;
  logic [N_SRC-1:0] grant;

  assign enqueue_rq = |gn;

  // Lowest-index requester wins.
  always_comb begin
    grant  = '0;
    enq_id = '0;
    for (int i = N_SRC - 1; i >= 0; i--) begin
      if (gn[i]) begin
        grant  = '0;
        grant[i] = 1'b1;
        enq_id = gn_id[i];
      end
    end
  end

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_enq  = enqueue_rq && !full;
  assign do_deq  = deq && !empty;
  assign cf_ak   = do_enq ? grant : '0;
  assign head_id = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_ptr] <= enq_id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_enq) wr_ptr <= next_ptr(wr_ptr);
      if (do_deq) rd_ptr <= next_ptr(rd_ptr);
      case ({do_enq, do_deq})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cf_ak))
    else $error("control_fifo: more than one acknowledge");

endmodule
