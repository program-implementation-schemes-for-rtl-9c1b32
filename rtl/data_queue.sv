// data_queue: first-in first-out buffer for one named channel between the
// application-specific hardware and the processor.
//
// The producer writes with enq/enq_data while full is low; the consumer sees
// the oldest word on deq_data (show-ahead) and removes it with deq while empty
// is low. q_rq, the queue's data request to the FIFO control logic, is high
// whenever the queue holds a word. Writes to a full queue and reads from an
// empty one are ignored. Enqueue and dequeue in the same cycle are allowed;
// a word written becomes visible on deq_data the next cycle.
//
// The 16-bit width and depth of one word are those of the line and circle
// queues of the graphics controller example. The storage is a register array
// with wrap-around pointers and an occupancy counter; reset empties the queue
// (contents are not cleared). Those details are this design's own.
module data_queue #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enq,
  input  logic [WIDTH-1:0]          enq_data,
  output logic                      full,
  input  logic                      deq,
  output logic [WIDTH-1:0]          deq_data,
  output logic                      empty,
  output logic                      q_rq,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_enq, do_deq;

  assign full   = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty  = (count == '0);
  assign q_rq   = !empty;
  assign do_enq = enq && !full;
  assign do_deq = deq && !empty;
  assign deq_data = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_ptr] <= enq_data;
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

  assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH+1))'(DEPTH))
    else $error("data_queue: occupancy above depth");

endmodule
