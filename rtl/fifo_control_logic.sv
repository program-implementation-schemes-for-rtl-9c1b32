// fifo_control_logic: decides when a thread's identifier tag is placed in the
// control FIFO for one data queue.
//
// Three states, as in the original state diagram:
//   wait    (gn=0)  -> enqueue when up_en & q_rq: the thread is enabled by the
//                      processor and its data queue holds data;
//   enqueue (gn=1)  -> done when cf_ak: the control FIFO took the tag;
//   done    (gn=0)  -> wait when up_ab: the processor signals it has finished
//                      with the control FIFO entry of this thread.
// Holding in done until up_ab stops the same data word from being announced
// twice. gn is a Moore output of the state register; cf_ak and up_ab are
// sampled on the rising clock edge. Several queues that feed one thread are
// served by OR-ing their q_rq into this block's q_rq.
//
// The states, transitions and signal names follow the original design. The
// state encoding, the asynchronous active-low reset into wait and the tag
// output tid (a parameter carried alongside gn) are this design's own.
module fifo_control_logic
  import hwsw_pkg::*;
#(
  parameter thread_id_t TID = TID_LINE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       up_en,
  input  logic       q_rq,
  input  logic       up_ab,
  input  logic       cf_ak,
  output logic       gn,
  output thread_id_t tid,
  output fc_state_t  state
);

  fc_state_t next_state;

  always_comb begin
    next_state = state;
    unique case (state)
      FC_WAIT:    if (up_en && q_rq) next_state = FC_ENQUEUE;
      FC_ENQUEUE: if (cf_ak)         next_state = FC_DONE;
      FC_DONE:    if (up_ab)         next_state = FC_WAIT;
      default:                       next_state = FC_WAIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= FC_WAIT;
    else        state <= next_state;
  end

  assign gn  = (state == FC_ENQUEUE);
  assign tid = TID;

  // The control FIFO only acknowledges a pending request.
  assert property (@(posedge clk) disable iff (!rst_n) cf_ak |-> gn)
    else $error("fifo_control_logic: cf_ak without gn");

endmodule
