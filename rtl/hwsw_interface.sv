// hwsw_interface: hardware half of the hardware-software interface of the
// graphics controller, where one processor runs a line-drawing and a
// circle-drawing program thread.
//
// The application-specific hardware delivers 16-bit coordinate words into one
// input data queue per thread (line, circle). Each queue's q_rq drives a FIFO
// control logic; when the processor has enabled that thread (up_en) and data
// is waiting, the control logic places the thread tag (line 2, circle 1) in a
// 3-deep control FIFO. The processor's scheduler loop polls the control FIFO,
// and on a valid tag (bit 2) resumes the named thread. The thread reads its
// data queue, writes the coordinates it computes into its output data queue,
// for the hardware to take, and writes its tag to the acknowledge address,
// which returns its control logic to wait so the next word can be announced.
// Because tags enter the control FIFO as data arrives, threads run in data
// arrival order.
//
// Beside it sits an interval timer for the alternative timer-driven I/O
// scheme, with its interrupt line brought out; it shares only the bus.
//
// Interface: a single-master synchronous system bus (see bus_regs for the
// address map and timing); per channel a producer port into the input queue
// and a consumer port out of the output queue (see data_queue); tm_irq.
// Latency: a word written into an empty input queue with the thread enabled
// makes its tag readable at CFIFO_ADDR three clock edges later (queue write,
// wait->enqueue, enqueue into the control FIFO).
//
// Queue widths and depths, the control FIFO depth, the tags and the example
// addresses follow the original design; everything bus_regs lists as its own
// is this design's choice, as are the output queues' depth and the reset.
module hwsw_interface
  import hwsw_pkg::*;
#(
  parameter int unsigned N_CH     = 2,
  parameter int unsigned DQ_WIDTH = COORD_W,
  parameter int unsigned DQ_DEPTH = 1,
  parameter int unsigned OQ_DEPTH = 1,
  parameter int unsigned CF_DEPTH = 3,
  parameter int unsigned TIMER_W  = 16,
  parameter logic [BUS_AW-1:0] CH_BASE [N_CH] = '{LINE_BASE, CIRCLE_BASE},
  parameter thread_id_t        CH_TID  [N_CH] = '{TID_LINE, TID_CIRCLE}
) (
  input  logic                clk,
  input  logic                rst_n,
  // system bus, processor is master
  input  logic [BUS_AW-1:0]   bus_addr,
  input  logic                bus_rd,
  input  logic                bus_wr,
  input  logic [BUS_DW-1:0]   bus_wdata,
  output logic [BUS_DW-1:0]   bus_rdata,
  // application-specific hardware: input data queues
  input  logic [N_CH-1:0]     asic_in_enq,
  input  logic [DQ_WIDTH-1:0] asic_in_data [N_CH],
  output logic [N_CH-1:0]     asic_in_full,
  // application-specific hardware: output data queues
  input  logic [N_CH-1:0]     asic_out_deq,
  output logic [DQ_WIDTH-1:0] asic_out_data [N_CH],
  output logic [N_CH-1:0]     asic_out_empty,
  // interval timer interrupt
  output logic                tm_irq
);

  logic [DQ_WIDTH-1:0] in_head [N_CH];
  logic [N_CH-1:0]     in_q_rq, in_deq, out_full, out_enq;
  logic [DQ_WIDTH-1:0] out_wdata;
  logic [N_CH-1:0]     up_en, up_ab, gn, cf_ak;
  thread_id_t          gn_id [N_CH];
  thread_id_t          cf_head_id;
  logic                cf_empty, cf_full, cf_deq;
  logic [$clog2(CF_DEPTH+1)-1:0] cf_count;
  logic [TIMER_W-1:0]  tm_reload, tm_count, tm_value;
  logic                tm_load, tm_restart;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    data_queue #(.WIDTH(DQ_WIDTH), .DEPTH(DQ_DEPTH)) u_in_q (
      .clk, .rst_n,
      .enq(asic_in_enq[c]), .enq_data(asic_in_data[c]), .full(asic_in_full[c]),
      .deq(in_deq[c]), .deq_data(in_head[c]), .empty(),
      .q_rq(in_q_rq[c]), .count()
    );

    fifo_control_logic #(.TID(CH_TID[c])) u_fc (
      .clk, .rst_n,
      .up_en(up_en[c]), .q_rq(in_q_rq[c]), .up_ab(up_ab[c]), .cf_ak(cf_ak[c]),
      .gn(gn[c]), .tid(gn_id[c]), .state()
    );

    data_queue #(.WIDTH(DQ_WIDTH), .DEPTH(OQ_DEPTH)) u_out_q (
      .clk, .rst_n,
      .enq(out_enq[c]), .enq_data(out_wdata), .full(out_full[c]),
      .deq(asic_out_deq[c]), .deq_data(asic_out_data[c]), .empty(asic_out_empty[c]),
      .q_rq(), .count()
    );
  end

  control_fifo #(.N_SRC(N_CH), .DEPTH(CF_DEPTH)) u_cfifo (
    .clk, .rst_n,
    .gn, .gn_id, .cf_ak,
    .deq(cf_deq), .head_id(cf_head_id), .empty(cf_empty), .full(cf_full),
    .count(cf_count)
  );

  io_timer #(.WIDTH(TIMER_W)) u_timer (
    .clk, .rst_n,
    .load_const(tm_load), .const_value(tm_value), .restart(tm_restart),
    .reload_value(tm_reload), .count(tm_count), .irq(tm_irq)
  );

  bus_regs #(
    .N_CH(N_CH), .DW(DQ_WIDTH), .TW(TIMER_W), .CF_DEPTH(CF_DEPTH),
    .CH_BASE(CH_BASE), .CH_TID(CH_TID)
  ) u_regs (
    .clk, .rst_n,
    .bus_addr, .bus_rd, .bus_wr, .bus_wdata, .bus_rdata,
    .in_data(in_head), .in_q_rq, .in_deq, .out_full, .out_enq, .out_data(out_wdata),
    .up_en, .up_ab,
    .cf_head_id, .cf_empty, .cf_full, .cf_count, .cf_deq,
    .tm_reload, .tm_count, .tm_irq, .tm_load, .tm_restart, .tm_value
  );

endmodule
