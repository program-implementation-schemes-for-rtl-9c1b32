// bus_regs: system-bus slave that maps the hardware-software interface into
// the processor's address space.
//
// The processor is always bus master; every queue, enable and status bit is
// reached with ordinary loads and stores. One access per clock: bus_rd or
// bus_wr with bus_addr (and bus_wdata) held for that cycle. Read data is
// combinational in the same cycle; the side effects of an access (dequeue,
// enqueue, register write) take place at the clock edge that ends it.
//
// Per channel c at base CH_BASE[c]:
//   +0 read  : oldest word of the input data queue, which is dequeued
//   +4 read  : bit0 q_rq (input queue holds data), bit1 output queue full
//   +8 r/w   : bit0 up_en, the processor's enable of the channel's thread
//   +c write : enqueue bus_wdata into the output data queue
// Control FIFO:
//   CFIFO_ADDR       read : bit2 valid, bits[1:0] thread tag; a valid read
//                           dequeues the tag
//   CFIFO_OUT_ADDR   read : bit0 empty, bit1 full, bit4 upward occupancy
//   CFIFO_OUTAK_ADDR write: bits[1:0] tag; pulses up_ab of every channel
//                           whose thread has that tag
// Timer at TIMER_BASE: +0 r/w reload constant, +4 write restarts the timer,
// +4 read returns bit31 irq and the current count.
//
// The data queue at 0xee000 with q_rq at bit 0 of +4 and up_en at bit 0 of
// +8, the three control FIFO addresses and the valid flag in bit 2 come from
// the original design's examples. The second channel's base, the output
// queue and timer registers, the status word layout and the tag-matched up_ab
// are this design's own. Unmapped reads return zero.
module bus_regs
  import hwsw_pkg::*;
#(
  parameter int unsigned       N_CH   = 2,
  parameter int unsigned       DW     = COORD_W,
  parameter int unsigned       TW     = 16,
  parameter int unsigned       CF_DEPTH = 3,
  parameter logic [BUS_AW-1:0] CH_BASE [N_CH] = '{LINE_BASE, CIRCLE_BASE},
  parameter thread_id_t        CH_TID  [N_CH] = '{TID_LINE, TID_CIRCLE}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // system bus
  input  logic [BUS_AW-1:0]    bus_addr,
  input  logic                 bus_rd,
  input  logic                 bus_wr,
  input  logic [BUS_DW-1:0]    bus_wdata,
  output logic [BUS_DW-1:0]    bus_rdata,
  // data queues
  input  logic [DW-1:0]        in_data [N_CH],
  input  logic [N_CH-1:0]      in_q_rq,
  output logic [N_CH-1:0]      in_deq,
  input  logic [N_CH-1:0]      out_full,
  output logic [N_CH-1:0]      out_enq,
  output logic [DW-1:0]        out_data,
  // FIFO control logic
  output logic [N_CH-1:0]      up_en,
  output logic [N_CH-1:0]      up_ab,
  // control FIFO
  input  thread_id_t           cf_head_id,
  input  logic                 cf_empty,
  input  logic                 cf_full,
  input  logic [$clog2(CF_DEPTH+1)-1:0] cf_count,
  output logic                 cf_deq,
  // timer
  input  logic [TW-1:0]        tm_reload,
  input  logic [TW-1:0]        tm_count,
  input  logic                 tm_irq,
  output logic                 tm_load,
  output logic                 tm_restart,
  output logic [TW-1:0]        tm_value
);

  logic sel_cf, sel_cf_out, sel_cf_ak, sel_tm_const, sel_tm_ctl;

  assign sel_cf       = (bus_addr == CFIFO_ADDR);
  assign sel_cf_out   = (bus_addr == CFIFO_OUT_ADDR);
  assign sel_cf_ak    = (bus_addr == CFIFO_OUTAK_ADDR);
  assign sel_tm_const = (bus_addr == TIMER_BASE);
  assign sel_tm_ctl   = (bus_addr == TIMER_BASE + 32'h4);

  assign out_data   = bus_wdata[DW-1:0];
  assign tm_value   = bus_wdata[TW-1:0];
  assign tm_load    = bus_wr && sel_tm_const;
  assign tm_restart = bus_wr && sel_tm_ctl;
  assign cf_deq     = bus_rd && sel_cf && !cf_empty;

  always_comb begin
    in_deq  = '0;
    out_enq = '0;
    up_ab   = '0;
    for (int c = 0; c < N_CH; c++) begin
      in_deq[c]  = bus_rd && (bus_addr == CH_BASE[c] + OFS_DATA);
      out_enq[c] = bus_wr && (bus_addr == CH_BASE[c] + OFS_OUT);
      up_ab[c]   = bus_wr && sel_cf_ak && (bus_wdata[ID_W-1:0] == CH_TID[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_en <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++)
        if (bus_wr && (bus_addr == CH_BASE[c] + OFS_ENABLE)) up_en[c] <= bus_wdata[0];
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (bus_rd) begin
      for (int c = 0; c < N_CH; c++) begin
        if (bus_addr == CH_BASE[c] + OFS_DATA)   bus_rdata = BUS_DW'(in_data[c]);
        if (bus_addr == CH_BASE[c] + OFS_STATUS) bus_rdata = BUS_DW'({out_full[c], in_q_rq[c]});
        if (bus_addr == CH_BASE[c] + OFS_ENABLE) bus_rdata = BUS_DW'(up_en[c]);
      end
      if (sel_cf) begin
        bus_rdata = BUS_DW'(cf_head_id);
        bus_rdata[CFIFO_VALID_BIT] = !cf_empty;
      end
      if (sel_cf_out)   bus_rdata = BUS_DW'({cf_count, 2'b00, cf_full, cf_empty});
      if (sel_tm_const) bus_rdata = BUS_DW'(tm_reload);
      if (sel_tm_ctl)   bus_rdata = {tm_irq, (BUS_DW-1)'(tm_count)};
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(bus_rd && bus_wr))
    else $error("bus_regs: read and write in the same cycle");

endmodule
