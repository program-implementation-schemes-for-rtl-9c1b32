// hwsw_pkg: constants and types shared by the hardware-software interface.
//
// The interface lets a single processor run several program threads that
// consume data produced by application-specific hardware. Each input channel
// has a data queue; when a queue holds data and the processor has enabled the
// thread that reads it, the thread's identifier tag is placed in a control
// FIFO. The processor's scheduler reads tags from that FIFO and resumes the
// named thread, so threads run in the order their data arrived.
//
// Thread ids follow the graphics controller example: circle = 1, line = 2.
// A control FIFO read returns the tag in bits [1:0] and a valid flag in bit 2.
// The data queue base 0xee000 with its request flag at +4 and enable at +8,
// and the control FIFO addresses 0xaa0000 / 0xab0000 / 0xac0000, are the
// example addresses of the original design. The circle channel at 0xee010,
// the output-queue offset +0xc and the timer at 0xee040 are this design's
// own choices.
package hwsw_pkg;

  localparam int unsigned BUS_AW = 32;  // DLX address width
  localparam int unsigned BUS_DW = 32;  // DLX data width
  localparam int unsigned ID_W   = 2;   // control FIFO word: 2-bit thread id
  localparam int unsigned COORD_W = 16; // data queue word: 16-bit coordinate

  typedef logic [ID_W-1:0] thread_id_t;

  localparam thread_id_t TID_CIRCLE = 2'd1;
  localparam thread_id_t TID_LINE   = 2'd2;

  // Channel register block: +0 data (read dequeues the input queue),
  // +4 status (bit0 q_rq, bit1 output queue full), +8 up_en (bit0),
  // +c output data (write enqueues the output queue).
  localparam logic [BUS_AW-1:0] LINE_BASE   = 32'h000e_e000;
  localparam logic [BUS_AW-1:0] CIRCLE_BASE = 32'h000e_e010;
  localparam logic [BUS_AW-1:0] OFS_DATA    = 32'h0;
  localparam logic [BUS_AW-1:0] OFS_STATUS  = 32'h4;
  localparam logic [BUS_AW-1:0] OFS_ENABLE  = 32'h8;
  localparam logic [BUS_AW-1:0] OFS_OUT     = 32'hc;

  // Control FIFO: status (read), head tag with valid flag (read dequeues),
  // acknowledge (write the tag of the thread that finished with its data).
  localparam logic [BUS_AW-1:0] CFIFO_OUT_ADDR   = 32'h00aa_0000;
  localparam logic [BUS_AW-1:0] CFIFO_ADDR       = 32'h00ab_0000;
  localparam logic [BUS_AW-1:0] CFIFO_OUTAK_ADDR = 32'h00ac_0000;
  localparam int unsigned       CFIFO_VALID_BIT  = 2;

  // I/O timer: +0 reload constant (read/write), +4 write restarts the timer
  // and clears its interrupt, read returns {irq, count}.
  localparam logic [BUS_AW-1:0] TIMER_BASE = 32'h000e_e040;

  // FIFO control logic states (Figure "FIFO control state transition diagram").
  typedef enum logic [1:0] {
    FC_WAIT    = 2'd0,
    FC_ENQUEUE = 2'd1,
    FC_DONE    = 2'd2
  } fc_state_t;

endpackage
