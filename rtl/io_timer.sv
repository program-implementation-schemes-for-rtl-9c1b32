// io_timer: interval timer that schedules an I/O interrupt service routine.
//
// In the timer-driven scheme a thread that performs a rate-constrained read
// or write runs as an interrupt service routine. The timer counts down by one
// every clock tick; when it reaches zero it raises irq and stops. The service
// routine performs the I/O operation and restarts the timer (restart), which
// reloads the count from reload_value and clears irq. load_const writes a new
// reload value, the interruption interval chosen from the rate constraint.
//
// The count-down, interrupt-at-zero and reload-by-the-service-routine
// behaviour follows the original description. The 16-bit width, the default
// interval of 81 cycles (the input period of the hardware control FIFO
// implementation of the graphics controller), stopping at zero, the level
// irq held until restart, and reset (count loaded, irq clear) are this
// design's own. After restart, irq rises reload_value clock edges later.
module io_timer #(
  parameter int unsigned          WIDTH = 16,
  parameter logic [WIDTH-1:0]     DEFAULT_INTERVAL = 16'd81
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_const,
  input  logic [WIDTH-1:0] const_value,
  input  logic             restart,
  output logic [WIDTH-1:0] reload_value,
  output logic [WIDTH-1:0] count,
  output logic             irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reload_value <= DEFAULT_INTERVAL;
      count        <= DEFAULT_INTERVAL;
      irq          <= 1'b0;
    end else begin
      if (load_const) reload_value <= const_value;
      if (restart) begin
        count <= load_const ? const_value : reload_value;
        irq   <= 1'b0;
      end else if (count != '0) begin
        count <= count - 1'b1;
        if (count == WIDTH'(1)) irq <= 1'b1;
      end else begin
        irq <= 1'b1;  // a zero interval expires at once
      end
    end
  end

endmodule
