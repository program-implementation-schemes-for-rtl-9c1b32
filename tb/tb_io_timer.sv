// tb_io_timer: self-checking test of the interval timer.
//
// Checks the interval in clock cycles: after reset the interrupt rises after
// the default 81 edges, and after every restart it rises exactly reload-value
// edges later and stays high until the next restart. An interrupt service
// routine model restarts the timer a random delay after each interrupt, with
// random new intervals loaded now and then, and the count is compared with a
// reference every cycle.
module tb_io_timer;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic        load_const, restart, irq;
  logic [15:0] const_value, reload_value, count;

  io_timer dut (.clk, .rst_n, .load_const, .const_value, .restart, .reload_value, .count, .irq);

  int edges;
  int ref_reload, ref_count;
  bit ref_irq;
  int n_irq = 0;

  task automatic ref_step();
    if (load_const) ref_reload = const_value;
    if (restart) begin
      ref_count = load_const ? const_value : ref_reload;
      ref_irq = 0;
    end else if (ref_count != 0) begin
      if (ref_count == 1) ref_irq = 1;
      ref_count--;
    end else ref_irq = 1;
  endtask

  initial begin
    {load_const, restart} = '0;
    const_value = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // default interval
    edges = 0;
    while (!irq && edges < 200) begin @(posedge clk); #1; edges++; end
    check(edges == 81, $sformatf("default interval 81, got %0d", edges));
    // load 10 and restart together
    @(negedge clk); load_const = 1; const_value = 10; restart = 1;
    @(posedge clk); #1; load_const = 0; restart = 0;
    check(!irq && count == 10 && reload_value == 10, "restart loads new constant");
    edges = 0;
    while (!irq && edges < 200) begin @(posedge clk); #1; edges++; end
    check(edges == 10, $sformatf("interval 10, got %0d", edges));
    repeat (5) @(posedge clk); #1;
    check(irq, "irq held until restart");
    // random service routine
    ref_reload = 10; ref_count = 0; ref_irq = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      load_const = ($urandom_range(0, 40) == 0);
      const_value = 16'($urandom_range(0, 30));
      restart = (irq && $urandom_range(0, 2) == 0) || ($urandom_range(0, 200) == 0);
      if (irq && restart) n_irq++;
      @(posedge clk);
      ref_step();
      #1;
      check(count == 16'(ref_count), "count");
      check(irq == ref_irq, "irq");
      check(reload_value == 16'(ref_reload), "reload value");
    end
    check(n_irq > 100, "interrupts serviced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
