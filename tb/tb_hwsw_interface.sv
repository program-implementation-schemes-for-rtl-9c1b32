// tb_hwsw_interface: end-to-end test of the hardware-software interface at
// its default sizes (two channels, one-word data queues, 3-deep control FIFO).
//
// A processor model runs the scheduler of the graphics controller: it enables
// the line and circle threads, polls the control FIFO until bit 2 (valid) is
// set, and resumes the thread named in bits [1:0]. The resumed thread reads
// its input data queue, spends a random number of cycles computing, writes
// one result word into its output data queue (waiting while that queue is
// full) and acknowledges its tag. Now and then the scheduler disables one
// thread for a while, and between polls it services the interval timer's
// interrupt. Hardware models on the other side write coordinate streams into
// the input queues whenever they are not full, and drain the output queues.
//
// Checked: every word reaches the right thread, in order, exactly once; each
// thread's result reaches the hardware in order; the tag read is always that
// of a thread whose queue holds data; the tag latency of three clocks from an
// idle start; and the timer interval. Each mechanism of the design is counted
// and must occur: an empty poll, both threads pending in the control FIFO at
// once, simultaneous enqueue requests, input-queue backpressure, a disabled
// thread holding back its data, the done state holding back a second word,
// output-queue full, and timer interrupts.
module tb_hwsw_interface;
  import hwsw_pkg::*;

  localparam int WORDS = 300;  // words per channel

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

  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic        bus_rd, bus_wr;
  logic [1:0]  asic_in_enq, asic_in_full, asic_out_deq, asic_out_empty;
  logic [15:0] asic_in_data [2];
  logic [15:0] asic_out_data [2];
  logic        tm_irq;

  hwsw_interface dut (.*);

  // channel 0 = line (tag 2), channel 1 = circle (tag 1)
  localparam logic [31:0] BASE [2] = '{32'h000e_e000, 32'h000e_e010};
  localparam logic [1:0]  TAG  [2] = '{2'd2, 2'd1};

  function automatic logic [15:0] word(input int ch, input int i);
    return 16'((ch == 0) ? (16'h1000 + i * 3) : (16'h8000 ^ (i * 7)));
  endfunction
  function automatic logic [15:0] result(input int ch, input logic [15:0] w);
    return (ch == 0) ? w + 16'd1 : ~w;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_empty_poll = 0, n_both_pending = 0, n_simul_gn = 0, n_in_full = 0;
  int n_disabled_hold = 0, n_done_hold = 0, n_out_full = 0, n_irq = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cfifo.count == 2) n_both_pending++;
    if (dut.gn == 2'b11) n_simul_gn++;
    for (int c = 0; c < 2; c++) begin
      if (asic_in_enq[c] && asic_in_full[c]) n_in_full++;
      if (dut.in_q_rq[c] && !dut.up_en[c]) n_disabled_hold++;
    end
    if (dut.in_q_rq[0] && dut.g_ch[0].u_fc.state == FC_DONE) n_done_hold++;
    if (dut.in_q_rq[1] && dut.g_ch[1].u_fc.state == FC_DONE) n_done_hold++;
  end

  // ---------------- processor bus tasks ----------------
  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_rd = 1; bus_wr = 0;
    #1 d = bus_rdata;
    @(posedge clk);
    #1 bus_rd = 0;
  endtask
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1; bus_rd = 0;
    @(posedge clk);
    #1 bus_wr = 0;
  endtask

  // ---------------- hardware side models ----------------
  int sent [2] = '{0, 0};
  int got_out [2] = '{0, 0};
  bit producers_on = 0;
  int hw_gap [2] = '{0, 0};

  // In lockstep mode both producers write in the same cycles, so words can
  // reach two idle threads together.
  bit lockstep = 0;
  always @(negedge clk) begin
    bit go;
    go = ($urandom_range(0, 3) != 0);
    for (int c = 0; c < 2; c++) begin
      asic_in_enq[c] = producers_on && sent[c] < WORDS && (lockstep ? go : ($urandom_range(0, 3) != 0));
      asic_in_data[c] = word(c, sent[c]);
      asic_out_deq[c] = !asic_out_empty[c] && ($urandom_range(0, 7) == 0);
    end
  end
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (asic_in_enq[c] && !asic_in_full[c]) sent[c]++;
      if (asic_out_deq[c] && !asic_out_empty[c]) begin
        check(asic_out_data[c] == result(c, word(c, got_out[c])), $sformatf("output word ch%0d", c));
        got_out[c]++;
      end
    end
  end

  // ---------------- processor: scheduler and threads ----------------
  int consumed [2] = '{0, 0};
  int edges;
  logic [31:0] d;

  task automatic service_timer();
    logic [31:0] t;
    bus_read(TIMER_BASE + 4, t);
    if (t[31]) begin
      n_irq++;
      bus_write(TIMER_BASE + 4, 0);  // restart
    end
  endtask

  task automatic run_thread(input int ch);
    logic [31:0] st, w;
    bus_read(BASE[ch] + OFS_STATUS, st);
    check(st[0] == 1'b1, "resumed thread has data");
    bus_read(BASE[ch] + OFS_DATA, w);
    check(w[15:0] == word(ch, consumed[ch]), $sformatf("thread %0d input word %0d", ch, consumed[ch]));
    consumed[ch]++;
    repeat ($urandom_range(0, 12)) @(posedge clk);
    // wait for room in the output queue
    forever begin
      bus_read(BASE[ch] + OFS_STATUS, st);
      if (!st[1]) break;
      n_out_full++;
    end
    bus_write(BASE[ch] + OFS_OUT, 32'(result(ch, w[15:0])));
    bus_write(CFIFO_OUTAK_ADDR, 32'(TAG[ch]));
  endtask

  initial begin
    bus_addr = '0; bus_wdata = '0; bus_rd = 0; bus_wr = 0;
    asic_in_enq = '0; asic_out_deq = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // empty poll
    bus_read(CFIFO_ADDR, d);
    check(d[2] == 1'b0, "control FIFO empty after reset");
    if (!d[2]) n_empty_poll++;

    // tag latency from idle: enable line thread, write one word directly
    bus_write(BASE[0] + OFS_ENABLE, 1);
    @(negedge clk);
    force asic_in_enq = 2'b01;
    @(posedge clk);  // edge 1: word written
    edges = 1;
    #1 release asic_in_enq;
    while (dut.u_cfifo.empty && edges < 20) begin @(posedge clk); #1; edges++; end
    check(edges == 3, $sformatf("tag latency 3 clocks, got %0d", edges));
    bus_read(CFIFO_ADDR, d);
    check(d[2] && d[1:0] == TAG[0], "first tag is the line thread");
    run_thread(0);

    // timer: 40-cycle interval
    bus_write(TIMER_BASE, 40);
    bus_write(TIMER_BASE + 4, 0);
    edges = 0;
    while (!tm_irq && edges < 100) begin @(posedge clk); #1; edges++; end
    check(edges == 40, $sformatf("timer interval 40, got %0d", edges));
    bus_write(TIMER_BASE + 4, 0);

    // main scheduler loop
    bus_write(BASE[1] + OFS_ENABLE, 1);
    producers_on = 1;
    while (consumed[0] < WORDS || consumed[1] < WORDS) begin
      int which;
      if (tm_irq) service_timer();
      // now and then let the producers pause so both threads go idle, then
      // restart them together
      if ($urandom_range(0, 40) == 0) begin
        producers_on = 0;
        lockstep = 1;
        repeat (30) begin
          bus_read(CFIFO_ADDR, d);
          if (d[2]) begin
            if (d[1:0] == TAG[0]) run_thread(0); else run_thread(1);
          end
        end
        producers_on = 1;
      end else if ($urandom_range(0, 20) == 0) lockstep = 0;
      // now and then hold one thread disabled for a while
      if ($urandom_range(0, 60) == 0) begin
        which = $urandom_range(0, 1);
        bus_write(BASE[which] + OFS_ENABLE, 0);
        repeat ($urandom_range(10, 40)) @(posedge clk);
        bus_write(BASE[which] + OFS_ENABLE, 1);
      end
      bus_read(CFIFO_ADDR, d);
      if (!d[2]) begin
        n_empty_poll++;
        continue;
      end
      if (d[1:0] == TAG[0]) run_thread(0);
      else if (d[1:0] == TAG[1]) run_thread(1);
      else check(0, "unknown tag");
    end
    // drain outputs
    edges = 0;
    while ((got_out[0] < WORDS || got_out[1] < WORDS) && edges < 2000) begin
      @(posedge clk); edges++;
    end
    check(got_out[0] == WORDS && got_out[1] == WORDS, "all results delivered");
    bus_read(CFIFO_ADDR, d);
    check(d[2] == 1'b0, "control FIFO empty at end");

    $display("mechanisms: empty_poll=%0d both_pending=%0d simul_gn=%0d in_full=%0d disabled_hold=%0d done_hold=%0d out_full=%0d irq=%0d",
             n_empty_poll, n_both_pending, n_simul_gn, n_in_full, n_disabled_hold, n_done_hold, n_out_full, n_irq);
    check(n_empty_poll > 0, "empty poll happened");
    check(n_both_pending > 0, "both threads pending happened");
    check(n_simul_gn > 0, "simultaneous enqueue requests happened");
    check(n_in_full > 0, "input queue backpressure happened");
    check(n_disabled_hold > 0, "disabled thread hold happened");
    check(n_done_hold > 0, "done-state hold happened");
    check(n_out_full > 0, "output queue full happened");
    check(n_irq > 0, "timer interrupt happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
