// tb_data_queue: self-checking test of data_queue.
//
// Two queues are driven with random enqueue/dequeue traffic: one at the
// default depth of one word and one four words deep. A SystemVerilog queue is
// the reference; every cycle the testbench compares full, empty, q_rq, count
// and the head word, and checks that writes to a full queue and reads from an
// empty one change nothing. It also checks that a word written to an empty
// queue is visible, with q_rq high, one clock later.
module tb_data_queue;
  localparam int W = 16;

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

  // depth 1 (default) and depth 4
  logic         enq1, deq1, full1, empty1, rq1;
  logic [W-1:0] din1, dout1;
  logic [0:0]   cnt1;
  logic         enq4, deq4, full4, empty4, rq4;
  logic [W-1:0] din4, dout4;
  logic [2:0]   cnt4;

  data_queue u_q1 (.clk, .rst_n, .enq(enq1), .enq_data(din1), .full(full1),
                   .deq(deq1), .deq_data(dout1), .empty(empty1), .q_rq(rq1), .count(cnt1));
  data_queue #(.WIDTH(W), .DEPTH(4)) u_q4 (.clk, .rst_n, .enq(enq4), .enq_data(din4), .full(full4),
                   .deq(deq4), .deq_data(dout4), .empty(empty4), .q_rq(rq4), .count(cnt4));

  logic [W-1:0] ref1[$], ref4[$];

  task automatic compare(input int depth, input logic [W-1:0] r[$], input logic f, input logic e,
                         input logic rq, input int c, input logic [W-1:0] h);
    check(c == r.size(), $sformatf("count d%0d", depth));
    check(f == (r.size() == depth), $sformatf("full d%0d", depth));
    check(e == (r.size() == 0), $sformatf("empty d%0d", depth));
    check(rq == (r.size() != 0), $sformatf("q_rq d%0d", depth));
    if (r.size() != 0) check(h == r[0], $sformatf("head d%0d", depth));
  endtask

  int n_full_writes = 0, n_empty_reads = 0;

  initial begin
    {enq1, deq1, enq4, deq4} = '0;
    din1 = '0; din4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare(1, ref1, full1, empty1, rq1, cnt1, dout1);
    // latency: write into empty queue, visible next clock
    enq1 = 1; din1 = 16'hbeef;
    @(posedge clk); #1;
    enq1 = 0;
    check(rq1 && dout1 == 16'hbeef, "one-cycle write latency");
    ref1.push_back(16'hbeef);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      enq1 = $urandom_range(0, 1); deq1 = $urandom_range(0, 1); din1 = W'($urandom);
      enq4 = ($urandom_range(0, 2) != 0) ^ (i[9]); deq4 = ($urandom_range(0, 2) != 0) ^ !i[9];
      din4 = W'($urandom);
      if (enq1 && ref1.size() == 1 && !deq1) n_full_writes++;
      if (deq1 && ref1.size() == 0) n_empty_reads++;
      @(posedge clk);
      // reference update: dequeue first, then enqueue, both judged on pre-edge state
      begin
        bit can_e1, can_d1, can_e4, can_d4;
        can_e1 = ref1.size() < 1; can_d1 = ref1.size() > 0;
        can_e4 = ref4.size() < 4; can_d4 = ref4.size() > 0;
        if (deq1 && can_d1) void'(ref1.pop_front());
        if (enq1 && can_e1) ref1.push_back(din1);
        if (deq4 && can_d4) void'(ref4.pop_front());
        if (enq4 && can_e4) ref4.push_back(din4);
      end
      #1;
      compare(1, ref1, full1, empty1, rq1, cnt1, dout1);
      compare(4, ref4, full4, empty4, rq4, cnt4, dout4);
    end
    check(n_full_writes > 0 && n_empty_reads > 0, "full/empty corner cases exercised");
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
