// tb_control_fifo: self-checking test of the thread-tag control FIFO.
//
// Three requesters (tags 1, 2, 3) each hold their gn line until acknowledged,
// as the FIFO control logic does, while the consumer dequeues at random. A
// reference model applies the same rules: the OR of the requests enqueues one
// tag per clock, lowest requester first, only while not full; the served
// requester sees cf_ak in that cycle. Each cycle the testbench compares
// cf_ak before the edge, and head tag, empty, full and occupancy after it.
// A second instance at the default size (two requesters, depth 3) gets a
// directed fill-to-full and drain sequence.
module tb_control_fifo;
  import hwsw_pkg::*;

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

  localparam int N = 3;
  logic [N-1:0] gn, cf_ak;
  thread_id_t   gn_id [N];
  logic         deq, empty, full;
  thread_id_t   head_id;
  logic [1:0]   count;

  control_fifo #(.N_SRC(N), .DEPTH(3)) dut (.clk, .rst_n, .gn, .gn_id, .cf_ak,
    .deq, .head_id, .empty, .full, .count);

  // default-size instance
  logic [1:0] gn2, ak2;
  thread_id_t id2 [2];
  logic deq2, empty2, full2;
  thread_id_t head2;
  logic [1:0] count2;
  control_fifo dut2 (.clk, .rst_n, .gn(gn2), .gn_id(id2), .cf_ak(ak2),
    .deq(deq2), .head_id(head2), .empty(empty2), .full(full2), .count(count2));

  thread_id_t ref_q[$];
  int n_full_block = 0, n_simul = 0;

  initial begin
    gn = '0; deq = 0;
    for (int i = 0; i < N; i++) gn_id[i] = thread_id_t'(i + 1);
    gn2 = '0; deq2 = 0; id2[0] = TID_LINE; id2[1] = TID_CIRCLE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(empty && !full && count == 0, "reset empty");

    // directed on the default instance: both request together, line first
    @(negedge clk); gn2 = 2'b11;
    #1; check(ak2 == 2'b01, "lowest requester acknowledged first");
    @(posedge clk); #1;
    check(!empty2 && head2 == TID_LINE && count2 == 1, "tag visible one clock after enqueue");
    @(negedge clk); gn2 = 2'b10;
    #1; check(ak2 == 2'b10, "second requester served next");
    @(posedge clk); #1;
    @(negedge clk); gn2 = 2'b01;
    @(posedge clk); #1;
    check(full2 && count2 == 3, "full at depth 3");
    @(negedge clk); gn2 = 2'b10;
    #1; check(ak2 == 2'b00, "no acknowledge while full");
    @(posedge clk); #1; check(count2 == 3, "nothing written while full");
    @(negedge clk); gn2 = 2'b00; deq2 = 1;
    #1; check(head2 == TID_LINE, "drain 1");
    @(posedge clk); #1; check(head2 == TID_CIRCLE, "drain 2");
    @(posedge clk); #1; check(head2 == TID_LINE, "drain 3");
    @(posedge clk); #1; check(empty2, "empty after drain");
    @(negedge clk); deq2 = 0;

    // random on the three-requester instance
    for (int i = 0; i < 5000; i++) begin
      logic [N-1:0] exp_ak;
      @(negedge clk);
      for (int r = 0; r < N; r++) if (!gn[r]) gn[r] = ($urandom_range(0, 3) == 0);
      deq = ($urandom_range(0, 2) == 0);
      #1;
      exp_ak = '0;
      if (ref_q.size() < 3) begin
        for (int r = 0; r < N; r++) if (gn[r]) begin exp_ak[r] = 1; break; end
      end else if (gn != 0) n_full_block++;
      if ($countones(gn) > 1) n_simul++;
      check(cf_ak == exp_ak, "cf_ak");
      @(posedge clk);
      if (deq && ref_q.size() > 0) void'(ref_q.pop_front());
      for (int r = 0; r < N; r++) if (exp_ak[r]) ref_q.push_back(thread_id_t'(r + 1));
      #1;
      gn = gn & ~exp_ak;
      check(count == ref_q.size(), "count");
      check(empty == (ref_q.size() == 0), "empty");
      check(full == (ref_q.size() == 3), "full");
      if (ref_q.size() > 0) check(head_id == ref_q[0], "head tag order");
    end
    check(n_full_block > 50 && n_simul > 50, "full and simultaneous requests exercised");
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
