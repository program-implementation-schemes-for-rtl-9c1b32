// tb_fifo_control_logic: self-checking test of the wait/enqueue/done
// controller.
//
// A directed sequence first walks one full round (enable and data present ->
// gn rises one clock later -> acknowledge -> done -> up_ab -> wait) and checks
// that gn is low whenever either enable or data is missing. Then random
// stimulus runs against a reference model of the three transitions; the
// acknowledge is only given while gn is high, as the control FIFO does. Every
// cycle gn, tid and the state are compared.
module tb_fifo_control_logic;
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

  logic up_en, q_rq, up_ab, cf_ak, gn;
  thread_id_t tid;
  fc_state_t  state;

  fifo_control_logic #(.TID(TID_CIRCLE)) dut (.clk, .rst_n, .up_en, .q_rq, .up_ab, .cf_ak,
                                              .gn, .tid, .state);

  typedef enum int {R_WAIT, R_ENQ, R_DONE} rstate_t;
  rstate_t rs;
  int n_enq = 0, n_hold_done = 0;

  task automatic step_check();
    @(posedge clk);
    case (rs)
      R_WAIT: if (up_en && q_rq) rs = R_ENQ;
      R_ENQ:  if (cf_ak) begin rs = R_DONE; n_enq++; end
      R_DONE: if (up_ab) rs = R_WAIT; else if (up_en && q_rq) n_hold_done++;
      default: rs = R_WAIT;
    endcase
    #1;
    check(gn == (rs == R_ENQ), "gn");
    check(tid == TID_CIRCLE, "tid");
    check(state == ((rs == R_WAIT) ? FC_WAIT : (rs == R_ENQ) ? FC_ENQUEUE : FC_DONE), "state");
  endtask

  initial begin
    {up_en, q_rq, up_ab, cf_ak} = '0;
    rs = R_WAIT;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(!gn && state == FC_WAIT, "reset state");
    // directed round
    q_rq = 1; step_check(); check(!gn, "no gn without up_en");
    q_rq = 0; up_en = 1; step_check(); check(!gn, "no gn without q_rq");
    q_rq = 1; step_check(); check(gn, "gn one clock after up_en & q_rq");
    step_check(); check(gn, "gn held until cf_ak");
    cf_ak = 1; step_check(); cf_ak = 0; check(!gn && state == FC_DONE, "done after cf_ak");
    step_check(); check(state == FC_DONE, "done held without up_ab");
    up_ab = 1; step_check(); up_ab = 0; check(state == FC_WAIT, "wait after up_ab");
    // random
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      up_en = ($urandom_range(0, 3) != 0);
      q_rq  = $urandom_range(0, 1);
      up_ab = ($urandom_range(0, 3) == 0);
      cf_ak = gn && $urandom_range(0, 1);
      step_check();
    end
    check(n_enq > 100 && n_hold_done > 100, "all transitions exercised");
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
