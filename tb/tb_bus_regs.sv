// tb_bus_regs: self-checking test of the system-bus address decoder.
//
// Random single-cycle reads and writes go to every mapped address and to
// random unmapped ones, with random values on the queue, control FIFO and
// timer inputs. For each access the expected read data and the expected
// strobes (dequeue, enqueue, acknowledge, timer load/restart) are worked out
// from the address map and compared. The thread-enable registers are checked
// against a reference copy of what was written.
module tb_bus_regs;
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

  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic        bus_rd, bus_wr;
  logic [15:0] in_data [2];
  logic [1:0]  in_q_rq, in_deq, out_full, out_enq, up_en, up_ab;
  logic [15:0] out_data;
  thread_id_t  cf_head_id;
  logic        cf_empty, cf_full, cf_deq;
  logic [1:0]  cf_count;
  logic [15:0] tm_reload, tm_count, tm_value;
  logic        tm_irq, tm_load, tm_restart;

  bus_regs dut (.*);

  localparam logic [31:0] ADDRS [14] = '{
    32'h000e_e000, 32'h000e_e004, 32'h000e_e008, 32'h000e_e00c,
    32'h000e_e010, 32'h000e_e014, 32'h000e_e018, 32'h000e_e01c,
    32'h00aa_0000, 32'h00ab_0000, 32'h00ac_0000,
    32'h000e_e040, 32'h000e_e044, 32'h0000_1234};
  localparam logic [1:0] TIDS [2] = '{2'd2, 2'd1};

  logic [1:0] ref_en;
  int n_cf_pop = 0, n_ab = 0;

  initial begin
    bus_addr = '0; bus_wdata = '0; bus_rd = 0; bus_wr = 0;
    ref_en = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      logic [31:0] exp_rd;
      logic [1:0]  exp_deq, exp_enq, exp_ab;
      int          a;
      @(negedge clk);
      a = $urandom_range(0, 13);
      bus_addr  = (a == 13) ? $urandom : ADDRS[a];
      bus_wdata = $urandom;
      if ($urandom_range(0, 1)) bus_wdata[1:0] = TIDS[$urandom_range(0, 1)];
      {bus_rd, bus_wr} = 2'b00;
      case ($urandom_range(0, 2))
        0: bus_rd = 1;
        1: bus_wr = 1;
        default: ;
      endcase
      in_data[0] = $urandom; in_data[1] = $urandom;
      in_q_rq = $urandom; out_full = $urandom;
      cf_head_id = $urandom; cf_empty = $urandom; cf_full = $urandom; cf_count = $urandom;
      tm_reload = $urandom; tm_count = $urandom; tm_irq = $urandom;
      #1;
      exp_rd = '0; exp_deq = '0; exp_enq = '0; exp_ab = '0;
      if (bus_rd) begin
        for (int c = 0; c < 2; c++) begin
          logic [31:0] b;
          b = 32'h000e_e000 + 32'(c) * 32'h10;
          if (bus_addr == b)       begin exp_rd = {16'h0, in_data[c]}; exp_deq[c] = 1; end
          if (bus_addr == b + 4)   exp_rd = {30'h0, out_full[c], in_q_rq[c]};
          if (bus_addr == b + 8)   exp_rd = {31'h0, ref_en[c]};
        end
        if (bus_addr == 32'h00ab_0000) exp_rd = {29'h0, !cf_empty, cf_head_id};
        if (bus_addr == 32'h00aa_0000) exp_rd = {26'h0, cf_count, 2'b00, cf_full, cf_empty};
        if (bus_addr == 32'h000e_e040) exp_rd = {16'h0, tm_reload};
        if (bus_addr == 32'h000e_e044) exp_rd = {tm_irq, 15'h0, tm_count};
      end
      if (bus_wr) begin
        if (bus_addr == 32'h000e_e00c) exp_enq[0] = 1;
        if (bus_addr == 32'h000e_e01c) exp_enq[1] = 1;
        if (bus_addr == 32'h00ac_0000) for (int c = 0; c < 2; c++)
          if (bus_wdata[1:0] == TIDS[c]) exp_ab[c] = 1;
      end
      check(bus_rdata == exp_rd, $sformatf("read data at %h", bus_addr));
      check(in_deq == exp_deq, "input dequeue strobe");
      check(out_enq == exp_enq, "output enqueue strobe");
      if (out_enq != 0) check(out_data == bus_wdata[15:0], "output data");
      check(up_ab == exp_ab, "up_ab by tag");
      check(cf_deq == (bus_rd && bus_addr == 32'h00ab_0000 && !cf_empty), "control FIFO dequeue");
      check(tm_load == (bus_wr && bus_addr == 32'h000e_e040), "timer load");
      check(tm_restart == (bus_wr && bus_addr == 32'h000e_e044), "timer restart");
      if (tm_load) check(tm_value == bus_wdata[15:0], "timer value");
      check(up_en == ref_en, "up_en");
      if (cf_deq) n_cf_pop++;
      if (up_ab != 0) n_ab++;
      @(posedge clk);
      if (bus_wr && bus_addr == 32'h000e_e008) ref_en[0] = bus_wdata[0];
      if (bus_wr && bus_addr == 32'h000e_e018) ref_en[1] = bus_wdata[0];
    end
    check(n_cf_pop > 50 && n_ab > 50, "control FIFO pops and acknowledges exercised");
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
