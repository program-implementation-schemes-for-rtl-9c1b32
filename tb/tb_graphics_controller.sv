// tb_graphics_controller: the graphics controller workload run through the
// hardware-software interface at its default sizes.
//
// Hardware models send shape parameters on two channels: line endpoints
// (x0, y0, x1, y1) on the line channel and circles (xc, yc, r) on the circle
// channel, starting with a line and a circle of radius 5 drawn at the same
// time. A processor model runs the control-FIFO scheduler; each time a tag is
// read the named thread takes one parameter word, and once a shape is
// complete the thread computes its pixels (integer line stepping, midpoint
// circle) and writes each pixel as {x[7:0], y[7:0]} into its output queue.
//
// The hardware side checks each returned shape with rules independent of the
// drawing algorithms: a line has max(|dx|,|dy|)+1 pixels from one endpoint to
// the other, in unit steps, each within half a pixel of the ideal line along
// the minor axis; every circle pixel lies within r of the circle in squared
// distance and every column from xc-r to xc+r is covered above and below.
// The clock cycles per coordinate seen by each output channel are printed.
module tb_graphics_controller;
  import hwsw_pkg::*;

  localparam int SHAPES = 12;  // shapes per channel

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

  localparam logic [31:0] BASE [2] = '{32'h000e_e000, 32'h000e_e010};
  localparam logic [1:0]  TAG  [2] = '{2'd2, 2'd1};
  localparam int          NPAR [2] = '{4, 3};

  // ---------------- shape parameters ----------------
  int par [2][SHAPES][4];
  initial begin
    for (int s = 0; s < SHAPES; s++) begin
      for (int k = 0; k < 4; k++) par[0][s][k] = $urandom_range(0, 120);
      par[1][s][0] = $urandom_range(30, 90);
      par[1][s][1] = $urandom_range(30, 90);
      par[1][s][2] = (s == 0) ? 5 : $urandom_range(1, 25);
    end
  end

  // ---------------- hardware side: send parameters ----------------
  int sent [2] = '{0, 0};
  bit producers_on = 0;
  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) begin
      asic_in_enq[c] = producers_on && sent[c] < SHAPES * NPAR[c];
      asic_in_data[c] = 16'(par[c][sent[c] / NPAR[c]][sent[c] % NPAR[c]]);
      asic_out_deq[c] = !asic_out_empty[c];
    end
  end

  // ---------------- hardware side: collect and check pixels ----------------
  int px [2][$], py [2][$];
  int pixels [2] = '{0, 0};
  longint first_out [2], last_out [2];

  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (asic_in_enq[c] && !asic_in_full[c]) sent[c]++;
      if (asic_out_deq[c] && !asic_out_empty[c]) begin
        px[c].push_back(int'(asic_out_data[c][15:8]));
        py[c].push_back(int'(asic_out_data[c][7:0]));
        if (pixels[c] == 0) first_out[c] = $time;
        last_out[c] = $time;
        pixels[c]++;
      end
    end
  end

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check_line(input int s);
    int x0 = par[0][s][0], y0 = par[0][s][1], x1 = par[0][s][2], y1 = par[0][s][3];
    int dx = x1 - x0, dy = y1 - y0;
    int n = (iabs(dx) > iabs(dy) ? iabs(dx) : iabs(dy)) + 1;
    int x, y, px_prev, py_prev;
    check(px[0].size() >= n, $sformatf("line %0d pixel count", s));
    if (px[0].size() < n) return;
    for (int i = 0; i < n; i++) begin
      x = px[0].pop_front(); y = py[0].pop_front();
      if (i == 0) check(x == x0 && y == y0, "line start point");
      if (i == n - 1) check(x == x1 && y == y1, "line end point");
      if (i > 0) check(iabs(x - px_prev) <= 1 && iabs(y - py_prev) <= 1 &&
                       (x != px_prev || y != py_prev), "line unit step");
      // distance along the minor axis, times the major length, at most half
      check(2 * iabs((y - y0) * dx - (x - x0) * dy) <= (n - 1), $sformatf("line %0d pixel near ideal", s));
      px_prev = x; py_prev = y;
    end
  endtask

  task automatic check_circle(input int s);
    int xc = par[1][s][0], yc = par[1][s][1], r = par[1][s][2];
    int n = 0;
    bit above [int], below [int];
    // the thread sends a terminator pixel {255,255} after each circle
    while (px[1].size() > 0 && !(px[1][0] == 255 && py[1][0] == 255)) begin
      int x = px[1].pop_front() - xc, y = py[1].pop_front() - yc;
      check(iabs(x * x + y * y - r * r) <= r, $sformatf("circle %0d pixel on circle", s));
      if (y >= 0) above[x] = 1;
      if (y <= 0) below[x] = 1;
      n++;
    end
    check(px[1].size() > 0, "circle terminator");
    if (px[1].size() > 0) begin void'(px[1].pop_front()); void'(py[1].pop_front()); end
    for (int x = -r; x <= r; x++)
      check(above.exists(x) && below.exists(x), $sformatf("circle %0d column %0d covered", s, x));
  endtask

  // ---------------- processor ----------------
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
  task automatic put_pixel(input int ch, input int x, input int y);
    logic [31:0] st;
    forever begin
      bus_read(BASE[ch] + OFS_STATUS, st);
      if (!st[1]) break;
    end
    bus_write(BASE[ch] + OFS_OUT, {16'h0, 8'(x), 8'(y)});
  endtask

  int got [2][4];
  int nword [2] = '{0, 0};
  int done_shapes [2] = '{0, 0};

  task automatic draw_line(input int x0, input int y0, input int x1, input int y1);
    int dx = iabs(x1 - x0), dy = -iabs(y1 - y0);
    int sx = x0 < x1 ? 1 : -1, sy = y0 < y1 ? 1 : -1;
    int err = dx + dy, e2, x = x0, y = y0;
    forever begin
      put_pixel(0, x, y);
      if (x == x1 && y == y1) break;
      e2 = 2 * err;
      if (e2 >= dy) begin err += dy; x += sx; end
      if (e2 <= dx) begin err += dx; y += sy; end
    end
  endtask

  task automatic draw_circle(input int xc, input int yc, input int r);
    int x = r, y = 0, d = 1 - r;
    while (x >= y) begin
      put_pixel(1, xc + x, yc + y); put_pixel(1, xc - x, yc + y);
      put_pixel(1, xc + x, yc - y); put_pixel(1, xc - x, yc - y);
      put_pixel(1, xc + y, yc + x); put_pixel(1, xc - y, yc + x);
      put_pixel(1, xc + y, yc - x); put_pixel(1, xc - y, yc - x);
      y++;
      if (d < 0) d += 2 * y + 1;
      else begin x--; d += 2 * (y - x) + 1; end
    end
    put_pixel(1, 255, 255);
  endtask

  task automatic run_thread(input int ch);
    logic [31:0] w;
    bus_read(BASE[ch] + OFS_DATA, w);
    got[ch][nword[ch]] = int'(w[15:0]);
    nword[ch]++;
    bus_write(CFIFO_OUTAK_ADDR, 32'(TAG[ch]));
    if (nword[ch] == NPAR[ch]) begin
      nword[ch] = 0;
      check(got[ch][0] == par[ch][done_shapes[ch]][0], "parameter word order");
      if (ch == 0) draw_line(got[0][0], got[0][1], got[0][2], got[0][3]);
      else         draw_circle(got[1][0], got[1][1], got[1][2]);
      done_shapes[ch]++;
    end
  endtask

  logic [31:0] d;
  int n_lines_checked = 0, n_circles_checked = 0;

  initial begin
    bus_addr = '0; bus_wdata = '0; bus_rd = 0; bus_wr = 0;
    asic_in_enq = '0; asic_out_deq = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    bus_write(BASE[0] + OFS_ENABLE, 1);
    bus_write(BASE[1] + OFS_ENABLE, 1);
    producers_on = 1;
    while (done_shapes[0] < SHAPES || done_shapes[1] < SHAPES) begin
      bus_read(CFIFO_ADDR, d);
      if (!d[2]) continue;
      if (d[1:0] == TAG[0]) run_thread(0);
      else if (d[1:0] == TAG[1]) run_thread(1);
      else check(0, "unknown tag");
    end
    repeat (10) @(posedge clk);
    for (int s = 0; s < SHAPES; s++) begin check_line(s); n_lines_checked++; end
    for (int s = 0; s < SHAPES; s++) begin check_circle(s); n_circles_checked++; end
    check(px[0].size() == 0 && px[1].size() == 0, "no extra pixels");
    $display("line: %0d pixels, %0d clocks/coordinate; circle: %0d pixels, %0d clocks/coordinate",
             pixels[0], (last_out[0] - first_out[0]) / 10 / (pixels[0] - 1),
             pixels[1], (last_out[1] - first_out[1]) / 10 / (pixels[1] - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
