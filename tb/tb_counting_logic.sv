// tb_counting_logic: self-checking test of the counting logic.
//
// Runs with 8 cells per page and 8-bit counts so that the cell overflow and
// the count saturation are reached quickly.  The stimulus is scripted bin by
// bin: for each bin the test sends a known number of pulses on each channel,
// then the reference edge that closes it, and queues the write it expects
// (page, cell, four counts).  A monitor compares every write request with the
// head of the queue.  The test also checks pageNow, triggerNow,
// triggerInCycle, errStatus and the cycle_done handshake, including its
// two-cycle latency after S.
module tb_counting_logic;
  import scaler_pkg::*;

  localparam int unsigned N_CH    = 4;
  localparam int unsigned N_CELLS = 8;
  localparam int unsigned CNT_W   = 8;

  logic                       clk = 0;
  logic                       rst_n = 0;
  logic                       s_evt = 0, trig_evt = 0;
  logic [N_CH-1:0]            ch_evt = '0;
  logic [7:0]                 err_clr = '0;
  logic                       wr_en, wr_page;
  logic [CELL_W-1:0]          wr_cell;
  logic [N_CH-1:0][CNT_W-1:0] wr_data;
  logic                       page_now;
  logic [CELL_W-1:0]          trigger_now;
  logic [15:0]                trigger_in_cycle;
  logic [7:0]                 err_status;
  logic                       cycle_done, done_page;
  logic [CELL_W:0]            done_cells;

  counting_logic #(.N_CH(N_CH), .N_CELLS(N_CELLS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // expected writes
  typedef struct packed {
    logic                       page;
    logic [CELL_W-1:0]          cl;
    logic [N_CH-1:0][CNT_W-1:0] data;
  } exp_wr_t;
  exp_wr_t exp_q[$];

  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      if (exp_q.size() == 0) begin
        check(0, $sformatf("unexpected write page %0d cell %0d", wr_page, wr_cell));
      end else begin
        exp_wr_t e;
        e = exp_q.pop_front();
        check(wr_page == e.page && wr_cell == e.cl && wr_data == e.data,
              $sformatf("write got p%0d c%0d %h, expected p%0d c%0d %h",
                        wr_page, wr_cell, wr_data, e.page, e.cl, e.data));
      end
    end
  end

  // cycle_done monitor
  int done_seen = 0;
  logic exp_done_page;
  int   exp_done_cells;
  int   s_cycle;
  always @(posedge clk) begin
    if (rst_n && cycle_done) begin
      done_seen++;
      check(done_page == exp_done_page, "cycle_done page");
      check(int'(done_cells) == exp_done_cells, $sformatf("cycle_done cells %0d exp %0d", done_cells, exp_done_cells));
      check(cyc - s_cycle == 2, $sformatf("cycle_done latency %0d", cyc - s_cycle));
    end
  end

  // send n pulses on every channel (n[c]), one per clock
  task automatic pulses(input int n[N_CH]);
    int mx = 0;
    foreach (n[c]) if (n[c] > mx) mx = n[c];
    for (int i = 0; i < mx; i++) begin
      @(negedge clk);
      for (int c = 0; c < N_CH; c++) ch_evt[c] = (i < n[c]);
    end
    @(negedge clk);
    ch_evt = '0;
  endtask

  task automatic edge_evt(input bit s, input bit t);
    @(negedge clk);
    s_evt = s; trig_evt = t;
    @(negedge clk);
    s_evt = 0; trig_evt = 0;
  endtask

  function automatic exp_wr_t mk(input bit pg, input int cl, input int n[N_CH]);
    exp_wr_t e;
    e.page = pg;
    e.cl = CELL_W'(cl);
    for (int c = 0; c < N_CH; c++) e.data[c] = (n[c] > 255) ? 8'hFF : CNT_W'(n[c]);
    return e;
  endfunction

  int n[N_CH];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Trig and pulses before the first S: nothing is counted or written
    n = '{3, 1, 0, 2};
    pulses(n);
    edge_evt(0, 1);
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0 && page_now == 0 && trigger_now == 0, "idle before S");

    // machine cycle 1: S, then 5 bins closed by 4 Trig and the next S
    edge_evt(1, 0);
    for (int k = 0; k < 5; k++) begin
      for (int c = 0; c < N_CH; c++) n[c] = (k + 2*c) % 6;
      pulses(n);
      check(trigger_now == CELL_W'(k), $sformatf("triggerNow %0d exp %0d", trigger_now, k));
      check(page_now == 0, "pageNow 0 in cycle 1");
      exp_q.push_back(mk(0, k, n));
      if (k < 4) edge_evt(0, 1);
    end
    exp_done_page = 0; exp_done_cells = 5;
    @(negedge clk); s_evt = 1; trig_evt = 1; s_cycle = cyc;
    @(negedge clk); s_evt = 0; trig_evt = 0;
    repeat (3) @(negedge clk);
    check(trigger_in_cycle == 4, $sformatf("triggerInCycle %0d exp 4", trigger_in_cycle));
    check(page_now == 1 && trigger_now == 0, "page switch to 1");
    check(err_status == 0, "no error in cycle 1");

    // machine cycle 2 (S came with a Trig): 10 bins into 8 cells -> overflow
    for (int k = 0; k < 10; k++) begin
      for (int c = 0; c < N_CH; c++) n[c] = (k + c) % 3;
      pulses(n);
      if (k < N_CELLS) exp_q.push_back(mk(1, k, n));
      if (k < 9) edge_evt(0, 1);
      if (k == 8) check(err_status == 8'b01, "overflow flagged");
      if (k == 8) check(trigger_now == CELL_W'(N_CELLS - 1), "pointer holds on last cell");
    end
    exp_done_page = 1; exp_done_cells = N_CELLS;
    @(negedge clk); s_evt = 1; s_cycle = cyc;
    @(negedge clk); s_evt = 0;
    repeat (3) @(negedge clk);
    check(trigger_in_cycle == 10, $sformatf("triggerInCycle %0d exp 10", trigger_in_cycle));
    check(page_now == 0, "page switch back to 0");

    // clear the overflow bit
    @(negedge clk); err_clr = 8'h01;
    @(negedge clk); err_clr = 8'h00;
    check(err_status == 0, "errStatus cleared");

    // machine cycle 3: saturation of channel 0 in bin 0
    n = '{300, 255, 7, 0};
    pulses(n);
    exp_q.push_back(mk(0, 0, n));
    check(err_status == 8'b10, "saturation flagged");
    edge_evt(0, 1);
    n = '{1, 0, 0, 1};
    pulses(n);
    exp_q.push_back(mk(0, 1, n));
    exp_done_page = 0; exp_done_cells = 2;
    @(negedge clk); s_evt = 1; s_cycle = cyc;
    @(negedge clk); s_evt = 0;
    repeat (4) @(negedge clk);
    check(trigger_in_cycle == 1, "triggerInCycle 1");

    check(exp_q.size() == 0, $sformatf("%0d expected writes missing", exp_q.size()));
    check(done_seen == 3, $sformatf("cycle_done seen %0d times", done_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
