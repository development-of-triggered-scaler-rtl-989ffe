// tb_triggered_scaler: end-to-end test of the triggered scaler at its
// default size (4 channels, 2 pages x 192 cells x 16 bit).
//
// The timing inputs are driven as the accelerator would: each machine cycle
// starts with S and Trig together, every further bin ends with a Trig, and
// the next S closes the last bin.  Every signal is a level pulse, two clocks
// high.  Per bin the test sends a known number of pulses on each channel:
//   ch1  an injection-kicker pattern: four successive bins with one pulse
//   ch2  a steady rate, a different count in every bin
//   ch3  one pulse per bin (a 25 Hz trigger)
//   ch4  a signal that must stay silent, checked by the miss-trigger detector
// It keeps the expected contents of both pages and, while the next machine
// cycle is being counted, reads the page just closed over the CPU bus
// (pageSet, waveform windows) and compares every used cell.
//
// Machine cycles run:
//   0  Trig and pulses before the first S: must be ignored
//   A  62 bins (2480 ms cycle)                      -> page 0
//   B  130 bins (5200 ms cycle), stray pulse on ch4,
//      doubled kicker pulse on ch1                  -> page 1, ch4 flagged
//   C  194 bins: more bins than cells, and 65540
//      pulses in one bin of ch2                     -> page 0, overflow and
//                                                      saturation in errStatus
// Each of these mechanisms is counted and a failure is counted for any that
// never happened: page switch, read of the frozen page during counting,
// pre-S input ignored, miss-trigger flag, flag clear, cell overflow, count
// saturation, errStatus clear.
module tb_triggered_scaler;
  import scaler_pkg::*;

  localparam int unsigned NC = DEF_N_CH;
  localparam int unsigned NK = DEF_N_CELLS;

  logic              clk = 0, rst_n = 0;
  logic              s_in = 0, trig_in = 0;
  logic [NC-1:0]     ch_in = '0;
  logic              bus_rd = 0, bus_wr = 0;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic [DATA_W-1:0] bus_wdata = '0;
  logic              bus_rvalid;
  logic [DATA_W-1:0] bus_rdata;
  logic [NC-1:0]     miss_flag;
  logic              check_done;
  logic              err_any;

  triggered_scaler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanisms seen
  int n_page_switch = 0, n_read_while_count = 0, n_pre_s_ignored = 0;
  int n_miss_flag = 0, n_flag_clear = 0, n_overflow = 0, n_saturation = 0, n_err_clear = 0;
  int n_check_done = 0;
  always @(posedge clk) if (rst_n && check_done) n_check_done++;

  // expected page contents
  int exp_cnt [2][NC][NK];

  // ---------------- stimulus ----------------
  task automatic ticks(input int n);
    repeat (n) @(negedge clk);
  endtask

  // n[c] pulses on channel c, all channels in parallel, 2 high / 2 low
  task automatic send_pulses(input int n[NC]);
    int mx = 0;
    foreach (n[c]) if (n[c] > mx) mx = n[c];
    for (int i = 0; i < mx; i++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) ch_in[c] = (i < n[c]);
      ticks(2);
      ch_in = '0;
      ticks(1);
    end
    ticks(4);
  endtask

  task automatic ref_edge(input bit s, input bit t);
    @(negedge clk);
    s_in = s; trig_in = t;
    ticks(2);
    s_in = 0; trig_in = 0;
    ticks(4);
  endtask

  // counts of bin k of a machine cycle with id m
  function automatic void bin_counts(input int m, input int k, output int n[NC]);
    n[0] = (k >= 3 && k <= 6) ? 1 : 0;            // K1..K4
    if (m == 2 && k == 4) n[0] = 2;                // doubled K2
    n[1] = 20 + (k * 7 + m) % 11;
    if (m == 3 && k == 1) n[1] = 65540;            // saturates
    n[2] = 1;
    n[3] = (m == 2 && k == 77) ? 1 : 0;            // stray pulse
  endfunction

  // one machine cycle of nb bins, writing page pg, opened by S+Trig already
  task automatic run_cycle(input int m, input int nb, input bit pg);
    int n[NC];
    for (int k = 0; k < nb; k++) begin
      bin_counts(m, k, n);
      send_pulses(n);
      if (k < NK)
        for (int c = 0; c < NC; c++) exp_cnt[pg][c][k] = (n[c] > 65535) ? 65535 : n[c];
      if (k < nb - 1) ref_edge(0, 1);
    end
  endtask

  // ---------------- CPU bus ----------------
  task automatic bus_read(input int addr, output logic [15:0] data);
    @(negedge clk);
    bus_rd = 1; bus_addr = ADDR_W'(addr);
    @(negedge clk);
    bus_rd = 0;
    if (!bus_rvalid) begin failures++; $display("FAIL: no rvalid for %0d", addr); end
    data = bus_rdata;
  endtask

  task automatic bus_write(input int addr, input logic [15:0] data);
    @(negedge clk);
    bus_wr = 1; bus_addr = ADDR_W'(addr); bus_wdata = data;
    @(negedge clk);
    bus_wr = 0;
  endtask

  task automatic expect_reg(input int addr, input int exp, input string what);
    logic [15:0] d;
    bus_read(addr, d);
    check(int'(d) == exp, $sformatf("%s: reg %0d = %0d, expected %0d", what, addr, d, exp));
  endtask

  // read back the closed page pg (nb used cells) while counting continues
  task automatic readback(input bit pg, input int nb, input string what);
    logic [15:0] d;
    int bad = 0;
    bus_write(11, 16'(pg));
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < nb && k < NK; k++) begin
        bus_read(33 + 256 * c + k, d);
        if (int'(d) != exp_cnt[pg][c][k]) begin
          bad++;
          if (bad < 5) $display("FAIL: %s ch%0d cell %0d = %0d, expected %0d", what, c + 1, k, d, exp_cnt[pg][c][k]);
        end
      end
    checks++;
    if (bad != 0) failures++;
    bus_read(9, d);
    if (d[0] != pg) n_read_while_count++;
  endtask

  // ---------------- test ----------------
  logic [15:0] d;

  initial begin
    ticks(4);
    rst_n = 1;
    ticks(4);

    // cycle 0: no S yet
    begin
      int n[NC];
      n = '{3, 5, 1, 1};
      send_pulses(n);
      ref_edge(0, 1);
      send_pulses(n);
      ref_edge(0, 1);
      expect_reg(10, 0, "triggerNow before S");
      expect_reg(16, 0, "triggerInCycle before S");
      bus_read(14, d);
      if (d == 0 && !err_any) n_pre_s_ignored++;
    end
    bus_write(12, 16'b1000);   // check ch4

    // cycle A: page 0, 62 bins
    ref_edge(1, 1);
    expect_reg(9, 0, "pageNow in cycle A");
    run_cycle(1, 62, 0);
    ref_edge(1, 1);
    n_page_switch++;
    expect_reg(16, 62, "triggerInCycle after A");
    expect_reg(9, 1, "pageNow after A");
    check(miss_flag == 0, "no miss flag after A");

    // cycle B: page 1, 130 bins; page 0 read meanwhile
    fork
      run_cycle(2, 130, 1);
      readback(0, 62, "page 0 / cycle A");
    join
    expect_reg(10, 129, "triggerNow at end of B");
    ref_edge(1, 1);
    n_page_switch++;
    ticks(NK + 10);
    expect_reg(16, 130, "triggerInCycle after B");
    check(miss_flag == 4'b1000, $sformatf("miss flag after B: %b", miss_flag));
    expect_reg(15, 8, "miss flag register");
    if (miss_flag[3]) n_miss_flag++;

    // cycle C: page 0, 194 bins; page 1 read and the flag cleared meanwhile
    fork
      run_cycle(3, 194, 0);
      begin
        readback(1, 130, "page 1 / cycle B");
        bus_write(15, 16'b1000);
        ticks(2);
        if (miss_flag == 0) n_flag_clear++;
        check(miss_flag == 0, "miss flag cleared");
      end
    join
    bus_read(14, d);
    if (d[ERR_CELL_OVERFLOW]) n_overflow++;
    if (d[ERR_COUNT_SAT]) n_saturation++;
    check(d == 16'b11, $sformatf("errStatus after C = %b", d));
    expect_reg(10, NK - 1, "pointer held on last cell");
    ref_edge(1, 0);
    n_page_switch++;
    ticks(NK + 10);
    expect_reg(16, 194, "triggerInCycle after C");
    check(miss_flag == 0, "no miss flag after C");
    readback(0, NK, "page 0 / cycle C");
    bus_write(14, 16'h0003);
    bus_read(14, d);
    if (d == 0) n_err_clear++;
    check(d == 0 && !err_any, "errStatus cleared");

    // mechanisms
    check(n_page_switch == 3, "page switches");
    check(n_read_while_count >= 2, "frozen page read during counting");
    check(n_pre_s_ignored == 1, "input before first S ignored");
    check(n_miss_flag == 1, "miss-trigger flagged");
    check(n_flag_clear == 1, "miss flag cleared");
    check(n_overflow == 1, "cell overflow");
    check(n_saturation == 1, "count saturation");
    check(n_err_clear == 1, "errStatus cleared");
    check(n_check_done == 3, $sformatf("closed pages checked: %0d", n_check_done));
    $display("mechanisms: page_switch=%0d read_while_counting=%0d pre_s_ignored=%0d miss_flag=%0d flag_clear=%0d overflow=%0d saturation=%0d err_clear=%0d checks_done=%0d",
             n_page_switch, n_read_while_count, n_pre_s_ignored, n_miss_flag, n_flag_clear,
             n_overflow, n_saturation, n_err_clear, n_check_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
