// tb_jparc_cycles: the scaler at its default size, run through the machine
// cycles and signals it was built to watch.
//
//   ch1  injection-kicker trigger: one pulse in each of four successive
//        25 Hz bins (K1..K4)
//   ch2  ring RF revolution signal: counts per 40 ms bin of 7429 at 3 GeV,
//        7608/7609 at 8 GeV and 7648 at 30 GeV, on a ramp whose bin
//        positions are this test's own choice
//   ch3  the 25 Hz trigger itself: one pulse per bin
//   ch4  a signal that must stay silent (rapid-cycle check enabled)
//
// Machine cycles, each opened by S together with Trig:
//   1  2480 ms (62 bins), reference pattern
//   2  5200 ms (130 bins), reference pattern
//   3  2480 ms, "miss trigger": K3 missing
//   4  2480 ms, "irregular trigger": an extra kicker pulse in bin 20
//   5  2480 ms, "double trigger": K2 counted twice
//   6  2480 ms, a fake pulse on ch4
//   7  2480 ms, reference pattern again (closes cycle 6)
// While each cycle is being counted, the page of the previous one is read
// over the CPU bus and every used cell is compared with the counts sent.
// Like the slow-cycle software check, the test then compares the ch1 page
// with the K1..K4 reference and must find a difference exactly in cycles 3,
// 4 and 5; the hardware flag of ch4 must rise exactly after cycle 6.
module tb_jparc_cycles;
  import scaler_pkg::*;

  localparam int unsigned NC = DEF_N_CH;
  localparam int unsigned NK = DEF_N_CELLS;
  localparam int NCYC = 7;

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

  int cycle_bins [NCYC+1] = '{0, 62, 130, 62, 62, 62, 62, 62};
  int sent [NCYC+1][NC][NK];

  // RF counts per 40 ms bin: flat 3 GeV, ramp through 8 GeV, flat top 30 GeV
  function automatic int rf_count(input int nb, input int k);
    int ramp_start = 12, ramp_end = nb - 12;
    if (k < ramp_start) return 7429;
    if (k >= ramp_end) return 7648;
    if (k == ramp_start + 2) return 7608;
    if (k == ramp_start + 3) return 7609;
    return 7429 + (7648 - 7429) * (k - ramp_start) / (ramp_end - ramp_start);
  endfunction

  function automatic void bin_counts(input int m, input int k, output int n[NC]);
    n[0] = (k >= 2 && k <= 5) ? 1 : 0;          // K1..K4
    if (m == 3 && k == 4) n[0] = 0;              // miss trigger
    if (m == 4 && k == 20) n[0] = 1;             // irregular trigger
    if (m == 5 && k == 3) n[0] = 2;              // double trigger
    n[1] = rf_count(cycle_bins[m], k);
    n[2] = 1;
    n[3] = (m == 6 && k == 33) ? 1 : 0;          // fake signal
  endfunction

  task automatic ticks(input int n);
    repeat (n) @(negedge clk);
  endtask

  // n[c] pulses per channel, in parallel, one clock high and one low
  task automatic send_pulses(input int n[NC]);
    int mx = 0;
    foreach (n[c]) if (n[c] > mx) mx = n[c];
    for (int i = 0; i < mx; i++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) ch_in[c] = (i < n[c]);
      @(negedge clk);
      ch_in = '0;
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

  task automatic run_cycle(input int m);
    int n[NC];
    for (int k = 0; k < cycle_bins[m]; k++) begin
      bin_counts(m, k, n);
      send_pulses(n);
      for (int c = 0; c < NC; c++) sent[m][c][k] = n[c];
      if (k < cycle_bins[m] - 1) ref_edge(0, 1);
    end
  endtask

  task automatic bus_read(input int addr, output logic [15:0] data);
    @(negedge clk);
    bus_rd = 1; bus_addr = ADDR_W'(addr);
    @(negedge clk);
    bus_rd = 0;
    data = bus_rdata;
  endtask

  task automatic bus_write(input int addr, input logic [15:0] data);
    @(negedge clk);
    bus_wr = 1; bus_addr = ADDR_W'(addr); bus_wdata = data;
    @(negedge clk);
    bus_wr = 0;
  endtask

  int ch1_page [NK];
  int n_ref_diff [NCYC+1];
  int flag_after [NCYC+1];

  // read cycle m's page (written on page (m-1)%2) and compare
  task automatic readback(input int m);
    logic [15:0] d;
    int bad = 0;
    bus_write(11, 16'((m - 1) % 2));
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < cycle_bins[m]; k++) begin
        bus_read(33 + 256 * c + k, d);
        if (c == 0) ch1_page[k] = int'(d);
        if (int'(d) != sent[m][c][k]) begin
          bad++;
          if (bad < 5) $display("FAIL: cycle %0d ch%0d cell %0d = %0d, sent %0d", m, c + 1, k, d, sent[m][c][k]);
        end
      end
    check(bad == 0, $sformatf("cycle %0d page contents", m));
    bus_read(16, d);
    check(int'(d) == cycle_bins[m], $sformatf("cycle %0d triggerInCycle %0d", m, d));
    // software-style comparison of ch1 with the K1..K4 reference
    n_ref_diff[m] = 0;
    for (int k = 0; k < cycle_bins[m]; k++)
      if (ch1_page[k] != ((k >= 2 && k <= 5) ? 1 : 0)) n_ref_diff[m]++;
  endtask

  initial begin
    ticks(4);
    rst_n = 1;
    ticks(4);
    bus_write(12, 16'b1000);

    ref_edge(1, 1);
    run_cycle(1);
    for (int m = 2; m <= NCYC; m++) begin
      ref_edge(1, 1);
      fork
        run_cycle(m);
        begin
          ticks(NK + 20);
          flag_after[m - 1] = int'(miss_flag[3]);
          readback(m - 1);
          if (miss_flag[3]) bus_write(15, 16'b1000);
        end
      join
    end
    ref_edge(1, 1);
    ticks(NK + 20);
    flag_after[NCYC] = int'(miss_flag[3]);
    readback(NCYC);

    for (int m = 1; m <= NCYC; m++) begin
      check((n_ref_diff[m] != 0) == (m inside {3, 4, 5}),
            $sformatf("cycle %0d: %0d cells of ch1 differ from K1-K4", m, n_ref_diff[m]));
      check(flag_after[m] == (m == 6 ? 1 : 0),
            $sformatf("cycle %0d: ch4 flag %0d", m, flag_after[m]));
    end
    begin
      logic [15:0] d;
      bus_read(14, d);
      check(d == 0, "no counting error in normal operation");
    end
    $display("ch1 differences per cycle: %0d %0d %0d %0d %0d %0d %0d",
             n_ref_diff[1], n_ref_diff[2], n_ref_diff[3], n_ref_diff[4],
             n_ref_diff[5], n_ref_diff[6], n_ref_diff[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
