// tb_miss_trigger_detector: self-checking test of the miss-trigger detector.
//
// The test holds two pages of cell counts for four channels and answers the
// detector's read port with one clock of latency, like the memory-buffers.
// For each scenario it fills the closed page, pulses cycle_done, and checks
// that scan_done comes n+2 cycles later, that exactly the enabled channels
// holding a non-zero cell among cells 0..n-1 get their flag, that non-zero
// cells beyond n and on the other page are ignored, that flags are sticky
// and cleared by flag_clr, and that every address read lies inside the page.
module tb_miss_trigger_detector;
  import scaler_pkg::*;

  localparam int unsigned N_CH    = 4;
  localparam int unsigned N_CELLS = 192;
  localparam int unsigned CNT_W   = 16;

  logic                       clk = 0, rst_n = 0;
  logic [N_CH-1:0]            enable = '0, flag_clr = '0;
  logic                       cycle_done = 0, done_page = 0;
  logic [CELL_W:0]            done_cells = '0;
  logic                       rd_page;
  logic [CELL_W-1:0]          rd_cell;
  logic [N_CH-1:0][CNT_W-1:0] rd_data;
  logic                       scan_done;
  logic [N_CH-1:0]            miss_flag;

  miss_trigger_detector #(.N_CH(N_CH), .N_CELLS(N_CELLS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  logic [CNT_W-1:0] pages [2][N_CH][N_CELLS];
  always_ff @(posedge clk)
    for (int c = 0; c < N_CH; c++) rd_data[c] <= pages[rd_page][c][rd_cell];

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  int max_cell_read;
  bit in_scan = 0;
  always @(posedge clk) if (in_scan && int'(rd_cell) > max_cell_read) max_cell_read = int'(rd_cell);

  // run one scan of page pg with n cells; expect flags exp afterwards
  task automatic scan(input bit pg, input int n, input logic [N_CH-1:0] exp, input string what);
    int unsigned t0;
    max_cell_read = -1;
    @(negedge clk);
    cycle_done = 1; done_page = pg; done_cells = (CELL_W+1)'(n);
    t0 = cyc;
    @(negedge clk);
    cycle_done = 0;
    in_scan = 1;
    while (!scan_done && cyc - t0 < 1000) @(negedge clk);
    in_scan = 0;
    check(scan_done, {what, ": scan_done"});
    check(cyc - t0 == n + 2, $sformatf("%s: scan took %0d cycles, expected %0d", what, cyc - t0, n + 2));
    check(miss_flag == exp, $sformatf("%s: flags %b expected %b", what, miss_flag, exp));
    check(max_cell_read == n - 1, $sformatf("%s: last cell read %0d, expected %0d", what, max_cell_read, n - 1));
  endtask

  initial begin
    for (int p = 0; p < 2; p++) for (int c = 0; c < N_CH; c++) for (int k = 0; k < N_CELLS; k++) pages[p][c][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 4'b1111;

    // clean 62-cell page (2480 ms machine cycle): no flag
    scan(0, 62, 4'b0000, "clean 62");

    // noise only beyond the used cells and on the other page: no flag
    pages[0][1][62] = 3;
    pages[1][2][10] = 1;
    scan(0, 62, 4'b0000, "outside page");

    // one stray count in channel 2, cell 40, of a 130-cell page (5200 ms)
    pages[0][1][62] = 0;
    pages[0][2][40] = 1;
    scan(0, 130, 4'b0100, "stray ch2");

    // flags are sticky: a clean scan leaves them set
    pages[0][2][40] = 0;
    scan(0, 130, 4'b0100, "sticky");

    // clear, then non-zero in the first and last cells of page 1 (which also
    // holds the count in ch2, cell 10), with channel 1 disabled
    @(negedge clk); flag_clr = 4'b1111;
    @(negedge clk); flag_clr = 4'b0000;
    check(miss_flag == 0, "flags cleared");
    pages[1][0][0]   = 16'hFFFF;
    pages[1][3][191] = 2;
    pages[1][1][100] = 5;
    enable = 4'b1101;
    scan(1, 192, 4'b1101, "edges, ch1 disabled");
    enable = 4'b1111;

    // random pages
    for (int r = 0; r < 20; r++) begin
      int n;
      logic [N_CH-1:0] exp;
      bit pg;
      @(negedge clk); flag_clr = 4'b1111;
      @(negedge clk); flag_clr = 4'b0000;
      pg = 1'($urandom);
      n = $urandom_range(N_CELLS, 1);
      exp = '0;
      for (int c = 0; c < N_CH; c++)
        for (int k = 0; k < N_CELLS; k++) begin
          pages[pg][c][k] = ($urandom_range(299) == 0) ? CNT_W'($urandom_range(9, 1)) : '0;
          if (k < n && pages[pg][c][k] != 0) exp[c] = 1'b1;
        end
      scan(pg, n, exp, $sformatf("random %0d", r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
