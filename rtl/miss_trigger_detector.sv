// miss_trigger_detector: the checking side of the triggered scaler (FPGA_2).
//
// Rapid-cycle check: in a channel that watches a signal which must not fire,
// any non-zero count in a cell marks a miss-trigger.  Each time the counting
// logic closes a page (`cycle_done`), this block reads cells 0 ..
// `done_cells`-1 of that page from all channels in parallel, one cell per
// clock, and sets the sticky flag `miss_flag[c]` of every enabled channel
// that holds a non-zero cell.
//
// Timing: the read port has one cycle of latency, so for a page of n cells
// `scan_done` pulses n+2 cycles after `cycle_done`, together with the
// updated flags.  A machine cycle lasts millions of clocks, so a scan always
// ends long before the next page closes; should a new `cycle_done` come during a scan anyway,
// the scan restarts on the new page.
//
// Reading the closed buffer and flagging non-zero cells follows the module's
// description; the per-channel enable and the write-1-to-clear `flag_clr`
// are this design's own choices.  Comparison of a slow-cycle page with a
// reference pattern is left to software.
module miss_trigger_detector
  import scaler_pkg::*;
#(
  parameter int unsigned N_CH    = DEF_N_CH,
  parameter int unsigned N_CELLS = DEF_N_CELLS,
  parameter int unsigned CNT_W   = DEF_CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            enable,      // channels to check
  input  logic [N_CH-1:0]            flag_clr,    // write-1-to-clear flags
  // from the counting logic
  input  logic                       cycle_done,
  input  logic                       done_page,
  input  logic [CELL_W:0]            done_cells,
  // read port B of the memory-buffers
  output logic                       rd_page,
  output logic [CELL_W-1:0]          rd_cell,
  input  logic [N_CH-1:0][CNT_W-1:0] rd_data,
  // results
  output logic                       scan_done,
  output logic [N_CH-1:0]            miss_flag
);

  logic                       busy;       // reading cells
  logic [CELL_W:0]            n_cells;    // cells to scan
  logic                       chk_valid;  // rd_data holds a cell to check
  logic                       chk_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_page   <= 1'b0;
      rd_cell   <= '0;
      n_cells   <= '0;
      chk_valid <= 1'b0;
      chk_last  <= 1'b0;
      scan_done <= 1'b0;
      miss_flag <= '0;
    end else begin
      scan_done <= 1'b0;
      miss_flag <= miss_flag & ~flag_clr;

      // address stage
      chk_valid <= 1'b0;
      chk_last  <= 1'b0;
      if (cycle_done) begin
        busy      <= (done_cells != '0);
        rd_page   <= done_page;
        rd_cell   <= '0;
        n_cells   <= done_cells;
      end else if (busy) begin
        chk_valid <= 1'b1;
        chk_last  <= ((CELL_W+1)'(rd_cell) + 1'b1 == n_cells);
        if ((CELL_W+1)'(rd_cell) + 1'b1 == n_cells) busy <= 1'b0;
        else                                        rd_cell <= rd_cell + 1'b1;
      end

      // check stage: rd_data holds the cell addressed last cycle
      if (chk_valid && !cycle_done) begin
        for (int c = 0; c < N_CH; c++) begin
          if (enable[c] && rd_data[c] != '0) miss_flag[c] <= 1'b1;
        end
        scan_done <= chk_last;
      end
    end
  end

  // A closed page never holds more cells than a page has.
  a_page_size: assert property (@(posedge clk) disable iff (!rst_n)
                                cycle_done |-> done_cells <= (CELL_W+1)'(N_CELLS));

  // The scan never reads past the cells the counting logic wrote.
  a_scan_in_page: assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> (CELL_W+1)'(rd_cell) < n_cells);

endmodule
