// counting_logic: the counting side of the triggered scaler (FPGA_1).
//
// Each input channel has a counter that counts the pulses of one bin.  A bin
// is the time between two reference edges, where a reference edge is a Trig
// (the 25 Hz rapid-cycle trigger) or an S (start of the machine cycle).  At
// every reference edge the counts of the bin just ended are written, for all
// channels at once, into cell `trigger_now` of the active page, and the
// counters restart from the pulses of the current cycle.  A Trig then moves
// the pointer to the next cell; an S moves it to cell 0 of the other page, so
// that the page just closed holds the whole last machine cycle while the
// other one fills.  Nothing is counted or written until the first S after
// reset.
//
// Timing: the write request (`wr_*`) is registered and appears one cycle after
// the reference edge.  `cycle_done` pulses one cycle after the write of the
// last cell of a closed page, giving that page and the number of cells
// written in it.  When S and Trig fall in the same cycle they form a single
// edge and that Trig belongs to the new machine cycle.
//
// The page/pointer scheme, the sizes and the pageNow, triggerNow,
// triggerInCycle and errStatus values follow the module's description.  The
// following are this design's own choices: counts saturate at 2**CNT_W-1 and
// set errStatus bit 1; a Trig that arrives with the pointer on the last cell
// writes that cell, sets errStatus bit 0, and all later bins of that machine
// cycle are dropped; errStatus bits are sticky and cleared by `err_clr`.
module counting_logic
  import scaler_pkg::*;
#(
  parameter int unsigned N_CH    = DEF_N_CH,
  parameter int unsigned N_CELLS = DEF_N_CELLS,
  parameter int unsigned CNT_W   = DEF_CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_evt,      // S edge (1-cycle pulse)
  input  logic                       trig_evt,   // Trig edge (1-cycle pulse)
  input  logic [N_CH-1:0]            ch_evt,     // input pulse per channel
  input  logic [7:0]                 err_clr,    // errStatus write-1-to-clear
  // write port to the memory-buffers
  output logic                       wr_en,
  output logic                       wr_page,
  output logic [CELL_W-1:0]          wr_cell,
  output logic [N_CH-1:0][CNT_W-1:0] wr_data,
  // status
  output logic                       page_now,
  output logic [CELL_W-1:0]          trigger_now,
  output logic [15:0]                trigger_in_cycle,
  output logic [7:0]                 err_status,
  // end of machine cycle, for the miss-trigger detector
  output logic                       cycle_done,
  output logic                       done_page,
  output logic [CELL_W:0]            done_cells
);

  localparam logic [CNT_W-1:0]  CNT_MAX   = '1;
  localparam logic [CELL_W-1:0] LAST_CELL = CELL_W'(N_CELLS - 1);

  logic                       counting;    // first S has been seen
  logic [N_CH-1:0][CNT_W-1:0] acc;
  logic                       full;        // bins past the last cell dropped
  logic [15:0]                trig_cnt;    // Trig edges in this S period
  logic                       done_pend;   // cycle_done after the last write
  logic                       done_page_q;
  logic [CELL_W:0]            done_cells_q;

  logic edge_evt;
  assign edge_evt = counting && (s_evt || trig_evt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      counting         <= 1'b0;
      page_now         <= 1'b0;
      trigger_now      <= '0;
      acc              <= '0;
      full             <= 1'b0;
      trig_cnt         <= '0;
      trigger_in_cycle <= '0;
      err_status       <= '0;
      wr_en            <= 1'b0;
      wr_page          <= 1'b0;
      wr_cell          <= '0;
      wr_data          <= '0;
      done_pend        <= 1'b0;
      done_page_q      <= 1'b0;
      done_cells_q     <= '0;
      cycle_done       <= 1'b0;
      done_page        <= 1'b0;
      done_cells       <= '0;
    end else begin
      err_status <= err_status & ~err_clr;
      wr_en      <= 1'b0;

      // cycle_done follows the write of the closing cell by one cycle
      cycle_done <= done_pend;
      done_page  <= done_page_q;
      done_cells <= done_cells_q;
      done_pend  <= 1'b0;

      // per-channel counters: a pulse in the edge cycle opens the new bin
      for (int c = 0; c < N_CH; c++) begin
        if (edge_evt) begin
          acc[c] <= CNT_W'(ch_evt[c]);
        end else if (counting && ch_evt[c]) begin
          if (acc[c] == CNT_MAX) err_status[ERR_COUNT_SAT] <= 1'b1;
          else                   acc[c] <= acc[c] + 1'b1;
        end
      end

      if (edge_evt) begin
        // close the current bin
        wr_en   <= !full;
        wr_page <= page_now;
        wr_cell <= trigger_now;
        wr_data <= acc;
      end

      if (!counting) begin
        if (s_evt) begin
          counting    <= 1'b1;
          page_now    <= 1'b0;
          trigger_now <= '0;
          full        <= 1'b0;
          trig_cnt    <= 16'(trig_evt);
          for (int c = 0; c < N_CH; c++) acc[c] <= CNT_W'(ch_evt[c]);
        end
      end else if (s_evt) begin
        // end of the machine cycle: switch pages
        done_pend        <= 1'b1;
        done_page_q      <= page_now;
        done_cells_q     <= full ? (CELL_W+1)'(N_CELLS)
                                 : (CELL_W+1)'(trigger_now) + 1'b1;
        trigger_in_cycle <= trig_cnt;
        trig_cnt         <= 16'(trig_evt);
        page_now         <= ~page_now;
        trigger_now      <= '0;
        full             <= 1'b0;
      end else if (trig_evt) begin
        if (trig_cnt != 16'hFFFF) trig_cnt <= trig_cnt + 1'b1;
        if (trigger_now == LAST_CELL) begin
          if (!full) err_status[ERR_CELL_OVERFLOW] <= 1'b1;
          full <= 1'b1;
        end else begin
          trigger_now <= trigger_now + 1'b1;
        end
      end
    end
  end

  // A bin that is dropped after the last cell is reported as an overflow.
  property p_full_flags_error;
    @(posedge clk) disable iff (!rst_n) $rose(full) |-> err_status[ERR_CELL_OVERFLOW];
  endproperty
  a_full_flags_error: assert property (p_full_flags_error);

  // The pointer never leaves the page.
  a_ptr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   trigger_now <= LAST_CELL);

endmodule
