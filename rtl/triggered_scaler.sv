// triggered_scaler: a four-channel scaler whose bins are set by the
// accelerator's timing signals, used to catch missing, extra or doubled
// triggers.
//
// S marks the start of a machine cycle and Trig the start of each 25 Hz
// rapid cycle.  For every channel the pulses of one rapid cycle are counted
// and stored in one cell of a 192-cell page, so a page holds the history of a
// whole machine cycle (62 cells for a 2480 ms cycle, 130 for 5200 ms).  Each
// channel has two pages: at every S the page just filled is frozen for
// readout and checking, and counting continues in the other one.
//
// Structure: edge_sync (inputs to one-cycle pulses) -> counting_logic
// (counters, cell pointer, page switch) -> memory_buffer x N_CH.  After each
// page switch the miss_trigger_detector scans the frozen page and raises a
// flag for every enabled channel with a non-zero cell.  The CPU reads status
// registers and both pages through register_interface.
//
// Interface: S, Trig and the channel inputs are asynchronous levels, counted
// on their rising edges (each level must hold for at least one clock).  The
// CPU bus is a plain synchronous register bus (see register_interface);
// read data are valid one cycle after the request.  `miss_flag`,
// `check_done` and `err_any` bring the error flags out for a front-panel or interlock use.
module triggered_scaler
  import scaler_pkg::*;
#(
  parameter int unsigned N_CH    = DEF_N_CH,
  parameter int unsigned N_CELLS = DEF_N_CELLS,
  parameter int unsigned CNT_W   = DEF_CNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // timing reference and measured signals
  input  logic              s_in,
  input  logic              trig_in,
  input  logic [N_CH-1:0]   ch_in,
  // CPU register bus
  input  logic              bus_rd,
  input  logic              bus_wr,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_wdata,
  output logic              bus_rvalid,
  output logic [DATA_W-1:0] bus_rdata,
  // error flags
  output logic [N_CH-1:0]   miss_flag,
  output logic              check_done,  // pulse: a closed page was checked
  output logic              err_any
);

  // ---- input synchronisers ----
  logic            s_evt, trig_evt;
  logic [N_CH-1:0] ch_evt;

  edge_sync u_sync_s    (.clk, .rst_n, .din(s_in),    .pulse(s_evt));
  edge_sync u_sync_trig (.clk, .rst_n, .din(trig_in), .pulse(trig_evt));
  for (genvar c = 0; c < N_CH; c++) begin : g_sync
    edge_sync u_sync_ch (.clk, .rst_n, .din(ch_in[c]), .pulse(ch_evt[c]));
  end

  // ---- FPGA_1: counting ----
  logic                       wr_en, wr_page;
  logic [CELL_W-1:0]          wr_cell;
  logic [N_CH-1:0][CNT_W-1:0] wr_data;
  logic                       page_now;
  logic [CELL_W-1:0]          trigger_now;
  logic [15:0]                trigger_in_cycle;
  logic [7:0]                 err_status, err_clr;
  logic                       cycle_done, done_page;
  logic [CELL_W:0]            done_cells;

  counting_logic #(.N_CH(N_CH), .N_CELLS(N_CELLS), .CNT_W(CNT_W)) u_count (
    .clk, .rst_n, .s_evt, .trig_evt, .ch_evt, .err_clr,
    .wr_en, .wr_page, .wr_cell, .wr_data,
    .page_now, .trigger_now, .trigger_in_cycle, .err_status,
    .cycle_done, .done_page, .done_cells
  );

  // ---- memory-buffers ----
  logic                       page_set;
  logic [CELL_W-1:0]          cpu_cell, det_cell;
  logic                       det_page;
  logic [N_CH-1:0][CNT_W-1:0] cpu_data, det_data;

  for (genvar c = 0; c < N_CH; c++) begin : g_buf
    memory_buffer #(.N_CELLS(N_CELLS), .CNT_W(CNT_W)) u_buf (
      .clk,
      .we(wr_en), .w_page(wr_page), .w_cell(wr_cell), .w_data(wr_data[c]),
      .a_page(page_set), .a_cell(cpu_cell), .a_data(cpu_data[c]),
      .b_page(det_page), .b_cell(det_cell), .b_data(det_data[c])
    );
  end

  // ---- FPGA_2: miss-trigger detection ----
  logic [N_CH-1:0]            det_enable, flag_clr;

  miss_trigger_detector #(.N_CH(N_CH), .N_CELLS(N_CELLS), .CNT_W(CNT_W)) u_det (
    .clk, .rst_n, .enable(det_enable), .flag_clr,
    .cycle_done, .done_page, .done_cells,
    .rd_page(det_page), .rd_cell(det_cell), .rd_data(det_data),
    .scan_done(check_done), .miss_flag
  );

  // ---- CPU registers ----
  bus_req_t req;
  bus_rsp_t rsp;
  assign req = '{rd: bus_rd, wr: bus_wr, addr: bus_addr, wdata: bus_wdata};

  register_interface #(.N_CH(N_CH), .N_CELLS(N_CELLS), .CNT_W(CNT_W)) u_regs (
    .clk, .rst_n, .req, .rsp,
    .page_now, .trigger_now, .trigger_in_cycle, .err_status, .miss_flag,
    .page_set, .det_enable, .err_clr, .flag_clr,
    .mem_cell(cpu_cell), .mem_data(cpu_data)
  );

  assign bus_rvalid = rsp.rvalid;
  assign bus_rdata  = rsp.rdata;
  assign err_any    = (|miss_flag) || (|err_status);

endmodule
