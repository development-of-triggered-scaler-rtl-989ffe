// register_interface: the CPU's view of the triggered scaler.
//
// A simple synchronous register bus: one read or write per cycle, read data
// valid (`rsp.rvalid`) one cycle after the read request.  The register
// numbers are those of the module's hardware layer:
//    9  pageNow         page being filled (read only)
//   10  triggerNow      cell being filled, 0..191 (read only)
//   11  pageSet         page the waveforms below are read from (read/write)
//   14  errStatus       counting errors; bit 0 cell overflow, bit 1 count
//                       saturation (read, write 1 to clear)
//   16  triggerInCycle  Trig edges in the previous S period (read only)
//   33 + 256*c + k      cell k (0..191) of channel c+1 on page pageSet
// Two registers are this design's additions:
//   12  detector enable, one bit per channel (read/write, reset 0)
//   15  miss-trigger flags, one bit per channel (read, write 1 to clear)
// Other addresses read 0 and ignore writes.  The physical PLC bus of the
// module is not modelled; an adapter to it would drive this bus.
module register_interface
  import scaler_pkg::*;
#(
  parameter int unsigned N_CH    = DEF_N_CH,
  parameter int unsigned N_CELLS = DEF_N_CELLS,
  parameter int unsigned CNT_W   = DEF_CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  bus_req_t                   req,
  output bus_rsp_t                   rsp,
  // status from the counting logic and the detector
  input  logic                       page_now,
  input  logic [CELL_W-1:0]          trigger_now,
  input  logic [15:0]                trigger_in_cycle,
  input  logic [7:0]                 err_status,
  input  logic [N_CH-1:0]            miss_flag,
  // controls
  output logic                       page_set,
  output logic [N_CH-1:0]            det_enable,
  output logic [7:0]                 err_clr,      // 1-cycle pulses
  output logic [N_CH-1:0]            flag_clr,     // 1-cycle pulses
  // read port A of the memory-buffers
  output logic [CELL_W-1:0]          mem_cell,
  input  logic [N_CH-1:0][CNT_W-1:0] mem_data
);

  // address decode of the waveform windows
  logic [1:0]        a_ch;
  logic [7:0]        a_off;
  logic              a_is_wf;
  assign a_ch     = req.addr[9:8];
  assign a_off    = req.addr[7:0];
  assign a_is_wf  = (32'(a_ch) < N_CH) && (a_off >= 8'(WF_BASE))
                    && (32'(a_off) < WF_BASE + N_CELLS);
  assign mem_cell = CELL_W'(a_off - 8'(WF_BASE));

  logic              q_rvalid;
  logic              q_is_wf;
  logic [1:0]        q_ch;
  logic [DATA_W-1:0] q_reg;
  logic [DATA_W-1:0] reg_val;

  always_comb begin
    reg_val = '0;
    unique case (req.addr)
      REG_PAGE_NOW:      reg_val = DATA_W'(page_now);
      REG_TRIGGER_NOW:   reg_val = DATA_W'(trigger_now);
      REG_PAGE_SET:      reg_val = DATA_W'(page_set);
      REG_DET_ENABLE:    reg_val = DATA_W'(det_enable);
      REG_ERR_STATUS:    reg_val = DATA_W'(err_status);
      REG_MISS_FLAGS:    reg_val = DATA_W'(miss_flag);
      REG_TRIG_IN_CYCLE: reg_val = trigger_in_cycle;
      default:           reg_val = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      page_set   <= 1'b0;
      det_enable <= '0;
      err_clr    <= '0;
      flag_clr   <= '0;
      q_rvalid   <= 1'b0;
      q_is_wf    <= 1'b0;
      q_ch       <= '0;
      q_reg      <= '0;
    end else begin
      err_clr  <= '0;
      flag_clr <= '0;
      if (req.wr) begin
        unique case (req.addr)
          REG_PAGE_SET:   page_set   <= req.wdata[0];
          REG_DET_ENABLE: det_enable <= req.wdata[N_CH-1:0];
          REG_ERR_STATUS: err_clr    <= req.wdata[7:0];
          REG_MISS_FLAGS: flag_clr   <= req.wdata[N_CH-1:0];
          default: ;
        endcase
      end
      q_rvalid   <= req.rd && !req.wr;
      q_is_wf    <= a_is_wf;
      q_ch       <= a_ch;
      q_reg      <= reg_val;
    end
  end

  // read data: the memory word arrives one cycle after its address
  always_comb begin
    rsp.rvalid = q_rvalid;
    rsp.rdata  = q_is_wf ? DATA_W'(mem_data[q_ch]) : q_reg;
  end

  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(req.rd && req.wr));

endmodule
