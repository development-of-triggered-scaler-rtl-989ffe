// tb_register_interface: self-checking test of the CPU register map.
//
// Status inputs are driven with random values and every register is read
// back.  The memory read port is answered by a model of the four buffers
// with one clock of latency, so every waveform address 33 + 256*c + k is
// checked against the cell it must select on the page chosen by pageSet.
// Writes to pageSet and the detector enable must read back; writes to
// errStatus and the miss flags must produce one-cycle clear pulses with the
// written mask; reads of unused addresses return 0; read data must be valid
// exactly one cycle after the request.
module tb_register_interface;
  import scaler_pkg::*;

  localparam int unsigned N_CH    = 4;
  localparam int unsigned N_CELLS = 192;
  localparam int unsigned CNT_W   = 16;

  logic                       clk = 0, rst_n = 0;
  bus_req_t                   req;
  bus_rsp_t                   rsp;
  logic                       page_now = 0;
  logic [CELL_W-1:0]          trigger_now = '0;
  logic [15:0]                trigger_in_cycle = '0;
  logic [7:0]                 err_status = '0;
  logic [N_CH-1:0]            miss_flag = '0;
  logic                       page_set;
  logic [N_CH-1:0]            det_enable;
  logic [7:0]                 err_clr;
  logic [N_CH-1:0]            flag_clr;
  logic [CELL_W-1:0]          mem_cell;
  logic [N_CH-1:0][CNT_W-1:0] mem_data;

  register_interface #(.N_CH(N_CH), .N_CELLS(N_CELLS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  // buffer model: value of cell k of channel c on page p
  function automatic logic [CNT_W-1:0] cellval(input int p, input int c, input int k);
    return CNT_W'(p * 16'h4000 + c * 16'h0400 + k * 3 + 1);
  endfunction
  always_ff @(posedge clk)
    for (int c = 0; c < N_CH; c++) mem_data[c] <= cellval(int'(page_set), c, int'(mem_cell));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial req = '0;

  task automatic rd(input int addr, output logic [15:0] data);
    @(negedge clk);
    req = '{rd: 1'b1, wr: 1'b0, addr: ADDR_W'(addr), wdata: '0};
    @(negedge clk);
    req = '0;
    check(rsp.rvalid, $sformatf("rvalid one cycle after read of %0d", addr));
    data = rsp.rdata;
    @(negedge clk);
    check(!rsp.rvalid, "rvalid is a single pulse");
  endtask

  task automatic wr(input int addr, input logic [15:0] data);
    @(negedge clk);
    req = '{rd: 1'b0, wr: 1'b1, addr: ADDR_W'(addr), wdata: data};
    @(negedge clk);
    req = '0;
  endtask

  task automatic expect_reg(input int addr, input logic [15:0] exp, input string what);
    logic [15:0] d;
    rd(addr, d);
    check(d == exp, $sformatf("%s (reg %0d): got %h expected %h", what, addr, d, exp));
  endtask

  logic [15:0] d;
  int seen_err_clr, seen_flag_clr;
  always @(posedge clk) begin
    if (rst_n && err_clr != 0) seen_err_clr++;
    if (rst_n && flag_clr != 0) seen_flag_clr++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // status registers
    for (int r = 0; r < 10; r++) begin
      @(negedge clk);
      page_now = 1'($urandom); trigger_now = CELL_W'($urandom_range(191));
      trigger_in_cycle = 16'($urandom); err_status = 8'($urandom_range(3));
      miss_flag = 4'($urandom);
      expect_reg(9,  16'(page_now), "pageNow");
      expect_reg(10, 16'(trigger_now), "triggerNow");
      expect_reg(14, 16'(err_status), "errStatus");
      expect_reg(15, 16'(miss_flag), "miss flags");
      expect_reg(16, trigger_in_cycle, "triggerInCycle");
    end

    // pageSet and detector enable
    expect_reg(11, 16'h0, "pageSet after reset");
    expect_reg(12, 16'h0, "enable after reset");
    wr(11, 16'h0001); expect_reg(11, 16'h1, "pageSet written");
    wr(12, 16'h000A); expect_reg(12, 16'hA, "enable written");
    check(det_enable == 4'hA, "det_enable output");

    // clear pulses
    seen_err_clr = 0; seen_flag_clr = 0;
    @(negedge clk); req = '{rd: 1'b0, wr: 1'b1, addr: ADDR_W'(14), wdata: 16'h0002};
    @(negedge clk); req = '0;
    check(err_clr == 8'h02, "err_clr pulse mask");
    @(negedge clk);
    check(err_clr == 8'h00, "err_clr back to 0");
    wr(15, 16'h0005);
    check(flag_clr == 4'h5, "flag_clr pulse mask");
    @(negedge clk);
    check(seen_err_clr == 1 && seen_flag_clr == 1, "one clear pulse each");

    // waveforms of both pages
    for (int p = 0; p < 2; p++) begin
      wr(11, 16'(p));
      for (int c = 0; c < N_CH; c++)
        for (int k = 0; k < N_CELLS; k += (k < 4 || k > 186) ? 1 : 13)
          expect_reg(33 + 256 * c + k, cellval(p, c, k), $sformatf("wf p%0d ch%0d cell %0d", p, c + 1, k));
    end

    // unused addresses read 0, writes there change nothing
    for (int a = 0; a < 33; a++) if (!(a inside {9, 10, 11, 12, 14, 15, 16})) expect_reg(a, 0, "unused");
    expect_reg(225, 0, "after ch1 window");
    expect_reg(256 + 32, 0, "before ch2 window");
    expect_reg(1023, 0, "top address");
    wr(13, 16'hFFFF);
    expect_reg(11, 16'h1, "pageSet unchanged by other write");
    expect_reg(12, 16'hA, "enable unchanged by other write");

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
