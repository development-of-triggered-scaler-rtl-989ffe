// tb_memory_buffer: self-checking test of one dual memory-buffer.
//
// First reads every cell of both pages and expects zero (the initial
// contents), then fills both pages with a pattern, then runs random mixed
// writes and reads on both read ports against a reference array kept in the
// test.  Each read is checked exactly one clock after its address, and a
// read of the cell written in the same cycle must return the old value.
// Full-size parameters (2 pages x 192 cells x 16 bit).
module tb_memory_buffer;
  import scaler_pkg::*;

  localparam int unsigned N_CELLS = 192;
  localparam int unsigned CNT_W   = 16;

  logic              clk = 0;
  logic              we = 0, w_page = 0;
  logic [CELL_W-1:0] w_cell = '0;
  logic [CNT_W-1:0]  w_data = '0;
  logic              a_page = 0, b_page = 0;
  logic [CELL_W-1:0] a_cell = '0, b_cell = '0;
  logic [CNT_W-1:0]  a_data, b_data;

  memory_buffer #(.N_CELLS(N_CELLS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [CNT_W-1:0] ref_mem [2][N_CELLS];
  logic [CNT_W-1:0] exp_a, exp_b;
  bit               chk_en = 0;

  // compare the data of the addresses set up in the previous cycle
  always @(negedge clk) begin
    if (chk_en) begin
      checks += 2;
      if (a_data != exp_a) begin failures++; $display("FAIL port A got %h exp %h", a_data, exp_a); end
      if (b_data != exp_b) begin failures++; $display("FAIL port B got %h exp %h", b_data, exp_b); end
    end
  end

  // one access cycle: set inputs at negedge, model the clock edge
  task automatic access(input bit wen, input bit wp, input int wc, input logic [CNT_W-1:0] wd,
                        input bit ap, input int ac, input bit bp, input int bc);
    @(negedge clk);
    #1;
    we = wen; w_page = wp; w_cell = CELL_W'(wc); w_data = wd;
    a_page = ap; a_cell = CELL_W'(ac); b_page = bp; b_cell = CELL_W'(bc);
    exp_a = ref_mem[ap][ac];   // value before this cycle's write
    exp_b = ref_mem[bp][bc];
    if (wen) ref_mem[wp][wc] = wd;
    chk_en = 1;
  endtask

  initial begin
    for (int p = 0; p < 2; p++) for (int c = 0; c < N_CELLS; c++) ref_mem[p][c] = '0;
    // initial contents
    for (int c = 0; c < N_CELLS; c++) access(0, 0, 0, 0, 0, c, 1, c);
    // fill
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < N_CELLS; c++)
        access(1, p[0], c, CNT_W'(p * 1000 + c * 7 + 1), 0, 0, 1, N_CELLS - 1);
    // readback of both pages
    for (int c = 0; c < N_CELLS; c++) access(0, 0, 0, 0, 0, c, 1, c);
    // random traffic, including same-cell collisions
    for (int i = 0; i < 3000; i++) begin
      int wc, ac, bc;
      bit wp, ap, bp;
      wc = $urandom_range(N_CELLS - 1); wp = 1'($urandom);
      ap = 1'($urandom); bp = 1'($urandom);
      ac = (i % 5 == 0) ? wc : $urandom_range(N_CELLS - 1);
      bc = (i % 7 == 0) ? wc : $urandom_range(N_CELLS - 1);
      if (i % 5 == 0) ap = wp;
      if (i % 7 == 0) bp = wp;
      access(1'($urandom), wp, wc, CNT_W'($urandom), ap, ac, bp, bc);
    end
    @(negedge clk);
    chk_en = 0;
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
