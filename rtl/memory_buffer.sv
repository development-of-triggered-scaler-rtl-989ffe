// memory_buffer: the dual memory-buffer of one input channel.
//
// Two pages of N_CELLS cells of CNT_W bits, held as one array indexed by
// {page, cell}.  The counting logic writes through the write port while the
// CPU (port A) and the miss-trigger detector (port B) read independently.
// Both read ports are synchronous: data appear one clock after the address.
// A read of the cell being written in the same cycle returns the old value.
// The contents start at zero.
//
// The size (2 x 192 x 16 bit) is the module's; giving the detector a read
// port of its own, instead of sharing the CPU's, is this design's choice (on
// an FPGA it maps to two block RAMs holding the same data).
module memory_buffer
  import scaler_pkg::*;
#(
  parameter int unsigned N_CELLS = DEF_N_CELLS,
  parameter int unsigned CNT_W   = DEF_CNT_W
) (
  input  logic              clk,
  // write port (counting logic)
  input  logic              we,
  input  logic              w_page,
  input  logic [CELL_W-1:0] w_cell,
  input  logic [CNT_W-1:0]  w_data,
  // read port A (CPU)
  input  logic              a_page,
  input  logic [CELL_W-1:0] a_cell,
  output logic [CNT_W-1:0]  a_data,
  // read port B (miss-trigger detector)
  input  logic              b_page,
  input  logic [CELL_W-1:0] b_cell,
  output logic [CNT_W-1:0]  b_data
);

  localparam int unsigned DEPTH = N_PAGES * N_CELLS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [CNT_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  function automatic logic [AW-1:0] index(input logic pg, input logic [CELL_W-1:0] cl);
    return pg ? AW'(N_CELLS) + AW'(cl) : AW'(cl);
  endfunction

  always_ff @(posedge clk) begin
    if (we && w_cell < CELL_W'(N_CELLS)) mem[index(w_page, w_cell)] <= w_data;
    a_data <= mem[index(a_page, a_cell)];
    b_data <= mem[index(b_page, b_cell)];
  end

endmodule
