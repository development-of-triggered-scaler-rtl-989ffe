// scaler_pkg: sizes, register addresses and shared types of the triggered
// scaler.
//
// The scaler has four input channels, each with a dual memory-buffer of
// 2 pages x 192 cells x 16 bit.  Register numbers 9, 10, 11, 14, 16 and the
// waveform windows at 33 + 256*ch follow the hardware-layer register list of
// the module.  Registers 12 (detector enable) and 15 (miss-trigger flags) are
// this design's own additions; the rest of the 10-bit address space reads 0.
package scaler_pkg;

  localparam int unsigned DEF_N_CH    = 4;    // input channels
  localparam int unsigned DEF_N_CELLS = 192;  // cells per page
  localparam int unsigned N_PAGES     = 2;    // pages per channel (dual buffer)
  localparam int unsigned DEF_CNT_W   = 16;   // width of one cell
  localparam int unsigned CELL_W      = 8;    // cell index width (0..255)
  localparam int unsigned ADDR_W      = 10;   // CPU register address width
  localparam int unsigned DATA_W      = 16;   // CPU register data width

  // CPU register addresses
  localparam logic [ADDR_W-1:0] REG_PAGE_NOW      = 10'd9;
  localparam logic [ADDR_W-1:0] REG_TRIGGER_NOW   = 10'd10;
  localparam logic [ADDR_W-1:0] REG_PAGE_SET      = 10'd11;
  localparam logic [ADDR_W-1:0] REG_DET_ENABLE    = 10'd12;
  localparam logic [ADDR_W-1:0] REG_ERR_STATUS    = 10'd14;
  localparam logic [ADDR_W-1:0] REG_MISS_FLAGS    = 10'd15;
  localparam logic [ADDR_W-1:0] REG_TRIG_IN_CYCLE = 10'd16;
  localparam int unsigned       WF_BASE           = 33;   // cell 0 of a channel, at 256*ch

  // errStatus bits (sticky, write 1 to clear)
  typedef enum int unsigned {
    ERR_CELL_OVERFLOW = 0,  // a Trig arrived with the pointer on the last cell
    ERR_COUNT_SAT     = 1   // a channel count saturated at 2**CNT_W-1
  } err_bit_e;

  // CPU register bus request (one access per cycle, read data one cycle later)
  typedef struct packed {
    logic              rd;
    logic              wr;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

endpackage
