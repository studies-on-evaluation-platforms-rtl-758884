// nvmm_pkg: types and constants shared by the NVMM simulator memory path.
//
// The memory bus carries one 64-byte cacheline per request, as the LLC does
// towards the memory controller. Addresses are 34-bit physical addresses; the
// DRAM starts at DRAM_BASE. Requests and responses use valid/ready handshakes
// with the structs below. The DDR command struct is what the controller hands
// to the PHY: one command per controller clock (200 MHz, 5 ns).
// The cacheline size, the 8-KiB row buffer, the DDR3-1600 timing values and the
// three injection modes follow the document; widths, field order, the address
// map and the encodings are this design's choices.
package nvmm_pkg;

  localparam int unsigned ADDR_W     = 34;
  localparam int unsigned ID_W       = 6;
  localparam int unsigned LINE_W     = 512;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LAT_W      = 16;   // width of every latency setting, in clocks

  // DDR3 geometry: 8 banks, 8-KiB rows (128 cachelines), 4 GiB in total.
  // Address offset from DRAM_BASE: [5:0] byte, [12:6] column, [28:13] row, [31:29] bank.
  localparam int unsigned BANKS  = 8;
  localparam int unsigned BANK_W = 3;
  localparam int unsigned ROW_W  = 16;
  localparam int unsigned COL_W  = 7;

  localparam logic [ADDR_W-1:0] DRAM_BASE = 34'h0_8000_0000;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [LAT_W-1:0]  lat_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    addr_t           addr;
    logic            we;
    line_t           data;
  } mem_req_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            we;
    logic            corrupt;   // integrity verification failed (MPE)
    line_t           data;
  } mem_rsp_t;

  typedef enum logic [2:0] {
    DDR_NOP = 3'd0,
    DDR_ACT = 3'd1,
    DDR_RD  = 3'd2,
    DDR_WR  = 3'd3,
    DDR_PRE = 3'd4
  } ddr_op_e;

  typedef struct packed {
    ddr_op_e           op;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    line_t             wdata;
  } ddr_cmd_t;

  typedef enum logic [1:0] {
    BUS_OFF    = 2'd0,
    BUS_COARSE = 2'd1,
    BUS_DCPMM  = 2'd2
  } bus_mode_e;

  // Run-time configuration, written through the MMIO registers.
  typedef struct packed {
    addr_t     nvmm_base;    // NVMM region is [nvmm_base, nvmm_limit)
    addr_t     nvmm_limit;
    bus_mode_e bus_mode;
    lat_t      rd_delay;     // coarse-grain / DCPMM base read latency
    lat_t      wr_delay;     // coarse-grain / DCPMM base write latency
    lat_t      rd_add256;    // DCPMM: read crossing a 256-byte boundary
    lat_t      rd_add4k;     // DCPMM: read crossing a 4-KiB boundary
    lat_t      wr_add256;
    lat_t      wr_add4k;
    lat_t      add_trcd;     // fine-grain: extra tRCD after ACTIVATE
    lat_t      add_trp;      // fine-grain: extra tRP after PRECHARGE of a dirty row
    lat_t      add_tras;     // extended fine-grain: extra tRAS
  } nvmm_cfg_t;

  function automatic logic [BANK_W-1:0] addr_bank(addr_t a);
    addr_t off = a - DRAM_BASE;
    return off[31:29];
  endfunction

  function automatic logic [ROW_W-1:0] addr_row(addr_t a);
    addr_t off = a - DRAM_BASE;
    return off[28:13];
  endfunction

  function automatic logic [COL_W-1:0] addr_col(addr_t a);
    addr_t off = a - DRAM_BASE;
    return off[12:6];
  endfunction

endpackage
