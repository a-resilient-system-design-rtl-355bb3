// Shared types and constants of the system-control (boot) subsystem.
//
// The subsystem is built around one peripheral bus. Every master drives a
// bus_req_t and every slave answers with a bus_rsp_t. A transfer is a single
// 32-bit word: the master raises req with address, write flag, write data and
// byte enables, and holds all of them stable until the slave answers with
// ready for one cycle. On a read, rdata is valid in that same ready cycle. err
// marks an access to an unmapped address or a write to read-only memory.
//
// The bootROM base address 0x1A00_0000 follows the boot subsystem's memory
// map; the other addresses are this design's choice, laid out in the style of
// the surrounding microcontroller platform.
package sysctrl_pkg;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
  } bus_req_t;

  typedef struct packed {
    logic        ready;
    logic        err;
    logic [31:0] rdata;
  } bus_rsp_t;

  localparam bus_req_t BUS_REQ_IDLE = '{req: 1'b0, we: 1'b0, addr: '0, wdata: '0, be: '0};
  localparam bus_rsp_t BUS_RSP_IDLE = '{ready: 1'b0, err: 1'b0, rdata: '0};

  // Memory map
  localparam logic [31:0] BOOTROM_BASE  = 32'h1A00_0000;
  localparam logic [31:0] BOOTROM_MASK  = 32'hFFFF_F000;   // 4 KiB window
  localparam logic [31:0] GPIO_BASE     = 32'h1A10_1000;
  localparam logic [31:0] DMA_BASE      = 32'h1A10_2000;
  localparam logic [31:0] SDIO_REG_BASE = 32'h1A10_3000;
  localparam logic [31:0] PERIPH_MASK   = 32'hFFFF_F000;   // 4 KiB per peripheral
  localparam logic [31:0] SRAM_BASE     = 32'h1C00_0000;
  localparam logic [31:0] SRAM_MASK     = 32'hFFFF_0000;   // 64 KiB window
  localparam logic [31:0] SDMEM_BASE    = 32'h2000_0000;
  localparam logic [31:0] SDMEM_MASK    = 32'hF000_0000;   // 256 MiB window onto the card

  // Byte-enable merge used by every writable slave.
  function automatic logic [31:0] apply_be(input logic [31:0] old_w,
                                           input logic [31:0] new_w,
                                           input logic [3:0]  be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++)
      r[8*i +: 8] = be[i] ? new_w[8*i +: 8] : old_w[8*i +: 8];
    return r;
  endfunction

endpackage
