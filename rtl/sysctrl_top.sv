// System-control CPU subsystem, boot fabric: everything the boot processor
// needs to wake the chip, around one peripheral bus.
//
// Four independent ways to get a first program running, each using a
// different subset of the blocks, so that a fault in one block leaves at
// least one way open:
//   SDIO boot     boot code in the bootROM copies an image from the SD card
//                 through the SDIO register interface into SRAM and jumps.
//   SPI boot      the same through the DMA and the SPI master (SD SPI mode).
//   external boot boot_sel_i moves the CPU's boot address to the SDIO memory
//                 window: the CPU runs straight from the card, which the
//                 SDIO interface's hardware FSM brought up after reset.
//   JTAG boot     a debug host halts the CPU through the JTAG interface and
//                 the debug module, fills SRAM over the bus and resumes.
// The CPU core itself is outside this module: its instruction and data bus
// ports, its boot address and its debug signals are ports here.
//
// Bus masters (served round robin): debug module, CPU data, CPU
// instruction, DMA. Slaves and their windows (see sysctrl_pkg): bootROM
// 0x1A00_0000, GPIO 0x1A10_1000, DMA/SPI registers 0x1A10_2000, SDIO
// registers 0x1A10_3000, SRAM 0x1C00_0000, SD card window 0x2000_0000.
// The set of blocks and their connections follow the subsystem's resource
// diagram; addresses, priorities and the boot-address selection by one pin
// are this design's choices.
module sysctrl_top
  import sysctrl_pkg::*;
#(
  parameter int unsigned ROM_WORDS    = 768,
  parameter string       ROM_INIT     = "",
  parameter int unsigned SRAM_WORDS   = 16384,
  parameter int unsigned SD_INIT_DIV  = 62,
  parameter int unsigned SD_FAST_DIV  = 1,
  parameter int unsigned SD_TRIES     = 4096,
  parameter int unsigned SD_TIMEOUT   = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // boot CPU
  input  bus_req_t    cpu_instr_req_i,
  output bus_rsp_t    cpu_instr_rsp_o,
  input  bus_req_t    cpu_data_req_i,
  output bus_rsp_t    cpu_data_rsp_o,
  input  logic        boot_sel_i,        // 1: external boot from the SD card window
  output logic [31:0] boot_addr_o,
  output logic        debug_req_o,
  output logic        resume_req_o,
  output logic        ndmreset_o,
  output logic        dpc_we_o,
  output logic [31:0] dpc_o,
  input  logic        cpu_halted_i,
  // pads
  input  logic [31:0] gpio_pad_i,
  output logic        sd_clk_o,
  input  logic        sd_cmd_i,
  output logic        sd_cmd_o,
  output logic        sd_cmd_oe_o,
  input  logic [3:0]  sd_dat_i,
  output logic [3:0]  sd_dat_o,
  output logic        sd_dat_oe_o,
  output logic        spi_sck_o,
  output logic        spi_csn_o,
  output logic        spi_mosi_o,
  input  logic        spi_miso_i,
  input  logic        jtag_tck_i,
  input  logic        jtag_tms_i,
  input  logic        jtag_tdi_i,
  input  logic        jtag_trst_ni,
  output logic        jtag_tdo_o,
  output logic        jtag_tdo_oe_o,
  output logic        sdio_init_done_o
);
  localparam int unsigned NM = 4;
  localparam int unsigned NS = 6;

  bus_req_t [NM-1:0] m_req;
  bus_rsp_t [NM-1:0] m_rsp;
  bus_req_t [NS-1:0] s_req;
  bus_rsp_t [NS-1:0] s_rsp;

  assign boot_addr_o = boot_sel_i ? SDMEM_BASE : BOOTROM_BASE;

  assign m_req[1]        = cpu_data_req_i;
  assign cpu_data_rsp_o  = m_rsp[1];
  assign m_req[2]        = cpu_instr_req_i;
  assign cpu_instr_rsp_o = m_rsp[2];

  periph_bus #(.NM(NM), .NS(NS)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp
  );

  bootrom #(.WORDS(ROM_WORDS), .INIT_FILE(ROM_INIT)) u_rom (
    .clk, .rst_n, .req_i(s_req[0]), .rsp_o(s_rsp[0])
  );

  sram #(.WORDS(SRAM_WORDS)) u_sram (
    .clk, .rst_n, .req_i(s_req[1]), .rsp_o(s_rsp[1])
  );

  gpio u_gpio (
    .clk, .rst_n, .req_i(s_req[2]), .rsp_o(s_rsp[2]), .pad_i(gpio_pad_i)
  );

  logic [7:0] spi_div, spi_tx, spi_rx;
  logic       spi_csn, spi_start, spi_done, spi_busy;

  dma u_dma (
    .clk, .rst_n, .slv_req_i(s_req[3]), .slv_rsp_o(s_rsp[3]),
    .mst_req_o(m_req[3]), .mst_rsp_i(m_rsp[3]),
    .spi_div_o(spi_div), .spi_csn_o(spi_csn), .spi_start_o(spi_start),
    .spi_tx_o(spi_tx), .spi_done_i(spi_done), .spi_rx_i(spi_rx)
  );

  spi_master u_spi (
    .clk, .rst_n, .clkdiv_i(spi_div), .csn_i(spi_csn), .start_i(spi_start),
    .tx_i(spi_tx), .busy_o(spi_busy), .done_o(spi_done), .rx_o(spi_rx),
    .sck_o(spi_sck_o), .csn_o(spi_csn_o), .mosi_o(spi_mosi_o), .miso_i(spi_miso_i)
  );

  sdio_regif #(.INIT_CLKDIV(SD_INIT_DIV), .FAST_CLKDIV(SD_FAST_DIV),
               .ACMD41_TRIES(SD_TRIES), .DAT_TIMEOUT(SD_TIMEOUT)) u_sdio (
    .clk, .rst_n, .reg_req_i(s_req[4]), .reg_rsp_o(s_rsp[4]),
    .mem_req_i(s_req[5]), .mem_rsp_o(s_rsp[5]), .init_done_o(sdio_init_done_o),
    .sd_clk_o, .sd_cmd_i, .sd_cmd_o, .sd_cmd_oe_o, .sd_dat_i, .sd_dat_o, .sd_dat_oe_o
  );

  logic        dmi_req, dmi_rsp;
  logic [6:0]  dmi_addr;
  logic [31:0] dmi_wdata, dmi_rdata;
  logic [1:0]  dmi_op;

  jtag_dtm u_dtm (
    .tck(jtag_tck_i), .tms(jtag_tms_i), .tdi(jtag_tdi_i), .trst_n(jtag_trst_ni),
    .tdo(jtag_tdo_o), .tdo_oe(jtag_tdo_oe_o),
    .clk, .rst_n, .dmi_req_o(dmi_req), .dmi_addr_o(dmi_addr), .dmi_wdata_o(dmi_wdata),
    .dmi_op_o(dmi_op), .dmi_rsp_i(dmi_rsp), .dmi_rdata_i(dmi_rdata)
  );

  debug_module u_dm (
    .clk, .rst_n, .dmi_req_i(dmi_req), .dmi_addr_i(dmi_addr), .dmi_wdata_i(dmi_wdata),
    .dmi_op_i(dmi_op), .dmi_rsp_o(dmi_rsp), .dmi_rdata_o(dmi_rdata),
    .debug_req_o, .resume_req_o, .ndmreset_o, .dpc_we_o, .dpc_o, .cpu_halted_i,
    .mst_req_o(m_req[0]), .mst_rsp_i(m_rsp[0])
  );
endmodule
