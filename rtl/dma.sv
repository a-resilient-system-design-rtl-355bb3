// DMA channel joining the SPI interface to the peripheral bus.
//
// In the SPI boot mode the boot code does not move card bytes itself: it
// places a command frame in SRAM, tells the DMA where it is, and the DMA
// streams LEN bytes through the SPI master, optionally storing the bytes
// that come back at RX_ADDR. When TX is disabled the DMA sends 0xFF, the
// idle pattern the card needs while it answers or sends a data block.
// Registers (slave port, offsets in the 4 KiB window):
//   0x00 TX_ADDR   R/W byte address of the bytes to send
//   0x04 RX_ADDR   R/W byte address for received bytes
//   0x08 LEN       R/W number of bytes to exchange
//   0x0C CTRL      W: [0] start, [1] TX enable, [2] RX enable
//                  R: [0] busy   (writes while busy are ignored)
//   0x10 SPI_DIV   R/W SPI clock half period minus one (reset 63)
//   0x14 SPI_CSN   R/W [0] chip-select level (reset 1, deselected)
// Per byte the DMA reads the containing word (if TX), hands the byte to
// the SPI master, waits for the exchange, then writes the received byte with
// a one-byte byte-enable (if RX). Bus master protocol as in sysctrl_pkg.
// The document gives only the role of the DMA; the register set and the
// byte-serial engine are this design's choices.
module dma
  import sysctrl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   slv_req_i,
  output bus_rsp_t   slv_rsp_o,
  output bus_req_t   mst_req_o,
  input  bus_rsp_t   mst_rsp_i,
  // to the SPI master
  output logic [7:0] spi_div_o,
  output logic       spi_csn_o,
  output logic       spi_start_o,
  output logic [7:0] spi_tx_o,
  input  logic       spi_done_i,
  input  logic [7:0] spi_rx_i
);
  typedef enum logic [2:0] {D_IDLE, D_RD, D_SPI, D_WAIT, D_WR} dstate_e;

  dstate_e     st_q;
  logic [31:0] tx_addr_q, rx_addr_q, len_q, txp_q, rxp_q, left_q;
  logic        tx_en_q, rx_en_q;
  logic [7:0]  byte_q;
  logic        pend_q;
  logic [31:0] rdata_q;

  // slave port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q    <= 1'b0;
      rdata_q   <= '0;
      tx_addr_q <= '0;
      rx_addr_q <= '0;
      len_q     <= '0;
      spi_div_o <= 8'd63;
      spi_csn_o <= 1'b1;
    end else begin
      pend_q <= slv_req_i.req && !pend_q;
      if (slv_req_i.req && !pend_q) begin
        unique case (slv_req_i.addr[4:2])
          3'd0: rdata_q <= tx_addr_q;
          3'd1: rdata_q <= rx_addr_q;
          3'd2: rdata_q <= len_q;
          3'd3: rdata_q <= {31'd0, st_q != D_IDLE};
          3'd4: rdata_q <= {24'd0, spi_div_o};
          3'd5: rdata_q <= {31'd0, spi_csn_o};
          default: rdata_q <= '0;
        endcase
        if (slv_req_i.we) begin
          unique case (slv_req_i.addr[4:2])
            3'd0: tx_addr_q <= slv_req_i.wdata;
            3'd1: rx_addr_q <= slv_req_i.wdata;
            3'd2: len_q     <= slv_req_i.wdata;
            3'd4: spi_div_o <= slv_req_i.wdata[7:0];
            3'd5: spi_csn_o <= slv_req_i.wdata[0];
            default: ;
          endcase
        end
      end
    end
  end
  assign slv_rsp_o = '{ready: pend_q, err: 1'b0, rdata: rdata_q};

  logic start_w;
  assign start_w = slv_req_i.req && !pend_q && slv_req_i.we &&
                   slv_req_i.addr[4:2] == 3'd3 && slv_req_i.wdata[0] && st_q == D_IDLE;

  // engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= D_IDLE;
      txp_q       <= '0;
      rxp_q       <= '0;
      left_q      <= '0;
      tx_en_q     <= 1'b0;
      rx_en_q     <= 1'b0;
      byte_q      <= '0;
      spi_start_o <= 1'b0;
    end else begin
      spi_start_o <= 1'b0;
      unique case (st_q)
        D_IDLE: if (start_w) begin
          txp_q   <= tx_addr_q;
          rxp_q   <= rx_addr_q;
          left_q  <= len_q;
          tx_en_q <= slv_req_i.wdata[1];
          rx_en_q <= slv_req_i.wdata[2];
          if (len_q != 0) st_q <= slv_req_i.wdata[1] ? D_RD : D_SPI;
        end
        D_RD: if (mst_rsp_i.ready) begin
          byte_q <= mst_rsp_i.rdata[8*txp_q[1:0] +: 8];
          st_q   <= D_SPI;
        end
        D_SPI: begin
          spi_start_o <= 1'b1;
          st_q        <= D_WAIT;
        end
        D_WAIT: if (spi_done_i) begin
          byte_q <= spi_rx_i;
          st_q   <= rx_en_q ? D_WR : D_IDLE;
          if (!rx_en_q) begin
            left_q <= left_q - 32'd1;
            txp_q  <= txp_q + 32'd1;
            if (left_q != 32'd1) st_q <= tx_en_q ? D_RD : D_SPI;
          end
        end
        D_WR: if (mst_rsp_i.ready) begin
          left_q <= left_q - 32'd1;
          txp_q  <= txp_q + 32'd1;
          rxp_q  <= rxp_q + 32'd1;
          st_q   <= (left_q == 32'd1) ? D_IDLE : (tx_en_q ? D_RD : D_SPI);
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

  assign spi_tx_o = tx_en_q ? byte_q : 8'hFF;

  always_comb begin
    mst_req_o = '0;
    if (st_q == D_RD) begin
      mst_req_o.req  = 1'b1;
      mst_req_o.addr = {txp_q[31:2], 2'b00};
      mst_req_o.be   = 4'hF;
    end else if (st_q == D_WR) begin
      mst_req_o.req   = 1'b1;
      mst_req_o.we    = 1'b1;
      mst_req_o.addr  = {rxp_q[31:2], 2'b00};
      mst_req_o.wdata = {4{byte_q}};
      mst_req_o.be    = 4'b0001 << rxp_q[1:0];
    end
  end
endmodule
