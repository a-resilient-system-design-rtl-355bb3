// SPI master for the SD card's SPI mode (the SPI boot path).
//
// Exchanges one byte per start_i pulse, full duplex, mode 0 (clock idles
// low, data sampled on the rising edge, shifted on the falling edge), most
// significant bit first. The SCK half period is clkdiv_i + 1 system clocks.
// Chip select is not decided here: csn_i (set by the DMA's SPI registers)
// is passed to the pin so a command frame can span many bytes.
// Interface: start_i with tx_i, then busy_o until done_o pulses with the
// received byte in rx_o. A byte takes 16 * (clkdiv_i + 1) system clocks.
// The document names only the SPI interface and its use through the DMA;
// the mode and framing are those of the SD card's SPI protocol.
module spi_master (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] clkdiv_i,
  input  logic       csn_i,
  input  logic       start_i,
  input  logic [7:0] tx_i,
  output logic       busy_o,
  output logic       done_o,
  output logic [7:0] rx_o,
  output logic       sck_o,
  output logic       csn_o,
  output logic       mosi_o,
  input  logic       miso_i
);
  logic [7:0] cnt_q, sh_q;
  logic [3:0] bit_q;
  logic       act_q;

  assign busy_o = act_q;
  assign csn_o  = csn_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      sh_q   <= '0;
      bit_q  <= '0;
      act_q  <= 1'b0;
      sck_o  <= 1'b0;
      mosi_o <= 1'b1;
      done_o <= 1'b0;
      rx_o   <= '0;
    end else begin
      done_o <= 1'b0;
      if (!act_q) begin
        if (start_i) begin
          act_q  <= 1'b1;
          sh_q   <= {tx_i[6:0], 1'b0};
          mosi_o <= tx_i[7];
          bit_q  <= '0;
          cnt_q  <= '0;
        end
      end else if (cnt_q == clkdiv_i) begin
        cnt_q <= '0;
        if (!sck_o) begin                  // rising edge: sample
          sck_o <= 1'b1;
          rx_o  <= {rx_o[6:0], miso_i};
          bit_q <= bit_q + 4'd1;
        end else begin                     // falling edge: shift
          sck_o <= 1'b0;
          if (bit_q == 4'd8) begin
            act_q  <= 1'b0;
            done_o <= 1'b1;
            mosi_o <= 1'b1;
          end else begin
            mosi_o <= sh_q[7];
            sh_q   <= {sh_q[6:0], 1'b0};
          end
        end
      end else begin
        cnt_q <= cnt_q + 8'd1;
      end
    end
  end
endmodule
