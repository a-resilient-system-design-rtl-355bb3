// Behavioural model of an SD card in SPI mode, for testbenches only.
//
// Mode 0 slave: samples MOSI on rising SCK, changes MISO after falling SCK
// (and when chip select falls). Command frames are 6 bytes starting with
// 01xxxxxx; the answer follows after one 0xFF byte. Understands CMD0, CMD8,
// CMD16, CMD17, CMD55, ACMD41 (idle for BUSY_ROUNDS polls) and CMD58. A
// CMD17 answer is R1, two 0xFF bytes, the 0xFE start token, 512 data bytes
// and a CRC16. Byte k of the card initially holds pattern(k) (same formula
// as the SD-mode model, so both cards can hold the same image).
module sd_spi_card_model #(
  parameter int unsigned BLOCKS      = 64,
  parameter int unsigned BUSY_ROUNDS = 2
) (
  input  logic sck,
  input  logic csn,
  input  logic mosi,
  output logic miso
);
  import sd_pkg::*;

  logic [7:0] mem [BLOCKS*512];
  logic [7:0] outq [$];
  logic [7:0] frame [6];
  int         nframe;
  logic [7:0] si, so;
  int         bitc;
  bit         app, idle, spi_mode, enabled = 1'b1;
  int unsigned n_acmd41, n_reads, n_cmd;

  function automatic logic [7:0] pattern(input int unsigned k);
    return 8'((k * 7 + 3) ^ (k >> 8));
  endfunction

  initial begin
    for (int unsigned k = 0; k < BLOCKS * 512; k++) mem[k] = pattern(k);
    miso = 1'b1; nframe = 0; bitc = 0; app = 0; idle = 1; spi_mode = 0;
    n_acmd41 = 0; n_reads = 0; n_cmd = 0; so = 8'hFF; si = 8'h00;
  end

  function automatic logic [7:0] next_out();
    if (outq.size() > 0) return outq.pop_front();
    return 8'hFF;
  endfunction

  task automatic r1(input logic [7:0] v);
    outq.push_back(8'hFF);
    outq.push_back(v);
  endtask

  task automatic command();
    logic [5:0]  idx;
    logic [31:0] arg;
    bit          was_app;
    idx = frame[0][5:0];
    arg = {frame[1], frame[2], frame[3], frame[4]};
    was_app = app; app = 0;
    n_cmd++;
    if (!spi_mode && idx != 0) return;
    if (was_app && idx == 6'd41) begin
      n_acmd41++;
      if (n_acmd41 > BUSY_ROUNDS) idle = 0;
      r1({7'd0, idle});
      return;
    end
    unique case (idx)
      6'd0:  begin outq.delete(); spi_mode = 1; idle = 1; n_acmd41 = 0; r1(8'h01); end
      6'd8:  begin r1({7'd0, idle}); outq.push_back(8'h00); outq.push_back(8'h00);
                   outq.push_back({4'd0, arg[11:8]}); outq.push_back(arg[7:0]); end
      6'd55: begin app = 1; r1({7'd0, idle}); end
      6'd58: begin r1({7'd0, idle}); outq.push_back({!idle, 1'b1, 6'h3F});
                   outq.push_back(8'h80); outq.push_back(8'h00); outq.push_back(8'h00); end
      6'd16: r1({7'd0, idle});
      6'd17: begin
        if (idle) r1(8'h05);
        else begin
          logic [15:0] crc;
          int unsigned a;
          a = (arg % BLOCKS) * 512;
          crc = '0;
          r1(8'h00);
          outq.push_back(8'hFF); outq.push_back(8'hFF); outq.push_back(8'hFE);
          for (int k = 0; k < 512; k++) begin
            outq.push_back(mem[a + k]);
            for (int b = 7; b >= 0; b--) crc = crc16_bit(crc, mem[a + k][b]);
          end
          outq.push_back(crc[15:8]); outq.push_back(crc[7:0]);
          n_reads++;
        end
      end
      default: r1({5'd0, 1'b1, 1'b0, idle});   // illegal command
    endcase
  endtask

  always @(negedge csn) begin
    bitc = 0;
    so   = enabled ? next_out() : 8'hFF;
    miso = so[7];
  end

  always @(posedge sck) begin
    if (!csn) begin
      si = {si[6:0], mosi};
      bitc++;
      if (bitc == 8) begin
        if (enabled) begin
          if (nframe == 0 && si[7:6] == 2'b01) begin frame[0] = si; nframe = 1; end
          else if (nframe > 0) begin
            frame[nframe] = si; nframe++;
            if (nframe == 6) begin nframe = 0; command(); end
          end
        end
      end
    end
  end

  always @(negedge sck) begin
    if (!csn) begin
      if (bitc == 8) begin
        bitc = 0;
        so   = enabled ? next_out() : 8'hFF;
      end else begin
        so = {so[6:0], 1'b1};
      end
      miso = so[7];
    end
  end
endmodule
