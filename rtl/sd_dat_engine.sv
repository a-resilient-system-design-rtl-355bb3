// SD data-line engine: moves one 512-byte block over DAT[3:0].
//
// Three operations (op_i, started by a start_i pulse):
//   DAT_RX   wait up to TIMEOUT SD clocks for the start bit (DAT0 low), shift
//            in the block, 1 or 4 bits per SD clock (bus4_i), then one
//            CRC16 per used line, and check them. Every completed 32-bit word
//            is written to the block buffer (buf_we_o, buf_addr_o, buf_wdata_o).
//   DAT_TX   drive a start bit, the block read from the buffer, the CRC16 of
//            each line and an end bit; release the lines, then read the card's
//            CRC status token (start bit, 3 bits, '010' = accepted) and wait
//            while the card signals busy by holding DAT0 low.
//   DAT_BUSY only the final busy wait (used after an R1b response).
// A busy wait ignores DAT0 for the first two SD clocks, which the card may
// take to start signalling busy.
// Byte order: byte k of the block is byte lane k%4 of buffer word k/4, and
// each byte travels most-significant bit first; in 4-bit mode DAT3 carries
// the upper bit of each nibble. Lines change after falling SD-clock edges
// (fall_i) and are sampled at rising edges (rise_i).
// The buffer read port is synchronous: buf_rdata_i is the word at the
// buf_addr_o of the previous cycle. done_o pulses at the end; crc_err_o and
// timeout_o then describe the outcome. The block format is the SD
// specification's; the document does not describe the data path.
module sd_dat_engine
  import sd_pkg::*;
#(
  parameter int unsigned BLOCK_BYTES = 512,
  parameter int unsigned TIMEOUT     = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rise_i,
  input  logic        fall_i,
  input  logic        start_i,
  input  dat_op_e     op_i,
  input  logic        bus4_i,
  output logic        busy_o,
  output logic        done_o,
  output logic        crc_err_o,
  output logic        timeout_o,
  output logic        buf_we_o,
  output logic [$clog2(BLOCK_BYTES/4)-1:0] buf_addr_o,
  output logic [31:0] buf_wdata_o,
  input  logic [31:0] buf_rdata_i,
  input  logic [3:0]  dat_i,
  output logic [3:0]  dat_o,
  output logic        dat_oe_o
);
  localparam int unsigned BITS = BLOCK_BYTES * 8;
  localparam int unsigned CW   = $clog2(BITS + 1);
  localparam int unsigned AW   = $clog2(BLOCK_BYTES / 4);

  typedef enum logic [3:0] {
    S_IDLE, S_RX_WAIT, S_RX_DATA, S_RX_CRC, S_RX_END,
    S_TX_START, S_TX_DATA, S_TX_CRC, S_TX_END,
    S_ST_WAIT, S_ST_BITS, S_BUSY
  } state_e;

  state_e            state_q;
  logic [CW-1:0]     pos_q;      // stream bit position of the current step
  logic [31:0]       tmo_q;
  logic [3:0][15:0]  crc_q;
  logic [3:0][15:0]  rcrc_q;     // CRC bits received
  logic [31:0]       word_q;
  logic [2:0]        st_q;
  logic [4:0]        k_q;
  logic [2:0]        w;          // bits per step (1 or 4)
  logic [3:0]        lanes;

  assign w      = bus4_i ? 3'd4 : 3'd1;
  assign lanes  = bus4_i ? 4'hF : 4'h1;
  assign busy_o = (state_q != S_IDLE);

  logic [AW-1:0]     wa_q;       // word address of a pending buffer write

  // Sending reads the word the current step needs; receiving writes the
  // word just completed.
  assign buf_addr_o = buf_we_o ? wa_q : AW'(pos_q[CW-1:5]);

  // Bit value of stream bit n of the current word: byte n/8 of the word,
  // bit 7 - n%8 of that byte.
  function automatic logic word_bit(input logic [31:0] wd, input logic [4:0] n);
    return wd[{n[4:3], 3'd7 - n[2:0]}];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      pos_q       <= '0;
      tmo_q       <= '0;
      crc_q       <= '0;
      rcrc_q      <= '0;
      word_q      <= '0;
      wa_q        <= '0;
      st_q        <= '0;
      k_q         <= '0;
      done_o      <= 1'b0;
      crc_err_o   <= 1'b0;
      timeout_o   <= 1'b0;
      buf_we_o    <= 1'b0;
      buf_wdata_o <= '0;
      dat_o       <= 4'hF;
      dat_oe_o    <= 1'b0;
    end else begin
      done_o   <= 1'b0;
      buf_we_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          pos_q     <= '0;
          tmo_q     <= '0;
          crc_q     <= '0;
          rcrc_q    <= '0;
          k_q       <= '0;
          crc_err_o <= 1'b0;
          timeout_o <= 1'b0;
          unique case (op_i)
            DAT_RX:  state_q <= S_RX_WAIT;
            DAT_TX:  state_q <= S_TX_START;
            default: state_q <= S_BUSY;
          endcase
        end

        // ---------------- receive ----------------
        S_RX_WAIT: if (rise_i) begin
          if (!dat_i[0]) state_q <= S_RX_DATA;
          else if (tmo_q == TIMEOUT) begin
            timeout_o <= 1'b1;
            done_o    <= 1'b1;
            state_q   <= S_IDLE;
          end else tmo_q <= tmo_q + 32'd1;
        end
        S_RX_DATA: if (rise_i) begin
          logic [31:0] nw;
          nw = word_q;
          for (int j = 0; j < 4; j++) begin
            if (lanes[j]) begin
              nw[{pos_q[4:3], 3'd7 - (pos_q[2:0] + 3'(w - 3'd1 - 3'(j)))}] = dat_i[j];
              crc_q[j] <= crc16_bit(crc_q[j], dat_i[j]);
            end
          end
          word_q <= nw;
          pos_q  <= pos_q + CW'(w);
          if (pos_q[4:0] + 5'(w) == 5'd0) begin
            buf_we_o    <= 1'b1;
            buf_wdata_o <= nw;
            wa_q        <= AW'(pos_q[CW-1:5]);
          end
          if (pos_q + CW'(w) == CW'(BITS)) state_q <= S_RX_CRC;
        end
        S_RX_CRC: if (rise_i) begin
          for (int j = 0; j < 4; j++) rcrc_q[j] <= {rcrc_q[j][14:0], dat_i[j]};
          k_q <= k_q + 5'd1;
          if (k_q == 5'd15) state_q <= S_RX_END;
        end
        S_RX_END: if (rise_i) begin
          for (int j = 0; j < 4; j++)
            if (lanes[j] && rcrc_q[j] != crc_q[j]) crc_err_o <= 1'b1;
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end

        // ---------------- transmit ----------------
        S_TX_START: if (fall_i) begin
          dat_oe_o <= 1'b1;
          dat_o    <= 4'h0;
          state_q  <= S_TX_DATA;
        end
        S_TX_DATA: if (fall_i) begin
          logic [3:0] v;
          v = 4'hF;
          for (int j = 0; j < 4; j++) begin
            if (lanes[j]) begin
              v[j] = word_bit(buf_rdata_i, pos_q[4:0] + (5'(w) - 5'd1 - 5'(j)));
              crc_q[j] <= crc16_bit(crc_q[j], v[j]);
            end
          end
          dat_o <= v;
          pos_q <= pos_q + CW'(w);
          if (pos_q + CW'(w) == CW'(BITS)) state_q <= S_TX_CRC;
        end
        S_TX_CRC: if (fall_i) begin
          logic [3:0] v;
          v = 4'hF;
          for (int j = 0; j < 4; j++) begin
            if (lanes[j]) begin
              v[j] = crc_q[j][15];
              crc_q[j] <= {crc_q[j][14:0], 1'b0};
            end
          end
          dat_o <= v;
          k_q   <= k_q + 5'd1;
          if (k_q == 5'd15) state_q <= S_TX_END;
        end
        S_TX_END: if (fall_i) begin
          dat_o   <= 4'hF;
          k_q     <= k_q + 5'd1;
          if (k_q == 5'd17) begin
            dat_oe_o <= 1'b0;     // end bit has been on the wire for one clock
            state_q  <= S_ST_WAIT;
          end
        end
        S_ST_WAIT: if (rise_i) begin
          if (!dat_i[0]) begin
            k_q     <= '0;
            state_q <= S_ST_BITS;
          end else if (tmo_q == TIMEOUT) begin
            timeout_o <= 1'b1;
            done_o    <= 1'b1;
            state_q   <= S_IDLE;
          end else tmo_q <= tmo_q + 32'd1;
        end
        S_ST_BITS: if (rise_i) begin
          st_q <= {st_q[1:0], dat_i[0]};
          k_q  <= k_q + 5'd1;
          if (k_q == 5'd3) begin       // 3 status bits, then the end bit
            crc_err_o <= (st_q != 3'b010);
            tmo_q     <= '0;
            state_q   <= S_BUSY;
          end
        end
        S_BUSY: if (rise_i) begin
          // The card may take two clocks to pull DAT0 low: ignore DAT0
          // during the first two sampled edges.
          if (dat_i[0] && tmo_q >= 32'd2) begin
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end else if (tmo_q == TIMEOUT) begin
            timeout_o <= 1'b1;
            done_o    <= 1'b1;
            state_q   <= S_IDLE;
          end else tmo_q <= tmo_q + 32'd1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
