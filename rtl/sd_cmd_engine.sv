// SD command-line engine: sends one command on CMD and collects its response.
//
// A command is 48 bits: start bit 0, transmission bit 1, 6-bit index, 32-bit
// argument, CRC7 and end bit 1. The engine drives CMD after falling edges of
// the SD clock (fall_i strobe) and samples it at rising edges (rise_i), as
// the SD bus does. After the command it releases CMD and waits up to
// NCR_MAX SD clocks for the card's start bit, then shifts in 48 or 136
// bits. A 48-bit response with CRC has its CRC7 checked.
//
// Interface: pulse start_i with idx_i, arg_i and rsp_i held for that cycle;
// busy_o stays high until done_o pulses. resp_o then holds the response: for
// 48-bit responses resp_o[31:0] is the 32-bit payload and resp_o[37:32] the
// echoed index; for 136-bit responses resp_o[127:0] holds the last 128 bits
// received (the register contents with their CRC7 and end bit).
// The SD command format is the SD specification's; the document only says
// that the SDIO register interface issues SD commands.
module sd_cmd_engine
  import sd_pkg::*;
#(
  parameter int unsigned NCR_MAX = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rise_i,
  input  logic         fall_i,
  input  logic         start_i,
  input  logic [5:0]   idx_i,
  input  logic [31:0]  arg_i,
  input  rsp_e         rsp_i,
  output logic         busy_o,
  output logic         done_o,
  output logic         timeout_o,
  output logic         crc_err_o,
  output logic [127:0] resp_o,
  input  logic         cmd_i,
  output logic         cmd_o,
  output logic         cmd_oe_o
);
  typedef enum logic [1:0] {S_IDLE, S_TX, S_WAIT, S_RX} state_e;

  state_e         state_q;
  logic [47:0]    tx_q;
  logic [135:0]   rx_q;
  logic [7:0]     cnt_q;
  rsp_e           rsp_q;
  logic [39:0]    head;

  assign head   = {2'b01, idx_i, arg_i};
  assign busy_o = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      tx_q      <= '1;
      rx_q      <= '0;
      cnt_q     <= '0;
      rsp_q     <= RSP_NONE;
      cmd_o     <= 1'b1;
      cmd_oe_o  <= 1'b0;
      done_o    <= 1'b0;
      timeout_o <= 1'b0;
      crc_err_o <= 1'b0;
      resp_o    <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          tx_q      <= {head, crc7_40(head), 1'b1};
          rsp_q     <= rsp_i;
          cnt_q     <= '0;
          timeout_o <= 1'b0;
          crc_err_o <= 1'b0;
          state_q   <= S_TX;
        end
        S_TX: if (fall_i) begin
          if (cnt_q < 8'd48) begin
            cmd_oe_o <= 1'b1;
            cmd_o    <= tx_q[47];
            tx_q     <= {tx_q[46:0], 1'b1};
            cnt_q    <= cnt_q + 8'd1;
          end else begin
            cmd_oe_o <= 1'b0;
            cmd_o    <= 1'b1;
            cnt_q    <= '0;
            if (rsp_q == RSP_NONE) begin
              done_o  <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              state_q <= S_WAIT;
            end
          end
        end
        S_WAIT: if (rise_i) begin
          if (!cmd_i) begin
            rx_q    <= '0;
            cnt_q   <= 8'd1;
            state_q <= S_RX;
          end else if (cnt_q == 8'(NCR_MAX)) begin
            timeout_o <= 1'b1;
            done_o    <= 1'b1;
            state_q   <= S_IDLE;
          end else begin
            cnt_q <= cnt_q + 8'd1;
          end
        end
        S_RX: if (rise_i) begin
          rx_q  <= {rx_q[134:0], cmd_i};
          cnt_q <= cnt_q + 8'd1;
          if (cnt_q == ((rsp_q == RSP_136) ? 8'd135 : 8'd47)) begin
            done_o  <= 1'b1;
            state_q <= S_IDLE;
            if (rsp_q == RSP_136) begin
              resp_o <= {rx_q[126:0], cmd_i};
            end else begin
              resp_o <= {88'd0, rx_q[46:7]};
              if (rsp_q == RSP_48)
                crc_err_o <= (crc7_40(rx_q[46:7]) != rx_q[6:0]);
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
