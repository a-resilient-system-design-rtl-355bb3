// SDIO register interface with autonomous card-initialisation and
// memory-mapping state machine.
//
// This block is what the SDIO and external boot modes stand on. It talks to
// an SD card in SD bus mode (CLK, CMD, DAT[3:0]) and offers two bus slaves:
//
// 1. Register port (reg_req_i). Software drives the card command by command:
//    it writes ARG, then CMD, and polls STATUS until busy clears. A command
//    may carry a data block (read into, or written from, the 512-byte block
//    buffer that is visible at offsets 0x200-0x3FC) or a busy wait (R1b).
//      0x00 CMD     W: [5:0] index, [9:8] response (0 none, 1 48-bit,
//                   2 48-bit without CRC, 3 136-bit), [10] read a block,
//                   [11] write a block, [12] wait for busy. Ignored while busy.
//      0x04 ARG     R/W command argument
//      0x08-0x14    RESP0..RESP3, R: response bits (see sd_cmd_engine)
//      0x18 STATUS  R: [0] busy, [1] cmd timeout, [2] cmd CRC error,
//                   [3] data timeout, [4] data CRC/status error,
//                   [8] card ready, [9] hardware init failed
//      0x1C CLKDIV  R/W SD clock half period minus one, in system clocks
//      0x20 CFG     R/W [0] 4-bit bus, [1] card ready (memory window on),
//                   [2] high-capacity card (block addressing)
//      0x24 RCA     R/W relative card address
// 2. Memory port (mem_req_i), for the external boot mode: the card appears
//    as plain memory. A read of offset A fetches block A/512 into the buffer
//    with CMD17 (unless that block is already there) and returns the word;
//    a write merges the word into the buffered block and writes the block
//    back with CMD24 before it is answered. The bus stalls (ready low) for
//    the whole card transfer, which is why executing from the card is slow.
//    An access made while the FSM is still initialising the card waits
//    for it, so a CPU fetching from the card right after reset simply
//    stalls; once the FSM is idle, an access while card ready is clear
//    (initialisation failed) is answered with err.
//
// After reset the hardware FSM initialises the card on its own, with no
// software: 80 idle clocks, CMD0, CMD8 (0x1AA), CMD55/ACMD41 until the card
// reports power-up done (at most ACMD41_TRIES times), CMD2, CMD3 (takes the
// RCA), CMD7 (selects the card, waits out busy), CMD55/ACMD6 (4-bit bus),
// CMD16 (512-byte blocks). It then switches to FAST_CLKDIV and sets card
// ready. Software that finds the card not ready can run the same sequence
// itself through the register port.
//
// From the document: the register interface on the peripheral bus, the FSM
// that initialises the card and translates bus accesses into SD reads and
// writes, and software-driven init and read. The register map, the command
// sequence details (from the SD specification), the one-block buffer and
// the clock divider values are this design's choices.
module sdio_regif
  import sysctrl_pkg::*;
  import sd_pkg::*;
#(
  parameter int unsigned INIT_CLKDIV  = 62,      // ~400 kHz from 50 MHz
  parameter int unsigned FAST_CLKDIV  = 1,       // 12.5 MHz from 50 MHz
  parameter int unsigned ACMD41_TRIES = 4096,
  parameter int unsigned NCR_MAX      = 64,
  parameter int unsigned DAT_TIMEOUT  = 65536,
  parameter int unsigned POWERUP_CLKS = 80
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   reg_req_i,
  output bus_rsp_t   reg_rsp_o,
  input  bus_req_t   mem_req_i,
  output bus_rsp_t   mem_rsp_o,
  output logic       init_done_o,
  output logic       sd_clk_o,
  input  logic       sd_cmd_i,
  output logic       sd_cmd_o,
  output logic       sd_cmd_oe_o,
  input  logic [3:0] sd_dat_i,
  output logic [3:0] sd_dat_o,
  output logic       sd_dat_oe_o
);
  // ------------------------------------------------------------ clock
  logic [15:0] clkdiv_q, div_cnt_q;
  logic        rise, fall;

  assign rise = (div_cnt_q == clkdiv_q) && !sd_clk_o;
  assign fall = (div_cnt_q == clkdiv_q) &&  sd_clk_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt_q <= '0;
      sd_clk_o  <= 1'b0;
    end else if (div_cnt_q >= clkdiv_q) begin
      div_cnt_q <= '0;
      sd_clk_o  <= !sd_clk_o;
    end else begin
      div_cnt_q <= div_cnt_q + 16'd1;
    end
  end

  // ------------------------------------------------------------ engines
  logic         cmd_start, cmd_busy, cmd_done, cmd_tmo, cmd_crc;
  logic [5:0]   cmd_idx;
  logic [31:0]  cmd_arg;
  rsp_e         cmd_rsp;
  logic [127:0] resp;

  logic         dat_start, dat_busy, dat_done, dat_crc, dat_tmo;
  dat_op_e      dat_op;
  logic         dat_we;
  logic [6:0]   dat_addr;
  logic [31:0]  dat_wdata, dat_rdata_q;
  logic         bus4_q;

  sd_cmd_engine #(.NCR_MAX(NCR_MAX)) u_cmd (
    .clk, .rst_n, .rise_i(rise), .fall_i(fall),
    .start_i(cmd_start), .idx_i(cmd_idx), .arg_i(cmd_arg), .rsp_i(cmd_rsp),
    .busy_o(cmd_busy), .done_o(cmd_done), .timeout_o(cmd_tmo), .crc_err_o(cmd_crc),
    .resp_o(resp), .cmd_i(sd_cmd_i), .cmd_o(sd_cmd_o), .cmd_oe_o(sd_cmd_oe_o)
  );

  sd_dat_engine #(.BLOCK_BYTES(512), .TIMEOUT(DAT_TIMEOUT)) u_dat (
    .clk, .rst_n, .rise_i(rise), .fall_i(fall),
    .start_i(dat_start), .op_i(dat_op), .bus4_i(bus4_q),
    .busy_o(dat_busy), .done_o(dat_done), .crc_err_o(dat_crc), .timeout_o(dat_tmo),
    .buf_we_o(dat_we), .buf_addr_o(dat_addr), .buf_wdata_o(dat_wdata),
    .buf_rdata_i(dat_rdata_q),
    .dat_i(sd_dat_i), .dat_o(sd_dat_o), .dat_oe_o(sd_dat_oe_o)
  );

  // ------------------------------------------------------------ block buffer
  logic [31:0] buf_q [128];
  logic [6:0]  bidx;
  logic [31:0] bus_rdata_q;
  logic        bus_we;
  logic [31:0] bus_wdata;
  logic [3:0]  bus_be;

  always_ff @(posedge clk) begin
    dat_rdata_q <= buf_q[dat_addr];
    bus_rdata_q <= buf_q[bidx];
    if (dat_we) begin
      buf_q[dat_addr] <= dat_wdata;
    end else if (bus_we) begin
      for (int i = 0; i < 4; i++)
        if (bus_be[i]) buf_q[bidx][8*i +: 8] <= bus_wdata[8*i +: 8];
    end
  end

  // ------------------------------------------------------------ control FSM
  typedef enum logic [3:0] {
    M_POWERUP, M_IDLE, M_ISSUE, M_WCMD, M_WDAT, M_MEMRESP
  } mstate_e;

  typedef enum logic [3:0] {
    ST_CMD0, ST_CMD8, ST_CMD55, ST_ACMD41, ST_CMD2, ST_CMD3, ST_CMD7,
    ST_CMD55B, ST_ACMD6, ST_CMD16, ST_REG, ST_MRD, ST_MWR
  } step_e;

  mstate_e      st_q;
  step_e        step_q, after_q;
  logic [15:0]  cnt_q;
  logic         v2_q, ccs_q, ready_q, fail_q;
  logic [15:0]  rca_q;
  logic [31:0]  arg_q;
  logic [12:0]  regcmd_q;
  logic         regcmd_pend_q;
  logic [3:0]   err_q;               // {dat err, dat tmo, cmd crc, cmd tmo}
  logic         cache_v_q;
  logic [18:0]  cache_blk_q;
  logic         mem_err_q;
  logic [127:0] resp_q;

  logic [18:0]  mem_blk;
  logic [6:0]   mem_word;
  logic         mem_hit;
  assign mem_blk  = mem_req_i.addr[27:9];
  assign mem_word = mem_req_i.addr[8:2];
  assign mem_hit  = cache_v_q && (cache_blk_q == mem_blk);
  assign init_done_o = ready_q;

  // Command for the current step
  always_comb begin
    cmd_idx = 6'd0;
    cmd_arg = 32'd0;
    cmd_rsp = RSP_48;
    unique case (step_q)
      ST_CMD0:   begin cmd_idx = 6'd0;  cmd_rsp = RSP_NONE; end
      ST_CMD8:   begin cmd_idx = 6'd8;  cmd_arg = 32'h0000_01AA; end
      ST_CMD55:  begin cmd_idx = 6'd55; end
      ST_ACMD41: begin cmd_idx = 6'd41; cmd_arg = {1'b0, v2_q, 6'd0, 24'hFF8000}; cmd_rsp = RSP_48_NOCRC; end
      ST_CMD2:   begin cmd_idx = 6'd2;  cmd_rsp = RSP_136; end
      ST_CMD3:   begin cmd_idx = 6'd3;  end
      ST_CMD7:   begin cmd_idx = 6'd7;  cmd_arg = {rca_q, 16'd0}; end
      ST_CMD55B: begin cmd_idx = 6'd55; cmd_arg = {rca_q, 16'd0}; end
      ST_ACMD6:  begin cmd_idx = 6'd6;  cmd_arg = 32'd2; end
      ST_CMD16:  begin cmd_idx = 6'd16; cmd_arg = 32'd512; end
      ST_REG:    begin cmd_idx = regcmd_q[5:0]; cmd_arg = arg_q; cmd_rsp = rsp_e'(regcmd_q[9:8]); end
      ST_MRD:    begin cmd_idx = 6'd17; cmd_arg = ccs_q ? {13'd0, mem_blk} : {4'd0, mem_blk, 9'd0}; end
      ST_MWR:    begin cmd_idx = 6'd24; cmd_arg = ccs_q ? {13'd0, mem_blk} : {4'd0, mem_blk, 9'd0}; end
      default: ;
    endcase
  end

  logic cmd_bad;
  assign cmd_bad = cmd_tmo || cmd_crc;

  // Register port decode
  logic reg_acc, reg_buf, reg_wr;
  logic [7:0] reg_off;
  logic reg_pend_q;
  logic [31:0] reg_rdata_q;
  logic reg_is_buf_q;
  assign reg_acc = reg_req_i.req && !reg_pend_q;
  assign reg_buf = reg_req_i.addr[9];
  assign reg_wr  = reg_acc && reg_req_i.we;
  assign reg_off = reg_req_i.addr[9:2];

  // Buffer bus-side port: register port when it is active, else memory port.
  logic mem_buf_we;
  always_comb begin
    if (reg_req_i.req) begin
      bidx      = reg_req_i.addr[8:2];
      bus_we    = reg_wr && reg_buf;
      bus_wdata = reg_req_i.wdata;
      bus_be    = reg_req_i.be;
    end else begin
      bidx      = mem_word;
      bus_we    = mem_buf_we;
      bus_wdata = mem_req_i.wdata;
      bus_be    = mem_req_i.be;
    end
  end

  assign mem_buf_we = (st_q == M_IDLE) && !regcmd_pend_q && mem_req_i.req &&
                      mem_req_i.we && ready_q && mem_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= M_POWERUP;
      step_q        <= ST_CMD0;
      after_q       <= ST_CMD0;
      cnt_q         <= '0;
      v2_q          <= 1'b0;
      ccs_q         <= 1'b0;
      ready_q       <= 1'b0;
      fail_q        <= 1'b0;
      rca_q         <= '0;
      arg_q         <= '0;
      regcmd_q      <= '0;
      regcmd_pend_q <= 1'b0;
      err_q         <= '0;
      cache_v_q     <= 1'b0;
      cache_blk_q   <= '0;
      mem_err_q     <= 1'b0;
      resp_q        <= '0;
      clkdiv_q      <= 16'(INIT_CLKDIV);
      bus4_q        <= 1'b0;
      cmd_start     <= 1'b0;
      dat_start     <= 1'b0;
      dat_op        <= DAT_RX;
      reg_pend_q    <= 1'b0;
      reg_rdata_q   <= '0;
      reg_is_buf_q  <= 1'b0;
    end else begin
      cmd_start <= 1'b0;
      dat_start <= 1'b0;

      // ---------------- register port
      reg_pend_q <= reg_acc;
      if (reg_acc) begin
        reg_is_buf_q <= reg_buf;
        unique case (reg_off)
          8'h00: reg_rdata_q <= {19'd0, regcmd_q};
          8'h01: reg_rdata_q <= arg_q;
          8'h02: reg_rdata_q <= resp_q[31:0];
          8'h03: reg_rdata_q <= resp_q[63:32];
          8'h04: reg_rdata_q <= resp_q[95:64];
          8'h05: reg_rdata_q <= resp_q[127:96];
          8'h06: reg_rdata_q <= {22'd0, fail_q, ready_q, 3'd0, err_q,
                                 (st_q != M_IDLE) || regcmd_pend_q};
          8'h07: reg_rdata_q <= {16'd0, clkdiv_q};
          8'h08: reg_rdata_q <= {29'd0, ccs_q, ready_q, bus4_q};
          8'h09: reg_rdata_q <= {16'd0, rca_q};
          default: reg_rdata_q <= '0;
        endcase
        if (reg_wr && !reg_buf) begin
          unique case (reg_off)
            8'h00: if (st_q == M_IDLE && !regcmd_pend_q) begin
              regcmd_q      <= reg_req_i.wdata[12:0];
              regcmd_pend_q <= 1'b1;
            end
            8'h01: arg_q    <= reg_req_i.wdata;
            8'h07: clkdiv_q <= reg_req_i.wdata[15:0];
            8'h08: begin
              bus4_q  <= reg_req_i.wdata[0];
              ready_q <= reg_req_i.wdata[1];
              ccs_q   <= reg_req_i.wdata[2];
            end
            8'h09: rca_q    <= reg_req_i.wdata[15:0];
            default: ;
          endcase
        end
      end

      // ---------------- controller
      unique case (st_q)
        M_POWERUP: if (rise) begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(POWERUP_CLKS - 1)) begin
            cnt_q  <= '0;
            step_q <= ST_CMD0;
            st_q   <= M_ISSUE;
          end
        end

        M_IDLE: begin
          if (regcmd_pend_q) begin
            regcmd_pend_q <= 1'b0;
            cache_v_q     <= 1'b0;
            step_q        <= ST_REG;
            st_q          <= M_ISSUE;
          end else if (mem_req_i.req) begin
            if (!ready_q) begin
              mem_err_q <= 1'b1;
              st_q      <= M_MEMRESP;
            end else if (!mem_hit) begin
              step_q <= ST_MRD;
              st_q   <= M_ISSUE;
            end else if (mem_req_i.we) begin
              step_q <= ST_MWR;            // word merged into buffer this cycle
              st_q   <= M_ISSUE;
            end else begin
              mem_err_q <= 1'b0;
              st_q      <= M_MEMRESP;      // buffer word read this cycle
            end
          end
        end

        M_ISSUE: begin
          cmd_start <= 1'b1;
          if (step_q == ST_MRD || (step_q == ST_REG && regcmd_q[10])) begin
            dat_start <= 1'b1;
            dat_op    <= DAT_RX;
          end
          st_q <= M_WCMD;
        end

        M_WCMD: if (cmd_done) begin
          resp_q <= resp;
          unique case (step_q)
            ST_CMD0:  begin step_q <= ST_CMD8; st_q <= M_ISSUE; end
            ST_CMD8: begin
              if (cmd_tmo) begin
                v2_q <= 1'b0; step_q <= ST_CMD55; st_q <= M_ISSUE;
              end else if (!cmd_crc && resp[11:0] == 12'h1AA) begin
                v2_q <= 1'b1; step_q <= ST_CMD55; st_q <= M_ISSUE;
              end else begin
                fail_q <= 1'b1; st_q <= M_IDLE;
              end
            end
            ST_CMD55: begin
              if (cmd_bad) begin fail_q <= 1'b1; st_q <= M_IDLE; end
              else begin step_q <= ST_ACMD41; st_q <= M_ISSUE; end
            end
            ST_ACMD41: begin
              if (cmd_tmo) begin
                fail_q <= 1'b1; st_q <= M_IDLE;
              end else if (resp[31]) begin
                ccs_q  <= resp[30] && v2_q;
                step_q <= ST_CMD2; st_q <= M_ISSUE;
              end else if (cnt_q == 16'(ACMD41_TRIES - 1)) begin
                fail_q <= 1'b1; st_q <= M_IDLE;
              end else begin
                cnt_q  <= cnt_q + 16'd1;
                step_q <= ST_CMD55; st_q <= M_ISSUE;
              end
            end
            ST_CMD2: begin
              if (cmd_tmo) begin fail_q <= 1'b1; st_q <= M_IDLE; end
              else begin step_q <= ST_CMD3; st_q <= M_ISSUE; end
            end
            ST_CMD3: begin
              if (cmd_bad) begin fail_q <= 1'b1; st_q <= M_IDLE; end
              else begin rca_q <= resp[31:16]; step_q <= ST_CMD7; st_q <= M_ISSUE; end
            end
            ST_CMD7: begin
              if (cmd_bad) begin fail_q <= 1'b1; st_q <= M_IDLE; end
              else begin
                dat_start <= 1'b1; dat_op <= DAT_BUSY;
                after_q   <= ST_CMD55B; st_q <= M_WDAT;
              end
            end
            ST_CMD55B: begin
              if (cmd_bad) begin fail_q <= 1'b1; st_q <= M_IDLE; end
              else begin step_q <= ST_ACMD6; st_q <= M_ISSUE; end
            end
            ST_ACMD6: begin
              if (cmd_bad) begin fail_q <= 1'b1; st_q <= M_IDLE; end
              else begin bus4_q <= 1'b1; step_q <= ST_CMD16; st_q <= M_ISSUE; end
            end
            ST_CMD16: begin
              if (cmd_bad) fail_q <= 1'b1;
              else begin
                ready_q  <= 1'b1;
                clkdiv_q <= 16'(FAST_CLKDIV);
              end
              st_q <= M_IDLE;
            end
            ST_REG: begin
              err_q <= {2'b00, cmd_crc, cmd_tmo};
              if (regcmd_q[10]) begin
                st_q <= M_WDAT;                       // receiver already armed
              end else if (regcmd_q[11] && !cmd_bad) begin
                dat_start <= 1'b1; dat_op <= DAT_TX; st_q <= M_WDAT;
              end else if (regcmd_q[12] && !cmd_bad) begin
                dat_start <= 1'b1; dat_op <= DAT_BUSY; st_q <= M_WDAT;
              end else begin
                st_q <= M_IDLE;
              end
            end
            ST_MRD: begin
              if (cmd_bad) begin
                mem_err_q <= 1'b1; st_q <= M_WDAT;    // let the receiver time out
              end else st_q <= M_WDAT;
            end
            ST_MWR: begin
              if (cmd_bad) begin
                cache_v_q <= 1'b0; mem_err_q <= 1'b1; st_q <= M_MEMRESP;
              end else begin
                dat_start <= 1'b1; dat_op <= DAT_TX; st_q <= M_WDAT;
              end
            end
            default: st_q <= M_IDLE;
          endcase
        end

        M_WDAT: if (dat_done) begin
          unique case (step_q)
            ST_CMD7: begin step_q <= after_q; st_q <= M_ISSUE; end
            ST_REG: begin
              err_q[3] <= dat_crc;
              err_q[2] <= dat_tmo;
              st_q     <= M_IDLE;
            end
            ST_MRD: begin
              if (dat_crc || dat_tmo || mem_err_q) begin
                mem_err_q <= 1'b1; st_q <= M_MEMRESP;
              end else begin
                cache_v_q   <= 1'b1;
                cache_blk_q <= mem_blk;
                st_q        <= M_IDLE;                 // now a hit
              end
            end
            ST_MWR: begin
              mem_err_q <= dat_crc || dat_tmo;
              if (dat_crc || dat_tmo) cache_v_q <= 1'b0;
              st_q <= M_MEMRESP;
            end
            default: st_q <= M_IDLE;
          endcase
        end

        M_MEMRESP: begin
          mem_err_q <= 1'b0;
          st_q      <= M_IDLE;
        end
        default: st_q <= M_IDLE;
      endcase
    end
  end

  assign reg_rsp_o = '{ready: reg_pend_q, err: 1'b0,
                       rdata: reg_is_buf_q ? bus_rdata_q : reg_rdata_q};
  assign mem_rsp_o = '{ready: (st_q == M_MEMRESP), err: (st_q == M_MEMRESP) && mem_err_q,
                       rdata: bus_rdata_q};

  // A bus master keeps a memory-window request up until it is answered.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_i.req && !mem_rsp_o.ready) |=> mem_req_i.req);
  // CMD and DAT are never driven by the host at the same time as data is read.
  a_no_drive_rx: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == M_WDAT && step_q == ST_MRD) |-> !sd_dat_oe_o);
endmodule
