// Behavioural model of an SD card in SD bus mode, for testbenches only.
//
// Samples CMD and DAT at rising SD-clock edges and drives them after falling
// edges. Understands the commands used to bring a card up and move single
// blocks: CMD0, CMD2, CMD3, CMD7 (with a short busy), CMD8, CMD16, CMD17,
// CMD24, CMD55, ACMD6 and ACMD41 (reports busy for BUSY_ROUNDS polls).
// Commands with a bad CRC7 are ignored and counted; CMD17/CMD24 before the
// card was selected with CMD7 get no answer. Data blocks carry CRC16
// per line; a write block with a bad CRC is refused with status '101'.
// Contents: BLOCKS blocks of 512 bytes; byte k initially holds pattern(k).
module sd_card_model #(
  parameter int unsigned BLOCKS      = 64,
  parameter bit          HC          = 1'b1,   // high capacity: block addressing
  parameter int unsigned BUSY_ROUNDS = 2,
  parameter int unsigned NAC         = 4       // clocks from response to data
) (
  input  logic       sd_clk,
  input  logic       cmd_line,     // resolved CMD line
  output logic       cmd_o,
  output logic       cmd_oe,
  input  logic [3:0] dat_line,     // resolved DAT lines
  output logic [3:0] dat_o,
  output logic       dat_oe
);
  import sd_pkg::*;

  logic [7:0] mem [BLOCKS*512];
  int unsigned n_cmd, n_bad_crc, n_reads, n_writes, n_acmd41;
  bit          bus4, app;
  logic [15:0] rca;
  bit          enabled = 1'b1;    // a disabled card never answers
  bit          selected;          // set by CMD7, cleared by CMD0

  function automatic logic [7:0] pattern(input int unsigned k);
    return 8'((k * 7 + 3) ^ (k >> 8));
  endfunction

  initial begin
    for (int unsigned k = 0; k < BLOCKS * 512; k++) mem[k] = pattern(k);
    cmd_o = 1'b1; cmd_oe = 1'b0; dat_o = 4'hF; dat_oe = 1'b0;
    bus4 = 0; app = 0; rca = 16'h1234; selected = 0;
    n_cmd = 0; n_bad_crc = 0; n_reads = 0; n_writes = 0; n_acmd41 = 0;
  end

  task automatic send_cmd_bits(input logic [135:0] bits, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge sd_clk);
      cmd_oe = 1'b1;
      cmd_o  = bits[i];
    end
    @(negedge sd_clk);
    cmd_oe = 1'b0;
    cmd_o  = 1'b1;
  endtask

  task automatic respond48(input logic [5:0] idx, input logic [31:0] pay, input bit crc_ones);
    logic [39:0] h;
    logic [6:0]  c;
    h = {2'b00, idx, pay};
    c = crc_ones ? 7'h7F : crc7_40(h);
    repeat (2) @(negedge sd_clk);
    send_cmd_bits({88'd0, h, c, 1'b1}, 48);
  endtask

  task automatic send_block(input int unsigned base);
    logic [15:0] crc [4];
    int w;
    w = bus4 ? 4 : 1;
    for (int j = 0; j < 4; j++) crc[j] = '0;
    repeat (NAC) @(negedge sd_clk);
    @(negedge sd_clk); dat_oe = 1'b1; dat_o = 4'h0;                 // start bit
    for (int n = 0; n < 4096; n += w) begin
      logic [3:0] v;
      v = 4'hF;
      for (int j = 0; j < w; j++) begin
        int b;
        b = n + (w - 1 - j);
        v[j] = mem[base + b / 8][7 - b % 8];
        crc[j] = crc16_bit(crc[j], v[j]);
      end
      @(negedge sd_clk); dat_o = v;
    end
    for (int k = 15; k >= 0; k--) begin
      logic [3:0] v;
      v = 4'hF;
      for (int j = 0; j < w; j++) v[j] = crc[j][k];
      @(negedge sd_clk); dat_o = v;
    end
    @(negedge sd_clk); dat_o = 4'hF;                                // end bit
    @(negedge sd_clk); dat_oe = 1'b0;
  endtask

  task automatic recv_block(input int unsigned base);
    logic [15:0] crc [4];
    logic [15:0] rc [4];
    logic [7:0]  blk [512];
    bit ok;
    int w;
    w = bus4 ? 4 : 1;
    for (int j = 0; j < 4; j++) begin crc[j] = '0; rc[j] = '0; end
    do @(posedge sd_clk); while (dat_line[0] !== 1'b0);          // start bit
    for (int n = 0; n < 4096; n += w) begin
      @(posedge sd_clk);
      for (int j = 0; j < w; j++) begin
        int b;
        b = n + (w - 1 - j);
        blk[b / 8][7 - b % 8] = dat_line[j];
        crc[j] = crc16_bit(crc[j], dat_line[j]);
      end
    end
    for (int k = 0; k < 16; k++) begin
      @(posedge sd_clk);
      for (int j = 0; j < w; j++) rc[j] = {rc[j][14:0], dat_line[j]};
    end
    @(posedge sd_clk);                                              // end bit
    ok = 1;
    for (int j = 0; j < w; j++) if (rc[j] != crc[j]) ok = 0;
    if (ok) begin
      for (int k = 0; k < 512; k++) mem[base + k] = blk[k];
      n_writes++;
    end
    repeat (2) @(negedge sd_clk);
    dat_oe = 1'b1;
    begin
      logic [4:0] tok;
      tok = ok ? 5'b0_010_1 : 5'b0_101_1;
      for (int i = 4; i >= 0; i--) begin dat_o = {3'b111, tok[i]}; @(negedge sd_clk); end
    end
    dat_o = 4'hE;                                                   // busy
    repeat (8) @(negedge sd_clk);
    dat_o = 4'hF;
    @(negedge sd_clk); dat_oe = 1'b0;
  endtask

  initial begin : serve
    logic [47:0] c;
    forever begin
      @(posedge sd_clk);
      if (cmd_line === 1'b0 && !cmd_oe) begin
        c = '0;
        for (int i = 1; i < 48; i++) begin
          @(posedge sd_clk);
          c = {c[46:0], cmd_line};
        end
        // c[46:0] holds bits 46..0 of the frame; bit 47 was the start bit 0.
        if (crc7_40({1'b0, c[46:8]}) != c[7:1]) begin
          n_bad_crc++;
        end else if (enabled) begin
          logic [5:0]  idx;
          logic [31:0] arg;
          bit          was_app;
          idx = c[45:40];
          arg = c[39:8];
          was_app = app;
          app = 0;
          n_cmd++;
          if (was_app && idx == 6'd41) begin
            n_acmd41++;
            respond48(6'h3F, {n_acmd41 > BUSY_ROUNDS, HC && arg[30], 6'd0, 24'hFF8000}, 1);
          end else if (was_app && idx == 6'd6) begin
            bus4 = (arg[1:0] == 2'b10);
            respond48(idx, 32'h0000_0920, 0);
          end else if ((idx == 6'd17 || idx == 6'd24) && !selected) begin
            // not in transfer state: an illegal command gets no answer
          end else begin
            unique case (idx)
              6'd0:  begin bus4 = 0; n_acmd41 = 0; selected = 0; end
              6'd8:  respond48(idx, {20'd0, arg[11:0]}, 0);
              6'd55: begin app = 1; respond48(idx, 32'h0000_0120, 0); end
              6'd2: begin
                logic [127:0] cid;
                cid = {120'h03_5344_5344_3136_4780_1234_5678_01, 8'h01};
                repeat (2) @(negedge sd_clk);
                send_cmd_bits({8'h3F, cid}, 136);
              end
              6'd3:  respond48(idx, {rca, 16'h0500}, 0);
              6'd7: begin
                selected = 1;
                respond48(idx, 32'h0000_0700, 0);
                dat_oe = 1'b1; dat_o = 4'hE;
                repeat (4) @(negedge sd_clk);
                dat_o = 4'hF; @(negedge sd_clk); dat_oe = 1'b0;
              end
              6'd16: respond48(idx, 32'h0000_0900, 0);
              6'd17: begin
                int unsigned a;
                a = HC ? arg * 512 : arg;
                respond48(idx, 32'h0000_0900, 0);
                n_reads++;
                send_block(a % (BLOCKS * 512));
              end
              6'd24: begin
                int unsigned a;
                a = HC ? arg * 512 : arg;
                respond48(idx, 32'h0000_0900, 0);
                recv_block(a % (BLOCKS * 512));
              end
              default: respond48(idx, 32'h0000_0004, 0);   // illegal command
            endcase
          end
        end
      end
    end
  end
endmodule
