// Self-checking testbench of the SDIO register interface.
// An SD-mode card model sits on the SD pins. Checks: the card is brought up
// by the hardware FSM alone (4-bit bus, fast clock); memory-window reads
// return the card's bytes and hit the one-block buffer on a second access;
// a memory-window write reaches the card; an access before the card is
// ready is refused; software-driven CMD17/CMD24 through the register port
// move blocks through the buffer; a missing card gives a command timeout.
module tb_sdio_regif;
  import sysctrl_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t rreq, mreq;
  bus_rsp_t rrsp, mrsp;
  logic init_done, sd_clk, cmd_h, cmd_h_oe, dat_oe_h;
  logic [3:0] dat_h;
  logic cmd_c, cmd_c_oe, dat_c_oe;
  logic [3:0] dat_c;
  logic cmd_line;
  logic [3:0] dat_line;

  assign cmd_line = cmd_h_oe ? cmd_h : (cmd_c_oe ? cmd_c : 1'b1);
  assign dat_line = dat_oe_h ? dat_h : (dat_c_oe ? dat_c : 4'hF);

  sdio_regif #(.INIT_CLKDIV(3), .FAST_CLKDIV(0), .ACMD41_TRIES(16),
               .DAT_TIMEOUT(2000)) dut (
    .clk, .rst_n, .reg_req_i(rreq), .reg_rsp_o(rrsp), .mem_req_i(mreq), .mem_rsp_o(mrsp),
    .init_done_o(init_done), .sd_clk_o(sd_clk),
    .sd_cmd_i(cmd_line), .sd_cmd_o(cmd_h), .sd_cmd_oe_o(cmd_h_oe),
    .sd_dat_i(dat_line), .sd_dat_o(dat_h), .sd_dat_oe_o(dat_oe_h)
  );

  sd_card_model #(.BLOCKS(16), .HC(1), .BUSY_ROUNDS(2)) card (
    .sd_clk, .cmd_line, .cmd_o(cmd_c), .cmd_oe(cmd_c_oe),
    .dat_line, .dat_o(dat_c), .dat_oe(dat_c_oe)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pword(input int unsigned a);
    return {card.pattern(a + 3), card.pattern(a + 2), card.pattern(a + 1), card.pattern(a)};
  endfunction

  task automatic xfer(input bit mem, input bit we, input logic [31:0] addr,
                      input logic [31:0] wd, input logic [3:0] be,
                      output logic [31:0] rd, output logic err);
    bus_req_t r;
    r = '{req: 1'b1, we: we, addr: addr, wdata: wd, be: be};
    if (mem) mreq = r; else rreq = r;
    do @(posedge clk); while (!(mem ? mrsp.ready : rrsp.ready));
    rd  = mem ? mrsp.rdata : rrsp.rdata;
    err = mem ? mrsp.err : rrsp.err;
    #1;
    mreq = '0; rreq = '0;
  endtask

  logic [31:0] rd;
  logic        er;
  int unsigned reads0;

  task automatic reg_wr(input logic [7:0] off, input logic [31:0] v);
    xfer(0, 1, {20'h1A103, 2'b0, off[7:0], 2'b0}, v, 4'hF, rd, er);
  endtask
  task automatic reg_rd(input logic [7:0] off, output logic [31:0] v);
    logic e;
    xfer(0, 0, {20'h1A103, 2'b0, off[7:0], 2'b0}, 0, 4'hF, v, e);
  endtask
  task automatic reg_cmd(input logic [5:0] idx, input logic [31:0] arg, input logic [12:0] flags);
    logic [31:0] s;
    reg_wr(8'h01, arg);
    reg_wr(8'h00, {19'd0, flags | {7'd0, idx}});
    do reg_rd(8'h06, s); while (s[0]);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    mreq = '0; rreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // An access issued right after reset stalls until the FSM has brought
    // the card up, then returns the card's data.
    xfer(1, 0, 32'h2000_0000 + 4, 0, 4'hF, rd, er);
    check(init_done === 1'b1, "early window access answered only after init");
    check(!er && rd == pword(4), "early window access returns card data");

    check(dut.bus4_q === 1'b1, "hardware init selected 4-bit bus");
    check(dut.clkdiv_q == 0, "hardware init switched to fast clock");
    check(card.bus4 == 1, "card got ACMD6");
    check(card.n_acmd41 == 3, "ACMD41 repeated until card ready");
    reg_rd(8'h06, s);
    check(s[8] && !s[9], "STATUS reports card ready");

    // Memory window reads (external boot path)
    reads0 = card.n_reads;
    xfer(1, 0, 32'h2000_0000 + 2*512 + 8, 0, 4'hF, rd, er);
    check(!er && rd == pword(2*512 + 8), $sformatf("window read blk2+8 got %h", rd));
    check(card.n_reads == reads0 + 1, "first access reads the block");
    xfer(1, 0, 32'h2000_0000 + 2*512 + 508, 0, 4'hF, rd, er);
    check(!er && rd == pword(2*512 + 508), "window read blk2+508 (hit)");
    check(card.n_reads == reads0 + 1, "second access in block hits buffer");
    for (int i = 0; i < 6; i++) begin
      int unsigned a;
      a = ($urandom % (16*128)) * 4;
      xfer(1, 0, 32'h2000_0000 + a, 0, 4'hF, rd, er);
      check(!er && rd == pword(a), $sformatf("window random read %0d", a));
    end

    // Memory window write: read-modify-write of a block
    xfer(1, 1, 32'h2000_0000 + 3*512 + 16, 32'hCAFE_F00D, 4'b0110, rd, er);
    check(!er, "window write answered");
    check(card.mem[3*512 + 17] == 8'hF0 && card.mem[3*512 + 18] == 8'hFE &&
          card.mem[3*512 + 16] == card.pattern(3*512 + 16) &&
          card.mem[3*512 + 19] == card.pattern(3*512 + 19), "write reached card with byte enables");
    check(card.n_writes == 1, "one block written");
    xfer(1, 0, 32'h2000_0000 + 3*512 + 16, 0, 4'hF, rd, er);
    check(rd == {card.pattern(3*512+19), 8'hFE, 8'hF0, card.pattern(3*512+16)}, "window read back write");

    // Software-driven read via registers: CMD17 block 7 with data
    reg_cmd(6'd17, 32'd7, 13'h0100 | 13'h0400);
    reg_rd(8'h06, s);
    check(s[4:1] == 0, "register CMD17 without errors");
    reg_rd(8'h02, s);
    check(s == 32'h0000_0900, "R1 payload visible in RESP0");
    for (int i = 0; i < 128; i += 37) begin
      reg_rd(8'h80 + 8'(i), s);
      check(s == pword(7*512 + 4*i), $sformatf("buffer word %0d after reg CMD17", i));
    end

    // Software-driven write via registers: CMD24 block 9
    for (int i = 0; i < 128; i++) reg_wr(8'h80 + 8'(i), 32'h1000_0000 + i);
    reg_cmd(6'd24, 32'd9, 13'h0100 | 13'h0800);
    reg_rd(8'h06, s);
    check(s[4:1] == 0, "register CMD24 without errors");
    check(card.mem[9*512 + 4*5] == 8'h05 && card.mem[9*512 + 4*5 + 3] == 8'h10, "CMD24 data on card");

    // 1-bit bus: switch card and host back to 1-bit via ACMD6 arg 0
    reg_cmd(6'd55, 32'h1234_0000, 13'h0100);
    reg_cmd(6'd6, 32'd0, 13'h0100);
    reg_wr(8'h08, 32'h6);          // ready, high capacity, 1-bit
    xfer(1, 0, 32'h2000_0000 + 11*512 + 40, 0, 4'hF, rd, er);
    check(!er && rd == pword(11*512 + 40), "window read over 1-bit bus");

    // Missing card: command timeout
    card.enabled = 0;
    reg_cmd(6'd13, 32'h1234_0000, 13'h0100);
    reg_rd(8'h06, s);
    check(s[1] == 1'b1, "command timeout flagged with no card answer");

    // Card not ready: the memory window refuses access.
    reg_wr(8'h08, 32'h0);
    xfer(1, 0, 32'h2000_0000, 0, 4'hF, rd, er);
    check(er === 1'b1, "window access with card not ready gives err");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
