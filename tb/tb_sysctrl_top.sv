// End-to-end testbench of the system-control boot subsystem, at the top's
// default parameters.
//
// Around the top sit: a behavioural boot CPU that runs the boot-mode
// decision flow of the boot code (mode pins, SDIO read, SDIO re-init and
// read, SPI load, busy loop) as bus transfers and honours debug halt and
// resume; an SD-mode card on the SDIO pins and an SPI-mode card on the SPI
// pins holding the same image (control word, then the program); and a JTAG
// host. Each boot mode is run after its own reset:
//   SDIO boot (hardware FSM already brought the card up), SDIO boot after
//   a failed hardware init (software re-initialises the card), SPI boot
//   selected by CSN1, SPI as last resort when the SDIO card is dead, JTAG
//   boot (GPIO9 parks the CPU in the loop, the host loads SRAM and resumes),
//   and external boot (boot_sel: the CPU fetches straight from the card).
// Every boot must end with a fetch from the image entry that returns the
// image's first instruction word. Each mechanism is counted and must occur.
module tb_sysctrl_top;
  import sysctrl_pkg::*;

  localparam logic [31:0] CONTROL_WORD = 32'hB007_C0DE;
  localparam int          IMG_BLOCKS   = 2;
  localparam logic [31:0] IMG_DST      = SRAM_BASE;          // image copied here
  localparam logic [31:0] ENTRY        = SRAM_BASE + 32'h4;  // after the control word
  localparam logic [31:0] TXS          = SRAM_BASE + 32'hE000;
  localparam logic [31:0] RXS          = SRAM_BASE + 32'hE800;
  localparam int          CSN1_PIN     = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  bus_req_t ireq, dreq;
  bus_rsp_t irsp, drsp;
  logic boot_sel = 0;
  logic [31:0] boot_addr, dpc, gpio_pads;
  logic dbg_req, resume_req, ndmreset, dpc_we, cpu_halted;
  logic sd_clk, cmd_h, cmd_h_oe, dat_h_oe, cmd_c, cmd_c_oe, dat_c_oe, cmd_line;
  logic [3:0] dat_h, dat_c, dat_line;
  logic sck, csn, mosi, miso;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_oe, init_done;

  assign cmd_line = cmd_h_oe ? cmd_h : (cmd_c_oe ? cmd_c : 1'b1);
  assign dat_line = dat_h_oe ? dat_h : (dat_c_oe ? dat_c : 4'hF);

  sysctrl_top dut (
    .clk, .rst_n,
    .cpu_instr_req_i(ireq), .cpu_instr_rsp_o(irsp),
    .cpu_data_req_i(dreq), .cpu_data_rsp_o(drsp),
    .boot_sel_i(boot_sel), .boot_addr_o(boot_addr),
    .debug_req_o(dbg_req), .resume_req_o(resume_req), .ndmreset_o(ndmreset),
    .dpc_we_o(dpc_we), .dpc_o(dpc), .cpu_halted_i(cpu_halted),
    .gpio_pad_i(gpio_pads),
    .sd_clk_o(sd_clk), .sd_cmd_i(cmd_line), .sd_cmd_o(cmd_h), .sd_cmd_oe_o(cmd_h_oe),
    .sd_dat_i(dat_line), .sd_dat_o(dat_h), .sd_dat_oe_o(dat_h_oe),
    .spi_sck_o(sck), .spi_csn_o(csn), .spi_mosi_o(mosi), .spi_miso_i(miso),
    .jtag_tck_i(tck), .jtag_tms_i(tms), .jtag_tdi_i(tdi), .jtag_trst_ni(trst_n),
    .jtag_tdo_o(tdo), .jtag_tdo_oe_o(tdo_oe), .sdio_init_done_o(init_done)
  );

  sd_card_model #(.BLOCKS(16)) sdcard (
    .sd_clk, .cmd_line, .cmd_o(cmd_c), .cmd_oe(cmd_c_oe),
    .dat_line, .dat_o(dat_c), .dat_oe(dat_c_oe)
  );
  sd_spi_card_model #(.BLOCKS(16)) spicard (.sck, .csn, .mosi, .miso);

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  int n_rom_fetch = 0, n_sdio = 0, n_sdio_reinit = 0, n_spi = 0, n_spi_fallback = 0;
  int n_jtag = 0, n_ext = 0, n_loop = 0, n_ext_stall = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // image word i as both cards hold it
  function automatic logic [31:0] img_word(input int unsigned i);
    if (i == 0) return CONTROL_WORD;
    return {sdcard.pattern(4*i + 3), sdcard.pattern(4*i + 2),
            sdcard.pattern(4*i + 1), sdcard.pattern(4*i)};
  endfunction

  // ---------------------------------------------------------------- CPU model
  logic in_loop = 0, halted_q = 0;
  logic [31:0] pc_after_resume;
  assign cpu_halted = halted_q;
  always @(posedge clk) begin
    if (!rst_n) halted_q <= 0;
    else if (dbg_req && in_loop) halted_q <= 1;
    else if (resume_req) halted_q <= 0;
    if (dpc_we) pc_after_resume <= dpc;
  end

  task automatic bus(input bit instr, input bit we, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output logic er);
    bus_req_t r;
    r = '{req: 1'b1, we: we, addr: a, wdata: wd, be: 4'hF};
    if (instr) ireq = r; else dreq = r;
    do @(posedge clk); while (!(instr ? irsp.ready : drsp.ready));
    rd = instr ? irsp.rdata : drsp.rdata;
    er = instr ? irsp.err : drsp.err;
    #1 ireq = '0; dreq = '0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] x; logic e; bus(0, 1, a, d, x, e);
  endtask
  task automatic rdw(input logic [31:0] a, output logic [31:0] d);
    logic e; bus(0, 0, a, 0, d, e);
  endtask
  task automatic fetch(input logic [31:0] a, output logic [31:0] d, output logic e);
    bus(1, 0, a, 0, d, e);
  endtask

  // ---- SDIO driver (register port)
  localparam logic [31:0] SR = SDIO_REG_BASE;
  task automatic sd_cmd(input logic [5:0] idx, input logic [31:0] arg, input logic [12:0] fl,
                        output logic [31:0] st);
    wr(SR + 4, arg);
    wr(SR + 0, {19'd0, fl | {7'd0, idx}});
    do rdw(SR + 32'h18, st); while (st[0]);
  endtask
  task automatic sdio_read(output bit ok);
    logic [31:0] st, cfg, v;
    ok = 1;
    rdw(SR + 32'h20, cfg);
    for (int b = 0; b < IMG_BLOCKS; b++) begin
      sd_cmd(6'd17, cfg[2] ? b : b * 512, 13'h0500, st);
      if (st[4:1] != 0) begin ok = 0; return; end
      for (int i = 0; i < 128; i++) begin
        rdw(SR + 32'h200 + 4*i, v);
        wr(IMG_DST + 512*b + 4*i, v);
      end
    end
  endtask
  task automatic sdio_init(output bit ok);
    logic [31:0] st, r, rca;
    bit hcs;
    ok = 0;
    wr(SR + 32'h1C, 62);
    wr(SR + 32'h20, 0);
    sd_cmd(6'd0, 0, 13'h0000, st);
    sd_cmd(6'd8, 32'h1AA, 13'h0100, st);
    hcs = (st[2:1] == 0);
    for (int t = 0; t < 50; t++) begin
      sd_cmd(6'd55, 0, 13'h0100, st);
      if (st[2:1] != 0) return;
      sd_cmd(6'd41, {1'b0, hcs, 30'h00FF8000}, 13'h0200, st);
      rdw(SR + 8, r);
      if (r[31]) break;
    end
    if (!r[31]) return;
    sd_cmd(6'd2, 0, 13'h0300, st);
    sd_cmd(6'd3, 0, 13'h0100, st);
    rdw(SR + 8, rca);
    sd_cmd(6'd7, {rca[31:16], 16'd0}, 13'h1100, st);
    sd_cmd(6'd55, {rca[31:16], 16'd0}, 13'h0100, st);
    sd_cmd(6'd6, 2, 13'h0100, st);
    sd_cmd(6'd16, 512, 13'h0100, st);
    if (st[2:1] != 0) return;
    wr(SR + 32'h24, {16'd0, rca[31:16]});
    wr(SR + 32'h20, {29'd0, hcs && r[30], 1'b1, 1'b1});
    wr(SR + 32'h1C, 1);
    ok = 1;
  endtask

  // ---- SPI driver (through the DMA)
  localparam logic [31:0] DR = DMA_BASE;
  task automatic dma_run(input logic [31:0] tx, input logic [31:0] rx, input int n, input logic [2:0] ctl);
    logic [31:0] s;
    wr(DR + 0, tx); wr(DR + 4, rx); wr(DR + 8, n);
    wr(DR + 32'hC, {29'd0, ctl});
    do rdw(DR + 32'hC, s); while (s[0]);
  endtask
  task automatic rd_byte(input logic [31:0] a, output logic [7:0] b);
    logic [31:0] w; rdw({a[31:2], 2'b00}, w); b = w[8*a[1:0] +: 8];
  endtask
  // send a 6-byte command and 8 idle bytes; return R1 and the 4 bytes after it
  // send a 6-byte command, then poll single bytes for R1 and read the 4
  // bytes that follow it for R3/R7
  task automatic spi_cmd(input logic [5:0] idx, input logic [31:0] arg, input logic [7:0] crc,
                         input bit long_rsp, output logic [7:0] r1, output logic [31:0] extra);
    logic [7:0] b;
    wr(TXS,     {arg[23:16], arg[31:24], 2'b01, idx});
    wr(TXS + 4, {8'hFF, 8'hFF, crc, arg[7:0]});
    dma_run(TXS, RXS, 6, 3'b011);
    r1 = 8'hFF;
    for (int i = 0; i < 8 && r1[7]; i++) begin
      dma_run(0, RXS, 1, 3'b101);
      rd_byte(RXS, r1);
    end
    extra = '0;
    if (long_rsp) begin
      dma_run(0, RXS, 4, 3'b101);
      for (int k = 0; k < 4; k++) begin rd_byte(RXS + k, b); extra = {extra[23:0], b}; end
    end
  endtask
  task automatic spi_load(output bit ok);
    logic [7:0] r1, b;
    logic [31:0] x;
    bit ccs;
    ok = 0;
    wr(DR + 32'h10, 63);                 // slow clock for card init
    wr(DR + 32'h14, 1);
    dma_run(0, 0, 10, 3'b001);           // 80 clocks with CS high
    wr(DR + 32'h14, 0);
    spi_cmd(0, 0, 8'h95, 0, r1, x);
    if (r1 != 8'h01) begin wr(DR + 32'h14, 1); return; end
    spi_cmd(8, 32'h1AA, 8'h87, 1, r1, x);
    for (int t = 0; t < 50; t++) begin
      spi_cmd(55, 0, 8'h01, 0, r1, x);
      spi_cmd(41, 32'h4000_0000, 8'h01, 0, r1, x);
      if (r1 == 8'h00) break;
    end
    if (r1 != 8'h00) begin wr(DR + 32'h14, 1); return; end
    spi_cmd(58, 0, 8'h01, 1, r1, x);
    ccs = x[30];
    wr(DR + 32'h10, 1);                  // fast clock
    for (int blk = 0; blk < IMG_BLOCKS; blk++) begin
      spi_cmd(17, ccs ? blk : blk * 512, 8'h01, 0, r1, x);
      if (r1 != 8'h00) begin wr(DR + 32'h14, 1); return; end
      b = 8'hFF;
      for (int k = 0; k < 40 && b != 8'hFE; k++) begin
        dma_run(0, RXS, 1, 3'b101);
        rd_byte(RXS, b);
      end
      if (b != 8'hFE) begin wr(DR + 32'h14, 1); return; end
      dma_run(0, IMG_DST + 512 * blk, 514, 3'b101);
    end
    wr(DR + 32'h14, 1);
    ok = 1;
  endtask

  task automatic check_control_word(output bit ok);
    logic [31:0] w;
    rdw(IMG_DST, w);
    ok = (w == CONTROL_WORD);
  endtask

  task automatic jump_to_image(input string mode);
    logic [31:0] w; logic e;
    fetch(ENTRY, w, e);
    check(!e && w == img_word(1), $sformatf("%s: first image instruction fetched from SRAM (%h)", mode, w));
    fetch(ENTRY + 32'h200, w, e);
    check(!e && w == img_word(129), $sformatf("%s: image word in second block loaded", mode));
  endtask

  typedef enum {R_SDIO, R_SDIO_REINIT, R_SPI, R_SPI_FALLBACK, R_LOOP} result_e;

  // Boot code decision flow
  task automatic boot_code(output result_e res);
    logic [31:0] pads, w;
    logic e;
    bit ok;
    fetch(boot_addr, w, e);
    check(boot_addr == BOOTROM_BASE && !e, "reset fetch from the bootROM");
    n_rom_fetch++;
    wr(GPIO_BASE, (32'd1 << 9) | (32'd1 << CSN1_PIN));
    rdw(GPIO_BASE + 4, pads);
    if (pads[9]) begin res = R_LOOP; return; end
    if (pads[CSN1_PIN]) begin
      spi_load(ok); check_control_word(ok);
      res = ok ? R_SPI : R_LOOP; return;
    end
    sdio_read(ok); if (ok) check_control_word(ok);
    if (ok) begin res = R_SDIO; return; end
    sdio_init(ok); if (ok) sdio_read(ok); if (ok) check_control_word(ok);
    if (ok) begin res = R_SDIO_REINIT; return; end
    spi_load(ok); if (ok) check_control_word(ok);
    res = ok ? R_SPI_FALLBACK : R_LOOP;
  endtask

  task automatic do_reset();
    rst_n = 0; ireq = '0; dreq = '0; in_loop = 0;
    for (int i = 0; i < 512; i++) dut.u_sram.mem[i] = '0;   // no stale image
    repeat (5) @(posedge clk);
    rst_n = 1;
  endtask

  // ---------------------------------------------------------------- JTAG host
  task automatic tck_cycle(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #50; o = tdo; tck = 1;
    #50; tck = 0;
  endtask
  task automatic jtag_reset();
    logic o;
    trst_n = 0; #100; trst_n = 1;
    repeat (5) tck_cycle(1, 0, o);
    tck_cycle(0, 0, o);
  endtask
  task automatic ir_scan(input logic [4:0] v);
    logic o;
    tck_cycle(1, 0, o); tck_cycle(1, 0, o); tck_cycle(0, 0, o); tck_cycle(0, 0, o);
    for (int i = 0; i < 5; i++) tck_cycle(i == 4, v[i], o);
    tck_cycle(1, 0, o); tck_cycle(0, 0, o);
  endtask
  task automatic dr_scan(input int n, input logic [40:0] din, output logic [40:0] dout);
    logic o;
    dout = '0;
    tck_cycle(1, 0, o); tck_cycle(0, 0, o); tck_cycle(0, 0, o);
    for (int i = 0; i < n; i++) begin tck_cycle(i == n - 1, din[i], o); dout[i] = o; end
    tck_cycle(1, 0, o); tck_cycle(0, 0, o);
    repeat (6) tck_cycle(0, 0, o);        // idle while the access completes
  endtask
  task automatic dmi_wr(input logic [6:0] a, input logic [31:0] d);
    logic [40:0] x; dr_scan(41, {a, d, 2'd2}, x);
  endtask
  task automatic dmi_rd(input logic [6:0] a, output logic [31:0] d);
    logic [40:0] x;
    dr_scan(41, {a, 32'd0, 2'd1}, x);
    dr_scan(41, {a, 32'd0, 2'd0}, x);
    d = x[33:2];
    check(x[1:0] == 2'd0, "DMI read completed without busy");
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scenarios
  initial begin : main
    result_e res;
    int first = 1;
    logic [31:0] w, st;
    logic e;
    logic [40:0] x;
    ireq = '0; dreq = '0;
    gpio_pads = '0;
    void'($value$plusargs("first=%d", first));
    // both cards hold the same image: control word in front
    for (int k = 0; k < 4; k++) begin
      sdcard.mem[k]  = CONTROL_WORD[8*k +: 8];
      spicard.mem[k] = CONTROL_WORD[8*k +: 8];
    end

    // 1. SDIO boot: the hardware FSM initialised the card, first read works
    if (first <= 1) begin
    $display("[%0t] scenario 1", $time);
    do_reset();
    wait (init_done);
    boot_code(res);
    check(res == R_SDIO, $sformatf("SDIO boot taken (%s)", res.name()));
    if (res == R_SDIO) begin n_sdio++; jump_to_image("SDIO boot"); end

    end
    // 2. hardware init fails (card silent during it): software re-init
    if (first <= 2) begin
    $display("[%0t] scenario 2", $time);
    sdcard.enabled = 0;
    do_reset();
    do rdw(SR + 32'h18, st); while (st[0] || !(st[9] || st[8]));
    check(st[9] && !st[8], "hardware init reports failure with silent card");
    sdcard.enabled = 1;
    boot_code(res);
    check(res == R_SDIO_REINIT, $sformatf("SDIO boot after software re-init (%s)", res.name()));
    if (res == R_SDIO_REINIT) begin n_sdio_reinit++; jump_to_image("SDIO re-init boot"); end

    end
    // 3. SPI boot chosen by CSN1
    if (first <= 3) begin
    $display("[%0t] scenario 3", $time);
    gpio_pads[CSN1_PIN] = 1;
    do_reset();
    boot_code(res);
    check(res == R_SPI, $sformatf("SPI boot selected by CSN1 (%s)", res.name()));
    if (res == R_SPI) begin n_spi++; jump_to_image("SPI boot"); end
    check(spicard.n_reads == IMG_BLOCKS, "SPI card delivered the image blocks");
    gpio_pads[CSN1_PIN] = 0;

    end
    // 4. SDIO card dead: SPI as the last resort
    if (first <= 4) begin
    $display("[%0t] scenario 4", $time);
    sdcard.enabled = 0;
    do_reset();
    boot_code(res);
    check(res == R_SPI_FALLBACK, $sformatf("SPI fallback after SDIO failure (%s)", res.name()));
    if (res == R_SPI_FALLBACK) begin n_spi_fallback++; jump_to_image("SPI fallback"); end
    sdcard.enabled = 1;

    end
    // 5. JTAG boot: GPIO9 parks the CPU; host loads SRAM through the debug module
    if (first <= 5) begin
    $display("[%0t] scenario 5", $time);
    gpio_pads[9] = 1;
    do_reset();
    for (int i = 0; i < 64; i++) wr(SRAM_BASE + 32'h2000 + 4*i, 0);   // clear target
    boot_code(res);
    check(res == R_LOOP, "GPIO9 sends the boot code to the busy loop");
    if (res == R_LOOP) n_loop++;
    in_loop = 1;
    jtag_reset();
    dr_scan(32, 0, x);
    check(x[31:0] == 32'h2000_0DB3, $sformatf("JTAG IDCODE %h", x[31:0]));
    ir_scan(5'h11);
    dmi_wr(7'h10, 32'h0000_0001);
    dmi_wr(7'h10, 32'h8000_0001);
    dmi_rd(7'h11, w);
    check(w[9] && cpu_halted, "debug module reports CPU halted");
    dmi_wr(7'h10, 32'h0000_0001);
    dmi_wr(7'h38, 32'h0005_0000);                         // 32-bit, autoincrement
    dmi_wr(7'h39, SRAM_BASE + 32'h2000);
    for (int i = 0; i < 16; i++) dmi_wr(7'h3C, 32'hA5A5_0000 + i);
    dmi_wr(7'h38, 32'h0015_0000);                         // + read on address
    dmi_wr(7'h39, SRAM_BASE + 32'h2000 + 4*5);
    dmi_rd(7'h3C, w);
    check(w == 32'hA5A5_0005, $sformatf("system bus read back %h", w));
    dmi_wr(7'h04, SRAM_BASE + 32'h2000);
    dmi_wr(7'h17, 32'h0023_07B1);                         // write dpc
    dmi_rd(7'h16, w);
    check(w[10:8] == 0, "abstract command to dpc accepted");
    dmi_wr(7'h10, 32'h4000_0001);                         // resume
    dmi_rd(7'h11, w);
    check(w[17] && !cpu_halted, "resume acknowledged");
    in_loop = 0;
    fetch(pc_after_resume, w, e);
    check(!e && w == 32'hA5A5_0000, "CPU resumes at the JTAG-loaded image");
    if (!e && w == 32'hA5A5_0000) n_jtag++;
    gpio_pads[9] = 0;

    end
    // 6. external boot: CPU fetches straight from the card window
    if (first <= 6) begin
    $display("[%0t] scenario 6", $time);
    boot_sel = 1;
    do_reset();
    check(boot_addr == SDMEM_BASE, "boot_sel moves the boot address to the card window");
    fork
      begin fetch(boot_addr, w, e); end
      begin repeat (100) @(posedge clk); if (!init_done && ireq.req) n_ext_stall++; end
    join
    check(!e && w == CONTROL_WORD, "first fetch from the card returns its first word");
    for (int i = 1; i < 140; i += 23) begin
      fetch(boot_addr + 4*i, w, e);
      check(!e && w == img_word(i), $sformatf("external fetch word %0d", i));
    end
    if (!e) n_ext++;
    boot_sel = 0;

    end
    if (first == 1) begin
    check(n_rom_fetch > 0, "bootROM fetch happened");
    check(n_sdio > 0, "SDIO boot happened");
    check(n_sdio_reinit > 0, "SDIO re-init boot happened");
    check(n_spi > 0, "SPI boot happened");
    check(n_spi_fallback > 0, "SPI fallback boot happened");
    check(n_loop > 0, "busy loop happened");
    check(n_jtag > 0, "JTAG boot happened");
    check(n_ext_stall > 0, "external fetch stalled during card init");
    check(n_ext > 0, "external boot happened");
    end
    $display("mechanisms: rom=%0d sdio=%0d sdio_reinit=%0d spi=%0d spi_fallback=%0d loop=%0d jtag=%0d ext=%0d ext_stall=%0d",
             n_rom_fetch, n_sdio, n_sdio_reinit, n_spi, n_spi_fallback, n_loop, n_jtag, n_ext, n_ext_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
