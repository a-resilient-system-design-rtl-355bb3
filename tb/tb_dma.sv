// Testbench of the DMA channel with the SPI master and an SRAM behind it.
// A mode-0 SPI slave echoes the previous byte it received, inverted. Checks:
// bytes read from SRAM at TX_ADDR (any alignment) go out on MOSI in order;
// received bytes land at RX_ADDR with single-byte enables, neighbours
// untouched; TX disabled sends 0xFF; the SPI registers drive the master.
module tb_dma;
  import sysctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t sreq, mreq; bus_rsp_t srsp, mrsp;
  logic [7:0] div, txb, rxb;
  logic csn_r, st, dn, bsy, sck, csn, mosi, miso;

  dma dut (.clk, .rst_n, .slv_req_i(sreq), .slv_rsp_o(srsp), .mst_req_o(mreq), .mst_rsp_i(mrsp),
           .spi_div_o(div), .spi_csn_o(csn_r), .spi_start_o(st), .spi_tx_o(txb),
           .spi_done_i(dn), .spi_rx_i(rxb));
  spi_master u_spi (.clk, .rst_n, .clkdiv_i(div), .csn_i(csn_r), .start_i(st), .tx_i(txb),
                    .busy_o(bsy), .done_o(dn), .rx_o(rxb), .sck_o(sck), .csn_o(csn),
                    .mosi_o(mosi), .miso_i(miso));
  sram #(.WORDS(256)) u_mem (.clk, .rst_n, .req_i(mreq), .rsp_o(mrsp));

  // echo slave
  logic [7:0] sh_in, sh_out, prev;
  logic [7:0] got [$];
  int bitc;
  always @(negedge csn) begin bitc = 0; prev = 8'h00; sh_out = ~prev; miso = sh_out[7]; end
  always @(posedge sck) if (!csn) begin sh_in = {sh_in[6:0], mosi}; bitc++; end
  always @(negedge sck) if (!csn) begin
    if (bitc == 8) begin bitc = 0; got.push_back(sh_in); prev = sh_in; sh_out = ~prev; end
    else sh_out = {sh_out[6:0], 1'b1};
    miso = sh_out[7];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic reg_x(input logic we, input logic [4:0] off, input logic [31:0] d, output logic [31:0] rd);
    #1;
    sreq = '{req: 1'b1, we: we, addr: DMA_BASE + 32'(off), wdata: d, be: 4'hF};
    do @(posedge clk); while (!srsp.ready);
    rd = srsp.rdata;
    #1 sreq = '0;
  endtask
  task automatic run(input logic [31:0] tx, input logic [31:0] rx, input int n, input logic [2:0] c);
    logic [31:0] s;
    reg_x(1, 5'h00, tx, s); reg_x(1, 5'h04, rx, s); reg_x(1, 5'h08, n, s);
    reg_x(1, 5'h0C, {29'd0, c}, s);
    do reg_x(0, 5'h0C, 0, s); while (s[0]);
  endtask
  function automatic logic [7:0] mbyte(input int a);
    return u_mem.mem[a / 4][8 * (a % 4) +: 8];
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] s;
    logic [7:0] src [10];
    sreq = '0;
    for (int i = 0; i < 256; i++) u_mem.mem[i] = 32'h5A5A_5A5A;
    for (int i = 0; i < 10; i++) begin
      src[i] = 8'($urandom);
      u_mem.mem[(3 + i) / 4][8 * ((3 + i) % 4) +: 8] = src[i];   // from byte 3, unaligned
    end
    repeat (2) @(posedge clk); rst_n = 1;
    reg_x(0, 5'h14, 0, s);
    check(s[0] == 1'b1 && csn, "chip select deselected after reset");
    reg_x(1, 5'h10, 1, s);
    check(div == 1, "SPI_DIV drives the master");
    reg_x(1, 5'h14, 0, s);
    check(!csn, "SPI_CSN drives chip select");
    run(3, 64 + 1, 10, 3'b111);
    check(got.size() == 10, "10 bytes sent");
    for (int i = 0; i < 10 && i < got.size(); i++)
      check(got[i] == src[i], $sformatf("MOSI byte %0d", i));
    check(mbyte(65) == 8'hFF, "first received byte is the slave's ~0");
    for (int i = 1; i < 10; i++)
      check(mbyte(65 + i) == ~src[i - 1], $sformatf("received byte %0d stored", i));
    check(mbyte(64) == 8'h5A && mbyte(75) == 8'h5A, "neighbouring bytes untouched");
    got.delete();
    run(0, 128, 3, 3'b101);
    check(got.size() == 3 && got[0] == 8'hFF && got[2] == 8'hFF, "TX disabled sends 0xFF");
    check(mbyte(129) == 8'h00, "echo of 0xFF stored");
    got.delete();
    run(3, 0, 2, 3'b011);
    check(got.size() == 2 && mbyte(0) == 8'h5A, "RX disabled stores nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
