// Testbench of the SPI master: a mode-0 slave model answers each byte with a
// byte from its own list and records what it received. Checks both
// directions, chip select pass-through, idle levels and the byte time of
// 16 * (clkdiv + 1) system clocks.
module tb_spi_master;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] div, tx, rx;
  logic csn_in, start, busy, done, sck, csn, mosi, miso;
  spi_master dut (.clk, .rst_n, .clkdiv_i(div), .csn_i(csn_in), .start_i(start), .tx_i(tx),
                  .busy_o(busy), .done_o(done), .rx_o(rx), .sck_o(sck), .csn_o(csn),
                  .mosi_o(mosi), .miso_i(miso));
  // slave
  logic [7:0] s_out [16], s_in [$];
  logic [7:0] sh_in, sh_out;
  int bitc = 0, bytec = 0;
  initial for (int i = 0; i < 16; i++) s_out[i] = 8'(i * 37 + 5);
  always @(negedge csn) begin bitc = 0; sh_out = s_out[0]; miso = sh_out[7]; end
  always @(posedge sck) if (!csn) begin
    sh_in = {sh_in[6:0], mosi}; bitc++;
    if (bitc == 8) begin s_in.push_back(sh_in); end
  end
  always @(negedge sck) if (!csn) begin
    if (bitc == 8) begin bitc = 0; bytec++; sh_out = s_out[bytec % 16]; end
    else sh_out = {sh_out[6:0], 1'b1};
    miso = sh_out[7];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] sent [8];
    int cyc;
    start = 0; tx = 0; div = 3; csn_in = 1; miso = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk);
    check(csn && !sck && mosi, "idle: CS high, SCK low, MOSI high");
    #1 csn_in = 0;
    for (int d = 0; d < 2; d++) begin
      div = d ? 8'd0 : 8'd3;
      for (int i = 0; i < 4; i++) begin
        int k;
        k = d * 4 + i;
        sent[k] = 8'($urandom);
        @(negedge clk); tx = sent[k]; start = 1;
        @(negedge clk); start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        check(rx == s_out[k], $sformatf("byte %0d received %h", k, rx));
        check(cyc == 16 * (div + 1) + 1, $sformatf("byte time %0d cycles at div %0d", cyc, div));
      end
    end
    check(!csn, "chip select follows csn_i");
    #1 csn_in = 1;
    @(posedge clk); #1;
    check(csn, "chip select released");
    check(s_in.size() == 8, "slave got 8 bytes");
    for (int k = 0; k < 8 && k < s_in.size(); k++) check(s_in[k] == sent[k], $sformatf("slave byte %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
