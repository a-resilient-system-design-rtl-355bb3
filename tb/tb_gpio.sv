// Testbench of the GPIO input block: pads read as 0 until enabled, enabled
// pads appear in PADIN after the two-flop synchronizer, enable register
// reads back.
module tb_gpio;
  import sysctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp;
  logic [31:0] pads;
  gpio dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp), .pad_i(pads));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic xfer(input logic we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] rd);
    #1;
    req = '{req: 1'b1, we: we, addr: a, wdata: d, be: 4'hF};
    do @(posedge clk); while (!rsp.ready);
    rd = rsp.rdata;
    #1 req = '0;
  endtask
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] rd;
    req = '0; pads = 32'h0000_1200;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    xfer(0, GPIO_BASE + 4, 0, rd);
    check(rd == 0, "pads read 0 while disabled");
    xfer(1, GPIO_BASE, 32'h0000_0200, rd);
    xfer(0, GPIO_BASE, 0, rd);
    check(rd == 32'h0000_0200, "enable register reads back");
    xfer(0, GPIO_BASE + 4, 0, rd);
    check(rd == 32'h0000_0200, "GPIO9 high, CSN1 masked");
    xfer(1, GPIO_BASE, 32'h0000_1200, rd);
    xfer(0, GPIO_BASE + 4, 0, rd);
    check(rd == 32'h0000_1200, "GPIO9 and CSN1 both read");
    for (int i = 0; i < 10; i++) begin
      logic [31:0] v;
      v = $urandom;
      xfer(1, GPIO_BASE, 32'hFFFF_FFFF, rd);
      pads = v;
      repeat (2) @(posedge clk);
      xfer(0, GPIO_BASE + 4, 0, rd);
      check(rd == v, "random pad pattern through synchronizer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
