// Testbench of the bootROM: contents loaded from a small hex file, reads
// answered one cycle after the request, unwritten words read zero, and a
// write is refused with err and leaves the contents unchanged.
module tb_bootrom;
  import sysctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp;
  bootrom #(.WORDS(768), .INIT_FILE("tb/bootrom_test.hex")) dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp));

  localparam logic [31:0] EXP [8] = '{32'h00000297, 32'h02028293, 32'h30529073, 32'h1a0002b7,
                                      32'hdeadbeef, 32'h0badf00d, 32'h12345678, 32'ha5a5a5a5};
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic xfer(input logic we, input logic [31:0] a, output logic [31:0] rd,
                      output logic er, output int cyc);
    #1;
    req = '{req: 1'b1, we: we, addr: a, wdata: 32'hFFFF_FFFF, be: 4'hF};
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!rsp.ready);
    rd = rsp.rdata; er = rsp.err;
    #1 req = '0;
  endtask
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] rd; logic er; int cyc;
    req = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 7; i >= 0; i--) begin
      xfer(0, BOOTROM_BASE + 4*i, rd, er, cyc);
      check(!er && rd == EXP[i] && cyc == 2, $sformatf("word %0d = %h (%0d cycles)", i, rd, cyc));
    end
    xfer(0, BOOTROM_BASE + 4*700, rd, er, cyc);
    check(!er && rd == 0, "unprogrammed word reads zero");
    xfer(1, BOOTROM_BASE + 4*4, rd, er, cyc);
    check(er, "write refused with err");
    xfer(0, BOOTROM_BASE + 4*4, rd, er, cyc);
    check(rd == 32'hdeadbeef, "contents unchanged by write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
