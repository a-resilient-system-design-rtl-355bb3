// Testbench of the SRAM: random word writes and read-back against a
// reference array, byte-enable merging, and the one-cycle response.
module tb_sram;
  import sysctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp;
  sram #(.WORDS(1024)) dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp));
  logic [31:0] ref_m [1024];
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic xfer(input logic we, input logic [31:0] a, input logic [31:0] d, input logic [3:0] be,
                      output logic [31:0] rd, output int cyc);
    #1;
    req = '{req: 1'b1, we: we, addr: a, wdata: d, be: be};
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!rsp.ready);
    rd = rsp.rdata;
    #1 req = '0;
  endtask
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] rd, d; int cyc, a;
    req = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      d = $urandom; ref_m[i] = d;
      xfer(1, SRAM_BASE + 4*i, d, 4'hF, rd, cyc);
    end
    for (int i = 0; i < 200; i++) begin
      a = $urandom % 1024;
      if ($urandom % 2) begin
        logic [3:0] be;
        be = 4'($urandom); d = $urandom;
        xfer(1, SRAM_BASE + 4*a, d, be, rd, cyc);
        ref_m[a] = apply_be(ref_m[a], d, be);
      end else begin
        xfer(0, SRAM_BASE + 4*a, 0, 4'hF, rd, cyc);
        check(rd == ref_m[a] && cyc == 2, $sformatf("read word %0d", a));
      end
    end
    for (int i = 0; i < 1024; i += 97) begin
      xfer(0, SRAM_BASE + 4*i, 0, 4'hF, rd, cyc);
      check(rd == ref_m[i], $sformatf("final word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
