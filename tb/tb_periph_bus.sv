// Testbench of the peripheral bus: two masters, two memory-like slaves with
// different latencies. Checks address decoding, data routing, the error
// answer for unmapped addresses, that a grant holds until ready, and that
// round-robin arbitration serves both of two masters that request back to back.
module tb_periph_bus;
  import sysctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [1:0][31:0] B = {32'h2000_0000, 32'h1000_0000};
  localparam logic [1:0][31:0] M = {32'hF000_0000, 32'hF000_0000};
  bus_req_t [1:0] mreq; bus_rsp_t [1:0] mrsp;
  bus_req_t [1:0] sreq; bus_rsp_t [1:0] srsp;

  periph_bus #(.NM(2), .NS(2), .SLV_BASE(B), .SLV_MASK(M)) dut (
    .clk, .rst_n, .m_req(mreq), .m_rsp(mrsp), .s_req(sreq), .s_rsp(srsp));

  // slave s answers after s+1 wait cycles with rdata = addr ^ (s+1)
  int wcnt [2];
  logic [31:0] last_w [2];
  for (genvar s = 0; s < 2; s++) begin : g_s
    always_ff @(posedge clk) begin
      if (!rst_n || !sreq[s].req || srsp[s].ready) wcnt[s] <= 0;
      else wcnt[s] <= wcnt[s] + 1;
      if (sreq[s].req && srsp[s].ready && sreq[s].we) last_w[s] <= sreq[s].wdata;
    end
    assign srsp[s] = '{ready: sreq[s].req && wcnt[s] == s + 1, err: 1'b0,
                       rdata: sreq[s].addr ^ (s + 1)};
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input int m, input logic we, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] rd, output logic er, output int cyc);
    #1;
    mreq[m] = '{req: 1'b1, we: we, addr: a, wdata: d, be: 4'hF};
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!mrsp[m].ready);
    rd = mrsp[m].rdata; er = mrsp[m].err;
    #1 mreq[m] = '0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int served [2];
  initial begin
    logic [31:0] rd; logic er; int cyc;
    mreq = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    xfer(0, 0, 32'h1000_0040, 0, rd, er, cyc);
    check(!er && rd == (32'h1000_0040 ^ 1) && cyc == 2, "slave 0 read, 1 wait state");
    xfer(1, 0, 32'h2000_0100, 0, rd, er, cyc);
    check(!er && rd == (32'h2000_0100 ^ 2) && cyc == 3, "slave 1 read, 2 wait states");
    xfer(0, 1, 32'h2000_0004, 32'h1234_5678, rd, er, cyc);
    check(!er && last_w[1] == 32'h1234_5678, "write routed to slave 1");
    xfer(1, 0, 32'h3000_0000, 0, rd, er, cyc);
    check(er && cyc == 1, "unmapped address answered with err at once");
    // two masters hammering: both must be served (round robin)
    served = '{0, 0};
    fork
      for (int i = 0; i < 20; i++) begin
        xfer(0, 0, 32'h1000_0000 + 4*i, 0, rd, er, cyc);
        check(rd == ((32'h1000_0000 + 4*i) ^ 1), "m0 data under contention");
        served[0]++;
      end
      begin
        logic [31:0] r2; logic e2; int c2;
        for (int i = 0; i < 20; i++) begin
          xfer(1, 0, 32'h2000_0000 + 4*i, 0, r2, e2, c2);
          check(r2 == ((32'h2000_0000 + 4*i) ^ 2), "m1 data under contention");
          served[1]++;
        end
      end
    join
    check(served[0] == 20 && served[1] == 20, "both masters served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
