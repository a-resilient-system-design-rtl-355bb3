// Testbench of the JTAG debug transport. A JTAG host (tck period 100 ns,
// clk period 10 ns) scans IR and DR; a DMI responder with a 128-entry
// register file answers after a programmable delay. Checks the IDCODE
// after reset, BYPASS, the DTMCS fields, DMI writes and read-back through
// the clock crossing, the busy answer (op 3) when a scan comes before the
// access has finished, that it stays sticky, and that dmireset clears it.
module tb_jtag_dtm;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_oe;
  logic dreq, drsp; logic [6:0] daddr; logic [31:0] dwdata, drdata; logic [1:0] dop;
  jtag_dtm dut (.tck, .tms, .tdi, .trst_n, .tdo, .tdo_oe, .clk, .rst_n,
                .dmi_req_o(dreq), .dmi_addr_o(daddr), .dmi_wdata_o(dwdata), .dmi_op_o(dop),
                .dmi_rsp_i(drsp), .dmi_rdata_i(drdata));
  // DMI responder
  logic [31:0] regs [128];
  int delay = 0, cnt = 0, n_req = 0;
  logic pend = 0;
  always_ff @(posedge clk) begin
    drsp <= 0;
    if (dreq) begin
      pend <= 1; cnt <= delay; n_req <= n_req + 1;
      if (dop == 2) regs[daddr] <= dwdata;
    end else if (pend) begin
      if (cnt == 0) begin drsp <= 1; drdata <= regs[daddr]; pend <= 0; end
      else cnt <= cnt - 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
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
  task automatic dr_scan(input int n, input logic [40:0] din, output logic [40:0] dout,
                         input int idle = 6);
    logic o;
    dout = '0;
    tck_cycle(1, 0, o); tck_cycle(0, 0, o); tck_cycle(0, 0, o);
    for (int i = 0; i < n; i++) begin tck_cycle(i == n - 1, din[i], o); dout[i] = o; end
    tck_cycle(1, 0, o); tck_cycle(0, 0, o);
    repeat (idle) tck_cycle(0, 0, o);
  endtask
  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [40:0] x;
    logic [6:0] a [8];
    logic [31:0] d [8];
    for (int i = 0; i < 128; i++) regs[i] = 0;
    #1 rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    jtag_reset();
    // IDCODE selected by reset
    dr_scan(32, 41'h0, x);
    check(x[31:0] == 32'h2000_0DB3, $sformatf("IDCODE after reset %h", x[31:0]));
    // BYPASS: one-bit register delays tdi by one
    ir_scan(5'h1F);
    dr_scan(8, 41'b1011_0110, x);
    check(x[7:0] == 8'b0110_1100, $sformatf("BYPASS %b", x[7:0]));
    // DTMCS
    ir_scan(5'h10);
    dr_scan(32, 41'h0, x);
    check(x[3:0] == 1 && x[9:4] == 7 && x[11:10] == 0 && x[14:12] == 1, $sformatf("DTMCS %h", x[31:0]));
    // DMI writes and read back, random addresses and data
    ir_scan(5'h11);
    for (int i = 0; i < 8; i++) begin
      a[i] = 7'(i * 13 + 1); d[i] = $urandom;
      dr_scan(41, {a[i], d[i], 2'd2}, x);
      check(regs[a[i]] == d[i], $sformatf("DMI write %0d", i));
    end
    for (int i = 0; i < 8; i++) begin
      dr_scan(41, {a[i], 32'd0, 2'd1}, x);
      dr_scan(41, {a[i], 32'd0, 2'd0}, x);
      check(x[1:0] == 0 && x[33:2] == d[i], $sformatf("DMI read %0d got %h", i, x[33:2]));
    end
    // slow responder: next capture sees busy
    delay = 3000;
    dr_scan(41, {a[0], 32'd0, 2'd1}, x, 0);
    dr_scan(41, {a[1], 32'd0, 2'd1}, x, 0);
    check(x[1:0] == 3, "busy reported while access in flight");
    repeat (3500) @(posedge clk);                // access has finished now
    dr_scan(41, {a[1], 32'd0, 2'd1}, x);
    check(x[1:0] == 3, "busy is sticky");
    check(n_req == 17, $sformatf("no request issued while sticky (%0d)", n_req));
    ir_scan(5'h10);
    dr_scan(32, 41'h0, x);
    check(x[11:10] == 3, "DTMCS dmistat shows the busy error");
    dr_scan(32, 41'h1_0000, x);                  // dmireset
    dr_scan(32, 41'h0, x);
    check(x[11:10] == 0, "dmireset clears dmistat");
    delay = 0;
    ir_scan(5'h11);
    dr_scan(41, {a[2], 32'd0, 2'd1}, x);
    dr_scan(41, {a[2], 32'd0, 2'd0}, x);
    check(x[1:0] == 0 && x[33:2] == d[2], "DMI works after dmireset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
