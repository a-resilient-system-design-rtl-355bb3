// Testbench of the debug module, driven directly on its DMI port. A CPU
// model halts on debug request and resumes on the resume pulse; a memory
// model (error above 0x8000_0000) sits on the system bus port. Checks halt
// and resume status and acknowledge, system-bus writes with autoincrement,
// read-on-address and read-on-data, the bus error code, the dpc abstract
// command and the not-supported / not-halted command errors.
module tb_debug_module;
  import sysctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, rsp, dreq, rreq, ndm, dpc_we, halted;
  logic [6:0] addr; logic [31:0] wdata, rdata, dpc; logic [1:0] op;
  bus_req_t mreq; bus_rsp_t mrsp;
  debug_module dut (.clk, .rst_n, .dmi_req_i(req), .dmi_addr_i(addr), .dmi_wdata_i(wdata),
                    .dmi_op_i(op), .dmi_rsp_o(rsp), .dmi_rdata_o(rdata),
                    .debug_req_o(dreq), .resume_req_o(rreq), .ndmreset_o(ndm),
                    .dpc_we_o(dpc_we), .dpc_o(dpc), .cpu_halted_i(halted),
                    .mst_req_o(mreq), .mst_rsp_i(mrsp));
  // CPU model
  logic [31:0] cpu_dpc;
  always_ff @(posedge clk) begin
    if (!rst_n) halted <= 0;
    else if (dreq) halted <= 1;
    else if (rreq) halted <= 0;
    if (dpc_we) cpu_dpc <= dpc;
  end
  // memory model, 2 wait states
  logic [31:0] mem [64];
  int w;
  always_ff @(posedge clk) begin
    if (!rst_n || !mreq.req || mrsp.ready) w <= 0; else w <= w + 1;
    if (mreq.req && mrsp.ready && mreq.we && !mreq.addr[31]) mem[mreq.addr[7:2]] <= mreq.wdata;
  end
  assign mrsp = '{ready: mreq.req && w == 2, err: mreq.addr[31], rdata: mem[mreq.addr[7:2]]};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic dmi(input logic [1:0] o, input logic [6:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk); req = 1; op = o; addr = a; wdata = d;
    @(negedge clk); req = 0;
    check(rsp, "DMI answered next cycle");
    r = rdata;
    repeat (6) @(negedge clk);       // let a bus access finish
  endtask
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r;
    req = 0; op = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) mem[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    dmi(2, 7'h10, 32'h8000_0000, r);
    check(!dreq, "haltreq ignored while dmactive is 0");
    dmi(2, 7'h10, 32'h0000_0001, r);
    dmi(2, 7'h10, 32'h8000_0001, r);
    check(dreq && halted, "haltreq reaches the CPU");
    dmi(1, 7'h11, 0, r);
    check(r[9] && r[8] && !r[11] && r[7] && r[3:0] == 2, $sformatf("dmstatus halted %h", r));
    dmi(2, 7'h10, 32'h0000_0001, r);
    // SBA writes with autoincrement
    dmi(2, 7'h38, 32'h0005_0000, r);
    dmi(2, 7'h39, 32'h0000_0010, r);
    for (int i = 0; i < 8; i++) dmi(2, 7'h3C, 32'hC0DE_0000 + i, r);
    for (int i = 0; i < 8; i++) check(mem[4 + i] == 32'hC0DE_0000 + i, $sformatf("SBA write %0d", i));
    dmi(1, 7'h39, 0, r);
    check(r == 32'h30, "sbaddress autoincremented");
    // read on address, then read on data
    dmi(2, 7'h38, 32'h0015_8000, r);
    dmi(2, 7'h39, 32'h0000_0014, r);
    dmi(1, 7'h3C, 0, r);
    check(r == 32'hC0DE_0001, "read on address");
    dmi(1, 7'h3C, 0, r);
    check(r == 32'hC0DE_0002, "read on data fetched the next word");
    // bus error
    dmi(2, 7'h39, 32'h8000_0000, r);
    dmi(1, 7'h38, 0, r);
    check(r[14:12] == 3'd2, "bus error reported in sberror");
    dmi(2, 7'h38, 32'h0000_7000, r);
    dmi(1, 7'h38, 0, r);
    check(r[14:12] == 3'd0 && r[31:29] == 1 && r[2], "sberror cleared, sbcs fields");
    // abstract command: dpc
    dmi(2, 7'h04, 32'h1C00_0100, r);
    dmi(2, 7'h17, 32'h0023_07B1, r);
    dmi(1, 7'h16, 0, r);
    check(r[10:8] == 0 && cpu_dpc == 32'h1C00_0100, "dpc written by abstract command");
    dmi(2, 7'h17, 32'h0023_1001, r);
    dmi(1, 7'h16, 0, r);
    check(r[10:8] == 3'd2, "unsupported register gives cmderr 2");
    dmi(2, 7'h16, 32'h0000_0700, r);
    // resume
    dmi(2, 7'h10, 32'h4000_0001, r);
    dmi(1, 7'h11, 0, r);
    check(!halted && r[17] && r[16] && r[11], "resume acknowledged, CPU running");
    dmi(2, 7'h17, 32'h0023_07B1, r);
    dmi(1, 7'h16, 0, r);
    check(r[10:8] == 3'd4, "command while running gives cmderr 4");
    dmi(2, 7'h10, 32'h0000_0003, r);
    check(ndm, "ndmreset output");
    dmi(2, 7'h10, 32'h0000_0000, r);
    check(!ndm && !dreq, "dmactive 0 clears requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
