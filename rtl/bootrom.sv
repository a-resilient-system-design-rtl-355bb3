// Boot ROM: read-only memory the boot processor starts executing from.
//
// The boot code (C runtime, boot-mode control flow, SPI and SDIO card
// drivers) is about 3 KiB, so the array holds WORDS = 768 32-bit words and
// sits at 0x1A00_0000. Its contents are fixed at build time: they are loaded
// from INIT_FILE, a hex file with one 32-bit word per line produced from the
// compiled boot program. With an empty INIT_FILE the array reads as zero.
//
// Bus timing: a read is answered one cycle after the request (registered
// ROM output), with ready and rdata. Writes do nothing and are answered
// with err, since the ROM cannot change after fabrication. Addresses beyond
// the array wrap (only the low index bits are decoded).
module bootrom
  import sysctrl_pkg::*;
#(
  parameter int unsigned WORDS     = 768,
  parameter string       INIT_FILE = ""
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req_i,
  output bus_rsp_t rsp_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic        pend_q;
  logic        werr_q;
  logic [31:0] rdata_q;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (req_i.req && !pend_q)
      rdata_q <= mem[req_i.addr[AW+1:2]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0;
      werr_q <= 1'b0;
    end else begin
      pend_q <= req_i.req && !pend_q;
      werr_q <= req_i.we;
    end
  end

  assign rsp_o = '{ready: pend_q, err: pend_q && werr_q, rdata: rdata_q};
endmodule
