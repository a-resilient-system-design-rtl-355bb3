// Subsystem SRAM: the writable memory boot images are loaded into.
//
// Single-port, WORDS x 32 bit, byte-writable. Accessed over the peripheral
// bus by the CPU, the debug module (JTAG boot) and the DMA (SPI boot). A
// request is answered one cycle later with ready; a read returns the word in
// that cycle. The document does not give the size of this memory; 64 KiB is
// this design's choice. Addresses beyond the array wrap.
module sram
  import sysctrl_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req_i,
  output bus_rsp_t rsp_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [31:0] rdata_q;
  logic        pend_q;
  logic [AW-1:0] idx;

  assign idx = req_i.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (req_i.req && !pend_q) begin
      if (req_i.we) mem[idx] <= apply_be(mem[idx], req_i.wdata, req_i.be);
      rdata_q <= mem[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= 1'b0;
    else        pend_q <= req_i.req && !pend_q;
  end

  assign rsp_o = '{ready: pend_q, err: 1'b0, rdata: rdata_q};
endmodule
