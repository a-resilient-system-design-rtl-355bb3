// GPIO input block used by the boot code to read its mode pins.
//
// The boot code enables the inputs it needs (GPIO9 and the SPI chip-select
// pin CSN1) in GPIO_ENABLE and then reads all 32 pad levels at once from
// PADIN. Pad inputs pass a two-flop synchronizer; a pad whose enable bit is
// clear reads as 0. Registers (word offsets in the 4 KiB window):
//   0x00 GPIO_ENABLE  R/W  per-pin input enable, reset 0
//   0x04 PADIN        R    synchronized pad levels AND GPIO_ENABLE
// The register layout is this design's choice; the document only shows the
// enable-then-read sequence. Answers every access one cycle after the request.
module gpio
  import sysctrl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req_i,
  output bus_rsp_t    rsp_o,
  input  logic [31:0] pad_i
);
  logic [31:0] en_q, sync1_q, sync2_q, rdata_q;
  logic        pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q    <= '0;
      sync1_q <= '0;
      sync2_q <= '0;
      pend_q  <= 1'b0;
      rdata_q <= '0;
    end else begin
      sync1_q <= pad_i;
      sync2_q <= sync1_q;
      pend_q  <= req_i.req && !pend_q;
      if (req_i.req && !pend_q) begin
        unique case (req_i.addr[2])
          1'b0: begin
            rdata_q <= en_q;
            if (req_i.we) en_q <= apply_be(en_q, req_i.wdata, req_i.be);
          end
          1'b1: rdata_q <= sync2_q & en_q;
        endcase
      end
    end
  end

  assign rsp_o = '{ready: pend_q, err: 1'b0, rdata: rdata_q};
endmodule
