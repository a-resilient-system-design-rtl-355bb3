// Peripheral bus of the system-control subsystem.
//
// Joins NM masters (CPU instruction port, CPU data port, debug module system
// bus access, DMA) to NS slaves (bootROM, SRAM, GPIO, DMA registers, SDIO
// registers, SDIO memory window). It is a single shared bus: one transfer is
// in flight at a time. When the bus is idle the requesting master that
// follows the previous owner in round-robin order is granted, so a CPU that
// polls a register back to back cannot starve the DMA or the debug module.
// The grant is held until the addressed slave answers with ready, so a
// transfer cannot be torn. A master that is not granted sees ready low and
// simply waits.
//
// Address decoding: slave s is selected when (addr & SLV_MASK[s]) ==
// SLV_BASE[s]. An address that no slave claims is answered at once with
// ready and err, so a stray access cannot hang the boot processor.
//
// Timing: request to slave is combinational; the slave's ready/rdata go back
// combinationally to the granted master. A grant costs no cycle when the bus
// is free. The document only names the bus and shows which blocks hang on it;
// arbitration order and the error response are this design's choices.
module periph_bus
  import sysctrl_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 6,
  parameter logic [NS-1:0][31:0] SLV_BASE = {SDMEM_BASE, SDIO_REG_BASE, DMA_BASE, GPIO_BASE, SRAM_BASE, BOOTROM_BASE},
  parameter logic [NS-1:0][31:0] SLV_MASK = {SDMEM_MASK, PERIPH_MASK, PERIPH_MASK, PERIPH_MASK, SRAM_MASK, BOOTROM_MASK}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bus_req_t [NM-1:0]   m_req,
  output bus_rsp_t [NM-1:0]   m_rsp,
  output bus_req_t [NS-1:0]   s_req,
  input  bus_rsp_t [NS-1:0]   s_rsp
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic          locked_q;
  logic [MW-1:0] owner_q, owner;
  logic          any_req;
  bus_req_t      cur;
  logic [SW-1:0] sel;
  logic          hit;
  bus_rsp_t      rsp;

  // Pick the owner: the locked one while a transfer is open, else the
  // first requester after the previous owner (round robin).
  int unsigned cand;
  always_comb begin
    owner   = owner_q;
    any_req = 1'b0;
    cand    = 0;
    if (!locked_q) begin
      for (int k = NM; k >= 1; k--) begin
        cand = (int'(owner_q) + k) % NM;
        if (m_req[cand].req) begin
          owner   = MW'(cand);
          any_req = 1'b1;
        end
      end
    end else begin
      any_req = m_req[owner_q].req;
    end
  end

  always_comb begin
    cur = m_req[owner];
    cur.req = any_req;
  end

  // Address decode
  always_comb begin
    sel = '0;
    hit = 1'b0;
    for (int s = 0; s < NS; s++) begin
      if (!hit && ((cur.addr & SLV_MASK[s]) == SLV_BASE[s])) begin
        sel = SW'(s);
        hit = 1'b1;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req[s] = cur;
      s_req[s].req = cur.req && hit && (sel == SW'(s));
    end
    if (!cur.req)      rsp = BUS_RSP_IDLE;
    else if (!hit)     rsp = '{ready: 1'b1, err: 1'b1, rdata: 32'hDEAD_BEEF};
    else               rsp = s_rsp[sel];
    for (int m = 0; m < NM; m++) begin
      m_rsp[m] = BUS_RSP_IDLE;
      m_rsp[m].rdata = rsp.rdata;
    end
    m_rsp[owner].ready = rsp.ready;
    m_rsp[owner].err   = rsp.err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
    end else if (cur.req) begin
      owner_q  <= owner;
      locked_q <= !rsp.ready;
    end else begin
      locked_q <= 1'b0;
    end
  end

  // A master must hold its request until it is answered.
  for (genvar m = 0; m < NM; m++) begin : g_chk
    property p_hold;
      @(posedge clk) disable iff (!rst_n)
        (m_req[m].req && !m_rsp[m].ready) |=> m_req[m].req;
    endproperty
    a_hold: assert property (p_hold) else $error("master %0d dropped req before ready", m);
  end
endmodule
