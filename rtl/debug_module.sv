// Debug module: the minimal RISC-V debug module behind the JTAG boot mode.
//
// A debug host reaches it over the debug module interface (DMI) from the
// JTAG transport. With it the host halts the boot CPU, writes the software
// image into SRAM through system bus access (no CPU involvement), sets the
// CPU's resume address (dpc) and lets it run again. Implemented subset of
// the RISC-V external debug specification (DMI addresses):
//   0x04 data0       argument of abstract commands
//   0x10 dmcontrol   [31] haltreq, [30] resumereq, [1] ndmreset, [0] dmactive
//   0x11 dmstatus    all/any halted, running, resumeack; authenticated; version 2
//   0x16 abstractcs  [12] busy (never), [10:8] cmderr (write 1 to clear), datacount 1
//   0x17 command     access register, 32-bit, write only, to dpc (0x7B1) while
//                    halted: drives dpc_we_o/dpc_o; anything else sets cmderr
//   0x38 sbcs        32-bit system bus access, autoincrement, readonaddr,
//                    readondata, sbbusy, sbbusyerror, sberror (bus err = 2)
//   0x39 sbaddress0
//   0x3C sbdata0     write: bus write; read: data of the last bus read
// The CPU side is a halt request level (debug_req_o), a one-cycle resume
// pulse, a reset request and the dpc write; the CPU reports halted. While
// dmactive is 0 everything is held in reset. A DMI request is answered in
// the next cycle. The document names the debug module and its role (halt,
// fill SRAM over the peripheral bus, resume); the register subset is this
// design's choice, taken from the debug specification.
module debug_module
  import sysctrl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DMI
  input  logic        dmi_req_i,
  input  logic [6:0]  dmi_addr_i,
  input  logic [31:0] dmi_wdata_i,
  input  logic [1:0]  dmi_op_i,       // 1 read, 2 write
  output logic        dmi_rsp_o,
  output logic [31:0] dmi_rdata_o,
  // CPU
  output logic        debug_req_o,
  output logic        resume_req_o,
  output logic        ndmreset_o,
  output logic        dpc_we_o,
  output logic [31:0] dpc_o,
  input  logic        cpu_halted_i,
  // system bus
  output bus_req_t    mst_req_o,
  input  bus_rsp_t    mst_rsp_i
);
  logic        dmactive_q, haltreq_q, ndmreset_q, resumeack_q, resume_pend_q;
  logic [31:0] data0_q, sbaddr_q, sbdata_q;
  logic [2:0]  cmderr_q, sberror_q;
  logic        sbbusy_q, sbbusyerr_q, sbautoinc_q, sbreadonaddr_q, sbreadondata_q;
  logic        sbwe_q;

  logic wr, rd;
  assign wr = dmi_req_i && dmi_op_i == 2'd2;
  assign rd = dmi_req_i && dmi_op_i == 2'd1;

  assign debug_req_o = dmactive_q && haltreq_q;
  assign ndmreset_o  = dmactive_q && ndmreset_q;
  assign dpc_o       = data0_q;

  logic [31:0] dmstatus, abstractcs, sbcs;
  assign dmstatus   = {14'd0, resumeack_q, resumeack_q, 4'd0,
                       !cpu_halted_i, !cpu_halted_i, cpu_halted_i, cpu_halted_i,
                       1'b1, 3'd0, 4'd2};
  assign abstractcs = {19'd0, 1'b0, 1'b0, cmderr_q, 4'd0, 4'd1};
  assign sbcs       = {3'd1, 6'd0, sbbusyerr_q, sbbusy_q, sbreadonaddr_q, 3'd2,
                       sbautoinc_q, sbreadondata_q, sberror_q, 7'd32, 5'b00100};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dmactive_q <= 1'b0;  haltreq_q <= 1'b0;   ndmreset_q <= 1'b0;
      resumeack_q <= 1'b0; resume_pend_q <= 1'b0; resume_req_o <= 1'b0;
      data0_q <= '0; sbaddr_q <= '0; sbdata_q <= '0;
      cmderr_q <= '0; sberror_q <= '0; sbbusy_q <= 1'b0; sbbusyerr_q <= 1'b0;
      sbautoinc_q <= 1'b0; sbreadonaddr_q <= 1'b0; sbreadondata_q <= 1'b0;
      sbwe_q <= 1'b0; dpc_we_o <= 1'b0;
      dmi_rsp_o <= 1'b0; dmi_rdata_o <= '0;
    end else begin
      dmi_rsp_o    <= dmi_req_i;
      resume_req_o <= 1'b0;
      dpc_we_o     <= 1'b0;

      if (rd) begin
        unique case (dmi_addr_i)
          7'h04:   dmi_rdata_o <= data0_q;
          7'h10:   dmi_rdata_o <= {haltreq_q, 29'd0, ndmreset_q, dmactive_q};
          7'h11:   dmi_rdata_o <= dmstatus;
          7'h16:   dmi_rdata_o <= abstractcs;
          7'h38:   dmi_rdata_o <= sbcs;
          7'h39:   dmi_rdata_o <= sbaddr_q;
          7'h3C:   dmi_rdata_o <= sbdata_q;
          default: dmi_rdata_o <= '0;
        endcase
      end

      // resume handshake
      if (resume_pend_q && !cpu_halted_i) begin
        resume_pend_q <= 1'b0;
        resumeack_q   <= 1'b1;
      end

      // system bus transfer completion
      if (sbbusy_q && mst_rsp_i.ready) begin
        sbbusy_q <= 1'b0;
        if (mst_rsp_i.err) sberror_q <= 3'd2;
        else if (!sbwe_q)  sbdata_q  <= mst_rsp_i.rdata;
        if (sbautoinc_q && !mst_rsp_i.err) sbaddr_q <= sbaddr_q + 32'd4;
      end

      if (wr && dmi_addr_i == 7'h10) begin
        dmactive_q <= dmi_wdata_i[0];
        ndmreset_q <= dmi_wdata_i[1];
        haltreq_q  <= dmi_wdata_i[31];
        if (dmi_wdata_i[30] && !dmi_wdata_i[31] && cpu_halted_i) begin
          resume_req_o  <= 1'b1;
          resume_pend_q <= 1'b1;
          resumeack_q   <= 1'b0;
        end
      end else if (dmactive_q && wr) begin
        unique case (dmi_addr_i)
          7'h04: data0_q <= dmi_wdata_i;
          7'h16: cmderr_q <= cmderr_q & ~dmi_wdata_i[10:8];
          7'h17: begin
            if (cmderr_q != 0) ;                               // ignored until cleared
            else if (!cpu_halted_i) cmderr_q <= 3'd4;          // halt/resume error
            else if (dmi_wdata_i[31:24] == 8'd0 && dmi_wdata_i[22:20] == 3'd2 &&
                     dmi_wdata_i[17] && dmi_wdata_i[16] && dmi_wdata_i[15:0] == 16'h07B1)
              dpc_we_o <= 1'b1;
            else cmderr_q <= 3'd2;                             // not supported
          end
          7'h38: begin
            sbbusyerr_q    <= sbbusyerr_q & ~dmi_wdata_i[22];
            sbreadonaddr_q <= dmi_wdata_i[20];
            sbautoinc_q    <= dmi_wdata_i[16];
            sbreadondata_q <= dmi_wdata_i[15];
            sberror_q      <= sberror_q & ~dmi_wdata_i[14:12];
          end
          7'h39: begin
            if (sbbusy_q) sbbusyerr_q <= 1'b1;
            else begin
              sbaddr_q <= dmi_wdata_i;
              if (sbreadonaddr_q && sberror_q == 0 && !sbbusyerr_q) begin
                sbbusy_q <= 1'b1; sbwe_q <= 1'b0;
              end
            end
          end
          7'h3C: begin
            if (sbbusy_q) sbbusyerr_q <= 1'b1;
            else begin
              sbdata_q <= dmi_wdata_i;
              if (sberror_q == 0 && !sbbusyerr_q) begin
                sbbusy_q <= 1'b1; sbwe_q <= 1'b1;
              end
            end
          end
          default: ;
        endcase
      end
      if (dmactive_q && rd && dmi_addr_i == 7'h3C) begin
        if (sbbusy_q) sbbusyerr_q <= 1'b1;
        else if (sbreadondata_q && sberror_q == 0 && !sbbusyerr_q) begin
          sbbusy_q <= 1'b1; sbwe_q <= 1'b0;
        end
      end

      if (!dmactive_q && !(wr && dmi_addr_i == 7'h10)) begin
        haltreq_q <= 1'b0; ndmreset_q <= 1'b0; cmderr_q <= '0; sberror_q <= '0;
        sbbusyerr_q <= 1'b0; sbautoinc_q <= 1'b0; sbreadonaddr_q <= 1'b0;
        sbreadondata_q <= 1'b0; data0_q <= '0;
      end
    end
  end

  always_comb begin
    mst_req_o       = '0;
    mst_req_o.req   = sbbusy_q;
    mst_req_o.we    = sbwe_q;
    mst_req_o.addr  = {sbaddr_q[31:2], 2'b00};
    mst_req_o.wdata = sbdata_q;
    mst_req_o.be    = 4'hF;
  end
endmodule
