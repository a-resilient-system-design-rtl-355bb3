// JTAG debug transport module: the JTAG interface of the JTAG boot mode.
//
// A standard IEEE 1149.1 TAP (16-state controller, 5-bit instruction
// register) clocked by tck, with the data registers of the RISC-V debug
// transport: IDCODE (0x01), DTMCS (0x10), DMI (0x11) and BYPASS (0x1F and
// any other code). A DMI scan is 41 bits {address[6:0], data[31:0], op[1:0]}
// shifted LSB first; Update-DR with op 1 (read) or 2 (write) starts a debug
// module access, and the next Capture-DR returns its data with op 0, or op 3
// if the access had not finished (sticky until dmireset in DTMCS).
// Clock crossing: the request is held in tck-domain registers and announced
// by a toggle that is synchronised into the clk domain, where it becomes a
// one-cycle dmi_req_o; the response toggles back the same way. tck must be
// slower than clk for the two-flop synchronisers. TDO changes on the
// falling edge of tck. The document names the JTAG interface and the debug
// host reaching the debug module through it; the transport is the one of
// the RISC-V debug specification. IDCODE value is this design's choice.
module jtag_dtm #(
  parameter logic [31:0] IDCODE = 32'h2000_0DB3
) (
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  output logic        tdo_oe,
  // DMI, clk domain
  input  logic        clk,
  input  logic        rst_n,
  output logic        dmi_req_o,
  output logic [6:0]  dmi_addr_o,
  output logic [31:0] dmi_wdata_o,
  output logic [1:0]  dmi_op_o,
  input  logic        dmi_rsp_i,
  input  logic [31:0] dmi_rdata_i
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [4:0] IR_IDCODE = 5'h01, IR_DTMCS = 5'h10, IR_DMI = 5'h11;

  tap_e        tap_q, tap_d;
  logic [4:0]  ir_q, irsh_q;
  logic [40:0] dr_q;
  logic        busy_q;       // a DMI access is in flight (tck view)
  logic        sticky_q;     // dmistat busy error
  logic [40:0] req_q;        // {addr, data, op} of the in-flight access
  logic [31:0] rsp_data_q;
  logic        req_tgl_q, ack_sync1, ack_sync2, ack_seen_q;
  logic        ack_tgl_q;    // clk domain: toggles when a response is back

  always_comb begin
    unique case (tap_q)
      TLR:    tap_d = tms ? TLR    : RTI;
      RTI:    tap_d = tms ? SEL_DR : RTI;
      SEL_DR: tap_d = tms ? SEL_IR : CAP_DR;
      CAP_DR: tap_d = tms ? EX1_DR : SH_DR;
      SH_DR:  tap_d = tms ? EX1_DR : SH_DR;
      EX1_DR: tap_d = tms ? UPD_DR : PA_DR;
      PA_DR:  tap_d = tms ? EX2_DR : PA_DR;
      EX2_DR: tap_d = tms ? UPD_DR : SH_DR;
      UPD_DR: tap_d = tms ? SEL_DR : RTI;
      SEL_IR: tap_d = tms ? TLR    : CAP_IR;
      CAP_IR: tap_d = tms ? EX1_IR : SH_IR;
      SH_IR:  tap_d = tms ? EX1_IR : SH_IR;
      EX1_IR: tap_d = tms ? UPD_IR : PA_IR;
      PA_IR:  tap_d = tms ? EX2_IR : PA_IR;
      EX2_IR: tap_d = tms ? UPD_IR : SH_IR;
      UPD_IR: tap_d = tms ? SEL_DR : RTI;
      default: tap_d = TLR;
    endcase
  end

  logic ack_new;
  assign ack_new = (ack_sync2 != ack_seen_q);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tap_q <= TLR; ir_q <= IR_IDCODE; irsh_q <= '0; dr_q <= '0;
      busy_q <= 1'b0; sticky_q <= 1'b0; req_q <= '0; req_tgl_q <= 1'b0;
      ack_sync1 <= 1'b0; ack_sync2 <= 1'b0; ack_seen_q <= 1'b0;
    end else begin
      tap_q     <= tap_d;
      ack_sync1 <= ack_tgl_q;
      ack_sync2 <= ack_sync1;
      if (ack_new) begin
        ack_seen_q <= ack_sync2;
        busy_q     <= 1'b0;
      end
      unique case (tap_q)
        TLR:    ir_q <= IR_IDCODE;
        CAP_IR: irsh_q <= 5'b00001;
        SH_IR:  irsh_q <= {tdi, irsh_q[4:1]};
        UPD_IR: ir_q <= irsh_q;
        CAP_DR: begin
          unique case (ir_q)
            IR_IDCODE: dr_q <= {9'd0, IDCODE};
            IR_DTMCS:  dr_q <= {9'd0, 14'd0, 3'd0, 3'd1,
                                (sticky_q || (busy_q && !ack_new)) ? 2'd3 : 2'd0,
                                6'd7, 4'd1};
            IR_DMI: begin
              if (busy_q && !ack_new) begin
                sticky_q <= 1'b1;
                dr_q     <= {req_q[40:34], 32'd0, 2'd3};
              end else begin
                dr_q     <= {req_q[40:34], rsp_data_q, sticky_q ? 2'd3 : 2'd0};
              end
            end
            default:   dr_q <= '0;
          endcase
        end
        SH_DR: begin
          unique case (ir_q)
            IR_IDCODE, IR_DTMCS: dr_q <= {9'd0, tdi, dr_q[31:1]};
            IR_DMI:              dr_q <= {tdi, dr_q[40:1]};
            default:             dr_q <= {40'd0, tdi};
          endcase
        end
        UPD_DR: begin
          if (ir_q == IR_DTMCS && dr_q[16]) sticky_q <= 1'b0;   // dmireset
          if (ir_q == IR_DTMCS && dr_q[17]) begin               // dmihardreset
            sticky_q <= 1'b0; busy_q <= 1'b0;
          end
          if (ir_q == IR_DMI && !sticky_q && !(busy_q && !ack_new) &&
              (dr_q[1:0] == 2'd1 || dr_q[1:0] == 2'd2)) begin
            req_q     <= dr_q;
            busy_q    <= 1'b1;
            req_tgl_q <= !req_tgl_q;
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo <= 1'b0; tdo_oe <= 1'b0;
    end else begin
      tdo_oe <= (tap_q == SH_DR) || (tap_q == SH_IR);
      tdo    <= (tap_q == SH_IR) ? irsh_q[0] : dr_q[0];
    end
  end

  // clk domain side
  logic req_sync1, req_sync2, req_seen_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync1 <= 1'b0; req_sync2 <= 1'b0; req_seen_q <= 1'b0;
      ack_tgl_q <= 1'b0; rsp_data_q <= '0; dmi_req_o <= 1'b0;
    end else begin
      req_sync1 <= req_tgl_q;
      req_sync2 <= req_sync1;
      dmi_req_o <= 1'b0;
      if (req_sync2 != req_seen_q) begin
        req_seen_q <= req_sync2;
        dmi_req_o  <= 1'b1;
      end
      if (dmi_rsp_i) begin
        rsp_data_q <= dmi_rdata_i;
        ack_tgl_q  <= !ack_tgl_q;
      end
    end
  end

  assign dmi_addr_o  = req_q[40:34];
  assign dmi_wdata_o = req_q[33:2];
  assign dmi_op_o    = req_q[1:0];
endmodule
