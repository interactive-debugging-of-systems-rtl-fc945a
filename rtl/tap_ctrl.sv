// tap_ctrl: IEEE 1149.1 test access port controller.
//
// The standard 16-state TAP state machine, clocked by tck and advanced by
// tms, with a 4-bit instruction register and the BYPASS and IDCODE data
// registers. The instruction DBG selects the debug register chain
// (dbg_regs), which is shifted outside this module: tap_ctrl gives it the
// capture/shift/update strobes and takes its serial output. tdo changes on
// the falling edge of tck, as the standard requires; tdo_en marks the
// Shift-IR and Shift-DR states (there is no tri-state driver here). The use
// of a TAP to reach the debug hardware is the CSAR approach's; the instruction
// codes and the IDCODE value are this design's choices.
module tap_ctrl #(
  parameter logic [31:0] IDCODE = 32'h0C5A_1001
) (
  input  logic tck,
  input  logic trst_n,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  output logic tdo_en,
  // debug data register chain
  output logic dbg_sel,
  output logic capture_dr,
  output logic shift_dr,
  output logic update_dr,
  input  logic dbg_tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_state_e;

  localparam logic [3:0] IR_IDCODE = 4'b0001;
  localparam logic [3:0] IR_DBG    = 4'b1000;
  localparam logic [3:0] IR_BYPASS = 4'b1111;

  tap_state_e state, nxt;
  logic [3:0]  ir, ir_sh;
  logic [31:0] id_sh;
  logic        byp;

  always_comb begin
    unique case (state)
      TLR:    nxt = tms ? TLR    : RTI;
      RTI:    nxt = tms ? SEL_DR : RTI;
      SEL_DR: nxt = tms ? SEL_IR : CAP_DR;
      CAP_DR: nxt = tms ? EX1_DR : SH_DR;
      SH_DR:  nxt = tms ? EX1_DR : SH_DR;
      EX1_DR: nxt = tms ? UPD_DR : PA_DR;
      PA_DR:  nxt = tms ? EX2_DR : PA_DR;
      EX2_DR: nxt = tms ? UPD_DR : SH_DR;
      UPD_DR: nxt = tms ? SEL_DR : RTI;
      SEL_IR: nxt = tms ? TLR    : CAP_IR;
      CAP_IR: nxt = tms ? EX1_IR : SH_IR;
      SH_IR:  nxt = tms ? EX1_IR : SH_IR;
      EX1_IR: nxt = tms ? UPD_IR : PA_IR;
      PA_IR:  nxt = tms ? EX2_IR : PA_IR;
      EX2_IR: nxt = tms ? UPD_IR : SH_IR;
      UPD_IR: nxt = tms ? SEL_DR : RTI;
      default: nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  assign dbg_sel    = (ir == IR_DBG);
  assign capture_dr = (state == CAP_DR);
  assign shift_dr   = (state == SH_DR);
  assign update_dr  = (state == UPD_DR);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir    <= IR_IDCODE;
      ir_sh <= '0;
      id_sh <= '0;
      byp   <= 1'b0;
    end else begin
      unique case (state)
        TLR:    ir    <= IR_IDCODE;
        CAP_IR: ir_sh <= 4'b0001;
        SH_IR:  ir_sh <= {tdi, ir_sh[3:1]};
        UPD_IR: ir    <= ir_sh;
        CAP_DR: begin
          id_sh <= IDCODE;
          byp   <= 1'b0;
        end
        SH_DR: begin
          id_sh <= {tdi, id_sh[31:1]};
          byp   <= tdi;
        end
        default: ;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo_en <= (state == SH_IR) || (state == SH_DR);
      if (state == SH_IR)
        tdo <= ir_sh[0];
      else if (state == SH_DR)
        tdo <= (ir == IR_IDCODE) ? id_sh[0] : (ir == IR_DBG) ? dbg_tdo : byp;
    end
  end
endmodule
