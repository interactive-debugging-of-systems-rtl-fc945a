// dbg_regs: debug register file behind the TAP, in the tck domain.
//
// With the DBG instruction selected, the TAP shifts a 39-bit word, LSB
// first: {wr, addr[5:0], data[31:0]}. Update-DR stores addr and, if wr is
// set, writes data to that register. Capture-DR loads {0, addr, read data of
// the last stored addr}, so a read takes one scan to set the address and a
// second to fetch the value.
//
// Register map (addr):
//   0..N_IF-1        monitor i: write mon_cfg_t; read {evt, arm, 14'b0, count}
//   8..8+N_IF-1      PSI i:     write psi_cfg_t; read {stopped, blocked, 14'b0, steps_left}
//   16               read {24'b0, events that have fired, one bit per monitor}
//   32+i / 40+i      read back the stored monitor / PSI configuration
// A write also toggles the register's update flag; pulse_sync in the
// instrument's clock domain turns that into a load strobe, and the
// configuration word stays stable until the next write, so the instrument may
// sample it directly. Status is captured in tck without synchronizers: it is
// meant to be read when the ports are stopped, when the instruments' state no
// longer changes and can be sampled on any clock. Directing the monitors and
// PSIs from debugger software through the TAP follows the CSAR approach; the
// shift format and the register map are this design's choices.
module dbg_regs
  import csar_pkg::*;
#(
  parameter int unsigned N = N_IF
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tdi,
  output logic             tdo,
  input  logic             sel,
  input  logic             capture_dr,
  input  logic             shift_dr,
  input  logic             update_dr,
  // configuration towards the instruments
  output mon_cfg_t [N-1:0] mon_cfg,
  output logic     [N-1:0] mon_tgl,
  output psi_cfg_t [N-1:0] psi_cfg,
  output logic     [N-1:0] psi_tgl,
  // status from the instruments
  input  logic [N-1:0][15:0] mon_count,
  input  logic [N-1:0]       mon_evt,
  input  logic [N-1:0]       mon_arm,
  input  logic [N-1:0]       psi_stopped,
  input  logic [N-1:0]       psi_blocked,
  input  logic [N-1:0][15:0] psi_steps,
  input  logic [N-1:0]       evt_fired
);
  localparam int unsigned DR_W = 1 + 6 + 32;

  logic [DR_W-1:0] dr;
  logic [5:0]      addr_q;
  logic [31:0]     rdata;

  always_comb begin
    rdata = '0;
    if (addr_q < 6'(N))
      rdata = {mon_evt[addr_q[2:0]], mon_arm[addr_q[2:0]], 14'b0, mon_count[addr_q[2:0]]};
    else if (addr_q >= 6'd8 && addr_q < 6'(8 + N))
      rdata = {psi_stopped[addr_q[2:0]], psi_blocked[addr_q[2:0]], 14'b0, psi_steps[addr_q[2:0]]};
    else if (addr_q == 6'd16)
      rdata = 32'(evt_fired);
    else if (addr_q >= 6'd32 && addr_q < 6'(32 + N))
      rdata = 32'(mon_cfg[addr_q[2:0]]);
    else if (addr_q >= 6'd40 && addr_q < 6'(40 + N))
      rdata = 32'(psi_cfg[addr_q[2:0]]);
  end

  assign tdo = dr[0];

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      dr      <= '0;
      addr_q  <= '0;
      mon_cfg <= '0;
      mon_tgl <= '0;
      psi_cfg <= '0;
      psi_tgl <= '0;
    end else if (sel) begin
      if (capture_dr) dr <= {1'b0, addr_q, rdata};
      if (shift_dr)   dr <= {tdi, dr[DR_W-1:1]};
      if (update_dr) begin
        addr_q <= dr[37:32];
        if (dr[38]) begin
          if (dr[37:32] < 6'(N)) begin
            mon_cfg[dr[34:32]] <= mon_cfg_t'(dr[MON_CFG_W-1:0]);
            mon_tgl[dr[34:32]] <= !mon_tgl[dr[34:32]];
          end else if (dr[37:32] >= 6'd8 && dr[37:32] < 6'(8 + N)) begin
            psi_cfg[dr[34:32]] <= psi_cfg_t'(dr[PSI_CFG_W-1:0]);
            psi_tgl[dr[34:32]] <= !psi_tgl[dr[34:32]];
          end
        end
      end
    end
  end
endmodule
