// proc_tile: a processor tile without its processor core.
//
// The core is not part of this RTL: its instruction port (ci_*) and data
// port (cd_*) are brought out. Each port runs through a tightly coupled
// memory (TCIM for instructions, TCDM for data), which serves local
// addresses itself and passes the rest on; then through a PSI, which can
// stop or step the port; then through a clock domain crossing into the
// network clock (n*_*, two network ports, 0 = instruction, 1 = data). A
// monitor on the core side of each PSI counts that port's handshakes and may
// raise a debug event; its PSI stops on that event in the same clock, and on
// the event network's global event (evt_global, already synchronized to
// clk). The arrangement of memories, monitors, PSIs and crossings follows
// the CSAR example system; the third crossing its floor plan
// draws per processor tile, whose use the text does not give, is not built.
//
// Clocks: clk is the tile clock; noc_clk the network clock. Configuration
// words come from the tck domain with toggle flags (see dbg_regs).
module proc_tile
  import csar_pkg::*;
#(
  parameter int unsigned TCM_DEPTH = 1024
) (
  input  logic clk,
  input  logic noc_clk,
  input  logic rst_n,
  // core instruction port
  input  logic ci_req_valid,
  output logic ci_req_accept,
  input  req_t ci_req,
  output logic ci_rsp_valid,
  input  logic ci_rsp_accept,
  output rsp_t ci_rsp,
  // core data port
  input  logic cd_req_valid,
  output logic cd_req_accept,
  input  req_t cd_req,
  output logic cd_rsp_valid,
  input  logic cd_rsp_accept,
  output rsp_t cd_rsp,
  // network ports (noc_clk)
  output logic [1:0] n_req_valid,
  input  logic [1:0] n_req_accept,
  output req_t [1:0] n_req,
  input  logic [1:0] n_rsp_valid,
  output logic [1:0] n_rsp_accept,
  input  rsp_t [1:0] n_rsp,
  // debug
  input  mon_cfg_t [1:0]       mon_cfg,
  input  logic     [1:0]       mon_tgl,
  input  psi_cfg_t [1:0]       psi_cfg,
  input  logic     [1:0]       psi_tgl,
  input  logic                 evt_global,
  input  logic                 arm_global,
  output logic     [1:0][15:0] mon_count,
  output logic     [1:0]       mon_evt,
  output logic     [1:0]       mon_arm,
  output logic     [1:0]       psi_stopped,
  output logic     [1:0]       psi_blocked,
  output logic     [1:0][15:0] psi_steps
);
  // per port: core side, tcm->psi, psi->cdc
  logic [1:0] c_req_valid, c_req_accept, c_rsp_valid, c_rsp_accept;
  req_t [1:0] c_req;
  rsp_t [1:0] c_rsp;
  logic [1:0] m_req_valid, m_req_accept, m_rsp_valid, m_rsp_accept;
  req_t [1:0] m_req;
  rsp_t [1:0] m_rsp;
  logic [1:0] p_req_valid, p_req_accept, p_rsp_valid, p_rsp_accept;
  req_t [1:0] p_req;
  rsp_t [1:0] p_rsp;

  assign c_req_valid = {cd_req_valid, ci_req_valid};
  assign c_req       = {cd_req, ci_req};
  assign c_rsp_accept = {cd_rsp_accept, ci_rsp_accept};
  assign {cd_req_accept, ci_req_accept} = c_req_accept;
  assign {cd_rsp_valid, ci_rsp_valid}   = c_rsp_valid;
  assign cd_rsp = c_rsp[1];
  assign ci_rsp = c_rsp[0];

  for (genvar p = 0; p < 2; p++) begin : g_port
    logic mon_load, psi_load;

    tcm #(.DEPTH(TCM_DEPTH)) u_tcm (
      .clk, .rst_n,
      .c_req_valid(c_req_valid[p]), .c_req_accept(c_req_accept[p]), .c_req(c_req[p]),
      .c_rsp_valid(c_rsp_valid[p]), .c_rsp_accept(c_rsp_accept[p]), .c_rsp(c_rsp[p]),
      .r_req_valid(m_req_valid[p]), .r_req_accept(m_req_accept[p]), .r_req(m_req[p]),
      .r_rsp_valid(m_rsp_valid[p]), .r_rsp_accept(m_rsp_accept[p]), .r_rsp(m_rsp[p])
    );

    pulse_sync u_mon_sync (.dst_clk(clk), .dst_rst_n(rst_n), .src_tgl(mon_tgl[p]), .dst_pulse(mon_load));
    pulse_sync u_psi_sync (.dst_clk(clk), .dst_rst_n(rst_n), .src_tgl(psi_tgl[p]), .dst_pulse(psi_load));

    monitor u_mon (
      .clk, .rst_n,
      .req_valid(m_req_valid[p]), .req_accept(m_req_accept[p]),
      .rsp_valid(m_rsp_valid[p]), .rsp_accept(m_rsp_accept[p]),
      .cfg_load(mon_load), .cfg(mon_cfg[p]), .arm_in(arm_global),
      .count(mon_count[p]), .evt(mon_evt[p]), .arm(mon_arm[p])
    );

    psi u_psi (
      .clk, .rst_n, .cfg_load(psi_load), .cfg(psi_cfg[p]),
      .evt_local(mon_evt[p]), .evt_global,
      .i_req_valid(m_req_valid[p]), .i_req_accept(m_req_accept[p]), .i_req(m_req[p]),
      .i_rsp_valid(m_rsp_valid[p]), .i_rsp_accept(m_rsp_accept[p]), .i_rsp(m_rsp[p]),
      .t_req_valid(p_req_valid[p]), .t_req_accept(p_req_accept[p]), .t_req(p_req[p]),
      .t_rsp_valid(p_rsp_valid[p]), .t_rsp_accept(p_rsp_accept[p]), .t_rsp(p_rsp[p]),
      .stopped(psi_stopped[p]), .blocked(psi_blocked[p]), .steps_left(psi_steps[p])
    );

    cdc_port u_cdc (
      .i_clk(clk), .i_rst_n(rst_n), .t_clk(noc_clk), .t_rst_n(rst_n),
      .i_req_valid(p_req_valid[p]), .i_req_accept(p_req_accept[p]), .i_req(p_req[p]),
      .i_rsp_valid(p_rsp_valid[p]), .i_rsp_accept(p_rsp_accept[p]), .i_rsp(p_rsp[p]),
      .t_req_valid(n_req_valid[p]), .t_req_accept(n_req_accept[p]), .t_req(n_req[p]),
      .t_rsp_valid(n_rsp_valid[p]), .t_rsp_accept(n_rsp_accept[p]), .t_rsp(n_rsp[p])
    );
  end
endmodule
