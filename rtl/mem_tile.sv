// mem_tile: a memory tile (CMEM or DMEM).
//
// Requests arrive from the network (n_*, noc_clk), cross into the memory
// tile's clock through a clock domain crossing, pass a PSI that can stop or
// step them, and reach a shared_mem array; responses go back the same way. A
// monitor on the network side of the PSI counts handshakes and can raise a
// debug event, on which its PSI stops at once; the PSI also stops on the
// global event from the event network (evt_global, synchronized to clk).
// This follows the memory tiles of the CSAR example system; the second
// crossing its floor plan draws per memory tile, whose use the text does not
// give, is not built.
module mem_tile
  import csar_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        noc_clk,
  input  logic        rst_n,
  input  logic        n_req_valid,
  output logic        n_req_accept,
  input  req_t        n_req,
  output logic        n_rsp_valid,
  input  logic        n_rsp_accept,
  output rsp_t        n_rsp,
  input  mon_cfg_t    mon_cfg,
  input  logic        mon_tgl,
  input  psi_cfg_t    psi_cfg,
  input  logic        psi_tgl,
  input  logic        evt_global,
  input  logic        arm_global,
  output logic [15:0] mon_count,
  output logic        mon_evt,
  output logic        mon_arm,
  output logic        psi_stopped,
  output logic        psi_blocked,
  output logic [15:0] psi_steps
);
  logic c_req_valid, c_req_accept, c_rsp_valid, c_rsp_accept;
  req_t c_req;
  rsp_t c_rsp;
  logic m_req_valid, m_req_accept, m_rsp_valid, m_rsp_accept;
  req_t m_req;
  rsp_t m_rsp;
  logic mon_load, psi_load;

  cdc_port u_cdc (
    .i_clk(noc_clk), .i_rst_n(rst_n), .t_clk(clk), .t_rst_n(rst_n),
    .i_req_valid(n_req_valid), .i_req_accept(n_req_accept), .i_req(n_req),
    .i_rsp_valid(n_rsp_valid), .i_rsp_accept(n_rsp_accept), .i_rsp(n_rsp),
    .t_req_valid(c_req_valid), .t_req_accept(c_req_accept), .t_req(c_req),
    .t_rsp_valid(c_rsp_valid), .t_rsp_accept(c_rsp_accept), .t_rsp(c_rsp)
  );

  pulse_sync u_mon_sync (.dst_clk(clk), .dst_rst_n(rst_n), .src_tgl(mon_tgl), .dst_pulse(mon_load));
  pulse_sync u_psi_sync (.dst_clk(clk), .dst_rst_n(rst_n), .src_tgl(psi_tgl), .dst_pulse(psi_load));

  monitor u_mon (
    .clk, .rst_n,
    .req_valid(c_req_valid), .req_accept(c_req_accept),
    .rsp_valid(c_rsp_valid), .rsp_accept(c_rsp_accept),
    .cfg_load(mon_load), .cfg(mon_cfg), .arm_in(arm_global),
    .count(mon_count), .evt(mon_evt), .arm(mon_arm)
  );

  psi u_psi (
    .clk, .rst_n, .cfg_load(psi_load), .cfg(psi_cfg),
    .evt_local(mon_evt), .evt_global,
    .i_req_valid(c_req_valid), .i_req_accept(c_req_accept), .i_req(c_req),
    .i_rsp_valid(c_rsp_valid), .i_rsp_accept(c_rsp_accept), .i_rsp(c_rsp),
    .t_req_valid(m_req_valid), .t_req_accept(m_req_accept), .t_req(m_req),
    .t_rsp_valid(m_rsp_valid), .t_rsp_accept(m_rsp_accept), .t_rsp(m_rsp),
    .stopped(psi_stopped), .blocked(psi_blocked), .steps_left(psi_steps)
  );

  shared_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_accept(m_req_accept), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_accept(m_rsp_accept), .rsp(m_rsp)
  );
endmodule
