// csar_soc: a multiple-clock system on chip with communication-centric,
// scan-based, abstraction-based, run/stop debug hardware.
//
// Three processor tiles (cores outside this RTL; their instruction and data
// ports are the cpu_i_* / cpu_d_* ports, index = tile) reach a code memory
// tile (CMEM) and a data memory tile (DMEM) through an interconnect in the
// network clock. Every tile has its own clock; clock domain crossings sit on
// every link between a tile and the interconnect. Tile 3 (index 2) is meant
// to run synchronous to the network: drive clk_tile[2] with clk_noc.
//
// Debug: eight monitored ports, each with a monitor and a PSI, numbered
//   0/1 tile 1 instruction/data, 2/3 tile 2, 4/5 tile 3, 6 CMEM, 7 DMEM.
// A monitor raises an event on a programmed handshake; its own PSI stops on
// the next handshake and the event network carries the event to every other
// tile's PSIs, which stop a few cycles later in their own clocks. The
// debugger programs and reads all instruments through the IEEE 1149.1 TAP
// (tck, tms, tdi, tdo) and the debug register file (see dbg_regs). Once all
// ports are stopped and the system is quiet, its state is consistent and can
// be read out; PSIs in STEP mode then let chosen ports proceed handshake by
// handshake.
//
// noc_contention shows, per memory tile, cycles where several initiators
// wait for it at once: the arbitrations whose outcome depends on timing.
module csar_soc
  import csar_pkg::*;
#(
  parameter int unsigned TCM_DEPTH = 1024,
  parameter int unsigned MEM_DEPTH = 4096
) (
  input  logic [2:0] clk_tile,
  input  logic       clk_noc,
  input  logic       clk_cmem,
  input  logic       clk_dmem,
  input  logic       rst_n,
  // TAP
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  output logic       tdo_en,
  // processor instruction ports
  input  logic [2:0] cpu_i_req_valid,
  output logic [2:0] cpu_i_req_accept,
  input  req_t [2:0] cpu_i_req,
  output logic [2:0] cpu_i_rsp_valid,
  input  logic [2:0] cpu_i_rsp_accept,
  output rsp_t [2:0] cpu_i_rsp,
  // processor data ports
  input  logic [2:0] cpu_d_req_valid,
  output logic [2:0] cpu_d_req_accept,
  input  req_t [2:0] cpu_d_req,
  output logic [2:0] cpu_d_rsp_valid,
  input  logic [2:0] cpu_d_rsp_accept,
  output rsp_t [2:0] cpu_d_rsp,
  output logic [1:0] noc_contention
);
  localparam int unsigned NI = 6;

  // network side of the tiles
  logic [NI-1:0] n_req_valid, n_req_accept, n_rsp_valid, n_rsp_accept;
  req_t [NI-1:0] n_req;
  rsp_t [NI-1:0] n_rsp;
  logic [1:0]    t_req_valid, t_req_accept, t_rsp_valid, t_rsp_accept;
  req_t [1:0]    t_req;
  rsp_t [1:0]    t_rsp;

  // debug
  mon_cfg_t [N_IF-1:0]       mon_cfg;
  psi_cfg_t [N_IF-1:0]       psi_cfg;
  logic     [N_IF-1:0]       mon_tgl, psi_tgl, mon_evt, mon_arm, psi_stopped, psi_blocked, evt_fired;
  logic     [N_IF-1:0][15:0] mon_count, psi_steps;
  logic     [4:0]            evt_dst, arm_dst, dst_clk;
  logic dbg_sel, capture_dr, shift_dr, update_dr, dbg_tdo;

  for (genvar t = 0; t < 3; t++) begin : g_tile
    proc_tile #(.TCM_DEPTH(TCM_DEPTH)) u_tile (
      .clk(clk_tile[t]), .noc_clk(clk_noc), .rst_n,
      .ci_req_valid(cpu_i_req_valid[t]), .ci_req_accept(cpu_i_req_accept[t]), .ci_req(cpu_i_req[t]),
      .ci_rsp_valid(cpu_i_rsp_valid[t]), .ci_rsp_accept(cpu_i_rsp_accept[t]), .ci_rsp(cpu_i_rsp[t]),
      .cd_req_valid(cpu_d_req_valid[t]), .cd_req_accept(cpu_d_req_accept[t]), .cd_req(cpu_d_req[t]),
      .cd_rsp_valid(cpu_d_rsp_valid[t]), .cd_rsp_accept(cpu_d_rsp_accept[t]), .cd_rsp(cpu_d_rsp[t]),
      .n_req_valid(n_req_valid[2*t +: 2]), .n_req_accept(n_req_accept[2*t +: 2]), .n_req(n_req[2*t +: 2]),
      .n_rsp_valid(n_rsp_valid[2*t +: 2]), .n_rsp_accept(n_rsp_accept[2*t +: 2]), .n_rsp(n_rsp[2*t +: 2]),
      .mon_cfg(mon_cfg[2*t +: 2]), .mon_tgl(mon_tgl[2*t +: 2]),
      .psi_cfg(psi_cfg[2*t +: 2]), .psi_tgl(psi_tgl[2*t +: 2]),
      .evt_global(evt_dst[t]), .arm_global(arm_dst[t]),
      .mon_count(mon_count[2*t +: 2]), .mon_evt(mon_evt[2*t +: 2]), .mon_arm(mon_arm[2*t +: 2]),
      .psi_stopped(psi_stopped[2*t +: 2]), .psi_blocked(psi_blocked[2*t +: 2]),
      .psi_steps(psi_steps[2*t +: 2])
    );
  end

  noc #(.NI(NI)) u_noc (
    .clk(clk_noc), .rst_n,
    .i_req_valid(n_req_valid), .i_req_accept(n_req_accept), .i_req(n_req),
    .i_rsp_valid(n_rsp_valid), .i_rsp_accept(n_rsp_accept), .i_rsp(n_rsp),
    .t_req_valid, .t_req_accept, .t_req,
    .t_rsp_valid, .t_rsp_accept, .t_rsp,
    .contention(noc_contention)
  );

  logic [1:0] mem_clk;
  assign mem_clk = {clk_dmem, clk_cmem};

  for (genvar m = 0; m < 2; m++) begin : g_mem
    mem_tile #(.MEM_DEPTH(MEM_DEPTH)) u_mem (
      .clk(mem_clk[m]), .noc_clk(clk_noc), .rst_n,
      .n_req_valid(t_req_valid[m]), .n_req_accept(t_req_accept[m]), .n_req(t_req[m]),
      .n_rsp_valid(t_rsp_valid[m]), .n_rsp_accept(t_rsp_accept[m]), .n_rsp(t_rsp[m]),
      .mon_cfg(mon_cfg[6+m]), .mon_tgl(mon_tgl[6+m]),
      .psi_cfg(psi_cfg[6+m]), .psi_tgl(psi_tgl[6+m]),
      .evt_global(evt_dst[3+m]), .arm_global(arm_dst[3+m]),
      .mon_count(mon_count[6+m]), .mon_evt(mon_evt[6+m]), .mon_arm(mon_arm[6+m]),
      .psi_stopped(psi_stopped[6+m]), .psi_blocked(psi_blocked[6+m]),
      .psi_steps(psi_steps[6+m])
    );
  end

  assign dst_clk = {clk_dmem, clk_cmem, clk_tile};

  edi #(.N_SRC(N_IF), .N_DST(5)) u_edi (
    .evt_src(mon_evt), .dst_clk, .dst_rst_n({5{rst_n}}), .evt_dst,
    .arm_src(mon_arm), .arm_dst,
    .tck, .trst_n, .evt_tck(evt_fired)
  );

  tap_ctrl u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo, .tdo_en,
    .dbg_sel, .capture_dr, .shift_dr, .update_dr, .dbg_tdo
  );

  dbg_regs #(.N(N_IF)) u_regs (
    .tck, .trst_n, .tdi, .tdo(dbg_tdo), .sel(dbg_sel),
    .capture_dr, .shift_dr, .update_dr,
    .mon_cfg, .mon_tgl, .psi_cfg, .psi_tgl,
    .mon_count, .mon_evt, .mon_arm, .psi_stopped, .psi_blocked, .psi_steps, .evt_fired
  );
endmodule
