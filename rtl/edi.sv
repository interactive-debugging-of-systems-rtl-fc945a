// edi: event distribution interconnect.
//
// Every monitor drives a debug event, a level held in a flip-flop of its own
// clock domain until the monitor is reprogrammed. The EDI combines the events
// of all sources and delivers the combined event to every destination clock
// domain through a two-flip-flop synchronizer, so that all PSIs stop their
// ports within a few cycles of their own clocks. It also synchronizes each
// source's event into the debug clock (tck) for the debugger to read which
// monitor fired. Broadcasting events to all PSIs as fast as possible follows
// the CSAR approach; the OR-then-synchronize structure is this design's choice.
// Events only rise between reprogrammings, so the OR of source flip-flops
// cannot produce a false pulse that a destination would keep.
//
// A second channel, built the same way, carries the arm events that
// monitors use for conditions spanning several monitors (see monitor.sv);
// it reaches the monitors only and stops no port.
//
// Timing: a source event reaches a destination 2-3 of its clock edges later.
module edi #(
  parameter int unsigned N_SRC = 8,
  parameter int unsigned N_DST = 5
) (
  input  logic [N_SRC-1:0] evt_src,
  input  logic [N_DST-1:0] dst_clk,
  input  logic [N_DST-1:0] dst_rst_n,
  output logic [N_DST-1:0] evt_dst,
  input  logic [N_SRC-1:0] arm_src,
  output logic [N_DST-1:0] arm_dst,
  input  logic             tck,
  input  logic             trst_n,
  output logic [N_SRC-1:0] evt_tck
);
  logic any_evt, any_arm;
  assign any_evt = |evt_src;
  assign any_arm = |arm_src;

  for (genvar d = 0; d < N_DST; d++) begin : g_dst
    sync2 u_sync (.clk(dst_clk[d]), .rst_n(dst_rst_n[d]), .d(any_evt), .q(evt_dst[d]));
    sync2 u_arm  (.clk(dst_clk[d]), .rst_n(dst_rst_n[d]), .d(any_arm), .q(arm_dst[d]));
  end
  for (genvar s = 0; s < N_SRC; s++) begin : g_src
    sync2 u_sync (.clk(tck), .rst_n(trst_n), .d(evt_src[s]), .q(evt_tck[s]));
  end
endmodule
