// psi: protocol-specific instrument on one valid/accept port.
//
// The PSI sits in the port between an initiator (i_*) and a target (t_*) and
// can inhibit communication by masking valid towards the receiver and accept
// towards the sender of each channel. A handshake is a single cycle with
// valid & accept, so masking both sides at once never splits a transfer: a
// word is either on the sender's side or on the receiver's side. Blocking the
// handshakes leaves an IP that waits for them with a stable state, which can
// then be read out on any clock.
//
// It stops when the debugger sets mode STOP, when a debug event arrives and
// event_en is set (the local monitor's event, same clock, and the
// distributed event from the event network, already synchronized to clk),
// and in mode STEP after step_n further request handshakes, which is how the
// debugger lets chosen ports go ahead of others and so forces one order of
// transactions at an arbiter (guided replay). In STEP mode the response
// channel stays open so stepped transactions can complete. Inhibiting the
// local interface on an event and guiding the order of handshakes follow the
// CSAR approach; the modes, the step counter and the configuration word
// (csar_pkg::psi_cfg_t, loaded on cfg_load) are this design's choices.
//
// Timing: purely combinational gating from registered state, no added latency.
// The request and response data words pass through unchanged: only the
// valid and accept signals are gated, so the data outputs are plain wires.
module psi
  import csar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_load,
  input  psi_cfg_t    cfg,
  input  logic        evt_local,
  input  logic        evt_global,
  // initiator side
  input  logic        i_req_valid,
  output logic        i_req_accept,
  input  req_t        i_req,
  output logic        i_rsp_valid,
  input  logic        i_rsp_accept,
  output rsp_t        i_rsp,
  // target side
  output logic        t_req_valid,
  input  logic        t_req_accept,
  output req_t        t_req,
  input  logic        t_rsp_valid,
  output logic        t_rsp_accept,
  input  rsp_t        t_rsp,
  // status
  output logic        stopped,
  output logic        blocked,   // a request is waiting at the closed port
  output logic [15:0] steps_left
);
  psi_cfg_t cfg_q;
  logic     req_open, rsp_open, evt_stop;

  always_comb begin
    evt_stop = cfg_q.event_en && (evt_local || evt_global);
    req_open = !evt_stop && (cfg_q.mode == PSI_RUN || (cfg_q.mode == PSI_STEP && steps_left != '0));
    rsp_open = !evt_stop && (cfg_q.mode == PSI_RUN || cfg_q.mode == PSI_STEP);
    stopped  = !req_open;
    blocked  = i_req_valid && !req_open;

    t_req_valid  = i_req_valid  && req_open;
    i_req_accept = t_req_accept && req_open;
    t_req        = i_req;
    i_rsp_valid  = t_rsp_valid  && rsp_open;
    t_rsp_accept = i_rsp_accept && rsp_open;
    i_rsp        = t_rsp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q      <= '{event_en: 1'b0, mode: PSI_RUN, step_n: '0};
      steps_left <= '0;
    end else if (cfg_load) begin
      cfg_q      <= cfg;
      steps_left <= cfg.step_n;
    end else if (cfg_q.mode == PSI_STEP && t_req_valid && t_req_accept) begin
      steps_left <= steps_left - 1'b1;
    end
  end

  // no transfer passes a closed port
  a_closed: assert property (@(posedge clk) disable iff (!rst_n) !req_open |-> !(t_req_valid && t_req_accept));
endmodule
