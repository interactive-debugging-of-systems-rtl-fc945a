// noc: the on-chip interconnect between the processor tiles' network ports
// (NI initiators) and the memory tiles (NT = 2 targets), in the network
// clock domain.
//
// The CSAR example connects its tiles through a network on chip taken from
// earlier work and not described there; this is the simplest interconnect
// that gives the same function and the property the debug method is about:
// a shared target behind an arbiter, where the order in which near-
// simultaneous requests from different clock domains are served can differ
// from run to run. Each target has a round-robin arbiter. A target serves one
// transaction at a time: the arbiter picks an initiator, forwards its request,
// remembers it as owner and routes the target's response back to it; the
// next request is granted once that response has been accepted. Target
// select: addr[15] = 0 -> target 0 (CMEM), 1 -> target 1 (DMEM). Each
// initiator may have only one transaction in flight (the tiles guarantee
// this), so two targets never answer the same initiator at once.
//
// Timing: request and response paths are combinational (no added cycles);
// the arbiter state changes only on handshakes, so a grant stays stable while
// its request waits to be accepted.
module noc
  import csar_pkg::*;
#(
  parameter int unsigned NI = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  // initiator ports (from the tiles' clock domain crossings)
  input  logic [NI-1:0]  i_req_valid,
  output logic [NI-1:0]  i_req_accept,
  input  req_t [NI-1:0]  i_req,
  output logic [NI-1:0]  i_rsp_valid,
  input  logic [NI-1:0]  i_rsp_accept,
  output rsp_t [NI-1:0]  i_rsp,
  // target ports (towards the memory tiles)
  output logic [1:0]     t_req_valid,
  input  logic [1:0]     t_req_accept,
  output req_t [1:0]     t_req,
  input  logic [1:0]     t_rsp_valid,
  output logic [1:0]     t_rsp_accept,
  input  rsp_t [1:0]     t_rsp,
  // arbitration conflicts: more than one initiator waits for a free target
  output logic [1:0]     contention
);
  localparam int unsigned IW = (NI > 1) ? $clog2(NI) : 1;

  logic [1:0]         busy;
  logic [1:0][IW-1:0] owner, last;
  logic [1:0][IW-1:0] gnt;
  logic [1:0]         gnt_ok;
  logic [1:0][NI-1:0] want;

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i < NI; i++)
        want[t][i] = i_req_valid[i] && (int'(i_req[i].addr[ADDR_W-1]) == t);
      // round robin: first requester after the last one served
      gnt[t]    = '0;
      gnt_ok[t] = 1'b0;
      for (int k = NI; k >= 1; k--) begin
        int unsigned idx;
        idx = (int'(last[t]) + k) % NI;
        if (want[t][idx]) begin
          gnt[t]    = IW'(idx);
          gnt_ok[t] = 1'b1;
        end
      end
      contention[t] = !busy[t] && ($countones(want[t]) > 1);
      t_req_valid[t] = gnt_ok[t] && !busy[t];
      t_req[t]       = i_req[gnt[t]];
      t_rsp_accept[t] = busy[t] && i_rsp_accept[owner[t]];
    end
    for (int i = 0; i < NI; i++) begin
      i_req_accept[i] = 1'b0;
      i_rsp_valid[i]  = 1'b0;
      i_rsp[i]        = '0;
      for (int t = 0; t < 2; t++) begin
        if (t_req_valid[t] && int'(gnt[t]) == i) i_req_accept[i] = t_req_accept[t];
        if (busy[t] && int'(owner[t]) == i) begin
          i_rsp_valid[i] = t_rsp_valid[t];
          i_rsp[i]       = t_rsp[t];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= '0;
      owner <= '0;
      last  <= '0;
    end else begin
      for (int t = 0; t < 2; t++) begin
        if (t_req_valid[t] && t_req_accept[t]) begin
          busy[t]  <= 1'b1;
          owner[t] <= gnt[t];
          last[t]  <= gnt[t];
        end else if (busy[t] && t_rsp_valid[t] && t_rsp_accept[t]) begin
          busy[t] <= 1'b0;
        end
      end
    end
  end
endmodule
