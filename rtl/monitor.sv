// monitor: non-intrusive handshake monitor of one port.
//
// The monitor abstracts the clock cycles of a port to handshakes: it counts
// only the cycles in which a transfer takes place (valid & accept) on the
// selected channel, request or response. When enabled, it raises its debug
// event on the handshake whose number equals the programmed breakpoint count,
// in the clock edge of that handshake, and holds the event until it is
// reprogrammed. Counting handshakes and raising an event on a programmed one
// follows the CSAR approach; the counter width, the channel select and the
// configuration word (csar_pkg::mon_cfg_t, loaded on cfg_load) are this
// design's choices.
//
// Timing: count and evt change on the clock edge that ends the handshake
// cycle, so a PSI in the same clock domain blocks the very next handshake.
module monitor
  import csar_pkg::*;
#(
  parameter int unsigned COUNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // observed port (taps only)
  input  logic               req_valid,
  input  logic               req_accept,
  input  logic               rsp_valid,
  input  logic               rsp_accept,
  // configuration
  input  logic               cfg_load,
  input  mon_cfg_t           cfg,
  input  logic               arm_in,
  // results
  output logic [COUNT_W-1:0] count,
  output logic               evt,
  output logic               arm
);
  mon_cfg_t cfg_q;
  logic     hs;

  always_comb hs = (cfg_q.chan_rsp ? (rsp_valid && rsp_accept) : (req_valid && req_accept))
                   && (!cfg_q.arm_wait || arm_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
      count <= '0;
      evt   <= 1'b0;
      arm   <= 1'b0;
    end else if (cfg_load) begin
      cfg_q <= cfg;
      evt   <= 1'b0;
      arm   <= 1'b0;
      if (cfg.clear) count <= '0;
    end else if (hs) begin
      count <= count + 1'b1;
      if (cfg_q.enable && (COUNT_W'(cfg_q.bp_count) == count + 1'b1)) begin
        if (cfg_q.arm_out) arm <= 1'b1;
        else               evt <= 1'b1;
      end
    end
  end
endmodule
