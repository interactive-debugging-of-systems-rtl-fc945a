// pulse_sync: carries an update request across clock domains. The sender
// toggles src_tgl once per update (after its data is stable); the receiver
// synchronizes the toggle level with two flip-flops and emits a one-cycle
// pulse in dst_clk for every change. The sender's data, held stable from
// before the toggle, may then be sampled directly in dst_clk. Updates must be
// spaced at least three dst_clk cycles apart. This transfer of debug
// configuration into the instruments' clocks is this design's choice.
module pulse_sync (
  input  logic dst_clk,
  input  logic dst_rst_n,
  input  logic src_tgl,
  output logic dst_pulse
);
  logic tgl_s, tgl_q;
  sync2 u_sync (.clk(dst_clk), .rst_n(dst_rst_n), .d(src_tgl), .q(tgl_s));
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) tgl_q <= 1'b0;
    else            tgl_q <= tgl_s;
  end
  assign dst_pulse = tgl_s ^ tgl_q;
endmodule
