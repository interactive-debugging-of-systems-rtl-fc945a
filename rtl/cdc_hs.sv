// cdc_hs: one-way clock domain crossing of a valid/accept channel using a
// four-phase handshake between the initiator clock (s_clk) and the target
// clock (d_clk).
//
// The initiator side takes a word when s_valid & s_accept, holds it in a
// register and raises x_valid. The target side synchronizes x_valid, samples
// the held word (it is stable for as long as x_valid is high), presents it on
// d_valid/d_data and raises x_accept. The initiator side synchronizes
// x_accept, drops x_valid, and the target drops x_accept once it sees x_valid
// low; only then does the initiator accept the next word. This is the
// four-phase protocol of the CSAR work (data held stable until the
// target indicates it has sampled it); the two-flip-flop synchronizers and
// the one-word output register on the target side are this design's choices.
//
// Timing: a word appears on d_valid about 3 d_clk edges after it is taken;
// the initiator side is busy for about two round trips through synchronizers.
// Neither side ever drops or duplicates a word.
module cdc_hs #(
  parameter int unsigned W = 8
) (
  input  logic         s_clk,
  input  logic         s_rst_n,
  input  logic         s_valid,
  output logic         s_accept,
  input  logic [W-1:0] s_data,

  input  logic         d_clk,
  input  logic         d_rst_n,
  output logic         d_valid,
  input  logic         d_accept,
  output logic [W-1:0] d_data
);
  // ---- initiator clock domain
  logic         x_valid, x_accept_s, busy;
  logic [W-1:0] hold;

  assign s_accept = !busy;

  always_ff @(posedge s_clk or negedge s_rst_n) begin
    if (!s_rst_n) begin
      busy    <= 1'b0;
      x_valid <= 1'b0;
      hold    <= '0;
    end else if (!busy) begin
      if (s_valid) begin
        hold    <= s_data;
        x_valid <= 1'b1;
        busy    <= 1'b1;
      end
    end else if (x_valid) begin
      if (x_accept_s) x_valid <= 1'b0;      // phase 3
    end else if (!x_accept_s) begin
      busy <= 1'b0;                          // phase 4 seen: ready again
    end
  end

  // ---- target clock domain
  logic x_valid_d, x_accept;

  sync2 u_sync_valid (.clk(d_clk), .rst_n(d_rst_n), .d(x_valid), .q(x_valid_d));
  sync2 u_sync_acc   (.clk(s_clk), .rst_n(s_rst_n), .d(x_accept), .q(x_accept_s));

  always_ff @(posedge d_clk or negedge d_rst_n) begin
    if (!d_rst_n) begin
      x_accept <= 1'b0;
      d_valid  <= 1'b0;
      d_data   <= '0;
    end else begin
      if (d_valid && d_accept) d_valid <= 1'b0;
      if (x_valid_d && !x_accept && !(d_valid && !d_accept)) begin
        d_data   <= hold;                    // sampled while x_valid holds it
        d_valid  <= 1'b1;
        x_accept <= 1'b1;                    // phase 2
      end else if (!x_valid_d) begin
        x_accept <= 1'b0;
      end
    end
  end

  // the initiator must not withdraw a word it offers
  property p_hold;
    @(posedge d_clk) disable iff (!d_rst_n) d_valid && !d_accept |=> d_valid && $stable(d_data);
  endproperty
  assert property (p_hold);
endmodule
