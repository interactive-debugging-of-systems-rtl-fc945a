// cdc_port: the clock domain crossing module of a port. It carries the
// request channel from the initiator clock to the target clock and the
// response channel back, each through a cdc_hs four-phase crossing. The
// CSAR example system places such a module on every link between a tile and the
// network; bundling a request and a response crossing into one module per port
// is this design's choice. Latency and throughput are those of cdc_hs.
module cdc_port
  import csar_pkg::*;
(
  input  logic i_clk,
  input  logic i_rst_n,
  input  logic t_clk,
  input  logic t_rst_n,
  // initiator side (i_clk)
  input  logic i_req_valid,
  output logic i_req_accept,
  input  req_t i_req,
  output logic i_rsp_valid,
  input  logic i_rsp_accept,
  output rsp_t i_rsp,
  // target side (t_clk)
  output logic t_req_valid,
  input  logic t_req_accept,
  output req_t t_req,
  input  logic t_rsp_valid,
  output logic t_rsp_accept,
  input  rsp_t t_rsp
);
  cdc_hs #(.W(REQ_W)) u_req (
    .s_clk(i_clk), .s_rst_n(i_rst_n), .s_valid(i_req_valid), .s_accept(i_req_accept), .s_data(i_req),
    .d_clk(t_clk), .d_rst_n(t_rst_n), .d_valid(t_req_valid), .d_accept(t_req_accept), .d_data(t_req)
  );
  cdc_hs #(.W(RSP_W)) u_rsp (
    .s_clk(t_clk), .s_rst_n(t_rst_n), .s_valid(t_rsp_valid), .s_accept(t_rsp_accept), .s_data(t_rsp),
    .d_clk(i_clk), .d_rst_n(i_rst_n), .d_valid(i_rsp_valid), .d_accept(i_rsp_accept), .d_data(i_rsp)
  );
endmodule
