// tcm: tightly coupled memory of a processor tile (used for both the
// instruction memory TCIM and the data memory TCDM).
//
// The processor port (c_*) is a request/response pair of valid/accept
// channels. Requests whose address lies in the local region
// (addr[15:14] == 2'b00) are served from a DEPTH-word single-port array with
// a one-cycle latency; all other requests are passed on unchanged to the
// remote port (r_*), which leads through the PSI and the clock domain
// crossing to the network, and its response is handed back. One transaction
// is in flight at a time, which keeps responses in request order. The
// CSAR example names the two memories and places them between the processor and
// its network ports; the address split, the size and the one-outstanding
// policy are this design's choices.
//
// Timing: a local access answers on the cycle after the request handshake.
module tcm
  import csar_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic c_req_valid,
  output logic c_req_accept,
  input  req_t c_req,
  output logic c_rsp_valid,
  input  logic c_rsp_accept,
  output rsp_t c_rsp,
  output logic r_req_valid,
  input  logic r_req_accept,
  output req_t r_req,
  input  logic r_rsp_valid,
  output logic r_rsp_accept,
  input  rsp_t r_rsp
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [1:0] {IDLE, LOCAL_RSP, REMOTE_REQ, REMOTE_RSP} state_e;

  state_e            state;
  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] rdata_q;
  req_t              req_q;
  logic              local_hit;

  assign local_hit = (c_req.addr[ADDR_W-1 -: 2] == REG_LOCAL);

  always_comb begin
    c_req_accept = (state == IDLE);
    r_req_valid  = (state == REMOTE_REQ);
    r_req        = req_q;
    c_rsp_valid  = (state == LOCAL_RSP) || (state == REMOTE_RSP && r_rsp_valid);
    c_rsp        = (state == LOCAL_RSP) ? rsp_t'(rdata_q) : r_rsp;
    r_rsp_accept = (state == REMOTE_RSP) && c_rsp_accept;
  end

  always_ff @(posedge clk) begin
    if (state == IDLE && c_req_valid && local_hit) begin
      if (c_req.we) mem[c_req.addr[AW-1:0]] <= c_req.wdata;
      rdata_q <= mem[c_req.addr[AW-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      req_q <= '0;
    end else begin
      unique case (state)
        IDLE: if (c_req_valid) begin
          if (local_hit) state <= LOCAL_RSP;
          else begin
            req_q <= c_req;
            state <= REMOTE_REQ;
          end
        end
        LOCAL_RSP:  if (c_rsp_accept) state <= IDLE;
        REMOTE_REQ: if (r_req_accept) state <= REMOTE_RSP;
        REMOTE_RSP: if (r_rsp_valid && c_rsp_accept) state <= IDLE;
        default:    state <= IDLE;
      endcase
    end
  end
endmodule
