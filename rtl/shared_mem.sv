// shared_mem: the memory of a memory tile (code memory CMEM or data memory
// DMEM), shared by all processor tiles through the network.
//
// A DEPTH-word single-port array behind a request/response pair of
// valid/accept channels. A request is accepted when no response is waiting;
// a write stores wdata, and every request, read or write, gets one response
// carrying the word's old contents on the next cycle. The CSAR example names the
// two memories; their size and port behaviour are this design's choices.
module shared_mem
  import csar_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  output logic req_accept,
  input  req_t req,
  output logic rsp_valid,
  input  logic rsp_accept,
  output rsp_t rsp
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] rdata_q;

  assign req_accept = !rsp_valid;
  assign rsp        = rsp_t'(rdata_q);

  always_ff @(posedge clk) begin
    if (req_valid && req_accept) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      rdata_q <= mem[req.addr[AW-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        rsp_valid <= 1'b0;
    else if (req_valid && req_accept)  rsp_valid <= 1'b1;
    else if (rsp_accept)               rsp_valid <= 1'b0;
  end
endmodule
