// cpu_model: behavioural stand-in for one port of a processor core, for
// testbenches only (the cores are not part of the RTL). It runs a fixed
// program on a request/response valid/accept port, one transaction at a
// time, while start is high, and counts its handshakes.
//   ROLE 0 fetch:    loads 16 words into its local memory, then alternates
//                    local fetches and fetches from the code memory (CMEM,
//                    0x4000..0x403F), checking every word.
//   ROLE 1 producer: writes item k as value k+1 into the FIFO slots of the
//                    data memory (DMEM, 0x8000+k); every fourth item also
//                    writes and reads back a local data memory word.
//   ROLE 2 consumer: polls slot k of the FIFO until it holds k+1, for every k.
//   ROLE 3 init:     clears the FIFO slots, writes the code pattern into
//                    CMEM, raises done, then keeps reading CMEM.
// Roles 1 and 2 raise done after NITEMS items. A program ends early when
// start falls; idle is high between programs.
module cpu_model
  import csar_pkg::*;
#(
  parameter int ROLE   = 0,
  parameter int NITEMS = 120
) (
  input  logic clk,
  input  logic start,
  output logic req_valid,
  input  logic req_accept,
  output req_t req,
  input  logic rsp_valid,
  output logic rsp_accept,
  input  rsp_t rsp,
  output int   n_req,       // request handshakes
  output int   n_remote,    // request handshakes to non-local addresses
  output int   errors,
  output int   items,
  output logic done,
  output logic idle
);
  function automatic logic [31:0] code_word(input logic [15:0] a);
    return 32'hC0DE_0000 ^ (32'(a) * 32'h9E37);
  endfunction

  task automatic xact(input logic [15:0] a, input logic we, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    req_valid = 1; req = '{addr: a, we: we, wdata: wd};
    do @(posedge clk); while (!req_accept);
    n_req++;
    if (a[15:14] != 2'b00) n_remote++;
    @(negedge clk); req_valid = 0; rsp_accept = 1;
    while (!rsp_valid) @(negedge clk);
    rd = rsp.rdata;
    @(posedge clk);
    @(negedge clk); rsp_accept = 0;
  endtask

  initial begin
    logic [31:0] rd;
    req_valid = 0; rsp_accept = 0; req = '0;
    n_req = 0; n_remote = 0; errors = 0; items = 0; done = 0; idle = 1;
    forever begin
      wait (start);
      idle = 0; done = 0; items = 0; n_req = 0; n_remote = 0;
      case (ROLE)
        0: begin
          for (int i = 0; i < 16; i++) xact(16'(i), 1, code_word(16'(i)), rd);
          for (int i = 0; start; i++) begin
            xact(16'(i % 16), 0, 0, rd);
            if (rd != code_word(16'(i % 16))) errors++;
            if (start) begin
              xact(16'h4000 + 16'(i % 64), 0, 0, rd);
              if (rd != code_word(16'h4000 + 16'(i % 64))) errors++;
            end
          end
        end
        1: for (int k = 0; k < NITEMS && start; k++) begin
          xact(16'h8000 + 16'(k), 1, 32'(k + 1), rd);
          if (k % 4 == 0) begin
            xact(16'(k % 256), 1, ~32'(k), rd);
            xact(16'(k % 256), 0, 0, rd);
            if (rd != ~32'(k)) errors++;
          end
          items++;
        end
        2: for (int k = 0; k < NITEMS && start; k++) begin
          do begin
            xact(16'h8000 + 16'(k), 0, 0, rd);
            if (rd != 0 && rd != 32'(k + 1)) errors++;
          end while (rd != 32'(k + 1) && start);
          if (rd == 32'(k + 1)) items++;
        end
        default: begin
          for (int k = 0; k < NITEMS; k++) xact(16'h8000 + 16'(k), 1, 0, rd);
          for (int a = 0; a < 64; a++) xact(16'h4000 + 16'(a), 1, code_word(16'h4000 + 16'(a)), rd);
          done = 1;
          for (int i = 0; start; i++) begin
            xact(16'h4000 + 16'(i % 64), 0, 0, rd);
            if (rd != code_word(16'h4000 + 16'(i % 64))) errors++;
          end
        end
      endcase
      if (ROLE == 1 || ROLE == 2) done = (items == NITEMS);
      idle = 1;
      wait (!start);
      done = 0;
    end
  end
endmodule
