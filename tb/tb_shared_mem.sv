// tb_shared_mem: self-checking test of the memory-tile memory. Writes every
// word, then issues 2000 random reads and writes with random response
// back-pressure. Checks each response against a reference array (old
// contents for a write), that a response is valid on the first cycle after
// its request, and that no request is accepted while a response waits.
module tb_shared_mem;
  import csar_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_accept, rsp_valid, rsp_accept;
  req_t req;
  rsp_t rsp;

  shared_mem #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    logic [31:0] exp;
    req_valid = 0; rsp_accept = 0; req = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH + 2000; i++) begin
      req.addr  = (i < DEPTH) ? 16'(i) : {$urandom_range(0, 1) ? 2'b10 : 2'b01, 14'($urandom_range(0, DEPTH - 1))};
      req.we    = (i < DEPTH) ? 1'b1 : 1'($urandom);
      req.wdata = $urandom;
      exp = model[req.addr[7:0]];
      @(negedge clk); req_valid = 1;
      #1 check(req_accept, "accepts when no response waits");
      @(negedge clk); req_valid = 0; #1;
      check(rsp_valid, "response after one cycle");
      while ($urandom_range(0, 2) == 0) begin
        @(negedge clk); req_valid = 1; #1;
        check(!req_accept && rsp_valid, "holds response, refuses request");
        req_valid = 0;
      end
      rsp_accept = 1;
      if (i >= DEPTH) check(rsp.rdata == exp, "read data");
      @(negedge clk); rsp_accept = 0;
      if (req.we) model[req.addr[7:0]] = req.wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
