// tb_tcm: self-checking test of the tightly coupled memory. A random core
// issues local and remote reads and writes (one at a time, random response
// back-pressure); a bench-side remote memory answers remote requests after
// a random delay. Checks: local reads return what a reference model holds,
// a local access answers on the first cycle after its request handshake,
// remote requests appear unchanged on the remote port and their responses
// come back to the core, and no request is accepted while one is in flight.
module tb_tcm;
  import csar_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic c_req_valid, c_req_accept, c_rsp_valid, c_rsp_accept;
  logic r_req_valid, r_req_accept, r_rsp_valid, r_rsp_accept;
  req_t c_req, r_req;
  rsp_t c_rsp, r_rsp;

  tcm #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_remote = 0;
  logic [31:0] model [DEPTH];
  logic [31:0] rmodel [int];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // remote side: accept after a random delay, answer after a random delay
  initial begin
    r_req_accept = 0; r_rsp_valid = 0; r_rsp = '0;
    forever begin
      @(negedge clk);
      if (r_req_valid && !r_rsp_valid) begin
        req_t q;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        r_req_accept = 1; q = r_req;
        @(negedge clk); r_req_accept = 0;
        check(q.addr[15:14] != 2'b00, "only remote addresses leave the tile");
        repeat ($urandom_range(0, 4)) @(negedge clk);
        r_rsp = rsp_t'(rmodel.exists(int'(q.addr)) ? rmodel[int'(q.addr)] : 32'hDEAD_0000 | 32'(q.addr));
        if (q.we) rmodel[int'(q.addr)] = q.wdata;
        r_rsp_valid = 1;
        do @(posedge clk); while (!r_rsp_accept);
        @(negedge clk); r_rsp_valid = 0;
      end
    end
  end

  initial begin
    req_t q;
    logic [31:0] exp;
    int lat;
    c_req_valid = 0; c_rsp_accept = 0; c_req = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // the first DEPTH requests clear the local memory
    for (int i = 0; i < DEPTH + 300; i++) begin
      logic loc;
      loc = (i < DEPTH) || ($urandom_range(0, 1) == 0);
      q.addr  = loc ? {2'b00, 14'($urandom_range(0, DEPTH - 1))} : {2'($urandom_range(1, 3)), 14'($urandom_range(0, 7))};
      if (i < DEPTH) q.addr = 16'(i);
      q.we    = (i < DEPTH) ? 1'b1 : 1'($urandom);
      q.wdata = (i < DEPTH) ? 32'h0 : $urandom;
      if (loc) exp = model[q.addr[5:0]];
      else exp = rmodel.exists(int'(q.addr)) ? rmodel[int'(q.addr)] : 32'hDEAD_0000 | 32'(q.addr);
      @(negedge clk); c_req_valid = 1; c_req = q;
      #1 check(c_req_accept, "idle tcm accepts");
      @(negedge clk); c_req_valid = 0;
      lat = 0;
      c_rsp_accept = ($urandom_range(0, 2) != 0);
      #1;
      while (!(c_rsp_valid && c_rsp_accept)) begin
        check(!c_req_accept, "no second request in flight");
        @(negedge clk); lat++; c_rsp_accept = ($urandom_range(0, 2) != 0); #1;
      end
      if (i >= DEPTH) check(c_rsp.rdata == exp, loc ? "local read data" : "remote read data");
      if (!loc) n_remote++;
      if (loc && q.we) model[q.addr[5:0]] = q.wdata;
      @(negedge clk); c_rsp_accept = 0;
    end
    // latency of a local access: response valid in the cycle after the handshake
    @(negedge clk); c_req_valid = 1; c_req = '{addr: 16'd5, we: 1'b0, wdata: 0};
    @(negedge clk); c_req_valid = 0; #1;
    check(c_rsp_valid && c_rsp.rdata == model[5], "one-cycle local latency");
    c_rsp_accept = 1; @(negedge clk); c_rsp_accept = 0;
    check(n_remote > 50, "remote traffic exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
