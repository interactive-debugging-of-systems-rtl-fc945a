// tb_noc: self-checking test of the interconnect. Six initiators each issue
// 200 transactions, one at a time, to random targets, with a tag
// (initiator, sequence number) in the write data. The two bench targets echo
// the tag back as read data after a random delay and check that they never
// get a request while a response of theirs is outstanding, and that the
// target select bit matches. Each initiator checks that every response is
// its own, in order. Also checks that arbitration conflicts occurred and
// that round robin served every initiator.
module tb_noc;
  import csar_pkg::*;
  localparam int NI = 6, N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NI-1:0] i_req_valid, i_req_accept, i_rsp_valid, i_rsp_accept;
  req_t [NI-1:0] i_req;
  rsp_t [NI-1:0] i_rsp;
  logic [1:0] t_req_valid, t_req_accept, t_rsp_valid, t_rsp_accept, contention;
  req_t [1:0] t_req;
  rsp_t [1:0] t_rsp;

  noc #(.NI(NI)) dut (.*);

  int checks = 0, failures = 0, n_contention = 0;
  int done [NI];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) if (contention != 0) n_contention++;

  for (genvar i = 0; i < NI; i++) begin : g_ini
    initial begin
      i_req_valid[i] = 0; i_rsp_accept[i] = 0; i_req[i] = '0; done[i] = 0;
      wait (rst_n);
      for (int s = 0; s < N; s++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        i_req[i] = '{addr: {1'($urandom), 15'($urandom)}, we: 1'($urandom), wdata: {8'(i), 24'(s)}};
        i_req_valid[i] = 1;
        do @(posedge clk); while (!i_req_accept[i]);
        @(negedge clk); i_req_valid[i] = 0;
        do begin
          @(negedge clk); i_rsp_accept[i] = 1'($urandom);
          @(posedge clk);
        end while (!(i_rsp_valid[i] && i_rsp_accept[i]));
        check(i_rsp[i].rdata == {8'(i), 24'(s)}, "response reaches its initiator");
        @(negedge clk); i_rsp_accept[i] = 0;
        done[i]++;
      end
    end
  end

  for (genvar t = 0; t < 2; t++) begin : g_tgt
    initial begin
      req_t q;
      t_req_accept[t] = 0; t_rsp_valid[t] = 0; t_rsp[t] = '0;
      forever begin
        @(negedge clk);
        if (t_req_valid[t]) begin
          repeat ($urandom_range(0, 2)) @(negedge clk);
          t_req_accept[t] = 1;
          @(posedge clk); q = t_req[t];
          @(negedge clk); t_req_accept[t] = 0;
          check(int'(q.addr[15]) == t, "target select");
          repeat ($urandom_range(0, 4)) begin
            @(negedge clk);
            check(!t_req_valid[t], "no request while busy");
          end
          t_rsp[t] = rsp_t'(q.wdata); t_rsp_valid[t] = 1;
          do @(posedge clk); while (!t_rsp_accept[t]);
          @(negedge clk); t_rsp_valid[t] = 0;
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NI; i++) wait (done[i] == N);
    check(n_contention > 0, "arbitration conflicts happened");
    $display("contention cycles: %0d", n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
