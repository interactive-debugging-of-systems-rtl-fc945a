// tb_cdc_port: self-checking test of the clock domain crossing port.
// Initiator clock 7 ns, target clock 11 ns (unrelated). 300 random requests
// go from initiator to target and 300 random responses back, with random
// valid gaps and random accept back-pressure on both sides. Every word must
// arrive once, unchanged and in order; a word offered by a receiver-side
// valid must stay until accepted.
module tb_cdc_port;
  import csar_pkg::*;
  localparam int N = 300;

  logic i_clk = 0, t_clk = 0, rst_n = 0;
  always #3.5 i_clk = ~i_clk;
  always #5.5 t_clk = ~t_clk;

  logic i_req_valid, i_req_accept, i_rsp_valid, i_rsp_accept;
  logic t_req_valid, t_req_accept, t_rsp_valid, t_rsp_accept;
  req_t i_req, t_req;
  rsp_t i_rsp, t_rsp;

  cdc_port dut (.i_clk, .i_rst_n(rst_n), .t_clk, .t_rst_n(rst_n), .*);

  int checks = 0, failures = 0;
  req_t req_q[$];
  rsp_t rsp_q[$];
  int n_req_sent = 0, n_req_got = 0, n_rsp_sent = 0, n_rsp_got = 0;

  // initiator: send requests, take responses
  always_ff @(posedge i_clk) begin
    if (rst_n) begin
      if (i_req_valid && i_req_accept) begin
        req_q.push_back(i_req);
        n_req_sent++;
      end
      if ((!i_req_valid || i_req_accept) ) begin
        i_req_valid <= (n_req_sent + (i_req_valid && i_req_accept ? 1 : 0) < N) && ($urandom_range(0, 2) != 0);
        i_req <= '{addr: 16'($urandom), we: 1'($urandom), wdata: $urandom};
      end
      i_rsp_accept <= ($urandom_range(0, 3) != 0);
      if (i_rsp_valid && i_rsp_accept) begin
        checks++;
        if (rsp_q.size() == 0 || rsp_q[0] != i_rsp) begin
          failures++;
          $display("FAIL rsp %0d got %h", n_rsp_got, i_rsp);
        end
        if (rsp_q.size() != 0) void'(rsp_q.pop_front());
        n_rsp_got++;
      end
    end
  end

  // target: take requests, send responses
  always_ff @(posedge t_clk) begin
    if (rst_n) begin
      t_req_accept <= ($urandom_range(0, 3) != 0);
      if (t_req_valid && t_req_accept) begin
        checks++;
        if (req_q.size() == 0 || req_q[0] != t_req) begin
          failures++;
          $display("FAIL req %0d got %h", n_req_got, t_req);
        end
        if (req_q.size() != 0) void'(req_q.pop_front());
        n_req_got++;
      end
      if (t_rsp_valid && t_rsp_accept) begin
        rsp_q.push_back(t_rsp);
        n_rsp_sent++;
      end
      if (!t_rsp_valid || t_rsp_accept) begin
        t_rsp_valid <= (n_rsp_sent + (t_rsp_valid && t_rsp_accept ? 1 : 0) < N) && ($urandom_range(0, 2) != 0);
        t_rsp <= rsp_t'($urandom);
      end
    end
  end

  // receivers must see stable data while valid waits
  req_t t_req_prev; logic t_wait;
  always_ff @(posedge t_clk) begin
    if (t_wait && t_req_valid && t_req != t_req_prev) begin failures++; $display("FAIL unstable req"); end
    t_wait <= t_req_valid && !t_req_accept;
    t_req_prev <= t_req;
  end

  initial begin
    i_req_valid = 0; i_rsp_accept = 0; t_req_accept = 0; t_rsp_valid = 0; t_wait = 0;
    i_req = '0; t_rsp = '0;
    repeat (3) @(posedge t_clk);
    rst_n = 1;
    wait (n_req_got == N && n_rsp_got == N);
    repeat (20) @(posedge t_clk);
    checks++;
    if (t_req_valid || i_rsp_valid) begin failures++; $display("FAIL extra words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog: req %0d rsp %0d", n_req_got, n_rsp_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
