// tb_proc_tile: self-checking test of a processor tile. Tile clock 3 ns,
// network clock 2 ns. A fetching core model drives the instruction port and
// a producer model the data port; a bench memory on the two network ports
// answers with the code pattern or stored data. The bench sets the debug
// configuration directly: a breakpoint on data handshake 10 with all PSIs
// stopping on events. Checks: exactly 10 data requests leave the tile, the
// instruction port stops too (through the global event input), a PSI step
// of 2 passes exactly 2 requests, and after resuming the producer finishes
// with every item stored and no wrong word seen by either model.
module tb_proc_tile;
  import csar_pkg::*;
  localparam int NITEMS = 40;
  logic clk = 0, noc_clk = 0, rst_n = 0;
  always #1.5 clk = ~clk;
  always #1   noc_clk = ~noc_clk;

  logic ci_req_valid, ci_req_accept, ci_rsp_valid, ci_rsp_accept;
  logic cd_req_valid, cd_req_accept, cd_rsp_valid, cd_rsp_accept;
  req_t ci_req, cd_req;
  rsp_t ci_rsp, cd_rsp;
  logic [1:0] n_req_valid, n_req_accept, n_rsp_valid, n_rsp_accept;
  req_t [1:0] n_req;
  rsp_t [1:0] n_rsp;
  mon_cfg_t [1:0] mon_cfg;
  psi_cfg_t [1:0] psi_cfg;
  logic [1:0] mon_tgl = '0, psi_tgl = '0, mon_evt, psi_stopped, psi_blocked;
  logic [1:0][15:0] mon_count, psi_steps;
  logic evt_global, arm_global;
  logic [1:0] mon_arm;

  proc_tile #(.TCM_DEPTH(256)) dut (.*);

  assign evt_global = |mon_evt;   // stands in for the event network
  assign arm_global = |mon_arm;

  logic start_i = 0, start_d = 0;
  int ni, nri, ei, ii, nd, nrd, ed, id;
  logic di, dd, idl_i, idl_d;
  cpu_model #(.ROLE(0), .NITEMS(NITEMS)) u_i (.clk, .start(start_i),
    .req_valid(ci_req_valid), .req_accept(ci_req_accept), .req(ci_req),
    .rsp_valid(ci_rsp_valid), .rsp_accept(ci_rsp_accept), .rsp(ci_rsp),
    .n_req(ni), .n_remote(nri), .errors(ei), .items(ii), .done(di), .idle(idl_i));
  cpu_model #(.ROLE(1), .NITEMS(NITEMS)) u_d (.clk, .start(start_d),
    .req_valid(cd_req_valid), .req_accept(cd_req_accept), .req(cd_req),
    .rsp_valid(cd_rsp_valid), .rsp_accept(cd_rsp_accept), .rsp(cd_rsp),
    .n_req(nd), .n_remote(nrd), .errors(ed), .items(id), .done(dd), .idle(idl_d));

  // bench network memory, one per port
  logic [31:0] store [int];
  int out_req [2];
  for (genvar p = 0; p < 2; p++) begin : g_net
    initial begin
      req_t q;
      n_req_accept[p] = 0; n_rsp_valid[p] = 0; n_rsp[p] = '0; out_req[p] = 0;
      forever begin
        @(negedge noc_clk);
        if (n_req_valid[p]) begin
          n_req_accept[p] = 1;
          @(posedge noc_clk); q = n_req[p]; out_req[p]++;
          @(negedge noc_clk); n_req_accept[p] = 0;
          if (q.addr[15:14] == 2'b01) n_rsp[p] = rsp_t'(32'hC0DE_0000 ^ (32'(q.addr) * 32'h9E37));
          else n_rsp[p] = rsp_t'(store.exists(int'(q.addr)) ? store[int'(q.addr)] : 0);
          if (q.we) store[int'(q.addr)] = q.wdata;
          n_rsp_valid[p] = 1;
          do @(posedge noc_clk); while (!n_rsp_accept[p]);
          @(negedge noc_clk); n_rsp_valid[p] = 0;
        end
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic set_psi(input int p, input logic ev, input psi_mode_e m, input int n);
    psi_cfg[p] = '{event_en: ev, mode: m, step_n: 16'(n)}; psi_tgl[p] = !psi_tgl[p]; #20;
  endtask

  initial begin
    int o0, o1;
    mon_cfg = '0; psi_cfg = '0;
    #10 rst_n = 1; #10;
    mon_cfg[1] = '{arm_wait: 0, arm_out: 0, clear: 1, chan_rsp: 0, enable: 1, bp_count: 16'd10}; mon_tgl[1] = 1;
    mon_cfg[0] = '{arm_wait: 0, arm_out: 0, clear: 1, chan_rsp: 0, enable: 0, bp_count: 16'd0};  mon_tgl[0] = 1;
    #20;
    set_psi(0, 1, PSI_RUN, 0);
    set_psi(1, 1, PSI_RUN, 0);
    start_i = 1; start_d = 1;
    wait (mon_evt[1]);
    #200;
    check(out_req[1] == 10 && mon_count[1] == 10, "data port stopped at handshake 10");
    check(psi_stopped == 2'b11, "both PSIs stopped");
    o0 = out_req[0];
    #200;
    check(out_req[0] == o0 && out_req[1] == 10, "no traffic while stopped");
    // step the data port by 2 with the breakpoint cleared
    set_psi(0, 0, PSI_STOP, 0);
    set_psi(1, 0, PSI_STOP, 0);
    mon_cfg[1] = '{arm_wait: 0, arm_out: 0, clear: 0, chan_rsp: 0, enable: 0, bp_count: 16'd0}; mon_tgl[1] = 0; #20;
    set_psi(1, 0, PSI_STEP, 2);
    #300;
    check(out_req[1] == 12 && out_req[0] == o0, "stepped by 2");
    set_psi(0, 0, PSI_RUN, 0);
    set_psi(1, 0, PSI_RUN, 0);
    wait (dd);
    start_i = 0; start_d = 0;
    wait (idl_i && idl_d);
    for (int k = 0; k < NITEMS; k++) check(store.exists(32'h8000 + k) && store[32'h8000 + k] == 32'(k + 1), "item stored");
    check(ei == 0 && ed == 0 && nri > 10, "core models saw correct words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
