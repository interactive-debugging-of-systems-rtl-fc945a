// tb_psi: self-checking test of the protocol-specific instrument. A random
// initiator and target drive both channels through the PSI; this bench
// counts the handshakes on each side. Checks: in RUN every transfer passes
// with data unchanged and the two sides agree; in STOP, and on a local or
// global event with event_en, no handshake happens on either side and the
// stop takes effect on the first cycle after the event; in STEP exactly
// step_n request handshakes pass; without event_en an event is ignored.
module tb_psi;
  import csar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_load, evt_local, evt_global;
  psi_cfg_t cfg;
  logic i_req_valid, i_req_accept, i_rsp_valid, i_rsp_accept;
  logic t_req_valid, t_req_accept, t_rsp_valid, t_rsp_accept;
  req_t i_req, t_req;
  rsp_t i_rsp, t_rsp;
  logic stopped, blocked;
  logic [15:0] steps_left;

  psi dut (.*);

  int checks = 0, failures = 0;
  int n_req, n_rsp;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic prog(input bit ev_en, input psi_mode_e m, input int n);
    @(negedge clk);
    cfg = '{event_en: ev_en, mode: m, step_n: 16'(n)};
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
  endtask

  // one random cycle; count handshakes and check both sides agree
  task automatic run(input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      i_req_valid = 1'($urandom); t_req_accept = 1'($urandom);
      t_rsp_valid = 1'($urandom); i_rsp_accept = 1'($urandom);
      i_req = '{addr: 16'($urandom), we: 1'($urandom), wdata: $urandom};
      t_rsp = rsp_t'($urandom);
      #1;
      check((i_req_valid && i_req_accept) == (t_req_valid && t_req_accept), "req sides agree");
      check((t_rsp_valid && t_rsp_accept) == (i_rsp_valid && i_rsp_accept), "rsp sides agree");
      check(t_req == i_req && i_rsp == t_rsp, "data passes");
      if (t_req_valid && t_req_accept) n_req++;
      if (t_rsp_valid && t_rsp_accept) n_rsp++;
    end
  endtask

  initial begin
    cfg_load = 0; cfg = '0; evt_local = 0; evt_global = 0;
    i_req_valid = 0; t_req_accept = 0; t_rsp_valid = 0; i_rsp_accept = 0; i_req = '0; t_rsp = '0;
    n_req = 0; n_rsp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // RUN: traffic flows
    run(100);
    check(n_req > 10 && n_rsp > 10, "run passes traffic");
    // STOP: nothing flows
    prog(0, PSI_STOP, 0);
    n_req = 0; n_rsp = 0;
    run(100);
    check(n_req == 0 && n_rsp == 0 && stopped, "stop blocks");
    // STEP 7: exactly seven requests
    prog(0, PSI_STEP, 7);
    n_req = 0;
    run(200);
    check(n_req == 7, "step count");
    check(stopped && steps_left == 0, "stopped after steps");
    // RUN with events enabled, then a local event
    prog(1, PSI_RUN, 0);
    run(50);
    @(negedge clk); evt_local = 1;
    n_req = 0; n_rsp = 0;
    run(50);
    check(n_req == 0 && n_rsp == 0, "local event stops at once");
    evt_local = 0;
    run(20);
    @(negedge clk); evt_global = 1;
    n_req = 0; n_rsp = 0;
    run(50);
    check(n_req == 0 && n_rsp == 0, "global event stops");
    // events ignored when not enabled
    prog(0, PSI_RUN, 0);
    n_req = 0;
    run(100);
    check(n_req > 10, "event ignored without event_en");
    evt_global = 0;
    // blocked flag
    prog(0, PSI_STOP, 0);
    @(negedge clk); i_req_valid = 1; #1;
    check(blocked && !t_req_valid, "blocked request visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
