// tb_dbg_regs: self-checking test of the debug register file. The bench
// drives the TAP strobes directly. It writes every monitor and PSI
// configuration register with random words and checks the outputs and the
// toggles of exactly that register; it reads every status register and the
// configuration read-back with random status inputs; and checks that a
// scan with wr = 0 writes nothing.
module tb_dbg_regs;
  import csar_pkg::*;
  localparam int N = 8;
  logic tck = 0, trst_n = 0, tdi = 0, tdo, sel = 0, capture_dr = 0, shift_dr = 0, update_dr = 0;
  always #10 tck = ~tck;
  mon_cfg_t [N-1:0] mon_cfg;
  psi_cfg_t [N-1:0] psi_cfg;
  logic [N-1:0] mon_tgl, psi_tgl, mon_evt, mon_arm, psi_stopped, psi_blocked, evt_fired;
  logic [N-1:0][15:0] mon_count, psi_steps;

  dbg_regs #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one capture / 39 shifts / update, returns the captured word
  task automatic scan(input logic wr, input logic [5:0] a, input logic [31:0] d, output logic [38:0] q);
    logic [38:0] w;
    w = {wr, a, d};
    @(negedge tck); sel = 1; capture_dr = 1;
    @(negedge tck); capture_dr = 0; shift_dr = 1;
    for (int i = 0; i < 39; i++) begin
      tdi = w[i]; q[i] = tdo;
      @(negedge tck);
    end
    shift_dr = 0; update_dr = 1;
    @(negedge tck); update_dr = 0;
  endtask

  logic [38:0] q;
  logic [31:0] d;
  logic [N-1:0] mt, pt;
  initial begin
    {mon_evt, mon_arm, psi_stopped, psi_blocked, evt_fired} = '0;
    mon_count = '0; psi_steps = '0;
    #25 trst_n = 1;
    for (int i = 0; i < N; i++) begin
      mt = mon_tgl; pt = psi_tgl;
      d = $urandom;
      scan(1, 6'(i), d, q);
      check(mon_cfg[i] == d[MON_CFG_W-1:0] && mon_tgl == (mt ^ (N'(1) << i)) && psi_tgl == pt, "monitor write");
      d = $urandom;
      scan(1, 6'(8 + i), d, q);
      check(psi_cfg[i] == d[PSI_CFG_W-1:0] && psi_tgl == (pt ^ (N'(1) << i)), "psi write");
    end
    mt = mon_tgl; pt = psi_tgl;
    scan(0, 6'd3, 32'hFFFF_FFFF, q);
    check(mon_tgl == mt && psi_tgl == pt, "read scan writes nothing");
    for (int i = 0; i < N; i++) begin
      mon_count[i] = 16'($urandom); psi_steps[i] = 16'($urandom);
      mon_evt[i] = 1'($urandom); mon_arm[i] = 1'($urandom); psi_stopped[i] = 1'($urandom); psi_blocked[i] = 1'($urandom);
    end
    evt_fired = N'($urandom);
    for (int i = 0; i < N; i++) begin
      scan(0, 6'(i), 0, q);
      scan(0, 6'(8 + i), 0, q);
      check(q[31:0] == {mon_evt[i], mon_arm[i], 14'b0, mon_count[i]} && q[37:32] == 6'(i), "monitor status read");
      scan(0, 6'(32 + i), 0, q);
      check(q[31:0] == {psi_stopped[i], psi_blocked[i], 14'b0, psi_steps[i]}, "psi status read");
      scan(0, 6'(40 + i), 0, q);
      check(q[31:0] == 32'(mon_cfg[i]), "monitor cfg read back");
      scan(0, 6'd16, 0, q);
      check(q[31:0] == 32'(psi_cfg[i]), "psi cfg read back");
    end
    scan(0, 6'd16, 0, q);
    check(q[31:0] == 32'(evt_fired), "fired mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
