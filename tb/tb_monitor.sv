// tb_monitor: self-checking test of the handshake monitor. Random valid and
// accept on both channels; a reference count of handshakes is kept here.
// Checks: the count follows the reference on every cycle, the event rises on
// the clock edge of handshake number bp_count and not before, stays high,
// is cleared by reprogramming, the channel select counts responses, a
// disabled monitor never raises its event, a monitor programmed to arm
// raises the arm event in place of the stop event, and a monitor waiting
// for the arm event counts nothing until it arrives.
module tb_monitor;
  import csar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_accept, rsp_valid, rsp_accept, cfg_load, evt, arm_in, arm;
  mon_cfg_t cfg;
  logic [15:0] count;

  monitor dut (.*);

  int checks = 0, failures = 0;
  int ref_count, bp;
  logic ref_evt, ref_arm, en, rsp_sel, aout, await_;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t (count %0d ref %0d evt %0d ref %0d arm %0d ref %0d)", msg, $time, count, ref_count, evt, ref_evt, arm, ref_arm); end
  endtask

  task automatic prog(input bit enable, input bit chan, input bit clr, input int bpc,
                      input bit ao = 0, input bit aw = 0);
    @(negedge clk);
    cfg = '{arm_wait: aw, arm_out: ao, clear: clr, chan_rsp: chan, enable: enable, bp_count: 16'(bpc)};
    cfg_load = 1;
    req_valid = 0; rsp_valid = 0;   // no handshake while reprogramming
    @(negedge clk);
    cfg_load = 0;
    en = enable; rsp_sel = chan; bp = bpc; ref_evt = 0; ref_arm = 0; aout = ao; await_ = aw;
    if (clr) ref_count = 0;
  endtask

  task automatic run(input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      req_valid = 1'($urandom); req_accept = 1'($urandom);
      rsp_valid = 1'($urandom); rsp_accept = 1'($urandom);
      @(posedge clk);
      if ((rsp_sel ? (rsp_valid && rsp_accept) : (req_valid && req_accept)) && (!await_ || arm_in)) begin
        ref_count++;
        if (en && ref_count == bp) begin
          if (aout) ref_arm = 1; else ref_evt = 1;
        end
      end
      #1;
      check(count == 16'(ref_count), "count");
      check(evt == ref_evt, "event");
      check(arm == ref_arm, "arm event");
    end
  endtask

  initial begin
    req_valid = 0; req_accept = 0; rsp_valid = 0; rsp_accept = 0; cfg_load = 0; cfg = '0;
    ref_count = 0; en = 0; rsp_sel = 0; bp = 0; ref_evt = 0; ref_arm = 0; aout = 0; await_ = 0;
    arm_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prog(1, 0, 1, 20);
    run(200);
    check(ref_evt == 1, "breakpoint reached");
    prog(0, 0, 1, 5);
    run(100);
    check(evt == 0, "disabled stays quiet");
    prog(1, 1, 1, 13);
    run(150);
    check(evt == 1, "response breakpoint");
    prog(1, 0, 0, ref_count + 7);   // keep counting, break 7 later
    run(100);
    check(evt == 1, "relative breakpoint");
    prog(1, 0, 1, 9, 1, 0);         // arming monitor
    run(100);
    check(arm == 1 && evt == 0, "arm event instead of stop event");
    prog(1, 0, 1, 6, 0, 1);         // waits for the arm event
    run(100);
    check(count == 0 && evt == 0, "nothing counted before arming");
    arm_in = 1;
    run(100);
    check(evt == 1 && arm == 0, "sequential breakpoint after arming");
    arm_in = 0;
    prog(1, 1, 1, 4, 0, 1);
    fork run(300); begin repeat (50) @(negedge clk); arm_in = 1; end join
    check(evt == 1, "sequential response breakpoint");
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
