// tb_mem_tile: self-checking test of a memory tile. Network clock 2 ns,
// memory clock 3.4 ns. The bench issues 300 random reads and writes from
// the network side against a reference model, then programs a breakpoint on
// request handshake 20 of a second batch and checks that exactly 20 requests
// reach the memory, that the 21st waits at the closed PSI, that a step of 1
// lets exactly one more through, and that the global event input alone also
// stops the port.
module tb_mem_tile;
  import csar_pkg::*;
  logic clk = 0, noc_clk = 0, rst_n = 0;
  always #1.7 clk = ~clk;
  always #1   noc_clk = ~noc_clk;
  logic n_req_valid, n_req_accept, n_rsp_valid, n_rsp_accept;
  req_t n_req;
  rsp_t n_rsp;
  mon_cfg_t mon_cfg;
  psi_cfg_t psi_cfg;
  logic mon_tgl = 0, psi_tgl = 0, evt_global = 0, arm_global = 0, mon_evt, mon_arm, psi_stopped, psi_blocked;
  logic [15:0] mon_count, psi_steps;

  mem_tile #(.MEM_DEPTH(512)) dut (.*);

  int checks = 0, failures = 0, mem_hs = 0;
  logic [31:0] model [512];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) if (dut.m_req_valid && dut.m_req_accept) mem_hs++;

  // one transaction from the network side; gives up after tmo noc cycles
  task automatic xact(input logic [15:0] a, input logic we, input logic [31:0] wd, output logic [31:0] rd, output bit ok, input int tmo = 1000);
    int n = 0;
    ok = 0;
    @(negedge noc_clk); n_req_valid = 1; n_req = '{addr: a, we: we, wdata: wd};
    do begin @(posedge noc_clk); n++; end while (!n_req_accept && n < tmo);
    @(negedge noc_clk); n_req_valid = 0;
    if (n >= tmo) return;
    n_rsp_accept = 1;
    n = 0;
    while (!n_rsp_valid && n < tmo) begin @(negedge noc_clk); n++; end
    if (n >= tmo) begin n_rsp_accept = 0; return; end
    rd = n_rsp.rdata;
    @(negedge noc_clk); n_rsp_accept = 0;
    ok = 1;
  endtask

  initial begin
    logic [31:0] rd, exp;
    bit ok;
    n_req_valid = 0; n_rsp_accept = 0; n_req = '0;
    mon_cfg = '0; psi_cfg = '{event_en: 1'b1, mode: PSI_RUN, step_n: 16'd0};
    #10 rst_n = 1; #10;
    psi_tgl = 1; #20;
    for (int i = 0; i < 512; i++) begin xact(16'h8000 + 16'(i), 1, 0, rd, ok); model[i] = 0; end
    for (int i = 0; i < 300; i++) begin
      logic [8:0] a; logic we; logic [31:0] wd;
      a = 9'($urandom); we = 1'($urandom); wd = $urandom;
      xact({2'b10, 5'b0, a}, we, wd, rd, ok);
      check(ok && rd == model[a], "read data");
      if (we) model[a] = wd;
    end
    // breakpoint 20 handshakes from now
    mon_cfg = '{arm_wait: 0, arm_out: 0, clear: 1, chan_rsp: 0, enable: 1, bp_count: 16'd20}; mon_tgl = 1; #20;
    mem_hs = 0;
    for (int i = 0; i < 20; i++) xact(16'h8000, 0, 0, rd, ok, 200);
    check(mem_hs == 20 && mon_evt && psi_stopped, "stopped after handshake 20");
    xact(16'h8001, 0, 0, rd, ok, 200);   // taken by the crossing, held by the PSI
    #100;
    check(mem_hs == 20 && psi_blocked, "21st request held at the PSI");
    psi_cfg = '{event_en: 1'b0, mode: PSI_STEP, step_n: 16'd1}; psi_tgl = 0; #40;
    check(mem_hs == 21, "step of one");
    // clear the breakpoint, run, then stop by the global event alone
    mon_cfg = '{arm_wait: 0, arm_out: 0, clear: 1, chan_rsp: 0, enable: 0, bp_count: 16'd0}; mon_tgl = 0;
    psi_cfg = '{event_en: 1'b1, mode: PSI_RUN, step_n: 16'd0}; psi_tgl = 1; #40;
    n_rsp_accept = 1; #20; n_rsp_accept = 0;      // drain the held response
    evt_global = 1; #20;
    mem_hs = 0;
    xact(16'h8002, 0, 0, rd, ok, 200);
    #100;
    check(mem_hs == 0 && psi_stopped, "global event stops");
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
