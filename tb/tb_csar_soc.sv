// tb_csar_soc: end-to-end test of the debug SOC at its default sizes.
//
// Behavioural core ports run a producer/consumer program: tile 1's data
// port writes items into a FIFO in the data memory, tile 2's data port polls
// for them, tile 3's data port initialises the memories and then keeps
// reading the code memory, and all instruction ports fetch from their local
// memory and the code memory. The clocks are the two use cases of the
// example system: all 2,000,003 fs; then tile 1 at 3,000,016 fs and tile 2 at
// 5,000,011 fs. For each use case and each breakpoint in {60,70,80,90,100}
// the bench, through the TAP only:
//   1. programs the monitor of tile 1's data port to raise an event on that
//      request handshake and every PSI to stop on events;
//   2. waits for the event, reads which monitor fired and checks that all
//      eight PSIs report stopped and that no port moves any more;
//   3. checks that the monitor count and the producer's own count are both
//      exactly the breakpoint, and that every item the producer had
//      completed is in the data memory (the last one may still be in flight);
//   4. guided replay: with all ports held stopped it opens the memory tiles
//      and steps tile 2's data port by 3 and tile 1's by 1 request, and
//      checks exactly those handshakes happened;
//   5. resumes everything and checks that the consumer receives all items
//      in order and no core port saw a wrong word.
// It compares, between the two use cases, tile 1's count and the FIFO
// contents at every breakpoint. Like the state comparison of the CSAR
// example, it also counts the state bits (all memories and monitor counters)
// that differ between the two use cases, once when stopped on the handshake
// and once sampled at the same time after start (the time at which use case 1
// reached the handshake), and checks that stopping on the handshake leaves
// fewer differing bits. A last run in the second use case sets a
// sequential breakpoint spanning two monitors: tile 2's data monitor raises
// the arm event on its 20th request, and tile 1's data monitor, waiting for
// it, stops the system on its 15th request after the arm event arrived.
// Counted mechanisms (each must occur): breakpoint events, stops through the
// event network in other clock domains, steps, arbitration conflicts, local
// memory accesses, TAP reads, sequential breakpoints.
module tb_csar_soc;
  import csar_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int NITEMS = 120;
  localparam int NBP = 5;
  localparam int BP [NBP] = '{60, 70, 80, 90, 100};
  localparam int SEQ_ARM = 20, SEQ_BP = 15;

  logic [2:0] clk_tile = '0;
  logic clk_noc = 0, clk_cmem = 0, clk_dmem = 0, rst_n = 0;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo, tdo_en;
  logic [2:0] cpu_i_req_valid, cpu_i_req_accept, cpu_i_rsp_valid, cpu_i_rsp_accept;
  logic [2:0] cpu_d_req_valid, cpu_d_req_accept, cpu_d_rsp_valid, cpu_d_rsp_accept;
  req_t [2:0] cpu_i_req, cpu_d_req;
  rsp_t [2:0] cpu_i_rsp, cpu_d_rsp;
  logic [1:0] noc_contention;

  csar_soc dut (.*);

  // ---------------- clocks (periods in fs, per use case)
  realtime per_t1, per_t2, per_base;
  always begin #(per_base / 2); clk_noc = ~clk_noc; end
  always begin #(per_base / 2); clk_cmem = ~clk_cmem; end
  always begin #(per_base / 2); clk_dmem = ~clk_dmem; end
  always begin #(per_t1 / 2); clk_tile[0] = ~clk_tile[0]; end
  always begin #(per_t2 / 2); clk_tile[1] = ~clk_tile[1]; end
  assign clk_tile[2] = clk_noc;       // tile 3 is synchronous with the network
  always #10 tck = ~tck;

  // ---------------- core models
  logic [2:0] start_i, start_d;
  int n_req_i [3], n_rem_i [3], err_i [3], items_i [3];
  int n_req_d [3], n_rem_d [3], err_d [3], items_d [3];
  logic [2:0] done_i, idle_i, done_d, idle_d;

  for (genvar t = 0; t < 3; t++) begin : g_cpu
    cpu_model #(.ROLE(0), .NITEMS(NITEMS)) u_i (
      .clk(clk_tile[t]), .start(start_i[t]),
      .req_valid(cpu_i_req_valid[t]), .req_accept(cpu_i_req_accept[t]), .req(cpu_i_req[t]),
      .rsp_valid(cpu_i_rsp_valid[t]), .rsp_accept(cpu_i_rsp_accept[t]), .rsp(cpu_i_rsp[t]),
      .n_req(n_req_i[t]), .n_remote(n_rem_i[t]), .errors(err_i[t]), .items(items_i[t]),
      .done(done_i[t]), .idle(idle_i[t])
    );
    cpu_model #(.ROLE(t == 0 ? 1 : t == 1 ? 2 : 3), .NITEMS(NITEMS)) u_d (
      .clk(clk_tile[t]), .start(start_d[t]),
      .req_valid(cpu_d_req_valid[t]), .req_accept(cpu_d_req_accept[t]), .req(cpu_d_req[t]),
      .rsp_valid(cpu_d_rsp_valid[t]), .rsp_accept(cpu_d_rsp_accept[t]), .rsp(cpu_d_rsp[t]),
      .n_req(n_req_d[t]), .n_remote(n_rem_d[t]), .errors(err_d[t]), .items(items_d[t]),
      .done(done_d[t]), .idle(idle_d[t])
    );
  end

  // ---------------- bookkeeping
  int checks = 0, failures = 0;
  int m_bp_events = 0, m_remote_stops = 0, m_steps = 0, m_contention = 0, m_local = 0, m_tap_reads = 0, m_seq = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk_noc) if (noc_contention != 0) m_contention++;

  // request handshakes that passed the PSI of each tile's data port
  int passed_d [3];
  for (genvar t = 0; t < 3; t++) begin : g_pass
    always @(posedge clk_tile[t])
      if (!rst_n) passed_d[t] <= 0;
      else if (dut.g_tile[t].u_tile.p_req_valid[1] && dut.g_tile[t].u_tile.p_req_accept[1]) passed_d[t] <= passed_d[t] + 1;
  end
  // tile 1 data requests that passed before the arm event reached tile 1
  logic armed_seen;
  int arm_base;
  always @(posedge clk_tile[0])
    if (dut.arm_dst[0] && !armed_seen) begin armed_seen <= 1'b1; arm_base <= passed_d[0]; end
  for (genvar t = 0; t < 3; t++) begin : g_loc
    always @(posedge clk_tile[t])
      if (cpu_d_req_valid[t] && cpu_d_req_accept[t] && cpu_d_req[t].addr[15:14] == 2'b00) m_local++;
  end

  // ---------------- TAP driver
  task automatic tms_clk(input bit m);
    @(negedge tck); tms = m;
    @(posedge tck);
  endtask

  task automatic tap_shift(input bit ir, input int n, input logic [63:0] din, output logic [63:0] dout);
    tms_clk(1);
    if (ir) tms_clk(1);
    tms_clk(0);
    tms_clk(0);
    dout = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      #1; dout[i] = tdo;
      @(posedge tck);
    end
    tms_clk(1);
    tms_clk(0);
    @(negedge tck);
  endtask

  task automatic reg_write(input logic [5:0] a, input logic [31:0] d);
    logic [63:0] r;
    tap_shift(0, 39, {25'b0, 1'b1, a, d}, r);
  endtask

  task automatic reg_read(input logic [5:0] a, output logic [31:0] d);
    logic [63:0] r;
    tap_shift(0, 39, {25'b0, 1'b0, a, 32'b0}, r);
    tap_shift(0, 39, {25'b0, 1'b0, a, 32'b0}, r);
    d = r[31:0];
    m_tap_reads++;
  endtask

  function automatic logic [31:0] mon_word(input bit clr, input bit en, input int bp,
                                          input bit ao = 0, input bit aw = 0);
    mon_cfg_t c;
    c = '{arm_wait: aw, arm_out: ao, clear: clr, chan_rsp: 1'b0, enable: en, bp_count: 16'(bp)};
    return 32'(c);
  endfunction
  function automatic logic [31:0] psi_word(input bit ev, input psi_mode_e m, input int n);
    psi_cfg_t c;
    c = '{event_en: ev, mode: m, step_n: 16'(n)};
    return 32'(c);
  endfunction

  // whole-state snapshots: 6 local memories, 2 memory tiles, 8 monitor counts
  localparam int TD = 1024, MD = 4096;
  localparam int NW = 6 * TD + 2 * MD + N_IF;
  logic [31:0] st [2][2][NBP][NW];   // [0 handshake / 1 time][use case][breakpoint]
  realtime t_hit [NBP];

  task automatic snap_state(input int kind, input int uc, input int bi);
    for (int k = 0; k < TD; k++) begin
      st[kind][uc][bi][0 * TD + k] = dut.g_tile[0].u_tile.g_port[0].u_tcm.mem[k];
      st[kind][uc][bi][1 * TD + k] = dut.g_tile[0].u_tile.g_port[1].u_tcm.mem[k];
      st[kind][uc][bi][2 * TD + k] = dut.g_tile[1].u_tile.g_port[0].u_tcm.mem[k];
      st[kind][uc][bi][3 * TD + k] = dut.g_tile[1].u_tile.g_port[1].u_tcm.mem[k];
      st[kind][uc][bi][4 * TD + k] = dut.g_tile[2].u_tile.g_port[0].u_tcm.mem[k];
      st[kind][uc][bi][5 * TD + k] = dut.g_tile[2].u_tile.g_port[1].u_tcm.mem[k];
    end
    for (int k = 0; k < MD; k++) begin
      st[kind][uc][bi][6 * TD + k]      = dut.g_mem[0].u_mem.u_mem.mem[k];
      st[kind][uc][bi][6 * TD + MD + k] = dut.g_mem[1].u_mem.u_mem.mem[k];
    end
    for (int i = 0; i < N_IF; i++) st[kind][uc][bi][6 * TD + 2 * MD + i] = 32'(dut.mon_count[i]);
  endtask

  // time-based sample, started with each run: use case 1 notes when tile 1
  // reaches the breakpoint handshake, use case 2 samples at that same time
  int tsnap_uc, tsnap_bi, tsnap_bp;
  event tsnap_go;
  always @(tsnap_go) begin
    realtime t0;
    t0 = $realtime;
    if (tsnap_uc == 0) begin
      wait (passed_d[0] == tsnap_bp);
      t_hit[tsnap_bi] = $realtime - t0;
    end else
      #(t_hit[tsnap_bi]);
    snap_state(1, tsnap_uc, tsnap_bi);
  end

  function automatic int unstable_bits(input int kind, input int bi);
    int n = 0;
    for (int w = 0; w < NW; w++) n += $countones(st[kind][0][bi][w] ^ st[kind][1][bi][w]);
    return n;
  endfunction

  // state snapshot at the breakpoint, per use case and breakpoint
  int snap_count [2][NBP];
  logic [31:0] snap_fifo [2][NBP][NITEMS];
  int snap_prod [2][NBP];

  function automatic int total_moves();
    int s = 0;
    for (int t = 0; t < 3; t++) s += n_req_i[t] + n_req_d[t];
    return s;
  endfunction

  task automatic one_run(input int uc, input int bi, input bit seq = 0);
    logic [31:0] d;
    logic [63:0] r;
    int moves, before_d1, before_d0, bp;
    bp = BP[bi];
    armed_seen = 1'b0;
    // reset the SOC and the TAP
    start_i = '0; start_d = '0;
    rst_n = 0; trst_n = 0;
    #100; rst_n = 1;
    @(posedge tck); #5; trst_n = 1;
    tms_clk(1); tms_clk(0);
    tap_shift(1, 4, 64'h8, r);                        // DBG instruction
    check(r[3:0] == 4'b0001, "IR capture");
    if (seq) begin
      reg_write(6'd3, mon_word(1, 1, SEQ_ARM, 1, 0)); // tile 2 data port arms
      reg_write(6'd1, mon_word(1, 1, SEQ_BP, 0, 1));  // tile 1 data port waits, then breaks
    end else
      reg_write(6'd1, mon_word(1, 1, bp));            // breakpoint on tile 1 data port
    for (int i = 0; i < N_IF; i++) if (i != 1 && !(seq && i == 3)) reg_write(6'(i), mon_word(1, 0, 0));
    for (int i = 0; i < N_IF; i++) reg_write(6'(8 + i), psi_word(1, PSI_RUN, 0));
    // initialise memories, then run
    start_d[2] = 1;
    wait (done_d[2]);
    start_i = '1; start_d = '1;
    if (!seq) begin
      tsnap_uc = uc; tsnap_bi = bi; tsnap_bp = bp;
      -> tsnap_go;
    end
    // 2. wait for the event
    do reg_read(6'd16, d); while (d[1] == 1'b0);
    m_bp_events++;
    check(d[7:0] == 8'b0000_0010, "only tile 1's data monitor fired");
    #2000;
    for (int i = 0; i < N_IF; i++) begin
      reg_read(6'(8 + i), d);
      check(d[31], $sformatf("PSI %0d stopped", i));
      if (d[31] && i != 1) m_remote_stops++;
    end
    moves = total_moves();
    #3000;
    check(total_moves() == moves, "system quiescent after the stop");
    // 3. state at the breakpoint
    reg_read(6'd1, d);
    if (seq) begin
      check(d[15:0] == 16'(SEQ_BP) && d[31], "monitor count after arming");
      check(armed_seen && passed_d[0] - arm_base == SEQ_BP, "tile 1 stopped exactly 15 requests after arming");
      reg_read(6'd3, d);
      check(d[30] && !d[31] && d[15:0] >= 16'(SEQ_ARM), "arming monitor raised the arm event only");
      if (d[30] && !d[31] && armed_seen && passed_d[0] - arm_base == SEQ_BP) m_seq++;
      bp = passed_d[0];
    end else begin
      check(d[15:0] == 16'(bp) && d[31], "monitor count at breakpoint");
      check(passed_d[0] == bp, "tile 1 data port stopped exactly at the breakpoint handshake");
      snap_count[uc][bi] = int'(d[15:0]);
      snap_prod[uc][bi] = items_d[0];
      snap_state(0, uc, bi);
    end
    for (int k = 0; k < NITEMS; k++) begin
      d = dut.g_mem[1].u_mem.u_mem.mem[k];
      if (!seq) snap_fifo[uc][bi][k] = d;
      if (k < bp - 1) check(d == 32'(k + 1), "completed item in memory");
      else if (k > bp - 1) check(d == 0, "no item beyond the breakpoint");
    end
    // 4. guided replay: hold all ports stopped, clear the event, then step
    for (int i = 0; i < N_IF; i++) reg_write(6'(8 + i), psi_word(0, PSI_STOP, 0));
    reg_write(6'd1, mon_word(0, 0, 0));
    reg_write(6'd3, mon_word(0, 0, 0));
    reg_write(6'd14, psi_word(0, PSI_RUN, 0));
    reg_write(6'd15, psi_word(0, PSI_RUN, 0));
    before_d1 = passed_d[1];
    before_d0 = passed_d[0];
    reg_write(6'd11, psi_word(0, PSI_STEP, 3));      // tile 2 data port: 3 requests
    #3000;
    check(passed_d[1] - before_d1 == 3, "tile 2 stepped by exactly 3");
    check(passed_d[0] == before_d0, "tile 1 held");
    reg_write(6'd9, psi_word(0, PSI_STEP, 1));       // then tile 1: 1 request
    #3000;
    check(passed_d[0] - before_d0 == 1, "tile 1 stepped by exactly 1");
    reg_read(6'd11, d);
    check(d[31] && d[15:0] == 0, "stepped PSI stopped again with no steps left");
    if (passed_d[1] - before_d1 == 3 && passed_d[0] - before_d0 == 1) m_steps++;
    // 5. resume and finish
    for (int i = 0; i < N_IF; i++) reg_write(6'(8 + i), psi_word(0, PSI_RUN, 0));
    wait (done_d[0] && done_d[1]);
    check(items_d[1] == NITEMS, "consumer received every item");
    start_i = '0; start_d = '0;
    wait (idle_i == '1 && idle_d == '1);
    for (int t = 0; t < 3; t++) check(err_i[t] == 0 && err_d[t] == 0, $sformatf("tile %0d saw only correct words", t + 1));
  endtask

  initial begin
    int diff;
    start_i = '0; start_d = '0;
    // warm-up run, so that every measured run starts from the memory contents
    // a complete run leaves behind (memories are not reset)
    per_base = 2.000003ns; per_t1 = 2.000003ns; per_t2 = 2.000003ns;
    one_run(0, 0);
    for (int uc = 0; uc < 2; uc++) begin
      per_base = 2.000003ns;
      per_t1 = (uc == 0) ? 2.000003ns : 3.000016ns;
      per_t2 = (uc == 0) ? 2.000003ns : 5.000011ns;
      for (int bi = 0; bi < NBP; bi++) begin
        one_run(uc, bi);
        $display("use case %0d handshake %0d done at %0t", uc + 1, BP[bi], $realtime);
      end
    end
    one_run(1, 0, 1);
    $display("use case 2 sequential breakpoint done at %0t", $realtime);
    // compare the two use cases at every breakpoint
    for (int bi = 0; bi < NBP; bi++) begin
      diff = 0;
      for (int k = 0; k < NITEMS; k++) if (snap_fifo[0][bi][k] != snap_fifo[1][bi][k]) diff++;
      check(snap_count[0][bi] == snap_count[1][bi], "same monitor count in both use cases");
      check(diff <= 1, "FIFO state differs at most in the item in flight");
      $display("handshake %0d: FIFO words differing between use cases: %0d", BP[bi], diff);
      $display("handshake %0d: differing state bits, stopped on the handshake %0d, sampled at the same time %0d",
               BP[bi], unstable_bits(0, bi), unstable_bits(1, bi));
      check(unstable_bits(0, bi) < unstable_bits(1, bi), "fewer differing bits when stopping on a handshake");
    end
    check(m_bp_events == 2 * NBP + 2, "breakpoint events");
    check(m_remote_stops > 0, "stops through the event network");
    check(m_steps > 0, "steps");
    check(m_contention > 0, "arbitration conflicts");
    check(m_local > 0, "local memory accesses");
    check(m_tap_reads > 0, "TAP reads");
    check(m_seq > 0, "sequential breakpoints");
    $display("mechanisms: events %0d, remote stops %0d, steps %0d, contention cycles %0d, local accesses %0d, TAP reads %0d, sequential breakpoints %0d",
             m_bp_events, m_remote_stops, m_steps, m_contention, m_local, m_tap_reads, m_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
