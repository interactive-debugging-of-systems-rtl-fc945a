// tb_tap_ctrl: self-checking test of the TAP controller. A bench-side model
// of a debug chain (a 12-bit shift register) stands in for dbg_regs.
// Checks: IDCODE is selected after reset and reads back its 32-bit value;
// shifting the IR returns the mandatory 0001 capture pattern; BYPASS delays
// tdi by one tck; DBG selects the external chain and the capture, shift and
// update strobes come in the standard state order with the right counts;
// five tms=1 clocks return to Test-Logic-Reset from any state.
module tb_tap_ctrl;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0;
  logic tdo, tdo_en, dbg_sel, capture_dr, shift_dr, update_dr, dbg_tdo;
  always #10 tck = ~tck;

  localparam logic [31:0] ID = 32'h1234_5671;
  tap_ctrl #(.IDCODE(ID)) dut (.*);

  // external chain model
  logic [11:0] chain, chain_cap;
  int n_cap, n_sh, n_upd;
  assign dbg_tdo = chain[0];
  always_ff @(posedge tck) begin
    if (dbg_sel && capture_dr) begin chain <= 12'hA5C; n_cap++; end
    if (dbg_sel && shift_dr)   begin chain <= {tdi, chain[11:1]}; n_sh++; end
    if (dbg_sel && update_dr)  begin chain_cap <= chain; n_upd++; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // drive tms/tdi at the falling edge, sample tdo before the next rising edge
  task automatic clk_tms(input bit m, input bit d = 0);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask

  // from Run-Test/Idle: shift n bits through IR or DR, return to Run-Test/Idle
  task automatic shift(input bit ir, input int n, input logic [63:0] din, output logic [63:0] dout);
    clk_tms(1);                 // Select-DR
    if (ir) clk_tms(1);         // Select-IR
    clk_tms(0);                 // Capture
    clk_tms(0);                 // Shift
    dout = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      #1; dout[i] = tdo;
      @(posedge tck);
    end
    clk_tms(1);                 // Update
    clk_tms(0);                 // Run-Test/Idle
    @(negedge tck);
  endtask

  logic [63:0] r;
  initial begin
    chain = '0; chain_cap = '0; n_cap = 0; n_sh = 0; n_upd = 0;
    #35 trst_n = 1;
    clk_tms(0);
    shift(0, 32, 64'h0, r);
    check(r[31:0] == ID, "IDCODE after reset");
    shift(1, 4, 64'hF, r);        // BYPASS
    check(r[3:0] == 4'b0001, "IR capture 0001");
    shift(0, 8, 64'hB5, r);
    check(r[0] == 1'b0 && r[7:1] == 7'h35, "bypass delays by one");
    shift(1, 4, 64'h8, r);        // DBG
    check(dbg_sel, "dbg selected");
    shift(0, 12, 64'h3C7, r);
    check(r[11:0] == 12'hA5C, "chain capture read out");
    check(chain_cap == 12'h3C7, "chain updated with shifted word");
    check(n_cap == 1 && n_sh == 12 && n_upd == 1, "strobe counts");
    repeat (5) clk_tms(1);
    @(negedge tck);
    check(dut.state == 4'(0), "five tms=1 reset");
    check(!dbg_sel, "IDCODE restored by reset");
    clk_tms(0);
    shift(0, 32, 64'h0, r);
    check(r[31:0] == ID, "IDCODE again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
