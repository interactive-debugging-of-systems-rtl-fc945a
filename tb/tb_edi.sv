// tb_edi: self-checking test of the event distribution interconnect. Five
// destination clocks with unrelated periods and a tck. Each source in turn
// raises its event; every destination must see it within 3 of its own clock
// edges (and not before), the tck-side mask must show exactly that source,
// and after the event is withdrawn all outputs must fall again. The arm
// channel is checked the same way and must not disturb the stop channel.
module tb_edi;
  localparam int NS = 8, ND = 5;
  logic [NS-1:0] evt_src;
  logic [NS-1:0] arm_src;
  logic [ND-1:0] dst_clk = '0, dst_rst_n, evt_dst, arm_dst;
  logic tck = 0, trst_n;
  logic [NS-1:0] evt_tck;

  always #5   dst_clk[0] = ~dst_clk[0];
  always #7.5 dst_clk[1] = ~dst_clk[1];
  always #12.5 dst_clk[2] = ~dst_clk[2];
  always #6   dst_clk[3] = ~dst_clk[3];
  always #9   dst_clk[4] = ~dst_clk[4];
  always #25  tck = ~tck;

  edi #(.N_SRC(NS), .N_DST(ND)) dut (.*);

  int checks = 0, failures = 0;
  int edges [ND];
  int seen  [ND];
  int aseen [ND];

  for (genvar d = 0; d < ND; d++) begin : g_watch
    always @(posedge dst_clk[d]) begin
      edges[d]++;
      if (evt_dst[d] && seen[d] < 0) seen[d] = edges[d];
      if (arm_dst[d] && aseen[d] < 0) aseen[d] = edges[d];
    end
  end

  initial begin
    evt_src = '0; arm_src = '0; dst_rst_n = '0; trst_n = 0;
    for (int d = 0; d < ND; d++) begin edges[d] = 0; seen[d] = -1; end
    #100; dst_rst_n = '1; trst_n = 1; #100;
    for (int s = 0; s < NS; s++) begin
      int base [ND];
      for (int d = 0; d < ND; d++) begin base[d] = edges[d]; seen[d] = -1; end
      evt_src[s] = 1'b1;
      #400;
      for (int d = 0; d < ND; d++) begin
        checks++;
        if (seen[d] < 0 || seen[d] - base[d] > 3 || seen[d] - base[d] < 2) begin
          failures++; $display("FAIL src %0d dst %0d latency %0d", s, d, seen[d] - base[d]);
        end
      end
      checks++;
      if (evt_tck != (NS'(1) << s)) begin failures++; $display("FAIL tck mask %b", evt_tck); end
      evt_src[s] = 1'b0;
      #400;
      checks++;
      if (evt_dst != '0 || evt_tck != '0) begin failures++; $display("FAIL not withdrawn"); end
    end
    for (int s = 0; s < NS; s++) begin
      int base [ND];
      for (int d = 0; d < ND; d++) begin base[d] = edges[d]; aseen[d] = -1; end
      arm_src[s] = 1'b1;
      #400;
      for (int d = 0; d < ND; d++) begin
        checks++;
        if (aseen[d] < 0 || aseen[d] - base[d] > 3 || aseen[d] - base[d] < 2) begin
          failures++; $display("FAIL arm src %0d dst %0d latency %0d", s, d, aseen[d] - base[d]);
        end
      end
      checks++;
      if (evt_dst != '0 || evt_tck != '0) begin failures++; $display("FAIL arm leaked into stop channel"); end
      arm_src[s] = 1'b0;
      #400;
      checks++;
      if (arm_dst != '0) begin failures++; $display("FAIL arm not withdrawn"); end
    end
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
