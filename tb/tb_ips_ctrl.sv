// tb_ips_ctrl: self-checking test of the Intelligent Power Switch control.
// tick pulses every 4th clock; comparator inputs change after a falling
// edge and reach the logic through the 2-flop synchronisers. A model of
// the protection rules runs in ticks, and these scenarios are checked:
//  * lamp_ctrl off -> gate off; on without over-current -> gate on;
//  * short over-current pulses (shorter than oc_time) never start the
//    soft start;
//  * a lasting over-current starts the soft start after oc_time ticks:
//    gate off for t_off ticks, on for t_on ticks, repeated while the
//    over-current persists; the driver returns to steady on after an
//    on-pulse without over-current. Pulse widths are measured and compared
//    with t_on/t_off for several settings (e.g. 25/25, 15/15, 80/8);
//  * over-temperature forces the gate off at once with ot_shutdown high,
//    and the driver restarts when it clears;
//  * the KID/LID diagnosis table and the lamp fault flag.
module tb_ips_ctrl;
  localparam int CW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, lamp_ctrl = 0, over_curr = 0, over_temp = 0, kid = 0, lid = 0;
  logic [CW-1:0] oc_time = 16'd5, t_on = 16'd25, t_off = 16'd25;
  logic gate_on, soft_start, ot_shutdown, lamp_fault;
  logic [1:0] diag;
  int tc = 0;
  always @(posedge clk) tc <= tc + 1;
  assign tick = (tc % 4 == 3);

  ips_ctrl dut (.clk, .rst_n, .tick, .lamp_ctrl, .over_curr, .over_temp, .kid, .lid, .oc_time, .t_on, .t_off,
    .gate_on, .soft_start, .ot_shutdown, .diag, .lamp_fault);

  task automatic wait_ticks(input int n);
    repeat (n) begin @(posedge clk); while (!tick) @(posedge clk); end
    @(negedge clk);
  endtask

  task automatic expect_gate(input logic g, input string what);
    checks++;
    if (gate_on !== g) begin failures++; $display("%s: gate_on %b", what, gate_on); end
  endtask

  // measure the length in ticks of the next gate-off and gate-on phases
  task automatic measure(output int off_len, output int on_len);
    off_len = 0; on_len = 0;
    while (gate_on) @(negedge clk);
    while (!gate_on) begin @(posedge clk); if (tick) off_len++; @(negedge clk); end
    while (gate_on && soft_start) begin @(posedge clk); if (tick) on_len++; @(negedge clk); end
  endtask

  initial begin
    int offl, onl;
    int settings_on[3] = '{25, 15, 80};
    int settings_off[3] = '{25, 15, 8};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    expect_gate(0, "off at reset");
    lamp_ctrl = 1;
    repeat (4) @(negedge clk);
    expect_gate(1, "switched on");
    // short over-current pulses
    for (int i = 0; i < 20; i++) begin
      over_curr = 1; wait_ticks($urandom_range(1, 3)); over_curr = 0; wait_ticks(2);
      checks++;
      if (soft_start || !gate_on) begin failures++; $display("soft start on a short over-current"); end
    end
    // lasting over-current with several settings
    for (int s = 0; s < 3; s++) begin
      t_on = CW'(settings_on[s]); t_off = CW'(settings_off[s]);
      over_curr = 1;
      wait_ticks(int'(oc_time) + 2);
      checks++;
      if (!soft_start) begin failures++; $display("no soft start after oc_time"); end
      measure(offl, onl);   // first off phase already running: not measured
      for (int k = 0; k < 3; k++) begin
        measure(offl, onl);
        checks++;
        if (offl != int'(t_off) || onl != int'(t_on)) begin
          failures++; $display("soft start pulses off %0d on %0d, set %0d/%0d", offl, onl, t_off, t_on);
        end
      end
      over_curr = 0;
      measure(offl, onl);
      wait_ticks(int'(t_on) + 2);
      checks++;
      if (soft_start || !gate_on) begin failures++; $display("no return to steady on"); end
    end
    // over-temperature
    for (int i = 0; i < 10; i++) begin
      wait_ticks($urandom_range(1, 10));
      @(negedge clk); over_temp = 1;
      repeat (3) @(negedge clk);
      checks++;
      if (gate_on || !ot_shutdown) begin failures++; $display("no over-temperature shutdown"); end
      wait_ticks($urandom_range(1, 20));
      over_temp = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (!gate_on || ot_shutdown) begin failures++; $display("no restart after cooling"); end
    end
    // diagnosis table
    for (int i = 0; i < 40; i++) begin
      logic [1:0] e;
      {kid, lid} = 2'($urandom);
      lamp_ctrl = 1'($urandom);
      repeat (4) @(negedge clk);
      e = (!kid && !lid) ? 2'd0 : (kid && lid) ? 2'd1 : (kid && !lid) ? 2'd2 : 2'd3;
      checks++;
      if (diag !== e) begin failures++; $display("diag %0d for KID %b LID %b", diag, kid, lid); end
      checks++;
      if (lamp_fault !== ((e == 2'd3) || (lamp_ctrl && kid && e != 2'd2))) begin
        failures++; $display("lamp_fault %b for KID %b LID %b on %b", lamp_fault, kid, lid, lamp_ctrl);
      end
      checks++;
      if (!lamp_ctrl && gate_on) begin failures++; $display("gate on while commanded off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
