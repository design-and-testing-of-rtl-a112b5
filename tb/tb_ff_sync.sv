// tb_ff_sync: self-checking test of the receiver synchronizer at 8xF.
// The testbench builds the serial stream itself (8-bit cycles, THS pair in
// the two MSBs) and feeds the 24-bit window the deserializer would give.
// Checks:
//  * no lock while the stream holds only idle THS pairs and zero payload;
//  * lock on the first bit at which a sync pattern fills the window;
//  * after lock, cyc_end pulses exactly on the last bit of every cycle of
//    the stream (random bit enables, random payload);
//  * two THS errors followed by a good THS keep the lock;
//  * three consecutive THS errors drop it with one relock pulse, and the
//    next sync pattern locks again at the right phase.
module tb_ff_sync;
  localparam int N = 8;
  localparam logic [5:0] SYN = 6'b011101;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic bit_en = 0, ths_ok = 0, ths_err = 0, cyc_end, locked, relock;
  logic [3*N-1:0] win, hist = '0;
  logic din = 0;

  assign win = {hist[3*N-2:0], din};
  ff_sync #(.N(N)) dut (.clk, .rst_n, .bit_en, .win, .ths_ok, .ths_err, .cyc_end, .locked, .relock);

  int n_relock = 0;
  always @(posedge clk) if (relock) n_relock++;

  // send one cycle: 2 THS bits then N-2 payload bits; check cyc_end phase
  task automatic send_cycle(input logic [1:0] ths, input bit rnd_payload, input bit check_phase);
    logic [N-1:0] c;
    c = {ths, rnd_payload ? (N-2)'($urandom) : (N-2)'(0)};
    for (int b = N - 1; b >= 0; b--) begin
      do begin
        @(negedge clk);
        bit_en = ($urandom_range(0, 3) != 0);
        din = c[b];
        #1;
        if (check_phase && bit_en) begin
          checks++;
          if (cyc_end !== (b == 0)) begin failures++; $display("cyc_end %b at bit %0d", cyc_end, b); end
        end
        @(posedge clk);
        if (bit_en) hist <= {hist[3*N-2:0], din};
      end while (!bit_en);
    end
    @(negedge clk); bit_en = 0;
  endtask

  task automatic pulse(input bit ok);
    @(negedge clk); ths_ok = ok; ths_err = !ok;
    @(negedge clk); ths_ok = 0; ths_err = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20; i++) send_cycle(2'b00, 0, 0);
    checks++;
    if (locked) begin failures++; $display("locked on idle stream"); end
    send_cycle(SYN[5:4], 0, 0);
    send_cycle(SYN[3:2], 0, 0);
    send_cycle(SYN[1:0], 0, 0);
    #1;
    checks++;
    if (!locked) begin failures++; $display("no lock after sync"); end
    for (int i = 0; i < 200; i++) send_cycle(2'($urandom) & 2'b00, 1, 1);
    checks++;
    if (!locked) begin failures++; $display("lock lost without errors"); end
    pulse(0); pulse(0); pulse(1); pulse(0); pulse(0);
    checks++;
    if (!locked || n_relock != 0) begin failures++; $display("lock lost after non-consecutive errors"); end
    pulse(0);
    #1;
    checks++;
    if (locked || n_relock != 1) begin failures++; $display("lock kept after 3 errors (relock %0d)", n_relock); end
    // relock on a sync pattern with an odd bit offset
    for (int i = 0; i < 3; i++) send_cycle(2'b00, 0, 0);
    send_cycle(SYN[5:4], 0, 0);
    send_cycle(SYN[3:2], 0, 0);
    send_cycle(SYN[1:0], 0, 0);
    checks++;
    if (!locked) begin failures++; $display("no relock"); end
    for (int i = 0; i < 50; i++) send_cycle(2'b00, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
