// tb_prg_lfsr: self-checking test of the pseudo-random generator (16-bit
// Galois LFSR, taps 0xB400, reset seed 0xACE1).
// Checks: the value after reset is the seed; each enabled clock matches a
// model step (shift right, xor taps when the old LSB was 1); a disabled
// clock holds; a load takes the new seed (a zero seed becomes 1, since the
// all-zero state would lock); the register never reaches zero; and the
// sequence from one seed has the full period of 65535 states.
module tb_prg_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, load = 0;
  logic [15:0] seed = '0, value, model;

  prg_lfsr dut (.clk, .rst_n, .en, .load, .seed, .value);

  function automatic logic [15:0] step(input logic [15:0] v);
    return (v >> 1) ^ (v[0] ? 16'hB400 : 16'h0000);
  endfunction

  initial begin
    int period;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (value !== 16'hACE1) begin failures++; $display("reset value %h", value); end
    rst_n = 1;
    model = 16'hACE1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      load = ($urandom_range(0, 40) == 0);
      seed = ($urandom_range(0, 3) == 0) ? 16'h0000 : 16'($urandom);
      @(posedge clk);
      if (load) model = (seed == 0) ? 16'h0001 : seed;
      else if (en) model = step(model);
      #1;
      checks++;
      if (value !== model) begin failures++; $display("value %h exp %h", value, model); end
      checks++;
      if (value == 16'h0000) begin failures++; $display("zero state"); end
    end
    // period from a fixed seed
    @(negedge clk); load = 1; seed = 16'h0001; en = 0;
    @(negedge clk); load = 0; en = 1;
    period = 0;
    do begin @(negedge clk); period++; end while (value != 16'h0001 && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
