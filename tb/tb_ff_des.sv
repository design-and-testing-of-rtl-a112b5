// tb_ff_des: self-checking test of the receiver deserializer at 8xF
// (8 bits per reference cycle). Random serial bits are shifted in on
// random bit enables; cyc_end marks every 8th enabled bit. A model keeps
// the bit history. Checks: win always holds the last 24 bits with the
// newest (the current din) at bit 0; after each cycle end, word holds the
// 8 bits of that cycle in arrival order (first bit at the MSB) and wstb is
// high for exactly one clock.
module tb_ff_des;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic bit_en = 0, din = 0, cyc_end = 0, wstb;
  logic [3*N-1:0] win, hist = '0;
  logic [N-1:0] word, exp_word;
  logic exp_stb = 0;

  ff_des #(.N(N)) dut (.clk, .rst_n, .bit_en, .din, .cyc_end, .win, .word, .wstb);

  initial begin
    int nb = 0, nw = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      bit_en = ($urandom_range(0, 2) != 0);
      din = 1'($urandom);
      cyc_end = bit_en && (nb % N == N - 1);
      #1;
      checks++;
      if (win !== {hist[3*N-2:0], din}) begin failures++; $display("win %h exp %h", win, {hist[3*N-2:0], din}); end
      checks++;
      if (wstb !== exp_stb) begin failures++; $display("wstb %b exp %b", wstb, exp_stb); end
      if (exp_stb) begin
        checks++;
        if (word !== exp_word) begin failures++; $display("word %h exp %h", word, exp_word); end
        nw++;
      end
      @(posedge clk);
      exp_stb = cyc_end;
      if (cyc_end) exp_word = {hist[N-2:0], din};
      if (bit_en) begin hist = {hist[3*N-2:0], din}; nb++; end
    end
    checks++;
    if (nw < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
