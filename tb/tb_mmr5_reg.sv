// tb_mmr5_reg: self-checking test of the five-copy majority register used
// for configuration bits. A model follows every write (we = 1). Random
// upsets of one or two copies at once (random masks) are injected on cycles
// without a write: the output must still equal the model, mism must flag
// the disagreement, and the copies must be rewritten with the voted value
// on the next clock (mism low again). Three upset copies with the same mask
// must flip the output (the limit of a 5-copy vote).
module tb_mmr5_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0, mism;
  logic [W-1:0] d = '0, q, mask = '0, model;
  logic [4:0] seu = '0;

  mmr5_reg #(.W(W)) dut (.clk, .rst_n, .we, .d, .q, .mism, .seu, .seu_mask(mask));

  initial begin
    int a, b;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) == 0);
      d = W'($urandom);
      seu = '0;
      if ($urandom_range(0, 3) == 0) begin
        a = $urandom_range(0, 4);
        b = $urandom_range(0, 4);
        seu = (5'b00001 << a) | (5'b00001 << b);
        mask = W'($urandom) | W'(1);
        we = 1'b0;
      end
      @(posedge clk);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("q %h exp %h at %0d", q, model, i); end
      checks++;
      if (mism !== (seu != 0)) begin failures++; $display("mism %b after seu %b", mism, seu); end
    end
    @(negedge clk); we = 0; seu = 5'b00111; mask = 8'h80;
    @(posedge clk); #1;
    checks++;
    if (q !== (model ^ 8'h80)) begin failures++; $display("triple upset not visible"); end
    seu = '0;
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
