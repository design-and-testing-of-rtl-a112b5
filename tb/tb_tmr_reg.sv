// tb_tmr_reg: self-checking test of the triplicated register with voter.
// A model register follows every load (en = 1) and holds otherwise.
// Random single-copy upsets (seu one-hot with a random mask) are injected
// on some clocks: the voted output must always equal the model, the
// mismatch flag must rise in the cycle after the upset, and the upset copy
// must be repaired one clock later when en is low (the copies reload the
// voted value), so mism falls again. Two copies upset at once with the same
// mask must win the vote (the documented limit of triplication).
module tb_tmr_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, mism;
  logic [W-1:0] d = '0, q, mask = '0, model;
  logic [2:0] seu = '0;

  tmr_reg #(.W(W)) dut (.clk, .rst_n, .en, .d, .q, .mism, .seu, .seu_mask(mask));

  initial begin
    int nup = 0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) == 0);
      d = W'($urandom);
      seu = '0;
      if ($urandom_range(0, 5) == 0) begin
        seu = 3'b001 << $urandom_range(0, 2);
        mask = W'($urandom) | W'(1);
        en = 1'b0;
        nup++;
      end
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("q %h exp %h at %0d", q, model, i); end
      checks++;
      if (mism !== (seu != 0)) begin failures++; $display("mism %b after seu %b", mism, seu); end
    end
    // double upset on two copies defeats the vote
    @(negedge clk); en = 0; seu = 3'b011; mask = 8'h01;
    @(posedge clk); #1;
    checks++;
    if (q !== (model ^ 8'h01)) begin failures++; $display("double upset not visible"); end
    seu = '0;
    $display("upsets injected %0d", nup);
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
