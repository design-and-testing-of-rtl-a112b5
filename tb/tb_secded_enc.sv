// tb_secded_enc: self-checking test of the SEC/DED Hamming encoder at its
// default size (16 data bits -> 22 code bits).
// For random and corner data words it checks, with a model written here:
// the code width is 22, every data bit sits at its non-power-of-two
// position in order, each Hamming check bit makes its parity group even,
// and bit 0 makes the whole word even. Purely combinational; values are
// applied and checked 1 time unit apart.
module tb_secded_enc;
  localparam int K = 16;
  localparam int N = 22;
  int checks = 0, failures = 0;
  logic [K-1:0] data;
  logic [N-1:0] code;

  secded_enc #(.K(K)) dut (.data, .code);

  task automatic check_one(input logic [K-1:0] v);
    int d, syn;
    logic ok;
    data = v;
    #1;
    ok = 1'b1;
    d = 0;
    syn = 0;
    for (int pos = 1; pos < N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        if (code[pos] !== v[d]) ok = 1'b0;
        d++;
      end
      if (code[pos]) syn ^= pos;
    end
    checks++;
    if (!ok) begin failures++; $display("data bits misplaced for %h: %b", v, code); end
    checks++;
    if (syn != 0) begin failures++; $display("syndrome %0d for %h", syn, v); end
    checks++;
    if (^code !== 1'b0) begin failures++; $display("overall parity odd for %h", v); end
  endtask

  initial begin
    checks++;
    if ($bits(code) != N) failures++;
    check_one('0);
    check_one('1);
    for (int i = 0; i < K; i++) check_one(K'(1) << i);
    for (int i = 0; i < 2000; i++) check_one(K'($urandom));
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
