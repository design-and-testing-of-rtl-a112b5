// tb_secded_dec: self-checking test of the SEC/DED Hamming decoder at its
// default size (22 code bits -> 16 data bits).
// Random data is encoded by a model written here (data at the
// non-power-of-two positions, check bit 2^i = parity of positions with bit i
// set, bit 0 = overall parity). Then 0, 1 or 2 random distinct bits are
// flipped. Expected: no error -> data back, sec = ded = 0; one flip (any
// position, including the parity bits) -> data corrected, sec = 1, ded = 0;
// two flips -> ded = 1, sec = 0. Purely combinational.
module tb_secded_dec;
  localparam int K = 16;
  localparam int N = 22;
  int checks = 0, failures = 0;
  logic [N-1:0] code;
  logic [K-1:0] data;
  logic sec, ded;

  secded_dec #(.K(K)) dut (.code, .data, .sec, .ded);

  function automatic logic [N-1:0] enc(input logic [K-1:0] v);
    logic [N-1:0] c;
    int d;
    c = '0;
    d = 0;
    for (int pos = 1; pos < N; pos++)
      if ((pos & (pos - 1)) != 0) begin c[pos] = v[d]; d++; end
    for (int i = 0; i < 5; i++)
      for (int pos = 1; pos < N; pos++)
        if (((pos >> i) & 1) == 1 && pos != (1 << i)) c[1 << i] ^= c[pos];
    c[0] = ^c[N-1:1];
    return c;
  endfunction

  initial begin
    logic [K-1:0] v;
    int a, b, nerr;
    for (int t = 0; t < 3000; t++) begin
      v = K'($urandom);
      nerr = t % 3;
      code = enc(v);
      a = $urandom_range(0, N - 1);
      b = (a + $urandom_range(1, N - 1)) % N;
      if (nerr >= 1) code[a] = ~code[a];
      if (nerr == 2) code[b] = ~code[b];
      #1;
      checks++;
      case (nerr)
        0: if (data !== v || sec !== 1'b0 || ded !== 1'b0) begin
             failures++; $display("clean word: got %h sec %b ded %b exp %h", data, sec, ded, v);
           end
        1: if (data !== v || sec !== 1'b1 || ded !== 1'b0) begin
             failures++; $display("1 error at %0d: got %h sec %b ded %b exp %h", a, data, sec, ded, v);
           end
        default: if (ded !== 1'b1 || sec !== 1'b0) begin
             failures++; $display("2 errors at %0d,%0d: sec %b ded %b", a, b, sec, ded);
           end
      endcase
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
