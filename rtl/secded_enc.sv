// secded_enc: SEC/DED (single error correcting, double error detecting)
// extended Hamming encoder for K data bits.
//
// Codeword layout: bit 0 is the overall parity; bits 1..K+R hold a classic
// Hamming code with parity bits at the power-of-two positions and the data
// bits, LSB first, at the remaining positions. Every codeword differs from
// every other in at least four bits. With K = 16 the code is 22 bits, with
// K = 12 it is 18 bits and with K = 7 (frame descriptor) it is 12 bits, the
// widths used by the FF-LYNX FIFOs and frame descriptor. The bit ordering is
// this design's choice. Purely combinational.
module secded_enc #(
  parameter int K = 16
) (
  input  logic [K-1:0]                           data,
  output logic [fflynx_pkg::secded_n(K)-1:0]     code
);
  import fflynx_pkg::*;
  localparam int R = hamming_r(K);
  localparam int N = K + R + 1;

  always_comb begin
    logic [N-1:0] c;
    int d;
    c = '0;
    d = 0;
    for (int pos = 1; pos < N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = data[d];
        d++;
      end
    end
    for (int i = 0; i < R; i++) begin
      logic p;
      p = 1'b0;
      for (int pos = 1; pos < N; pos++)
        if (((pos >> i) & 1) == 1 && pos != (1 << i)) p ^= c[pos];
      c[1 << i] = p;
    end
    c[0] = ^c[N-1:1];
    code = c;
  end
endmodule
