// secded_dec: decoder for the SEC/DED extended Hamming code of secded_enc.
//
// The syndrome is the XOR of the positions of all set bits of the Hamming
// part; together with the overall parity it distinguishes: no error; one
// error (syndrome points at the flipped bit, or at the parity bit 0 when the
// syndrome is zero) which is corrected; two errors (syndrome non-zero,
// overall parity even) which are only flagged. Purely combinational.
module secded_dec #(
  parameter int K = 16
) (
  input  logic [fflynx_pkg::secded_n(K)-1:0] code,
  output logic [K-1:0]                       data,
  output logic                               sec,   // single error found and corrected
  output logic                               ded    // double error detected, data unreliable
);
  import fflynx_pkg::*;
  localparam int R = hamming_r(K);
  localparam int N = K + R + 1;

  always_comb begin
    logic [N-1:0] c;
    int syn;
    logic par;
    int d;
    c   = code;
    syn = 0;
    for (int pos = 1; pos < N; pos++)
      if (c[pos]) syn = syn ^ pos;
    par = ^c;
    sec = 1'b0;
    ded = 1'b0;
    if (syn != 0 && par) begin
      sec = 1'b1;
      if (syn < N) c[syn] = ~c[syn];
      else ded = 1'b1;  // points outside a shortened code: more than one error
    end else if (syn != 0 && !par) begin
      ded = 1'b1;
    end else if (syn == 0 && par) begin
      sec = 1'b1;       // overall parity bit itself flipped
    end
    if (ded) sec = 1'b0;
    data = '0;
    d = 0;
    for (int pos = 1; pos < N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data[d] = c[pos];
        d++;
      end
    end
  end
endmodule
