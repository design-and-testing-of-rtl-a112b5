// prg_lfsr: W-bit pseudo random generator, a Galois linear feedback shift
// register (W = 16: polynomial x^16 + x^14 + x^13 + x^11 + 1, maximal
// length 65535). value is the current state; en advances it one step per
// clock; load sets it to seed (a zero seed is replaced by 1, since the
// all-zero state would lock). The generator type and polynomial are this
// design's choice: the document only names pseudo random generators.
module prg_lfsr #(
  parameter int           W    = 16,
  parameter logic [W-1:0] TAPS = 16'hB400,
  parameter logic [W-1:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= SEED;
    else if (load) value <= (seed == '0) ? W'(1) : seed;
    else if (en) value <= (value >> 1) ^ (value[0] ? TAPS : '0);
  end
endmodule
