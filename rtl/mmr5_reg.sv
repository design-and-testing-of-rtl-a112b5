// mmr5_reg: W-bit register kept in five copies with a bitwise 3-of-5
// majority (multi modular redundancy), used for the test-chip configuration
// and status registers so that two upset copies (a double event upset) are
// still outvoted.
//
// Each copy loads d when we is high and the voted value otherwise, which
// scrubs upsets every clock. q is the voted value; mism flags disagreement.
// seu/seu_mask flip bits of chosen copies for upset emulation (tie to zero in
// normal use). One clock write latency.
module mmr5_reg #(
  parameter int           W   = 8,
  parameter logic [W-1:0] RST = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         mism,
  input  logic [4:0]   seu,
  input  logic [W-1:0] seu_mask
);
  logic [W-1:0] c [5];
  logic [W-1:0] nxt;

  always_comb begin
    for (int b = 0; b < W; b++) begin
      int ones;
      ones = 0;
      for (int i = 0; i < 5; i++) ones += int'(c[i][b]);
      q[b] = (ones >= 3);
    end
    mism = 1'b0;
    for (int i = 1; i < 5; i++) if (c[i] != c[0]) mism = 1'b1;
  end

  assign nxt = we ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) c[i] <= RST;
    end else begin
      for (int i = 0; i < 5; i++) c[i] <= nxt ^ (seu[i] ? seu_mask : '0);
    end
  end
endmodule
