// tmr_reg: W-bit register kept in three copies with a bitwise majority voter,
// the hardening used for the state registers of the FF-LYNX interface FSMs
// (one voter, one copy of the next-state logic).
//
// On every clock each copy is loaded with d when en is high, otherwise with
// the voted value, so an upset in one copy is outvoted at once and
// overwritten on the next edge. q is the voted value, mism flags that the
// copies disagree. seu/seu_mask let a test flip bits of chosen copies to
// emulate single event upsets (tie both to zero in normal use). Reset value
// RST; one clock of latency like a plain register.
module tmr_reg #(
  parameter int         W   = 8,
  parameter logic [W-1:0] RST = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         mism,
  input  logic [2:0]   seu,
  input  logic [W-1:0] seu_mask
);
  logic [W-1:0] c0, c1, c2, nxt;

  assign q    = (c0 & c1) | (c0 & c2) | (c1 & c2);
  assign mism = (c0 != c1) || (c1 != c2);
  assign nxt  = en ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= RST; c1 <= RST; c2 <= RST;
    end else begin
      c0 <= nxt ^ (seu[0] ? seu_mask : '0);
      c1 <= nxt ^ (seu[1] ? seu_mask : '0);
      c2 <= nxt ^ (seu[2] ? seu_mask : '0);
    end
  end
endmodule
