// ff_des: Deserializer of the FF-LYNX receiver.
//
// Shifts the serial input in on every bit_en. win exposes the last 3*N
// received bits including the bit arriving now (newest in bit 0), which the
// synchronizer searches for the sync pattern. At the last bit of a reference
// cycle (cyc_end from the synchronizer) the N bits of that cycle are
// registered on word, with the THS pair in word[N-1:N-2] and the FRM bits
// below, and wstb pulses for one clock.
module ff_des #(
  parameter int N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bit_en,
  input  logic           din,
  input  logic           cyc_end,
  output logic [3*N-1:0] win,
  output logic [N-1:0]   word,
  output logic           wstb
);
  logic [3*N-2:0] sr;

  assign win = {sr, din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      word <= '0;
      wstb <= 1'b0;
    end else begin
      wstb <= 1'b0;
      if (bit_en) begin
        sr <= win[3*N-2:0];
        if (cyc_end) begin
          word <= win[N-1:0];
          wstb <= 1'b1;
        end
      end
    end
  end
endmodule
