// ff_sync: Synchronizer of the FF-LYNX receiver.
//
// Recovers the reference-cycle timing from the received stream. While
// hunting, at every received bit it checks whether the THS positions of the
// last three N-bit cycles hold the sync pattern exactly; on a match the bit
// just received is taken as the end of a cycle and the phase counter locks.
// When locked, cyc_end marks the last bit of each cycle (the recovered
// reference clock). ERR_MAX consecutive undecodable THS sequences reported by
// the THS detector send it back to hunting; any good sequence resets the
// count. The lock and unlock rules are this design's choices.
module ff_sync #(
  parameter int N       = 8,
  parameter int ERR_MAX = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bit_en,
  input  logic [3*N-1:0] win,
  input  logic           ths_ok,
  input  logic           ths_err,
  output logic           cyc_end,
  output logic           locked,
  output logic           relock      // pulses when lock is lost
);
  import fflynx_pkg::*;
  typedef struct packed {
    logic                 lk;
    logic [$clog2(N)-1:0] ph;
    logic [2:0]           errs;
  } sy_t;
  sy_t s, s_n;
  logic match, mism_unused;

  assign match = ({win[3*N-1 -: 2], win[2*N-1 -: 2], win[N-1 -: 2]} == THS_SYN);

  always_comb begin
    s_n     = s;
    relock  = 1'b0;
    cyc_end = bit_en && s.lk && (int'(s.ph) == N - 1);
    if (!s.lk) begin
      if (bit_en && match) begin
        s_n.lk   = 1'b1;
        s_n.ph   = '0;
        s_n.errs = '0;
      end
    end else begin
      if (bit_en) s_n.ph = (int'(s.ph) == N - 1) ? '0 : s.ph + 1'b1;
      if (ths_ok) s_n.errs = '0;
      else if (ths_err) begin
        if (int'(s.errs) + 1 >= ERR_MAX) begin
          s_n.lk   = 1'b0;
          s_n.errs = '0;
          relock   = 1'b1;
        end else s_n.errs = s.errs + 3'd1;
      end
    end
  end

  tmr_reg #(.W($bits(sy_t))) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(s_n), .q(s), .mism(mism_unused),
    .seu(3'b000), .seu_mask('0));

  assign locked = s.lk;
endmodule
