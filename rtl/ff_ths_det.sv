// ff_ths_det: THS detector of the FF-LYNX receiver.
//
// Works on the aligned cycle words from the deserializer through a window
// of three cycles. When no sequence is running and the oldest cycle of the
// window has a non-zero THS pair, the three pairs are decoded to the nearest
// of the trigger, header and sync patterns (at most one bit wrong accepted);
// the three cycles are then tagged with that kind and an index 0..2, and the
// next two windows are skipped. An undecodable sequence pulses ths_err.
// The FRM bits of every cycle leave in order, three cycles after they
// arrived, together with their tag (out_stb, out_frm, out_kind, out_idx),
// so the frame analyzer knows which cycles carry FL frames before it sees
// them. trg_out pulses with the first cycle of every trigger.
module ff_ths_det #(
  parameter int N = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wstb,
  input  logic [N-1:0] word,
  output logic        out_stb,
  output logic [N-3:0] out_frm,
  output fflynx_pkg::ths_kind_e out_kind,
  output logic [1:0]  out_idx,
  output logic        trg_out,
  output logic        ths_ok,
  output logic        ths_err
);
  import fflynx_pkg::*;
  logic [N-1:0] w1, w2;
  ths_kind_e    t1, t2;
  logic [1:0]   skip;
  ths_kind_e    k;

  // pattern held by the oldest chunk and the two following ones
  assign k = ths_decode({w1[N-1 -: 2], w2[N-1 -: 2], word[N-1 -: 2]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1 <= '0; w2 <= '0; t1 <= THS_NONE; t2 <= THS_NONE; skip <= '0;
      out_stb <= 1'b0; out_frm <= '0; out_kind <= THS_NONE; out_idx <= '0;
      trg_out <= 1'b0; ths_ok <= 1'b0; ths_err <= 1'b0;
    end else begin
      out_stb <= 1'b0;
      trg_out <= 1'b0;
      ths_ok  <= 1'b0;
      ths_err <= 1'b0;
      if (wstb) begin
        out_stb <= 1'b1;
        out_frm <= w1[N-3:0];
        if (skip == 0) begin
          out_idx <= 2'd0;
          if (w1[N-1 -: 2] != 2'b00) begin
            out_kind <= k;
            t1 <= k;
            t2 <= k;
            if (k == THS_NONE) ths_err <= 1'b1;
            else begin
              ths_ok  <= 1'b1;
              skip    <= 2'd2;
              trg_out <= (k == THS_K_TRG);
            end
          end else begin
            out_kind <= THS_NONE;
          end
        end else begin
          out_kind <= t1;
          out_idx  <= (skip == 2'd2) ? 2'd1 : 2'd2;
          t1       <= t2;
          skip     <= skip - 2'd1;
        end
        w1 <= w2;
        w2 <= word;
      end
    end
  end
endmodule
