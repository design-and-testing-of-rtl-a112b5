// tb_ff_ths_det: self-checking test of the receiver THS detector at 8xF.
// A stream of 8-bit cycles is built first: idle cycles (THS pair 00) and
// 3-cycle trigger, header and sync sequences, some with one wrong THS bit
// (must still be recognised) and some with two wrong bits (must be
// rejected when no pattern is within one bit). The expected tag of every
// cycle is computed here from the protocol rule: a sequence starts at a
// cycle with a non-zero THS pair when no sequence is running; the three
// pairs are matched to the nearest pattern. The stream is then fed one
// cycle every 3 clocks. Checks: out_frm of every cycle comes out in order
// with its kind and index 0..2, trg_out/ths_ok/ths_err pulse with the
// first cycle of a recognised trigger / recognised sequence / rejected
// start, and nothing else pulses. The two outputs before the first real
// cycle come from the empty window after reset and must read as idle.
module tb_ff_ths_det;
  import fflynx_pkg::*;
  localparam int N = 8, L = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wstb = 0, out_stb, trg_out, ths_ok, ths_err;
  logic [N-1:0] word = '0;
  logic [N-3:0] out_frm;
  ths_kind_e out_kind;
  logic [1:0] out_idx;

  ff_ths_det #(.N(N)) dut (.clk, .rst_n, .wstb, .word, .out_stb, .out_frm, .out_kind, .out_idx,
    .trg_out, .ths_ok, .ths_err);

  logic [N-1:0] cyc[L + 2];
  ths_kind_e    e_kind[L];
  int           e_idx[L];
  logic         e_trg[L], e_ok[L], e_err[L];

  function automatic int hdist(input logic [5:0] a, input logic [5:0] b);
    logic [5:0] x;
    x = a ^ b;
    return int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(x[4]) + int'(x[5]);
  endfunction
  function automatic ths_kind_e nearest(input logic [5:0] p);
    if (hdist(p, 6'b110100) <= 1) return THS_K_TRG;
    if (hdist(p, 6'b101011) <= 1) return THS_K_HDR;
    if (hdist(p, 6'b011101) <= 1) return THS_K_SYN;
    return THS_NONE;
  endfunction

  initial begin
    int i, o, skip, nseq = 0, nrej = 0, nerr1 = 0;
    logic [5:0] p;
    ths_kind_e k, cur;
    // build the stream
    i = 0;
    while (i < L - 3) begin
      if ($urandom_range(0, 2) == 0) begin
        case ($urandom_range(0, 2))
          0: p = 6'b110100;
          1: p = 6'b101011;
          default: p = 6'b011101;
        endcase
        case ($urandom_range(0, 5))
          0: begin p[$urandom_range(0, 3)] ^= 1'b1; end                 // one bad bit, first pair kept
          1: begin p[$urandom_range(0, 1)] ^= 1'b1; p[$urandom_range(2, 3)] ^= 1'b1; end
          default: ;
        endcase
        if (p[5:4] == 2'b00) p[5] = 1'b1;
        for (int j = 0; j < 3; j++) cyc[i + j] = {p[5 - 2 * j -: 2], (N-2)'($urandom)};
        i += 3;
      end else begin
        cyc[i] = {2'b00, (N-2)'($urandom)};
        i++;
      end
    end
    while (i < L + 2) begin cyc[i] = {2'b00, (N-2)'($urandom)}; i++; end
    // expected tags
    skip = 0; cur = THS_NONE;
    for (i = 0; i < L; i++) begin
      e_trg[i] = 0; e_ok[i] = 0; e_err[i] = 0;
      if (skip == 0) begin
        e_idx[i] = 0;
        if (cyc[i][N-1 -: 2] != 2'b00) begin
          k = nearest({cyc[i][N-1 -: 2], cyc[i + 1][N-1 -: 2], cyc[i + 2][N-1 -: 2]});
          e_kind[i] = k;
          if (k == THS_NONE) begin e_err[i] = 1; nrej++; end
          else begin e_ok[i] = 1; e_trg[i] = (k == THS_K_TRG); skip = 2; cur = k; nseq++; end
        end else e_kind[i] = THS_NONE;
      end else begin
        e_kind[i] = cur; e_idx[i] = 3 - skip; skip--;
      end
    end
    // drive and compare
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    o = -2;
    for (i = 0; i < L + 2; i++) begin
      @(negedge clk); word = cyc[i]; wstb = 1;
      @(negedge clk); wstb = 0;
      checks++;
      if (out_stb !== 1'b1) begin failures++; $display("out_stb missing at %0d", o); end
      // the first two outputs are the empty window after reset: idle cycles
      if (o < 0) begin
        checks++;
        if (out_kind !== THS_NONE || out_frm !== '0 || ths_ok || ths_err || trg_out) begin
          failures++; $display("reset window not idle");
        end
      end else begin
        checks++;
        if (out_frm !== cyc[o][N-3:0] || out_kind !== e_kind[o] || int'(out_idx) != e_idx[o] ||
            trg_out !== e_trg[o] || ths_ok !== e_ok[o] || ths_err !== e_err[o]) begin
          failures++;
          $display("cycle %0d: frm %h kind %0d idx %0d trg %b ok %b err %b, exp %h %0d %0d %b %b %b", o,
                   out_frm, out_kind, out_idx, trg_out, ths_ok, ths_err,
                   cyc[o][N-3:0], e_kind[o], e_idx[o], e_trg[o], e_ok[o], e_err[o]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_stb || trg_out || ths_ok || ths_err) begin failures++; $display("pulse longer than one clock"); end
      o++;
    end
    $display("sequences %0d rejected %0d", nseq, nrej);
    checks++;
    if (nseq < 300 || nrej < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
