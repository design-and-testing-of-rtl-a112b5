// ff_ser: Serializer of the FF-LYNX transmitter.
//
// At every ref_en it builds the N-bit word of the next reference cycle and
// then shifts it out MSB first, one bit per bit_en. The two leading bits are
// the THS channel: the current pair of a running trigger/header/sync pattern
// (three cycles each, started by trg_go/hdr_go/syn_go) or 00. The other N-2
// bits are the FRM channel: during the three cycles of a trigger in FL mode
// they carry the FL frame, otherwise the next N-2 bits of the variable
// latency frame in progress, or zeros.
//
// A frame starts at hdr_go (its first bits go out in the header's first
// cycle) and is the bit string: 12-bit coded descriptor, len+1 words from
// the TX buffer (label first when present), then the CRC-8 of those words
// when crc_on. Words are appended to a 48-bit staging buffer one per
// reference cycle, which always holds at least N-2 bits while the frame
// lasts; the last cycle is padded with zeros. busy is high while a frame is
// being sent. Frame bits are suspended, not lost, during FL cycles.
// Bit order, staging and CRC placement are this design's choices within the
// frame format of the document.
module ff_ser #(
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  input  logic                 ref_en,
  input  logic                 trg_go,
  input  logic                 hdr_go,
  input  logic                 syn_go,
  input  logic                 flf_mode,
  input  logic                 crc_on,
  input  logic [11:0]          fdc,
  input  logic [3:0]           fd_len,
  input  logic [3*(N-2)-1:0]   flf_frame,
  input  logic [15:0]          buf_word,
  output logic                 buf_pop,
  output logic                 busy,
  output logic                 dat
);
  import fflynx_pkg::*;
  localparam int M  = N - 2;
  localparam int BW = 48;
  localparam int FB = 3 * M;

  // control state (TMR protected)
  typedef struct packed {
    logic       active;
    logic [4:0] wl;        // words still to append
    logic       crc_pend;
    logic [1:0] ths_c;     // remaining THS pairs after this cycle
    logic [1:0] flf_c;     // remaining FL cycles after this cycle
  } ser_t;
  ser_t s, s_n;
  logic mism_unused;

  logic [BW-1:0]  sb, sb_n;
  logic [6:0]     sc, sc_n;
  logic [7:0]     crc, crc_n;
  logic [3:0]     ths_sh, ths_sh_n;   // pending THS pairs
  logic [FB-1:0]  fl_sh, fl_sh_n;
  logic [N-1:0]   word, shr;

  always_comb begin
    logic [1:0]  pair;
    logic [M-1:0] chunk;
    logic fl_cycle;
    logic [5:0] pat;
    s_n      = s;
    sb_n     = sb;
    sc_n     = sc;
    crc_n    = crc;
    ths_sh_n = ths_sh;
    fl_sh_n  = fl_sh;
    buf_pop  = 1'b0;
    pair     = 2'b00;
    chunk    = '0;
    fl_cycle = 1'b0;
    pat      = trg_go ? THS_TRG : (hdr_go ? THS_HDR : THS_SYN);
    if (ref_en) begin
      // THS channel
      if (trg_go || hdr_go || syn_go) begin
        pair       = pat[5:4];
        ths_sh_n   = pat[3:0];
        s_n.ths_c  = 2'd2;
      end else if (s.ths_c != 0) begin
        pair       = ths_sh[3:2];
        ths_sh_n   = {ths_sh[1:0], 2'b00};
        s_n.ths_c  = s.ths_c - 2'd1;
      end
      // FL frame cycles
      if (trg_go && flf_mode) begin
        fl_cycle  = 1'b1;
        chunk     = flf_frame[FB-1 -: M];
        fl_sh_n   = flf_frame << M;
        s_n.flf_c = 2'd2;
      end else if (s.flf_c != 0) begin
        fl_cycle  = 1'b1;
        chunk     = fl_sh[FB-1 -: M];
        fl_sh_n   = fl_sh << M;
        s_n.flf_c = s.flf_c - 2'd1;
      end
      // VL frame: start, append one item, then take a chunk
      if (hdr_go) begin
        sb_n         = {fdc, {(BW-12){1'b0}}};
        sc_n         = 7'd12;
        s_n.active   = 1'b1;
        s_n.wl       = {1'b0, fd_len} + 5'd1;
        s_n.crc_pend = crc_on;
        crc_n        = '0;
      end
      if (s_n.active) begin
        if (s_n.wl != 0 && int'(sc_n) + 16 <= BW) begin
          sb_n     = sb_n | ({buf_word, {(BW-16){1'b0}}} >> sc_n);
          sc_n     = sc_n + 7'd16;
          crc_n    = crc8_word(crc_n, buf_word);
          buf_pop  = 1'b1;
          s_n.wl   = s_n.wl - 5'd1;
        end else if (s_n.wl == 0 && s_n.crc_pend && int'(sc_n) + 8 <= BW) begin
          sb_n         = sb_n | ({crc_n, {(BW-8){1'b0}}} >> sc_n);
          sc_n         = sc_n + 7'd8;
          s_n.crc_pend = 1'b0;
        end
        if (!fl_cycle) begin
          chunk = sb_n[BW-1 -: M];
          sb_n  = sb_n << M;
          sc_n  = (int'(sc_n) > M) ? sc_n - 7'(M) : 7'd0;
          if (sc_n == 0 && s_n.wl == 0 && !s_n.crc_pend) s_n.active = 1'b0;
        end
      end
    end
    word = {pair, chunk};
  end

  tmr_reg #(.W($bits(ser_t))) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(s_n), .q(s), .mism(mism_unused),
    .seu(3'b000), .seu_mask('0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb <= '0; sc <= '0; crc <= '0; ths_sh <= '0; fl_sh <= '0; shr <= '0;
    end else begin
      sb <= sb_n; sc <= sc_n; crc <= crc_n; ths_sh <= ths_sh_n; fl_sh <= fl_sh_n;
      if (ref_en)      shr <= word;
      else if (bit_en) shr <= shr << 1;
    end
  end

  assign dat  = shr[N-1];
  assign busy = s.active;
endmodule
