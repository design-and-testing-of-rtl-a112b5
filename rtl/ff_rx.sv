// ff_rx: FF-LYNX receiver interface (speed option N x F, N = 4, 8, 16).
//
// Recovers triggers, variable-latency frames and fixed-latency frames from
// the serial stream. Sub-blocks: Deserializer, Synchronizer (finds the
// cycle boundary from the sync pattern and gives the recovered reference
// cycle), THS Detector (trigger/header/sync recognition with one-bit error
// tolerance) and Frame Analyzer (descriptor decoding, label/payload/CRC,
// FL frames in an embedded FIFO, host delivery). The data-word buffer
// (RX_BUF) and descriptor FIFO are outside and connect through dw_*/fd_*.
//
// Clocking: one clock with bit_en marking received bits (the clock that
// comes with the double-wire link). ref_stb is the recovered reference
// cycle: the host port is sampled and updated at it. trg_out pulses once per
// received trigger (or FL frame) with a fixed delay after the stream.
module ff_rx #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic         ser_dat,
  output logic         ref_stb,
  output logic         locked,
  // configuration
  input  logic         flf_mode,
  input  logic         crc_on,
  // host VLF port
  output logic [15:0]  word_out,
  output logic         data_valid,
  input  logic         get_data,
  output logic         first,
  output logic         is_label,
  output logic         data_type,
  output logic         last_frame,
  // host FLF port and trigger
  output logic [5:0]   flf_word,
  output logic         flf_valid,
  input  logic         flf_get,
  output logic         trg_out,
  // data-word FIFO (RX_BUF)
  output logic         dw_push,
  output logic [15:0]  dw_wdata,
  input  logic         dw_full,
  output logic         dw_pop,
  input  logic [15:0]  dw_rdata,
  input  logic         dw_empty,
  // frame-descriptor FIFO
  output logic         fd_push,
  output logic [11:0]  fd_wdata,
  input  logic         fd_full,
  output logic         fd_pop,
  input  logic [11:0]  fd_rdata,
  input  logic         fd_empty,
  // status
  output logic [15:0]  fd_err_cnt,
  output logic [15:0]  crc_err_cnt,
  output logic [15:0]  word_lost_cnt,
  output logic [15:0]  flf_lost_cnt,
  output logic         frame_done,
  output logic         relock
);
  import fflynx_pkg::*;
  logic [3*N-1:0] win;
  logic [N-1:0]   word;
  logic           wstb, cyc_end, ths_ok, ths_err, d_stb;
  logic [N-3:0]   d_frm;
  ths_kind_e      d_kind;
  logic [1:0]     d_idx;

  ff_des #(.N(N)) u_des (.clk(clk), .rst_n(rst_n), .bit_en(bit_en), .din(ser_dat), .cyc_end(cyc_end),
    .win(win), .word(word), .wstb(wstb));

  ff_sync #(.N(N)) u_sync (.clk(clk), .rst_n(rst_n), .bit_en(bit_en), .win(win), .ths_ok(ths_ok),
    .ths_err(ths_err), .cyc_end(cyc_end), .locked(locked), .relock(relock));

  ff_ths_det #(.N(N)) u_det (.clk(clk), .rst_n(rst_n), .wstb(wstb), .word(word),
    .out_stb(d_stb), .out_frm(d_frm), .out_kind(d_kind), .out_idx(d_idx),
    .trg_out(trg_out), .ths_ok(ths_ok), .ths_err(ths_err));

  assign ref_stb = cyc_end;

  ff_frm_ana #(.N(N)) u_fa (
    .clk(clk), .rst_n(rst_n), .ref_en(cyc_end), .flf_mode(flf_mode), .crc_on(crc_on),
    .in_stb(d_stb), .in_frm(d_frm), .in_kind(d_kind), .in_idx(d_idx),
    .dw_push(dw_push), .dw_wdata(dw_wdata), .dw_full(dw_full),
    .dw_pop(dw_pop), .dw_rdata(dw_rdata), .dw_empty(dw_empty),
    .fd_push(fd_push), .fd_wdata(fd_wdata), .fd_full(fd_full),
    .fd_pop(fd_pop), .fd_rdata(fd_rdata), .fd_empty(fd_empty),
    .word_out(word_out), .data_valid(data_valid), .get_data(get_data), .first(first), .is_label(is_label),
    .data_type(data_type), .last_frame(last_frame),
    .flf_word(flf_word), .flf_valid(flf_valid), .flf_get(flf_get),
    .fd_err_cnt(fd_err_cnt), .crc_err_cnt(crc_err_cnt), .word_lost_cnt(word_lost_cnt),
    .flf_lost_cnt(flf_lost_cnt), .frame_done(frame_done));
endmodule
