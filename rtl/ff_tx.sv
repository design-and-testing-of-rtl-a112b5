// ff_tx: FF-LYNX transmitter interface (speed option N x F, N = 4, 8, 16).
//
// Encapsulates host data into the FF-LYNX serial stream. Each reference
// cycle carries N bits, sent MSB first: 2 THS bits (triggers, frame headers,
// sync patterns, 6-bit patterns over three cycles) then N-2 FRM bits (frame
// data). Sub-blocks: Frame Builder (host handshake, framing, descriptors,
// FL frames in FIFO_FLF), THS Scheduler (trigger priority, fixed trigger
// latency of three reference cycles), Serializer (cycle word, shift out).
// The data-word buffer (TX_BUF) and the descriptor FIFO are outside, as in
// the test chip, and connect through the dw_*/fd_* ports.
//
// Clocking: a single clock clk; bit_en marks the link bit times (tie high
// when clk is the bit clock) and the reference cycle is N bit times, counted
// here and shown on ref_stb (one clk pulse at the last bit of every cycle;
// host inputs are sampled and get_data/flf_get are meant at that clock).
// The document clocks the frame builder and scheduler with the reference
// clock and only the serializer with the fast clock; here they share one
// clock with an enable. Configuration: flf_mode (trigger input starts an FL
// frame: up-link) or plain triggers (down-link), crc_on, sync_en.
module ff_tx #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  output logic         ref_stb,
  // configuration
  input  logic         flf_mode,
  input  logic         crc_on,
  input  logic         sync_en,
  // host VLF port
  input  logic [15:0]  word_in,
  input  logic         data_valid,
  input  logic         label_on,
  input  logic         data_type,
  output logic         get_data,
  // host FLF port and trigger
  input  logic [5:0]   flf_word,
  input  logic         flf_valid,
  output logic         flf_get,
  input  logic         trg_in,
  // serial output
  output logic         ser_dat,
  // data-word FIFO (TX_BUF)
  output logic         dw_push,
  output logic [15:0]  dw_wdata,
  input  logic         dw_afull,
  output logic         dw_pop,
  input  logic [15:0]  dw_rdata,
  // frame-descriptor FIFO
  output logic         fd_push,
  output logic [11:0]  fd_wdata,
  input  logic         fd_afull,
  output logic         fd_pop,
  input  logic [11:0]  fd_rdata,
  input  logic         fd_empty,
  // status
  output logic         trg_lost,
  output logic         flf_underrun
);
  logic [$clog2(N)-1:0] ph;
  logic ref_en, trg_go, hdr_go, syn_go, hdr_req, ser_busy;
  logic [11:0] fdc;
  logic [3:0]  fd_len;
  logic [3*(N-2)-1:0] flf_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else if (bit_en) ph <= (int'(ph) == N - 1) ? '0 : ph + 1'b1;
  end
  assign ref_en  = bit_en && (int'(ph) == N - 1);
  assign ref_stb = ref_en;

  ff_frm_bld #(.N(N)) u_fb (
    .clk(clk), .rst_n(rst_n), .ref_en(ref_en),
    .word_in(word_in), .data_valid(data_valid), .label_on(label_on), .data_type(data_type), .get_data(get_data),
    .flf_word(flf_word), .flf_valid(flf_valid), .flf_get(flf_get),
    .dw_push(dw_push), .dw_wdata(dw_wdata), .dw_afull(dw_afull),
    .fd_push(fd_push), .fd_wdata(fd_wdata), .fd_afull(fd_afull),
    .fd_pop(fd_pop), .fd_rdata(fd_rdata), .fd_empty(fd_empty),
    .hdr_req(hdr_req), .hdr_go(hdr_go), .trg_go(trg_go), .flf_mode(flf_mode), .ser_busy(ser_busy),
    .fdc(fdc), .fd_len(fd_len), .flf_frame(flf_frame), .flf_underrun(flf_underrun));

  ff_ths_sch u_sch (
    .clk(clk), .rst_n(rst_n), .ref_en(ref_en), .trg_in(trg_in), .hdr_req(hdr_req), .sync_en(sync_en),
    .trg_go(trg_go), .hdr_go(hdr_go), .syn_go(syn_go), .trg_lost(trg_lost));

  ff_ser #(.N(N)) u_ser (
    .clk(clk), .rst_n(rst_n), .bit_en(bit_en), .ref_en(ref_en),
    .trg_go(trg_go), .hdr_go(hdr_go), .syn_go(syn_go), .flf_mode(flf_mode), .crc_on(crc_on),
    .fdc(fdc), .fd_len(fd_len), .flf_frame(flf_frame),
    .buf_word(dw_rdata), .buf_pop(dw_pop), .busy(ser_busy), .dat(ser_dat));
endmodule
