// ff_frm_bld: Frame Builder of the FF-LYNX transmitter.
//
// Host side (sampled at ref_en, once per reference cycle): a 16-bit word is
// taken when data_valid and get_data are both high; a packet is one
// uninterrupted data_valid burst. get_data drops when the data-word buffer
// or the descriptor buffer is almost full. Packets are cut into frames of at
// most 16 words; when label_on is high at the start of a packet its first
// word is the label, and only the first frame of the packet carries it.
// Words go straight into the external data-word FIFO; when a frame is
// complete (16 words and a further word arrives, or data_valid falls) its
// 7-bit frame descriptor {len-1, label_on, data_type, last_frame} is
// Hamming coded to 12 bits and pushed into the descriptor FIFO.
//
// Serializer side: while a descriptor waits and the serializer is idle,
// hdr_req asks the THS scheduler for a header; at hdr_go the descriptor is
// popped and its code and length go to the serializer.
//
// Fixed-latency frames: 6-bit words from the FL port (flf_valid/flf_get
// handshake) are packed, FLW = (N-2)/2 words per frame, into 3*(N-2)-bit FL
// frames (the FRM bits of the three trigger cycles) kept in the embedded
// rad-hard FIFO_FLF; one is popped at each trigger when flf_mode is set.
// An empty FIFO_FLF at a trigger sends zeros and pulses flf_underrun.
// Packing FL words into frames of FLW words is this design's reading of the
// 6-bit FL port; the packet/frame rules follow the document.
module ff_frm_bld #(
  parameter int N         = 8,
  parameter int FLF_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ref_en,
  // host VLF port
  input  logic [15:0]          word_in,
  input  logic                 data_valid,
  input  logic                 label_on,
  input  logic                 data_type,
  output logic                 get_data,
  // host FLF port
  input  logic [5:0]           flf_word,
  input  logic                 flf_valid,
  output logic                 flf_get,
  // data-word FIFO (write side)
  output logic                 dw_push,
  output logic [15:0]          dw_wdata,
  input  logic                 dw_afull,
  // frame-descriptor FIFO
  output logic                 fd_push,
  output logic [11:0]          fd_wdata,
  input  logic                 fd_afull,
  output logic                 fd_pop,
  input  logic [11:0]          fd_rdata,
  input  logic                 fd_empty,
  // to/from scheduler and serializer
  output logic                 hdr_req,
  input  logic                 hdr_go,
  input  logic                 trg_go,
  input  logic                 flf_mode,
  input  logic                 ser_busy,
  output logic [11:0]          fdc,
  output logic [3:0]           fd_len,
  output logic [3*(N-2)-1:0]   flf_frame,
  output logic                 flf_underrun
);
  import fflynx_pkg::*;
  localparam int FLW = (N - 2) / 2;
  localparam int FB  = 3 * (N - 2);

  typedef struct packed {
    logic       in_pkt;
    logic [4:0] in_cnt;
    logic       lbl;
    logic       dt;
  } fb_t;

  fb_t  s, s_n;
  fd_t  fd_new, fd_rx;
  logic [11:0] fd_code;
  logic xfer, fd_sec_unused, fd_ded_unused, mism_unused;

  // packer for FL words
  logic [FB-1:0] pk;
  logic [$clog2(FLW+1)-1:0] pk_n;
  logic flf_xfer, flf_push, flf_full, flf_empty;
  logic [FB-1:0] flf_rd;
  logic flf_ded_unused, flf_afull_unused;
  logic [$clog2(FLF_DEPTH+1)-1:0] flf_lvl_unused;
  logic [15:0] flf_sec_cnt_unused, flf_ded_cnt_unused;

  assign get_data = !dw_afull && !fd_afull;
  assign xfer     = ref_en && data_valid && get_data;
  assign dw_push  = xfer;
  assign dw_wdata = word_in;

  always_comb begin
    s_n     = s;
    fd_push = 1'b0;
    fd_new  = '0;
    if (ref_en) begin
      if (xfer) begin
        if (!s.in_pkt) begin
          s_n.in_pkt = 1'b1;
          s_n.lbl    = label_on;
          s_n.dt     = data_type;
          s_n.in_cnt = 5'd1;
        end else if (s.in_cnt == 5'd16) begin
          fd_push       = 1'b1;
          fd_new        = '{len: 4'd15, label_on: s.lbl, data_type: s.dt, last_frame: 1'b0};
          s_n.lbl       = 1'b0;
          s_n.in_cnt    = 5'd1;
        end else begin
          s_n.in_cnt = s.in_cnt + 5'd1;
        end
      end else if (!data_valid && s.in_pkt) begin
        fd_push    = 1'b1;
        fd_new     = '{len: 4'(s.in_cnt - 5'd1), label_on: s.lbl, data_type: s.dt, last_frame: 1'b1};
        s_n.in_pkt = 1'b0;
        s_n.in_cnt = 5'd0;
      end
    end
  end

  tmr_reg #(.W($bits(fb_t))) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(s_n), .q(s), .mism(mism_unused),
    .seu(3'b000), .seu_mask('0));

  secded_enc #(.K(7)) u_fdenc (.data(fd_new), .code(fd_code));
  assign fd_wdata = fd_code;

  // descriptor to serializer
  assign hdr_req = !fd_empty && !ser_busy;
  assign fd_pop  = hdr_go;
  assign fdc     = fd_rdata;
  secded_dec #(.K(7)) u_fddec (.code(fd_rdata), .data(fd_rx), .sec(fd_sec_unused), .ded(fd_ded_unused));
  assign fd_len  = fd_rx.len;

  // FL word packer and FIFO_FLF
  assign flf_get  = !flf_full;
  assign flf_xfer = ref_en && flf_valid && flf_get;
  assign flf_push = flf_xfer && (int'(pk_n) == FLW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk   <= '0;
      pk_n <= '0;
    end else if (flf_xfer) begin
      pk   <= FB'({pk, flf_word});
      pk_n <= flf_push ? '0 : pk_n + 1'b1;
    end
  end

  logic [FB-1:0] flf_wdata;
  assign flf_wdata = FB'({pk, flf_word});

  rh_fifo #(.W(FB), .DEPTH(FLF_DEPTH), .AF(1)) u_fifo_flf (
    .clk(clk), .rst_n(rst_n), .push(flf_push), .wdata(flf_wdata),
    .pop(trg_go && flf_mode), .rdata(flf_rd), .rd_ded(flf_ded_unused),
    .empty(flf_empty), .full(flf_full), .afull(flf_afull_unused), .level(flf_lvl_unused),
    .sec_cnt(flf_sec_cnt_unused), .ded_cnt(flf_ded_cnt_unused),
    .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  assign flf_frame    = flf_empty ? '0 : flf_rd;
  assign flf_underrun = trg_go && flf_mode && flf_empty;
endmodule
