// ff_frm_ana: Frame Analyzer of the FF-LYNX receiver.
//
// Link side: takes the tagged FRM chunks of the THS detector (N-2 bits per
// reference cycle). A chunk tagged as the first cycle of a header starts a
// frame; chunks tagged as trigger cycles carry an FL frame when flf_mode is
// set and are kept out of the frame stream. Frame bits collect in a 32-bit
// staging register and are parsed in order: the 12-bit coded descriptor
// (single errors corrected; a double error drops the frame and counts
// fd_err), len+1 words pushed into the external data-word FIFO (a full
// FIFO drops the word and counts word_lost), and the CRC-8 when crc_on
// (a mismatch counts crc_err). The rest of the last cycle is padding. When
// the frame ends its descriptor, re-coded, goes into the descriptor FIFO.
// The three chunks of an FL frame go into the embedded rad-hard FL FIFO.
//
// Host side (at ref_en, recovered reference cycle): a frame whose
// descriptor is stored is delivered word by word with data_valid/get_data;
// first marks its first word, is_label says that word is the label, and
// data_type/last_frame come from the descriptor. FL frames are delivered
// as (N-2)/2 6-bit words on the FL port with flf_valid/flf_get.
// data_valid falls for one reference cycle between frames; this and the
// error handling are this design's choices.
module ff_frm_ana #(
  parameter int N         = 8,
  parameter int FLF_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ref_en,
  input  logic                   flf_mode,
  input  logic                   crc_on,
  // tagged chunks from the THS detector
  input  logic                   in_stb,
  input  logic [N-3:0]           in_frm,
  input  fflynx_pkg::ths_kind_e  in_kind,
  input  logic [1:0]             in_idx,
  // data-word FIFO
  output logic                   dw_push,
  output logic [15:0]            dw_wdata,
  input  logic                   dw_full,
  output logic                   dw_pop,
  input  logic [15:0]            dw_rdata,
  input  logic                   dw_empty,
  // frame-descriptor FIFO
  output logic                   fd_push,
  output logic [11:0]            fd_wdata,
  input  logic                   fd_full,
  output logic                   fd_pop,
  input  logic [11:0]            fd_rdata,
  input  logic                   fd_empty,
  // host VLF port
  output logic [15:0]            word_out,
  output logic                   data_valid,
  input  logic                   get_data,
  output logic                   first,
  output logic                   is_label,
  output logic                   data_type,
  output logic                   last_frame,
  // host FLF port
  output logic [5:0]             flf_word,
  output logic                   flf_valid,
  input  logic                   flf_get,
  // status
  output logic [15:0]            fd_err_cnt,
  output logic [15:0]            crc_err_cnt,
  output logic [15:0]            word_lost_cnt,
  output logic [15:0]            flf_lost_cnt,
  output logic                   frame_done
);
  import fflynx_pkg::*;
  localparam int M   = N - 2;
  localparam int FB  = 3 * M;
  localparam int FLW = M / 2;

  typedef enum logic [1:0] {P_IDLE, P_FD, P_WORDS, P_CRC} pst_e;

  // parser state
  pst_e        st, st_n, st_a;
  logic [31:0] acc_a;
  logic [5:0]  cnt_a;
  logic [31:0] acc, acc_n;
  logic [5:0]  cnt, cnt_n;
  logic [4:0]  wl, wl_n;
  logic [7:0]  crc, crc_n;
  fd_t         fd, fd_n;
  logic        fd_ded_evt, crc_err_evt, word_evt;

  // FD decode / re-encode
  logic [11:0] fdc_in;
  fd_t         fd_dec;
  logic        fd_sec_unused, fd_ded;
  logic [11:0] fd_code;

  assign fdc_in = acc_a[31:20];
  secded_dec #(.K(7)) u_fddec (.code(fdc_in), .data(fd_dec), .sec(fd_sec_unused), .ded(fd_ded));
  secded_enc #(.K(7)) u_fdenc (.data(fd_n), .code(fd_code));

  logic vl_chunk, fl_chunk, hdr_start;
  assign fl_chunk  = in_stb && flf_mode && in_kind == THS_K_TRG;
  assign hdr_start = in_stb && in_kind == THS_K_HDR && in_idx == 2'd0;
  assign vl_chunk  = in_stb && !fl_chunk;

  // step 1: take in this cycle's chunk
  always_comb begin
    st_a = st; acc_a = acc; cnt_a = cnt;
    if (hdr_start) begin
      st_a  = P_FD;
      acc_a = {in_frm, {(32-M){1'b0}}};
      cnt_a = 6'(M);
    end else if (vl_chunk && st != P_IDLE) begin
      acc_a = acc | ({in_frm, {(32-M){1'b0}}} >> cnt);
      cnt_a = cnt + 6'(M);
    end
  end

  // step 2: parse up to two items (a word and the CRC can end together)
  always_comb begin
    st_n = st_a; acc_n = acc_a; cnt_n = cnt_a; wl_n = wl; fd_n = fd;
    crc_n = hdr_start ? 8'h00 : crc;
    dw_push = 1'b0; dw_wdata = '0; fd_push = 1'b0;
    fd_ded_evt = 1'b0; crc_err_evt = 1'b0; word_evt = 1'b0;
    for (int it = 0; it < 2; it++) begin
      if (st_n == P_FD && cnt_n >= 6'd12) begin
        if (fd_ded) begin
          fd_ded_evt = 1'b1;
          st_n  = P_IDLE;
          cnt_n = '0;
          acc_n = '0;
        end else begin
          fd_n  = fd_dec;
          wl_n  = {1'b0, fd_dec.len} + 5'd1;
          st_n  = P_WORDS;
          acc_n = acc_n << 12;
          cnt_n = cnt_n - 6'd12;
        end
      end else if (st_n == P_WORDS && cnt_n >= 6'd16) begin
        word_evt = 1'b1;
        dw_push  = !dw_full;
        dw_wdata = acc_n[31:16];
        crc_n    = crc8_word(crc_n, acc_n[31:16]);
        acc_n    = acc_n << 16;
        cnt_n    = cnt_n - 6'd16;
        wl_n     = wl_n - 5'd1;
        if (wl_n == 0) begin
          if (crc_on) st_n = P_CRC;
          else begin
            st_n = P_IDLE; fd_push = 1'b1; cnt_n = '0; acc_n = '0;
          end
        end
      end else if (st_n == P_CRC && cnt_n >= 6'd8) begin
        crc_err_evt = (acc_n[31:24] != crc_n);
        st_n = P_IDLE; fd_push = 1'b1; cnt_n = '0; acc_n = '0;
      end
    end
  end
  assign fd_wdata   = fd_code;
  assign frame_done = fd_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; acc <= '0; cnt <= '0; wl <= '0; crc <= '0; fd <= '0;
      fd_err_cnt <= '0; crc_err_cnt <= '0; word_lost_cnt <= '0;
    end else begin
      st <= st_n; acc <= acc_n; cnt <= cnt_n; wl <= wl_n; crc <= crc_n; fd <= fd_n;
      if (fd_ded_evt && fd_err_cnt != 16'hFFFF) fd_err_cnt <= fd_err_cnt + 1'b1;
      if (crc_err_evt && crc_err_cnt != 16'hFFFF) crc_err_cnt <= crc_err_cnt + 1'b1;
      if (word_evt && dw_full && word_lost_cnt != 16'hFFFF) word_lost_cnt <= word_lost_cnt + 1'b1;
    end
  end

  // ---------------- FL frames ----------------
  logic [FB-1:0] fl_acc;
  logic          fl_push, fl_full, fl_empty, fl_ded_unused, fl_afull_unused;
  logic [FB-1:0] fl_rd;
  logic [$clog2(FLF_DEPTH+1)-1:0] fl_lvl_unused;
  logic [15:0]   fl_sec_unused, fl_dedc_unused;
  logic [FB-1:0] unp;
  logic [3:0]    unp_n;
  logic          fl_pop;

  assign fl_push = fl_chunk && in_idx == 2'd2 && !fl_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_acc <= '0;
      flf_lost_cnt <= '0;
    end else if (fl_chunk) begin
      fl_acc <= FB'({fl_acc, in_frm});
      if (in_idx == 2'd2 && fl_full && flf_lost_cnt != 16'hFFFF) flf_lost_cnt <= flf_lost_cnt + 1'b1;
    end
  end

  rh_fifo #(.W(FB), .DEPTH(FLF_DEPTH), .AF(1)) u_fifo_flf (
    .clk(clk), .rst_n(rst_n), .push(fl_push), .wdata(FB'({fl_acc, in_frm})),
    .pop(fl_pop), .rdata(fl_rd), .rd_ded(fl_ded_unused),
    .empty(fl_empty), .full(fl_full), .afull(fl_afull_unused), .level(fl_lvl_unused),
    .sec_cnt(fl_sec_unused), .ded_cnt(fl_dedc_unused),
    .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  assign fl_pop    = ref_en && unp_n == 0 && !fl_empty;
  assign flf_valid = (unp_n != 0);
  assign flf_word  = unp[FB-1 -: 6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unp <= '0; unp_n <= '0;
    end else if (ref_en) begin
      if (fl_pop) begin
        unp <= fl_rd; unp_n <= 4'(FLW);
      end else if (flf_valid && flf_get) begin
        unp <= unp << 6; unp_n <= unp_n - 4'd1;
      end
    end
  end

  // ---------------- host VLF delivery ----------------
  logic       o_act, o_first;
  logic [4:0] o_wl;
  fd_t        o_fd, o_fd_dec;
  logic       o_sec_unused, o_ded_unused;
  secded_dec #(.K(7)) u_odec (.code(fd_rdata), .data(o_fd_dec), .sec(o_sec_unused), .ded(o_ded_unused));

  assign fd_pop     = ref_en && !o_act && !fd_empty;
  assign data_valid = o_act && !dw_empty;
  assign word_out   = dw_rdata;
  assign dw_pop     = ref_en && data_valid && get_data;
  assign first      = o_first;
  assign is_label   = o_first && o_fd.label_on;
  assign data_type  = o_fd.data_type;
  assign last_frame = o_fd.last_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_act <= 1'b0; o_first <= 1'b0; o_wl <= '0; o_fd <= '0;
    end else if (ref_en) begin
      if (fd_pop) begin
        o_act   <= 1'b1;
        o_first <= 1'b1;
        o_fd    <= o_fd_dec;
        o_wl    <= {1'b0, o_fd_dec.len} + 5'd1;
      end else if (dw_pop) begin
        o_first <= 1'b0;
        o_wl    <= o_wl - 5'd1;
        if (o_wl == 5'd1) o_act <= 1'b0;
      end
    end
  end

  // the FD FIFO is sized like the DW FIFO; a full FD FIFO cannot occur
  // before the DW FIFO is full, so fd_full is only observed here
  logic fd_full_seen_unused;
  assign fd_full_seen_unused = fd_full;
endmodule
