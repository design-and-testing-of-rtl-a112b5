// fftc1: the FF-TC1 test chip.
//
// Holds the FF-LYNX transmitter and receiver in the three speed options
// (4xF, 8xF, 16xF), one pair of 64-word rad-hard FIFOs shared by the
// transmitters (data words 16 -> 22 bits, frame descriptors 12 -> 18 bits),
// an equal pair shared by the receivers, the Built-In Test Module with its
// two 64-word FIFOs, and an I2C slave with the configuration and status
// registers. The serial pads are shared by the speed options: the selected
// transmitter drives lvds_tx_dat, the selected receiver listens.
//
// Clocking: one master clock at 16 x F. The 16x interfaces shift a bit
// every clock, the 8x and 4x ones every 2nd and 4th clock (bit enables);
// the reference cycle is 16 clocks in every option. The document gives each
// option its own link clock; the common clock with enables is this design's
// choice. Only the selected option runs; the other two are held in reset,
// and the test module restarts for one clock when the speed changes.
//
// Configuration register 0 (written over I2C): [1:0] speed (0 = 4x, 1 = 8x,
// 2 = 16x), [3:2] test mode, [4] FL mode, [5] CRC on, [6] sync patterns on.
// Register 1: [5:0] length mask of the built-in packet generator.
// Test modes (as in the chip's test set-up):
//   0 TX #1  - transmitter inputs from the parallel port pins,
//   1 TX #2  - transmitter inputs from the Built-In Test Module, started by
//              pulses on tx_trg_pin / tx_dav_pin,
//   2 RX     - receiver fed from lvds_rx_dat, outputs on the parallel port,
//   3 TX/RX  - Built-In Test Module -> transmitter -> receiver inside the
//              chip, receiver outputs on the parallel port.
// In the RX modes the parallel port drives the receiver outputs (pp_oe = 1).
// Status registers 16.. (read over I2C): SEU and DEU counts of the six
// FIFOs, receiver descriptor/CRC error and lost word counts, packets sent.
module fftc1 #(
  parameter int DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // I2C
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  // test pulses / trigger input
  input  logic        tx_trg_pin,
  input  logic        tx_dav_pin,
  // parallel port, transmitter direction (test mode TX #1)
  input  logic [15:0] pp_word_in,
  input  logic        pp_dv_in,
  input  logic        pp_label_in,
  input  logic        pp_dt_in,
  output logic        pp_get_data,
  input  logic [5:0]  pp_flf_in,
  input  logic        pp_flf_valid_in,
  output logic        pp_flf_get,
  // parallel port, receiver direction (RX and TX/RX modes)
  output logic        pp_oe,
  output logic [15:0] pp_word_out,
  output logic        pp_dv_out,
  output logic        pp_first,
  output logic        pp_label_out,
  output logic        pp_dt_out,
  output logic        pp_last_out,
  input  logic        pp_get_in,
  output logic [5:0]  pp_flf_out,
  output logic        pp_flf_valid_out,
  input  logic        pp_flf_get_in,
  output logic        rx_trg_out,
  // serial pads
  output logic        lvds_tx_dat,
  input  logic        lvds_rx_dat,
  output logic        tx_ref_stb,
  output logic        rx_ref_stb,
  output logic        rx_locked
);
  localparam int NS = 3;

  // ---------------- configuration ----------------
  logic [31:0] cfg;
  logic [1:0]  speed, mode;
  logic        flf_mode, crc_on, sync_en, cfg_mism;
  logic [5:0]  len_mask;
  logic [16*8-1:0] st;
  assign speed    = (cfg[1:0] == 2'd3) ? 2'd2 : cfg[1:0];
  assign mode     = cfg[3:2];
  assign flf_mode = cfg[4];
  assign crc_on   = cfg[5];
  assign sync_en  = cfg[6];
  assign len_mask = cfg[13:8];

  i2c_regs #(.NCFG(4), .NST(16)) u_i2c (.clk(clk), .rst_n(rst_n), .scl(scl), .sda_in(sda_in), .sda_oe(sda_oe),
    .cfg(cfg), .st(st), .cfg_mism(cfg_mism));

  // ---------------- bit enables ----------------
  logic [1:0] bc;
  logic [NS-1:0] ben;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bc <= '0;
    else bc <= bc + 2'd1;
  end
  assign ben[0] = (bc == 2'd3);
  assign ben[1] = bc[0];
  assign ben[2] = 1'b1;

  // ---------------- built-in test module ----------------
  // only the selected speed option runs; the others are held in reset so
  // that a speed change always starts from a clean transmitter/receiver
  logic [NS-1:0] run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run <= '0;
    else for (int i = 0; i < NS; i++) run[i] <= (int'(speed) == i);
  end

  logic [15:0] b_word; logic b_dv, b_flv, b_trg;
  logic [5:0]  b_flw;
  logic [15:0] b_sec, b_ded, b_pkts;
  logic        sel_get, sel_flget, sel_tref;
  logic [2:0]  flw;
  assign flw = (speed == 2'd0) ? 3'd1 : (speed == 2'd1) ? 3'd3 : 3'd7;

  // the test module restarts with the selected transmitter after a speed change
  logic bist_rst_n;
  assign bist_rst_n = rst_n && run[speed];

  ff_bist u_bist (.clk(clk), .rst_n(bist_rst_n), .ref_en(sel_tref), .trg_pin(tx_trg_pin), .dav_pin(tx_dav_pin),
    .len_mask(len_mask), .flw(flw), .flf_mode(flf_mode),
    .word_in(b_word), .data_valid(b_dv), .get_data(sel_get), .flf_word(b_flw), .flf_valid(b_flv),
    .flf_get(sel_flget), .trg(b_trg), .fifo_sec_cnt(b_sec), .fifo_ded_cnt(b_ded), .pkt_cnt(b_pkts), .seu(3'b000));

  // transmitter input selection
  logic        use_bist, use_pins, rx_modes;
  logic [15:0] t_word; logic t_dv, t_lbl, t_dt, t_flv, t_trg; logic [5:0] t_flw;
  assign use_bist = (mode == 2'd1) || (mode == 2'd3);
  assign use_pins = (mode == 2'd0);
  assign rx_modes = (mode == 2'd2) || (mode == 2'd3);
  always_comb begin
    t_word = '0; t_dv = 1'b0; t_lbl = 1'b0; t_dt = 1'b0; t_flw = '0; t_flv = 1'b0; t_trg = 1'b0;
    if (use_bist) begin
      t_word = b_word; t_dv = b_dv; t_flw = b_flw; t_flv = b_flv; t_trg = b_trg;
    end else if (use_pins) begin
      t_word = pp_word_in; t_dv = pp_dv_in; t_lbl = pp_label_in; t_dt = pp_dt_in;
      t_flw = pp_flf_in; t_flv = pp_flf_valid_in; t_trg = tx_trg_pin;
    end
  end

  // ---------------- shared TX FIFOs ----------------
  logic tdw_push, tdw_pop, tdw_afull, tfd_push, tfd_pop, tfd_afull, tfd_empty;
  logic [15:0] tdw_wdata, tdw_rdata; logic [11:0] tfd_wdata, tfd_rdata;
  logic [15:0] tdw_sec, tdw_ded, tfd_sec, tfd_ded;
  logic tdw_ded_u, tdw_e_u, tdw_f_u, tfd_ded_u, tfd_f_u;
  logic [$clog2(DEPTH+1)-1:0] tdw_l_u, tfd_l_u;
  rh_fifo #(.W(16), .DEPTH(DEPTH)) u_tx_dw (.clk(clk), .rst_n(rst_n), .push(tdw_push), .wdata(tdw_wdata),
    .pop(tdw_pop), .rdata(tdw_rdata), .rd_ded(tdw_ded_u), .empty(tdw_e_u), .full(tdw_f_u), .afull(tdw_afull),
    .level(tdw_l_u), .sec_cnt(tdw_sec), .ded_cnt(tdw_ded), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(12), .DEPTH(DEPTH)) u_tx_fd (.clk(clk), .rst_n(rst_n), .push(tfd_push), .wdata(tfd_wdata),
    .pop(tfd_pop), .rdata(tfd_rdata), .rd_ded(tfd_ded_u), .empty(tfd_empty), .full(tfd_f_u), .afull(tfd_afull),
    .level(tfd_l_u), .sec_cnt(tfd_sec), .ded_cnt(tfd_ded), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  // ---------------- shared RX FIFOs ----------------
  logic rdw_push, rdw_pop, rdw_full, rdw_empty, rfd_push, rfd_pop, rfd_full, rfd_empty;
  logic [15:0] rdw_wdata, rdw_rdata; logic [11:0] rfd_wdata, rfd_rdata;
  logic [15:0] rdw_sec, rdw_ded, rfd_sec, rfd_ded;
  logic rdw_ded_u, rdw_af_u, rfd_ded_u, rfd_af_u;
  logic [$clog2(DEPTH+1)-1:0] rdw_l_u, rfd_l_u;
  rh_fifo #(.W(16), .DEPTH(DEPTH)) u_rx_dw (.clk(clk), .rst_n(rst_n), .push(rdw_push), .wdata(rdw_wdata),
    .pop(rdw_pop), .rdata(rdw_rdata), .rd_ded(rdw_ded_u), .empty(rdw_empty), .full(rdw_full), .afull(rdw_af_u),
    .level(rdw_l_u), .sec_cnt(rdw_sec), .ded_cnt(rdw_ded), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(12), .DEPTH(DEPTH)) u_rx_fd (.clk(clk), .rst_n(rst_n), .push(rfd_push), .wdata(rfd_wdata),
    .pop(rfd_pop), .rdata(rfd_rdata), .rd_ded(rfd_ded_u), .empty(rfd_empty), .full(rfd_full), .afull(rfd_af_u),
    .level(rfd_l_u), .sec_cnt(rfd_sec), .ded_cnt(rfd_ded), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  // ---------------- the three speed options ----------------
  logic [NS-1:0] tx_ref, tx_get, tx_flget, tx_ser, tx_dwpush, tx_dwpop, tx_fdpush, tx_fdpop, tx_tlost, tx_fund;
  logic [15:0]   tx_dwwd [NS];
  logic [11:0]   tx_fdwd [NS];
  logic [NS-1:0] rx_ref, rx_lock, rx_dv, rx_first, rx_lbl, rx_dt, rx_last, rx_flv, rx_trg;
  logic [NS-1:0] rx_dwpush, rx_dwpop, rx_fdpush, rx_fdpop, rx_fdone, rx_relock;
  logic [15:0]   rx_word [NS];
  logic [15:0]   rx_dwwd [NS];
  logic [11:0]   rx_fdwd [NS];
  logic [5:0]    rx_flw  [NS];
  logic [15:0]   rx_fderr [NS];
  logic [15:0]   rx_crcerr [NS];
  logic [15:0]   rx_wlost [NS];
  logic [15:0]   rx_flost [NS];
  logic          rx_din;

  assign rx_din = (mode == 2'd3) ? tx_ser[speed] : lvds_rx_dat;

  for (genvar i = 0; i < NS; i++) begin : g_spd
    localparam int N = 4 << i;
    logic sel, orst_n;
    assign sel    = (int'(speed) == i);
    assign orst_n = rst_n && run[i];
    ff_tx #(.N(N)) u_tx (.clk(clk), .rst_n(orst_n), .bit_en(ben[i]), .ref_stb(tx_ref[i]),
      .flf_mode(flf_mode), .crc_on(crc_on), .sync_en(sync_en),
      .word_in(t_word), .data_valid(sel && t_dv), .label_on(t_lbl), .data_type(t_dt), .get_data(tx_get[i]),
      .flf_word(t_flw), .flf_valid(sel && t_flv), .flf_get(tx_flget[i]), .trg_in(sel && t_trg),
      .ser_dat(tx_ser[i]),
      .dw_push(tx_dwpush[i]), .dw_wdata(tx_dwwd[i]), .dw_afull(sel ? tdw_afull : 1'b1),
      .dw_pop(tx_dwpop[i]), .dw_rdata(tdw_rdata),
      .fd_push(tx_fdpush[i]), .fd_wdata(tx_fdwd[i]), .fd_afull(sel ? tfd_afull : 1'b1),
      .fd_pop(tx_fdpop[i]), .fd_rdata(tfd_rdata), .fd_empty(sel ? tfd_empty : 1'b1),
      .trg_lost(tx_tlost[i]), .flf_underrun(tx_fund[i]));
    ff_rx #(.N(N)) u_rx (.clk(clk), .rst_n(orst_n), .bit_en(ben[i]), .ser_dat(rx_din), .ref_stb(rx_ref[i]),
      .locked(rx_lock[i]), .flf_mode(flf_mode), .crc_on(crc_on),
      .word_out(rx_word[i]), .data_valid(rx_dv[i]), .get_data(sel && pp_get_in), .first(rx_first[i]),
      .is_label(rx_lbl[i]), .data_type(rx_dt[i]), .last_frame(rx_last[i]),
      .flf_word(rx_flw[i]), .flf_valid(rx_flv[i]), .flf_get(sel && pp_flf_get_in), .trg_out(rx_trg[i]),
      .dw_push(rx_dwpush[i]), .dw_wdata(rx_dwwd[i]), .dw_full(sel ? rdw_full : 1'b0),
      .dw_pop(rx_dwpop[i]), .dw_rdata(rdw_rdata), .dw_empty(sel ? rdw_empty : 1'b1),
      .fd_push(rx_fdpush[i]), .fd_wdata(rx_fdwd[i]), .fd_full(sel ? rfd_full : 1'b0),
      .fd_pop(rx_fdpop[i]), .fd_rdata(rfd_rdata), .fd_empty(sel ? rfd_empty : 1'b1),
      .fd_err_cnt(rx_fderr[i]), .crc_err_cnt(rx_crcerr[i]), .word_lost_cnt(rx_wlost[i]), .flf_lost_cnt(rx_flost[i]),
      .frame_done(rx_fdone[i]), .relock(rx_relock[i]));
  end

  // FIFO port multiplexing to the selected option
  assign tdw_push  = tx_dwpush[speed];
  assign tdw_wdata = tx_dwwd[speed];
  assign tdw_pop   = tx_dwpop[speed];
  assign tfd_push  = tx_fdpush[speed];
  assign tfd_wdata = tx_fdwd[speed];
  assign tfd_pop   = tx_fdpop[speed];
  assign rdw_push  = rx_dwpush[speed] && rx_modes;
  assign rdw_wdata = rx_dwwd[speed];
  assign rdw_pop   = rx_dwpop[speed];
  assign rfd_push  = rx_fdpush[speed] && rx_modes;
  assign rfd_wdata = rx_fdwd[speed];
  assign rfd_pop   = rx_fdpop[speed];

  assign sel_get   = tx_get[speed];
  assign sel_flget = tx_flget[speed];
  assign sel_tref  = tx_ref[speed];

  // pads and ports
  assign lvds_tx_dat      = tx_ser[speed];
  assign tx_ref_stb       = tx_ref[speed];
  assign rx_ref_stb       = rx_ref[speed];
  assign rx_locked        = rx_lock[speed];
  assign pp_get_data      = use_pins && tx_get[speed];
  assign pp_flf_get       = use_pins && tx_flget[speed];
  assign pp_oe            = rx_modes;
  assign pp_word_out      = rx_modes ? rx_word[speed] : '0;
  assign pp_dv_out        = rx_modes && rx_dv[speed];
  assign pp_first         = rx_modes && rx_first[speed];
  assign pp_label_out     = rx_modes && rx_lbl[speed];
  assign pp_dt_out        = rx_modes && rx_dt[speed];
  assign pp_last_out      = rx_modes && rx_last[speed];
  assign pp_flf_out       = rx_modes ? rx_flw[speed] : '0;
  assign pp_flf_valid_out = rx_modes && rx_flv[speed];
  assign rx_trg_out       = rx_trg[speed];

  // trigger-loss counter of the transmitters
  logic [7:0] tlost;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tlost <= '0;
    else if (|tx_tlost && tlost != 8'hFF) tlost <= tlost + 8'd1;
  end

  // status bytes 16..31
  assign st = {
    b_pkts[7:0],              // 31 packets started by the test module
    {6'd0, cfg_mism, rx_lock[speed]}, // 30
    tlost,                    // 29
    rx_flost[speed][7:0],     // 28
    rx_wlost[speed][7:0],     // 27
    rx_crcerr[speed][7:0],    // 26
    rx_fderr[speed][7:0],     // 25
    b_ded[7:0], b_sec[7:0],   // 24, 23 test module FIFOs
    rfd_ded[7:0], rfd_sec[7:0], // 22, 21
    rdw_ded[7:0], rdw_sec[7:0], // 20, 19
    {tfd_ded[3:0], tdw_ded[3:0]}, // 18 DEUs of the TX FD / DW FIFOs (low nibbles)
    tfd_sec[7:0], tdw_sec[7:0]  // 17, 16
  };
endmodule
