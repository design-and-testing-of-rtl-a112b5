// tb_wl_packet_latency: packet latency against packet size on an 8xF link.
// A transmitter and a receiver of the 8xF option, with their 64-word data
// and descriptor FIFOs, carry packets of 4, 16, 32, 52 and 64 words while a
// trigger is sent every TRG_PERIOD reference cycles (down-link triggers,
// no FL frames). For each size, NPKT packets are offered one every
// ARR_PERIOD reference cycles; the latency of a packet runs from the cycle
// the host raises data_valid to the cycle its last word leaves the
// receiver. Checks: every word arrives in order and unchanged; every
// trigger arrives; no error counter moves; no packet is faster than the
// link allows: (12 descriptor bits + 16 bits per word + 8 CRC bits) per
// frame of at most 16 words, over 6 FRM bits per reference cycle; the mean
// latency grows with the packet size. The mean and maximum latency per
// size are printed, as a latency curve for this configuration.
module tb_wl_packet_latency;
  import fflynx_pkg::*;
  localparam int N = 8;
  localparam int NPKT = 12;
  localparam int ARR_PERIOD = 150;
  localparam int TRG_PERIOD = 10;
  localparam int NSIZE = 5;
  localparam int SIZES[NSIZE] = '{4, 16, 32, 52, 64};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tx_ref, get_data, flf_get, ser, trg_lost, flf_under;
  logic [15:0] word_in = 0; logic data_valid = 0, label_on = 0, data_type = 0, trg_in = 0, flf_valid = 0;
  logic [5:0] flf_word = 0;
  logic tdw_push, tdw_pop, tfd_push, tfd_pop, tdw_afull, tfd_afull, tfd_empty;
  logic [15:0] tdw_wdata, tdw_rdata; logic [11:0] tfd_wdata, tfd_rdata;

  ff_tx #(.N(N)) u_tx (.clk, .rst_n, .bit_en(1'b1), .ref_stb(tx_ref), .flf_mode(1'b0), .crc_on(1'b1), .sync_en(1'b1),
    .word_in, .data_valid, .label_on, .data_type, .get_data, .flf_word, .flf_valid, .flf_get, .trg_in,
    .ser_dat(ser), .dw_push(tdw_push), .dw_wdata(tdw_wdata), .dw_afull(tdw_afull), .dw_pop(tdw_pop), .dw_rdata(tdw_rdata),
    .fd_push(tfd_push), .fd_wdata(tfd_wdata), .fd_afull(tfd_afull), .fd_pop(tfd_pop), .fd_rdata(tfd_rdata), .fd_empty(tfd_empty),
    .trg_lost, .flf_underrun(flf_under));
  rh_fifo #(.W(16), .DEPTH(64)) u_tdw (.clk, .rst_n, .push(tdw_push), .wdata(tdw_wdata), .pop(tdw_pop), .rdata(tdw_rdata),
    .rd_ded(), .empty(), .full(), .afull(tdw_afull), .level(), .sec_cnt(), .ded_cnt(), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(12), .DEPTH(64)) u_tfd (.clk, .rst_n, .push(tfd_push), .wdata(tfd_wdata), .pop(tfd_pop), .rdata(tfd_rdata),
    .rd_ded(), .empty(tfd_empty), .full(), .afull(tfd_afull), .level(), .sec_cnt(), .ded_cnt(), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  logic rx_ref, locked, dv, first, is_label, dt, lastf, fv, trg_out, rdw_push, rdw_pop, rdw_full, rdw_empty;
  logic rfd_push, rfd_pop, rfd_full, rfd_empty, fdone, relock;
  logic [15:0] wout, rdw_wdata, rdw_rdata, fderr, crcerr, wlost, flost; logic [11:0] rfd_wdata, rfd_rdata; logic [5:0] fw;
  ff_rx #(.N(N)) u_rx (.clk, .rst_n, .bit_en(1'b1), .ser_dat(ser), .ref_stb(rx_ref), .locked, .flf_mode(1'b0), .crc_on(1'b1),
    .word_out(wout), .data_valid(dv), .get_data(1'b1), .first, .is_label, .data_type(dt), .last_frame(lastf),
    .flf_word(fw), .flf_valid(fv), .flf_get(1'b1), .trg_out,
    .dw_push(rdw_push), .dw_wdata(rdw_wdata), .dw_full(rdw_full), .dw_pop(rdw_pop), .dw_rdata(rdw_rdata), .dw_empty(rdw_empty),
    .fd_push(rfd_push), .fd_wdata(rfd_wdata), .fd_full(rfd_full), .fd_pop(rfd_pop), .fd_rdata(rfd_rdata), .fd_empty(rfd_empty),
    .fd_err_cnt(fderr), .crc_err_cnt(crcerr), .word_lost_cnt(wlost), .flf_lost_cnt(flost), .frame_done(fdone), .relock);
  rh_fifo #(.W(16), .DEPTH(64)) u_rdw (.clk, .rst_n, .push(rdw_push), .wdata(rdw_wdata), .pop(rdw_pop), .rdata(rdw_rdata),
    .rd_ded(), .empty(rdw_empty), .full(rdw_full), .afull(), .level(), .sec_cnt(), .ded_cnt(), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(12), .DEPTH(64)) u_rfd (.clk, .rst_n, .push(rfd_push), .wdata(rfd_wdata), .pop(rfd_pop), .rdata(rfd_rdata),
    .rd_ded(), .empty(rfd_empty), .full(rfd_full), .afull(), .level(), .sec_cnt(), .ded_cnt(), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  logic [15:0] exp_w[$];
  int pk_left[$];
  longint pk_req[$];
  longint refc = 0;
  int n_trg_sent = 0, n_trg_rx = 0;
  bit trg_on = 1;
  longint lat_sum = 0; int lat_max = 0, lat_min = 1 << 30, lat_n = 0;
  always @(posedge clk) if (tx_ref) refc++;

  // host side: words accepted at each transmitter reference edge
  always @(posedge clk) if (rst_n && tx_ref) begin
    if (data_valid && get_data) exp_w.push_back(word_in);
    if (trg_in) n_trg_sent++;
  end
  // triggers at a fixed period
  always @(posedge clk) if (rst_n && tx_ref) begin
    #2;
    trg_in = trg_on && (refc % TRG_PERIOD == 0);
  end
  // receiver side
  always @(posedge clk) if (rst_n && rx_ref && dv) begin
    checks++;
    if (exp_w.size() == 0) begin failures++; $display("unexpected word %h", wout); end
    else if (wout !== exp_w.pop_front()) begin failures++; $display("word mismatch %h", wout); end
    if (pk_left.size() > 0) begin
      pk_left[0]--;
      if (pk_left[0] == 0) begin
        int lat;
        lat = int'(refc - pk_req[0]);
        lat_sum += lat; lat_n++;
        if (lat > lat_max) lat_max = lat;
        if (lat < lat_min) lat_min = lat;
        void'(pk_left.pop_front()); void'(pk_req.pop_front());
      end
    end
  end
  always @(posedge clk) if (rst_n && trg_out) n_trg_rx++;

  task automatic tick(); @(negedge clk); while (!tx_ref) @(negedge clk); @(posedge clk); #1; endtask
  logic acc_last;
  always @(posedge clk) if (tx_ref) acc_last <= data_valid && get_data;

  initial begin
    longint t0, mean_prev;
    int bound, nfr;
    mean_prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) tick();
    checks++;
    if (!locked) begin failures++; $display("no lock"); end
    for (int si = 0; si < NSIZE; si++) begin
      lat_sum = 0; lat_n = 0; lat_max = 0; lat_min = 1 << 30;
      t0 = refc;
      for (int p = 0; p < NPKT; p++) begin
        while (refc < t0 + longint'(p) * ARR_PERIOD) tick();
        pk_left.push_back(SIZES[si]); pk_req.push_back(refc);
        label_on = 0; data_type = 1'(si);
        for (int i = 0; i < SIZES[si]; i++) begin
          word_in = 16'($urandom); data_valid = 1;
          do tick(); while (!acc_last);
        end
        data_valid = 0;
        tick();
      end
      while (pk_left.size() != 0 && refc < t0 + longint'(NPKT + 20) * ARR_PERIOD) tick();
      checks++;
      if (pk_left.size() != 0 || lat_n != NPKT) begin failures++; $display("size %0d: %0d packets incomplete", SIZES[si], pk_left.size()); end
      nfr = (SIZES[si] + 15) / 16;
      bound = (nfr * (12 + 8) + 16 * SIZES[si]) / (N - 2);
      checks++;
      if (lat_min < bound) begin failures++; $display("size %0d: latency %0d below the link bound %0d", SIZES[si], lat_min, bound); end
      checks++;
      if (lat_sum / lat_n < mean_prev) begin failures++; $display("size %0d: mean latency fell", SIZES[si]); end
      mean_prev = lat_sum / lat_n;
      $display("packet size %0d words: latency mean %0d max %0d min %0d reference cycles (bound %0d)",
               SIZES[si], lat_sum / lat_n, lat_max, lat_min, bound);
    end
    trg_on = 0;
    repeat (100) tick();
    checks++;
    if (n_trg_rx != n_trg_sent || n_trg_sent == 0) begin failures++; $display("triggers %0d sent %0d received", n_trg_sent, n_trg_rx); end
    checks++;
    if (crcerr != 0 || fderr != 0 || wlost != 0 || trg_lost) begin failures++; $display("error counters moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
