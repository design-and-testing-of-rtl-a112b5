// tb_ff_tx: self-checking test of the FF-LYNX transmitter (ff_tx) at the
// 8xF speed option. The transmitter and its two FIFOs (data words and frame
// descriptors) drive a receiver built from the same design, which acts as
// the reference decoder: every word the transmitter accepted on its host
// port must come out of the link in order with the right label and data
// type flags, every FL word must arrive, every trigger must arrive with
// one constant latency, and no error counter may move.
// Stimulus: random packets of 1..40 words (longer than one frame, so the
// transmitter must fragment them), with and without label, random FL words
// and random triggers; CRC and sync patterns enabled.
module tb_ff_tx #(parameter int N = 8, parameter int NPKT = 60);
  import fflynx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tx_ref, get_data, flf_get, ser, trg_lost, flf_under;
  logic [15:0] word_in; logic data_valid = 0, label_on = 0, data_type = 0, trg_in = 0, flf_valid = 0;
  logic [5:0] flf_word;
  logic tdw_push, tdw_pop, tfd_push, tfd_pop, tdw_afull, tfd_afull, tfd_empty;
  logic [15:0] tdw_wdata, tdw_rdata; logic [11:0] tfd_wdata, tfd_rdata;

  ff_tx #(.N(N)) u_tx (.clk, .rst_n, .bit_en(1'b1), .ref_stb(tx_ref), .flf_mode(1'b1), .crc_on(1'b1), .sync_en(1'b1),
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
  ff_rx #(.N(N)) u_rx (.clk, .rst_n, .bit_en(1'b1), .ser_dat(ser), .ref_stb(rx_ref), .locked, .flf_mode(1'b1), .crc_on(1'b1),
    .word_out(wout), .data_valid(dv), .get_data(1'b1), .first, .is_label, .data_type(dt), .last_frame(lastf),
    .flf_word(fw), .flf_valid(fv), .flf_get(1'b1), .trg_out,
    .dw_push(rdw_push), .dw_wdata(rdw_wdata), .dw_full(rdw_full), .dw_pop(rdw_pop), .dw_rdata(rdw_rdata), .dw_empty(rdw_empty),
    .fd_push(rfd_push), .fd_wdata(rfd_wdata), .fd_full(rfd_full), .fd_pop(rfd_pop), .fd_rdata(rfd_rdata), .fd_empty(rfd_empty),
    .fd_err_cnt(fderr), .crc_err_cnt(crcerr), .word_lost_cnt(wlost), .flf_lost_cnt(flost), .frame_done(fdone), .relock);
  rh_fifo #(.W(16), .DEPTH(64)) u_rdw (.clk, .rst_n, .push(rdw_push), .wdata(rdw_wdata), .pop(rdw_pop), .rdata(rdw_rdata),
    .rd_ded(), .empty(rdw_empty), .full(rdw_full), .afull(), .level(), .sec_cnt(), .ded_cnt(), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(12), .DEPTH(64)) u_rfd (.clk, .rst_n, .push(rfd_push), .wdata(rfd_wdata), .pop(rfd_pop), .rdata(rfd_rdata),
    .rd_ded(), .empty(rfd_empty), .full(rfd_full), .afull(), .level(), .sec_cnt(), .ded_cnt(), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  // expected streams
  logic [17:0] exp_w[$];   // {label flag, data_type, word}
  logic [5:0]  exp_f[$];
  int n_trg_sent = 0, n_trg_rx = 0, n_words_rx = 0, n_frames = 0;
  longint trg_t[$]; int lat_first = -1;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // receiver checks
  always @(posedge clk) if (rst_n && rx_ref) begin
    if (dv) begin
      logic [17:0] e;
      checks++;
      if (exp_w.size() == 0) begin failures++; $display("unexpected word %h", wout); end
      else begin
        e = exp_w.pop_front();
        if ({is_label, dt, wout} !== e) begin failures++; $display("word mismatch got %b %b %h exp %h", is_label, dt, wout, e); end
      end
      n_words_rx++;
    end
    if (fv) begin
      checks++;
      if (exp_f.size() == 0 || fw !== exp_f.pop_front()) begin failures++; $display("FL word mismatch %h", fw); end
    end
  end
  always @(posedge clk) if (rst_n && fdone) n_frames++;
  always @(posedge clk) if (rst_n && trg_out) begin
    int lat;
    n_trg_rx++;
    if (trg_t.size() == 0) begin failures++; $display("spurious trigger"); end
    else begin
      lat = int'(cyc - trg_t.pop_front());
      checks++;
      if (lat_first < 0) lat_first = lat;
      else if (lat != lat_first) begin failures++; $display("trigger latency %0d vs %0d", lat, lat_first); end
    end
  end

  // one reference edge of the transmitter; returns just after it
  task automatic tick(); @(negedge clk); while (!tx_ref) @(negedge clk); @(posedge clk); #1; endtask

  // input monitors: record what the transmitter accepts at each reference edge
  logic cur_lbl;
  always @(posedge clk) if (rst_n && tx_ref) begin
    if (data_valid && get_data) exp_w.push_back({cur_lbl, data_type, word_in});
    if (flf_valid && flf_get) begin exp_f.push_back(flf_word); flf_credit++; end
    if (trg_in) begin n_trg_sent++; trg_t.push_back(cyc); flf_credit -= (N-2)/2; end
  end
  int flf_credit = 0;
  logic acc_last;
  always @(posedge clk) if (tx_ref) acc_last <= data_valid && get_data;

  initial begin
    int lbl, len, gap, ntrg_gap;
    logic [15:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // let the receiver lock on sync patterns
    repeat (40) tick();
    if (!locked) begin failures++; $display("no lock"); end
    checks++;
    for (int p = 0; p < NPKT; p++) begin
      lbl = $urandom_range(0, 1);
      len = $urandom_range(1, 40);
      data_type = 1'($urandom_range(0, 1));
      label_on = 1'(lbl);
      for (int i = 0; i < len; i++) begin
        w = 16'($urandom);
        word_in = w; data_valid = 1; cur_lbl = (lbl == 1 && i == 0);
        flf_word = 6'($urandom); flf_valid = ($urandom_range(0, 3) == 0);
        trg_in = 0;
        // hold until accepted
        do tick(); while (!acc_last);
        flf_valid = 0;
      end
      data_valid = 0; label_on = 0;
      gap = $urandom_range(1, 12);
      for (int g = 0; g < gap; g++) begin
        // trigger when a full FL frame is queued
        trg_in = (flf_credit >= (N-2)/2) && ($urandom_range(0, 2) == 0) && (g % 4 == 0);
        tick();
        trg_in = 0;
        repeat (3) tick();
      end
    end
    // drain
    repeat (800) tick();
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("%0d words not received", exp_w.size()); end
    checks++;
    if (n_trg_rx != n_trg_sent) begin failures++; $display("triggers %0d sent %0d received", n_trg_sent, n_trg_rx); end
    checks++;
    if (crcerr != 0 || fderr != 0 || wlost != 0 || trg_lost) begin failures++; $display("error counters"); end
    $display("N=%0d words=%0d frames=%0d triggers=%0d flf_left=%0d latency=%0d", N, n_words_rx, n_frames, n_trg_rx, exp_f.size(), lat_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
