// tb_fftc1: two FF-TC1 chips connected by their serial pads.
// Chip A runs test mode TX #1 (transmitter fed from the parallel port
// pins), chip B test mode RX (receiver output on the parallel port); A's
// lvds_tx_dat drives B's lvds_rx_dat. Both are set up over their own I2C
// buses, for each speed option in turn (4xF, 8xF, 16xF), with FL mode, CRC
// and sync patterns on. The host model on A sends packets of random length
// (1..40 words, so packets of one to three frames) with random label and
// data type, a steady flow of random FL words and trigger pulses (the first
// trigger only once the FL FIFO holds a frame, as an empty one sends zeros); the host on B stalls at
// random. Checks: B locks; every word comes out of B in order with the
// right frame start, label, data type and last-frame flags; FL words in
// order; one trigger out per trigger in; B's status registers show no
// descriptor, CRC or lost-word errors. The FIFOs are 32 words deep here (a frame is at most 16 words; the
// data-word FIFO must hold a whole frame before its descriptor is written) so
// that A's flow control (get_data low) is exercised.
module tb_fftc1;
  localparam int HB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // I2C: two buses, one per chip, driven by one master model
  int bus = 0;
  logic scl = 1, sda_m = 1, sda;
  logic a_sda_oe, b_sda_oe;
  logic a_scl, b_scl, a_sda, b_sda;
  assign a_scl = (bus == 0) ? scl : 1'b1;
  assign b_scl = (bus == 1) ? scl : 1'b1;
  assign a_sda = ((bus == 0) ? sda_m : 1'b1) && !a_sda_oe;
  assign b_sda = ((bus == 1) ? sda_m : 1'b1) && !b_sda_oe;
  assign sda = (bus == 0) ? a_sda : b_sda;

  // chip A host (transmitter side)
  logic [15:0] w_in = 0;
  logic dv_in = 0, lbl_in = 0, dt_in = 0, trg_in = 0;
  logic [5:0] fl_in = 0;
  logic flv_in = 0;
  logic a_get, a_flget, a_ref, a_ser;
  // chip B host (receiver side)
  logic b_oe, b_dv, b_first, b_lbl, b_dt, b_last, b_flv, b_trg, b_ref, b_lock;
  logic [15:0] b_word;
  logic [5:0] b_fl;
  logic b_get = 1, b_flget = 1;
  logic unused_a_oe, unused_a_dv, unused_a_first, unused_a_lbl, unused_a_dt, unused_a_last, unused_a_flv;
  logic unused_a_trg, unused_a_rref, unused_a_lock, unused_b_tx, unused_b_tref, unused_b_get, unused_b_flget;
  logic [15:0] unused_a_word;
  logic [5:0] unused_a_fl;

  fftc1 #(.DEPTH(32)) u_a (.clk, .rst_n, .scl(a_scl), .sda_in(a_sda), .sda_oe(a_sda_oe),
    .tx_trg_pin(trg_in), .tx_dav_pin(1'b0),
    .pp_word_in(w_in), .pp_dv_in(dv_in), .pp_label_in(lbl_in), .pp_dt_in(dt_in), .pp_get_data(a_get),
    .pp_flf_in(fl_in), .pp_flf_valid_in(flv_in), .pp_flf_get(a_flget),
    .pp_oe(unused_a_oe), .pp_word_out(unused_a_word), .pp_dv_out(unused_a_dv), .pp_first(unused_a_first),
    .pp_label_out(unused_a_lbl), .pp_dt_out(unused_a_dt), .pp_last_out(unused_a_last), .pp_get_in(1'b1),
    .pp_flf_out(unused_a_fl), .pp_flf_valid_out(unused_a_flv), .pp_flf_get_in(1'b1), .rx_trg_out(unused_a_trg),
    .lvds_tx_dat(a_ser), .lvds_rx_dat(1'b0), .tx_ref_stb(a_ref), .rx_ref_stb(unused_a_rref), .rx_locked(unused_a_lock));

  fftc1 #(.DEPTH(32)) u_b (.clk, .rst_n, .scl(b_scl), .sda_in(b_sda), .sda_oe(b_sda_oe),
    .tx_trg_pin(1'b0), .tx_dav_pin(1'b0),
    .pp_word_in(16'h0), .pp_dv_in(1'b0), .pp_label_in(1'b0), .pp_dt_in(1'b0), .pp_get_data(unused_b_get),
    .pp_flf_in(6'h0), .pp_flf_valid_in(1'b0), .pp_flf_get(unused_b_flget),
    .pp_oe(b_oe), .pp_word_out(b_word), .pp_dv_out(b_dv), .pp_first(b_first),
    .pp_label_out(b_lbl), .pp_dt_out(b_dt), .pp_last_out(b_last), .pp_get_in(b_get),
    .pp_flf_out(b_fl), .pp_flf_valid_out(b_flv), .pp_flf_get_in(b_flget), .rx_trg_out(b_trg),
    .lvds_tx_dat(unused_b_tx), .lvds_rx_dat(a_ser), .tx_ref_stb(unused_b_tref), .rx_ref_stb(b_ref), .rx_locked(b_lock));

  initial begin
    #50000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // ---------------- I2C master ----------------
  task automatic half(); repeat (HB) @(posedge clk); endtask
  task automatic i2c_start(); sda_m = 1; half(); scl = 1; half(); sda_m = 0; half(); scl = 0; half(); endtask
  task automatic i2c_stop(); sda_m = 0; half(); scl = 1; half(); sda_m = 1; half(); half(); endtask
  task automatic wbit(input logic b); sda_m = b; half(); scl = 1; half(); half(); scl = 0; half(); endtask
  task automatic rbit(output logic b); sda_m = 1; half(); scl = 1; half(); b = sda; half(); scl = 0; half(); endtask
  task automatic wbyte(input logic [7:0] v);
    logic a;
    for (int i = 7; i >= 0; i--) wbit(v[i]);
    rbit(a);
    checks++;
    if (a) begin failures++; $display("I2C byte %h not acknowledged", v); end
  endtask
  task automatic rbyte(input logic ack, output logic [7:0] v);
    for (int i = 7; i >= 0; i--) rbit(v[i]);
    wbit(!ack);
  endtask
  task automatic reg_write(input logic [7:0] a, input logic [7:0] v);
    i2c_start(); wbyte({7'h3A, 1'b0}); wbyte(a); wbyte(v); i2c_stop();
  endtask
  task automatic reg_read(input logic [7:0] a, output logic [7:0] v);
    i2c_start(); wbyte({7'h3A, 1'b0}); wbyte(a); i2c_start(); wbyte({7'h3A, 1'b1}); rbyte(0, v); i2c_stop();
  endtask

  // ---------------- chip A host model ----------------
  // expected entries: {first, label, data type, last frame, word}
  logic [19:0] exp_w[$];
  logic [5:0]  exp_f[$];
  bit running = 0;
  int rem = 0, gap = 0, idx = 0, plen = 0, trg_sent = 0, trg_gap = 0, n_pkts = 0;
  always begin
    bit acc, facc;
    @(negedge clk);
    if (rst_n && a_ref) begin
      acc = dv_in && a_get;
      facc = flv_in && a_flget;
      if (acc)
        exp_w.push_back({1'(idx % 16 == 0), 1'(lbl_in && idx < 16), dt_in,
                         1'(idx / 16 == (plen - 1) / 16), w_in});
      if (facc) exp_f.push_back(fl_in);
      if (trg_in) trg_sent++;
      @(posedge clk);
      #1;
      if (acc) begin idx++; rem--; w_in = 16'($urandom); end
      if (dv_in && rem == 0) begin dv_in = 0; gap = $urandom_range(1, 4); n_pkts++; end
      else if (!dv_in) begin
        if (gap > 0) gap--;
        if (gap == 0 && running) begin
          plen = $urandom_range(1, 40); rem = plen; idx = 0;
          lbl_in = 1'($urandom); dt_in = 1'($urandom); w_in = 16'($urandom); dv_in = 1;
        end
      end
      if (!running) flv_in = 0;
      else if (facc || !flv_in) begin fl_in = 6'($urandom); flv_in = 1; end
      trg_in = 0;
      if (trg_gap > 0) trg_gap--;
      else if (running && $urandom_range(0, 9) == 0) begin trg_in = 1; trg_gap = 6; end
    end
  end

  // ---------------- chip B host model ----------------
  int got_w = 0, got_f = 0, got_trg = 0, stalls = 0;
  always @(negedge clk) if (rst_n && b_ref && b_oe) begin
    if (b_dv && !b_get) stalls++;
    if (b_dv && b_get) begin
      checks++;
      if (exp_w.size() == 0) begin failures++; $display("unexpected word %h", b_word); end
      else begin
        if ({b_first, b_first ? b_lbl : exp_w[0][18], b_dt, b_last, b_word} !== exp_w[0]) begin
          failures++;
          $display("got first=%b lbl=%b dt=%b last=%b %h, exp %b", b_first, b_lbl, b_dt, b_last, b_word, exp_w[0]);
        end
        void'(exp_w.pop_front());
      end
      got_w++;
    end
    if (b_flv && b_flget) begin
      checks++;
      if (exp_f.size() == 0 || b_fl !== exp_f[0]) begin failures++; $display("FL word %h exp %h (%0d queued)", b_fl, exp_f.size() ? exp_f[0] : 6'd0, exp_f.size()); end
      if (exp_f.size() > 0) void'(exp_f.pop_front());
      got_f++;
    end
  end
  always @(posedge clk) if (rst_n && b_trg) got_trg++;
  always @(posedge clk) begin
    #1;
    b_get <= ($urandom_range(0, 3) != 0);
    b_flget <= ($urandom_range(0, 3) != 0);
  end

  task automatic aref(input int n);
    repeat (n) begin @(posedge clk); while (!a_ref) @(posedge clk); end
  endtask

  task automatic run_speed(input int sp);
    logic [7:0] v;
    int t0, w0, f0;
    // transmitter first, so that the receiver locks to the new stream
    bus = 0;
    reg_write(8'd0, 8'(sp) | (8'd0 << 2) | 8'h70);
    bus = 1;
    reg_write(8'd0, 8'(sp) | (8'd2 << 2) | 8'h70);
    reg_read(8'd0, v);
    checks++;
    if (v !== (8'(sp) | 8'h78)) begin failures++; $display("B config readback %h", v); end
    aref(60);
    checks++;
    if (!b_lock) begin failures++; $display("speed %0d: B not locked", sp); end
    exp_w.delete(); exp_f.delete();
    t0 = got_trg; w0 = got_w; f0 = got_f; trg_sent = 0;
    trg_gap = 20;
    running = 1;
    aref(600);
    running = 0;
    aref(1200);
    checks++;
    if (exp_w.size() != 0 || got_w == w0 || got_f == f0 || exp_f.size() > 5 * ((4 << sp) - 2) / 2) begin
      failures++;
      $display("speed %0d: %0d words / %0d FL words left, %0d words received", sp, exp_w.size(), exp_f.size(), got_w - w0);
    end
    checks++;
    if (got_trg - t0 != trg_sent || trg_sent == 0) begin
      failures++; $display("speed %0d: %0d triggers sent, %0d received", sp, trg_sent, got_trg - t0);
    end
    bus = 1;
    for (int r = 25; r <= 28; r++) begin
      reg_read(8'(r), v);
      checks++;
      if (v !== 8'h00) begin failures++; $display("speed %0d: B status %0d = %h", sp, r, v); end
    end
    $display("speed %0d: %0d words, %0d FL words, %0d triggers received", sp, got_w - w0, got_f - f0, got_trg - t0);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int sp = 0; sp < 3; sp++) run_speed(sp);
    checks++;
    if (stalls == 0 || n_pkts == 0) begin failures++; $display("no receiver stalls or no packets"); end
    $display("packets=%0d stalls=%0d", n_pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
