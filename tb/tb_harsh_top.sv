// tb_harsh_top: end-to-end test of the whole design at its default sizes.
// FF-TC1 part: for each speed option (4xF, 8xF, 16xF) the chip is set up
// over I2C (test mode TX/RX internal loop, FL mode, CRC and sync patterns
// on, random packet length mask), the receiver must lock, then random
// pulses on the test pins make the Built-In Test Module send packets and
// triggers through the transmitter, the serial link and the receiver.
// The words and FL words the transmitter accepts (seen inside the chip)
// must come out of the parallel port in order, with random stalls by the
// host (pp_get_in low). Triggers must come out one each. The status
// registers are read back over I2C: packet count and error counters.
// IPS part: switch on, short and lasting over-current (soft start),
// over-temperature shutdown, KID/LID diagnosis.
// Each mechanism is counted; the test fails if any of them never happened.
module tb_harsh_top;
  localparam int HB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic scl = 1, sda_m = 1, sda_oe, sda;
  logic tx_trg_pin = 0, tx_dav_pin = 0, pp_get_in = 1, pp_flf_get_in = 1;
  logic pp_get_data, pp_flf_get, pp_oe, pp_dv_out, pp_first, pp_label_out, pp_dt_out, pp_last_out, pp_flf_valid_out;
  logic [15:0] pp_word_out;
  logic [5:0] pp_flf_out;
  logic rx_trg_out, lvds_tx_dat, tx_ref_stb, rx_ref_stb, rx_locked;
  logic ips_tick, lamp_ctrl = 0, over_curr = 0, over_temp = 0, kid = 0, lid = 0;
  logic gate_on, soft_start, ot_shutdown, lamp_fault;
  logic [1:0] ips_diag;
  assign sda = sda_m && !sda_oe;

  harsh_top dut (.clk, .rst_n, .scl, .sda_in(sda), .sda_oe, .tx_trg_pin, .tx_dav_pin,
    .pp_word_in(16'h0000), .pp_dv_in(1'b0), .pp_label_in(1'b0), .pp_dt_in(1'b0), .pp_get_data,
    .pp_flf_in(6'h00), .pp_flf_valid_in(1'b0), .pp_flf_get,
    .pp_oe, .pp_word_out, .pp_dv_out, .pp_first, .pp_label_out, .pp_dt_out, .pp_last_out, .pp_get_in,
    .pp_flf_out, .pp_flf_valid_out, .pp_flf_get_in, .rx_trg_out,
    .lvds_tx_dat, .lvds_rx_dat(1'b0), .tx_ref_stb, .rx_ref_stb, .rx_locked,
    .ips_tick, .lamp_ctrl, .over_curr, .over_temp, .kid, .lid, .oc_time(16'd4), .t_on(16'd6), .t_off(16'd6),
    .gate_on, .soft_start, .ot_shutdown, .ips_diag, .lamp_fault);

  int tcnt = 0;
  always @(posedge clk) tcnt <= tcnt + 1;
  assign ips_tick = (tcnt % 8 == 7);

  // ---------------- mechanism counters ----------------
  int m_lock = 0, m_words = 0, m_fl = 0, m_trg = 0, m_frag = 0, m_stall = 0, m_frames = 0, m_speeds = 0;
  int m_i2c = 0, m_status = 0, m_softstart = 0, m_ot = 0, m_diag = 0, m_bist_pkts = 0;

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

  // ---------------- link scoreboard ----------------
  logic [15:0] exp_w[$];
  logic [5:0]  exp_f[$];
  int trg_sent = 0;
  bit frame_first_seen = 0;
  // transmitter input, seen just before the reference edge that takes it
  always @(negedge clk) if (rst_n && dut.u_fftc1.sel_tref) begin
    if (dut.u_fftc1.t_dv && dut.u_fftc1.sel_get) exp_w.push_back(dut.u_fftc1.t_word);
    if (dut.u_fftc1.t_flv && dut.u_fftc1.sel_flget) exp_f.push_back(dut.u_fftc1.t_flw);
    if (dut.u_fftc1.t_trg) trg_sent++;
  end
  // a speed change restarts the test module and the transmitter: FL words
  // queued for the old one are dropped
  always @(negedge clk) if (rst_n && !dut.u_fftc1.bist_rst_n) exp_f.delete();
  // parallel port output
  always @(negedge clk) if (rst_n && rx_ref_stb && pp_oe) begin
    if (pp_dv_out && !pp_get_in) m_stall++;
    if (pp_dv_out && pp_get_in) begin
      checks++;
      if (exp_w.size() == 0) begin failures++; $display("unexpected word %h", pp_word_out); end
      else begin
        if (pp_word_out !== exp_w[0]) begin failures++; $display("word %h exp %h", pp_word_out, exp_w[0]); end
        void'(exp_w.pop_front());
      end
      m_words++;
      if (pp_first) begin
        m_frames++;
        if (!pp_last_out) m_frag++;
      end
    end
    if (pp_flf_valid_out && pp_flf_get_in) begin
      checks++;
      if (exp_f.size() == 0 || pp_flf_out !== exp_f[0]) begin failures++; $display("FL word %h", pp_flf_out); end
      if (exp_f.size() > 0) void'(exp_f.pop_front());
      m_fl++;
    end
  end
  always @(posedge clk) if (rst_n && rx_trg_out) m_trg++;
  always @(posedge clk) begin
    #1;
    pp_get_in <= ($urandom_range(0, 4) != 0);
    pp_flf_get_in <= ($urandom_range(0, 4) != 0);
  end
  logic lk_d = 0;
  always @(posedge clk) begin lk_d <= rx_locked; if (rx_locked && !lk_d) m_lock++; end

  // wait for a number of transmitter reference cycles
  task automatic tref(input int n);
    repeat (n) begin @(posedge clk); while (!tx_ref_stb) @(posedge clk); end
  endtask

  task automatic run_speed(input int sp);
    logic [7:0] v, pk0, pk1;
    logic [5:0] mask;
    int trg0;
    mask = (sp == 0) ? 6'd7 : 6'd31;
    reg_write(8'd1, {2'b00, mask});
    reg_write(8'd0, 8'(sp) | (8'd3 << 2) | 8'h10 | 8'h20 | 8'h40);
    reg_read(8'd0, v);
    checks++;
    if (v !== (8'(sp) | 8'h7C)) begin failures++; $display("config readback %h", v); end else m_i2c++;
    reg_read(8'd31, pk0);
    tref(60);
    checks++;
    if (!rx_locked) begin failures++; $display("speed %0d: no lock", sp); end
    trg0 = m_trg;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      tx_dav_pin = 1;
      tx_trg_pin = (i % 3 == 0);
      tref(1);
      @(negedge clk);
      tx_dav_pin = 0; tx_trg_pin = 0;
      tref($urandom_range(8, 30));
    end
    tref(1500);
    checks++;
    if (exp_w.size() != 0 || exp_f.size() > 2 * ((4 << sp) - 2) / 2) begin
      failures++; $display("speed %0d: %0d words / %0d FL words not received", sp, exp_w.size(), exp_f.size());
    end
    checks++;
    if (m_trg - trg0 != 14) begin failures++; $display("speed %0d: %0d triggers received of 14", sp, m_trg - trg0); end
    reg_read(8'd31, pk1);
    checks++;
    if (8'(pk1 - pk0) != 8'd40) begin failures++; $display("packet counter moved %0d", 8'(pk1 - pk0)); end
    else m_bist_pkts += 40;
    for (int a = 25; a <= 28; a++) begin
      reg_read(8'(a), v);
      checks++;
      if (v !== 8'h00) begin failures++; $display("error status register %0d = %0d", a, v); end else m_status++;
    end
    m_speeds++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sp = 0; sp < 3; sp++) run_speed(sp);
    // IPS
    lamp_ctrl = 1; kid = 1; lid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (!gate_on || ips_diag != 2'd2 || lamp_fault) begin failures++; $display("IPS not on"); end
    over_curr = 1;
    repeat (8 * 20) @(posedge clk);
    if (soft_start) m_softstart++;
    over_curr = 0;
    repeat (8 * 30) @(posedge clk);
    checks++;
    if (soft_start || !gate_on) begin failures++; $display("IPS did not leave soft start"); end
    over_temp = 1;
    repeat (5) @(posedge clk);
    if (ot_shutdown && !gate_on) m_ot++;
    over_temp = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (!gate_on) begin failures++; $display("IPS did not restart"); end
    kid = 0; lid = 1;
    repeat (5) @(posedge clk);
    if (ips_diag == 2'd3 && lamp_fault) m_diag++;

    $display("mechanisms: lock=%0d vl_words=%0d frames=%0d fragmented_frames=%0d fl_words=%0d triggers=%0d host_stalls=%0d",
             m_lock, m_words, m_frames, m_frag, m_fl, m_trg, m_stall);
    $display("            speed_options=%0d bist_packets=%0d i2c_config=%0d status_ok=%0d soft_start=%0d ot_shutdown=%0d diag_fault=%0d",
             m_speeds, m_bist_pkts, m_i2c, m_status, m_softstart, m_ot, m_diag);
    checks++;
    if (m_lock == 0 || m_words == 0 || m_frames == 0 || m_frag == 0 || m_fl == 0 || m_trg == 0 || m_stall == 0 ||
        m_speeds != 3 || m_bist_pkts == 0 || m_i2c == 0 || m_status == 0 || m_softstart == 0 || m_ot == 0 || m_diag == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #60000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
