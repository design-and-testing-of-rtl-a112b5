// tb_ff_bist: self-checking test of the Built-In Test Module.
// Two copies run side by side from the same pulses: the reference copy and
// one whose triplicated state is hit by random single-copy upsets (a whole
// copy inverted). Their outputs must agree on every clock, showing that the
// full TMR masks the upsets. ref_en pulses every 2nd clock; the
// transmitter side (get_data, flf_get) is emulated with random stalls.
// Three phases with length masks 0, 7 and 63 (8xF, 3 FL words per frame).
// Checks on the reference copy, at every reference edge:
//  * each data_valid burst is one packet of 1..len_mask+1 words, and the
//    number of packets equals the number of dav pulses (pkt_cnt too);
//  * while get_data is low the word and data_valid are held;
//  * with mask 0 every packet is a single word;
//  * trg follows trg_pin, and in FL mode the module keeps FL words coming
//    (at least 3 per trigger). Triggers are at least 8 reference cycles
//    apart, as a transmitter needs; the last phase only drains.
module tb_ff_bist;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ref_en = 0, trg_pin = 0, dav_pin = 0, get_data = 1, flf_get = 1;
  logic [5:0] len_mask = '0;
  logic [2:0] seu = '0;
  logic [15:0] w0, w1, sec0, ded0, pc0, sec1, ded1, pc1;
  logic dv0, dv1, fv0, fv1, t0, t1;
  logic [5:0] f0, f1;

  ff_bist u_ref (.clk, .rst_n, .ref_en, .trg_pin, .dav_pin, .len_mask, .flw(3'd3), .flf_mode(1'b1),
    .word_in(w0), .data_valid(dv0), .get_data, .flf_word(f0), .flf_valid(fv0), .flf_get, .trg(t0),
    .fifo_sec_cnt(sec0), .fifo_ded_cnt(ded0), .pkt_cnt(pc0), .seu(3'b000));
  ff_bist u_hit (.clk, .rst_n, .ref_en, .trg_pin, .dav_pin, .len_mask, .flw(3'd3), .flf_mode(1'b1),
    .word_in(w1), .data_valid(dv1), .get_data, .flf_word(f1), .flf_valid(fv1), .flf_get, .trg(t1),
    .fifo_sec_cnt(sec1), .fifo_ded_cnt(ded1), .pkt_cnt(pc1), .seu);

  int n_dav = 0, n_pkt = 0, cur = 0, n_trg_pin = 0, n_trg = 0, n_fl = 0, n_seu = 0, max_len = 0;
  logic held = 0;
  int last_trg = 0;
  logic [15:0] held_w;

  task automatic run(input logic [5:0] mask, input int cycles, input int dav_gap, input bit pulses);
    len_mask = mask;
    max_len = 0;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      ref_en = (c % 2 == 1);
      seu = '0;
      if (!ref_en && $urandom_range(0, 30) == 0) begin seu = 3'b001 << $urandom_range(0, 2); n_seu++; end
      if (ref_en) begin
        dav_pin = pulses && ($urandom_range(0, dav_gap) == 0);
        trg_pin = pulses && (c - last_trg > 16) && ($urandom_range(0, 7) == 0);
        if (trg_pin) last_trg = c;
        get_data = ($urandom_range(0, 3) != 0);
        flf_get = ($urandom_range(0, 3) != 0);
      end
      #1;
      checks++;
      // the word is compared only while it is valid: an empty FIFO shows
      // whatever its (unreset) array holds
      if ({dv0 ? w0 : 16'd0, dv0, f0, fv0, t0, pc0} !== {dv1 ? w1 : 16'd0, dv1, f1, fv1, t1, pc1}) begin
        failures++; $display("upset copy differs at %0d", c);
      end
      if (ref_en) begin
        if (dav_pin) n_dav++;
        if (trg_pin) n_trg_pin++;
        if (t0) n_trg++;
        checks++;
        if (t0 !== trg_pin) begin failures++; $display("trg %b pin %b", t0, trg_pin); end
        if (held) begin
          checks++;
          if (!dv0 || w0 !== held_w) begin failures++; $display("word not held during stall"); end
        end
        held = dv0 && !get_data;
        held_w = w0;
        if (dv0 && get_data) cur++;
        if (!dv0 && cur > 0) begin
          n_pkt++;
          if (cur > max_len) max_len = cur;
          checks++;
          if (cur > int'(mask) + 1) begin failures++; $display("packet of %0d words with mask %0d", cur, mask); end
          cur = 0;
        end
        if (fv0 && flf_get) n_fl++;
      end
      @(posedge clk);
    end
    $display("mask %0d: packets %0d longest %0d", mask, n_pkt, max_len);
    checks++;
    if (mask == 0 && max_len != 1) begin failures++; $display("mask 0 gave %0d-word packets", max_len); end
    checks++;
    if (mask != 0 && pulses && max_len < 2) begin failures++; $display("no multi-word packets"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(6'd0, 20000, 15, 1);
    run(6'd7, 30000, 23, 1);
    run(6'd63, 60000, 79, 1);
    run(6'd63, 20000, 0, 0);    // drain the queued packets
    checks++;
    if (n_pkt != n_dav || int'(pc0) != n_dav) begin failures++; $display("packets %0d cnt %0d pulses %0d", n_pkt, pc0, n_dav); end
    checks++;
    if (n_fl < 3 * n_trg) begin failures++; $display("FL words %0d for %0d triggers", n_fl, n_trg); end
    $display("pulses %0d packets %0d triggers %0d FL words %0d upsets %0d", n_dav, n_pkt, n_trg, n_fl, n_seu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
