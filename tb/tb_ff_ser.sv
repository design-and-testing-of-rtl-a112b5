// tb_ff_ser: self-checking test of the transmitter Serializer at 8xF
// (2 THS bits + 6 FRM bits per reference cycle), with random bit enables.
// The testbench plays the scheduler (trigger/header/sync starts at least 3
// reference cycles apart, headers only when the serializer is not busy)
// and the TX buffer (a word queue read first-word-through with buf_pop).
// It rebuilds the reference cycles from the serial output and checks:
//  * the THS pairs of every cycle: the 3 pairs of each started pattern
//    (trigger 110100, header 101011, sync 011101), 00 otherwise;
//  * in the 3 cycles of a trigger the FRM bits are the FL frame, MSB first;
//  * in all other cycles the FRM bits continue the variable-latency
//    stream: for each frame the 12-bit descriptor, len+1 words, then the
//    CRC-8 (polynomial x^8+x^2+x+1, zero start, MSB first, computed here
//    bit by bit) when crc_on, with zero padding and zeros between frames;
//  * every buffered word is read exactly once.
module tb_ff_ser;
  localparam int N = 8, M = N - 2, FB = 3 * M;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic bit_en = 0, ref_en = 0, trg_go = 0, hdr_go = 0, syn_go = 0, crc_on = 0;
  logic [11:0] fdc = '0;
  logic [3:0] fd_len = '0;
  logic [FB-1:0] flf_frame = '0;
  logic [15:0] buf_word = '0;
  logic buf_pop, busy, dat;

  ff_ser #(.N(N)) dut (.clk, .rst_n, .bit_en, .ref_en, .trg_go, .hdr_go, .syn_go, .flf_mode(1'b1), .crc_on,
    .fdc, .fd_len, .flf_frame, .buf_word, .buf_pop, .busy, .dat);

  logic [15:0] bq[$];
  logic        vl[$];        // expected variable-latency FRM bits
  logic [N-1:0] cyc_bits;
  int nb = 0, ph = 0, since = 10, nref = 0;
  int n_trg = 0, n_hdr = 0, n_syn = 0;
  // expectation for the cycle being shifted out
  logic [1:0]   e_pair;
  logic [1:0]   ths_pend[$];
  logic         e_fl;
  logic [M-1:0] e_flc;
  logic [M-1:0] fl_pend[$];

  function automatic logic [7:0] crc_bit(input logic [7:0] c, input logic b);
    logic fb;
    fb = c[7] ^ b;
    c = {c[6:0], 1'b0};
    if (fb) c ^= 8'h07;
    return c;
  endfunction

  task automatic check_cycle(input logic [N-1:0] got, input logic [1:0] ep, input logic fl, input logic [M-1:0] flc);
    logic [M-1:0] ev;
    logic [1:0]   gp;
    gp = got[N-1 -: 2];
    checks++;
    if (gp != ep) begin failures++; $display("ref %0d THS %b exp %b", nref, got[N-1 -: 2], ep); end
    if (fl) ev = flc;
    else for (int b = M - 1; b >= 0; b--) ev[b] = (vl.size() > 0) ? vl.pop_front() : 1'b0;
    checks++;
    if (got[M-1:0] != ev) begin failures++; $display("ref %0d FRM %b exp %b (fl %b)", nref, got[M-1:0], ev, fl); end
  endtask

  initial begin
    logic [5:0] pat;
    logic [7:0] crc;
    logic [15:0] w;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    e_pair = 2'b00; e_fl = 0; e_flc = '0;
    for (int c = 0; c < 80000; c++) begin
      @(negedge clk);
      bit_en = ($urandom_range(0, 3) != 0);
      ref_en = bit_en && (ph == N - 1);
      trg_go = 0; hdr_go = 0; syn_go = 0;
      // the cycle that ends at this reference edge is complete: check it first
      if (bit_en) begin cyc_bits = {cyc_bits[N-2:0], dat}; nb++; end
      if (ref_en) begin
        if (nref > 0) check_cycle(cyc_bits, e_pair, e_fl, e_flc);
        nref++;
        since++;
      end
      if (ref_en) begin
        if (since >= 3) begin
          if ($urandom_range(0, 5) == 0) trg_go = 1;
          else if (!busy && $urandom_range(0, 2) == 0) hdr_go = 1;
          else if ($urandom_range(0, 3) == 0) syn_go = 1;
        end
        if (trg_go || hdr_go || syn_go) begin
          since = 0;
          pat = trg_go ? 6'b110100 : hdr_go ? 6'b101011 : 6'b011101;
          ths_pend.delete();
          for (int j = 2; j >= 0; j--) ths_pend.push_back(2'((pat >> (2 * j)) & 6'h3));
        end
        if (trg_go) begin
          flf_frame = FB'({$urandom, $urandom});
          fl_pend.delete();
          for (int j = 2; j >= 0; j--) fl_pend.push_back(M'((flf_frame >> (M * j)) & FB'({M{1'b1}})));
          n_trg++;
        end
        if (syn_go) n_syn++;
        if (hdr_go) begin
          fdc = 12'($urandom); fd_len = 4'($urandom); crc_on = 1'($urandom);
          for (int b = 11; b >= 0; b--) vl.push_back(fdc[b]);
          crc = '0;
          for (int i = 0; i <= int'(fd_len); i++) begin
            w = 16'($urandom);
            bq.push_back(w);
            for (int b = 15; b >= 0; b--) begin vl.push_back(w[b]); crc = crc_bit(crc, w[b]); end
          end
          if (crc_on) for (int b = 7; b >= 0; b--) vl.push_back(crc[b]);
          n_hdr++;
        end
      end
      buf_word = (bq.size() > 0) ? bq[0] : 16'h0000;
      #1;
      if (buf_pop) begin
        checks++;
        if (bq.size() == 0) begin failures++; $display("pop from empty buffer"); end
        else void'(bq.pop_front());
      end
      if (ref_en) begin
        // what the cycle starting now must carry
        e_pair = (ths_pend.size() > 0) ? ths_pend.pop_front() : 2'b00;
        e_fl   = (fl_pend.size() > 0);
        e_flc  = e_fl ? fl_pend.pop_front() : '0;
      end
      @(posedge clk);
      if (bit_en) ph = (ph + 1) % N;
    end
    checks++;
    if (bq.size() > 16) begin failures++; $display("%0d words never read", bq.size()); end
    $display("triggers %0d headers %0d syncs %0d", n_trg, n_hdr, n_syn);
    checks++;
    if (n_trg < 100 || n_hdr < 100 || n_syn < 50) failures++;
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
