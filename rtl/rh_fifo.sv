// rh_fifo: radiation-hardened circular FIFO for W-bit words, DEPTH entries.
//
// Every word is stored SEC/DED Hamming coded (W + R + 1 bits: 16 -> 22 for
// the data-word FIFO, 12 -> 18 for the frame-descriptor FIFO). Reads go
// through the decoder, so a single flipped bit is corrected on the way out
// and a double flip is flagged (rd_ded). A scrubbing controller walks the
// occupied entries, one per clock, decodes each and writes back the
// corrected code word when it finds a single error; it skips the entry
// being written in the same clock, so scrubbing goes on while the FIFO is
// used. SEU and DEU counters (saturating, 16 bit) count corrected single
// errors (by the scrubber or on a read) and double errors seen on a read.
//
// Interface: first-word-fall-through; rdata is valid while !empty and pop
// removes it. push is ignored when full, pop when empty. afull rises when
// at most AF entries are free. seu_we/seu_addr/seu_mask XOR a mask into one
// stored code word to emulate upsets (tie to zero in normal use).
// Following the document: the code, the array, the scrubber and the
// counters. The scrub order, the counter widths and the flag timing are
// this design's choices.
module rh_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 64,
  parameter int AF    = 2
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             push,
  input  logic [W-1:0]                     wdata,
  input  logic                             pop,
  output logic [W-1:0]                     rdata,
  output logic                             rd_ded,
  output logic                             empty,
  output logic                             full,
  output logic                             afull,
  output logic [$clog2(DEPTH+1)-1:0]       level,
  output logic [15:0]                      sec_cnt,
  output logic [15:0]                      ded_cnt,
  input  logic                             seu_we,
  input  logic [$clog2(DEPTH)-1:0]         seu_addr,
  input  logic [fflynx_pkg::secded_n(W)-1:0] seu_mask
);
  localparam int NC = fflynx_pkg::secded_n(W);
  localparam int AW = $clog2(DEPTH);

  logic [NC-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp, sp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic [NC-1:0] wcode, scode_fix;
  logic [W-1:0]  sdata;
  logic          rd_sec, s_sec, s_ded;
  logic          do_push, do_pop, s_valid, s_fix;

  secded_enc #(.K(W)) u_enc  (.data(wdata), .code(wcode));
  secded_dec #(.K(W)) u_rdec (.code(mem[rp]), .data(rdata), .sec(rd_sec), .ded(rd_ded));
  secded_dec #(.K(W)) u_sdec (.code(mem[sp]), .data(sdata), .sec(s_sec), .ded(s_ded));
  secded_enc #(.K(W)) u_senc (.data(sdata), .code(scode_fix));

  assign empty   = (cnt == 0);
  assign full    = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign afull   = (int'(cnt) >= DEPTH - AF);
  assign level   = cnt;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  // scrub pointer entry is occupied when it lies between rp and wp
  always_comb begin
    logic [AW-1:0] off;
    off     = sp - rp;
    s_valid = (int'(off) < int'(cnt));
    s_fix   = s_valid && s_sec && !(do_push && wp == sp) && !(do_pop && rp == sp);
  end

  function automatic logic [15:0] sat_add(input logic [15:0] a, input logic [1:0] b);
    logic [16:0] t;
    t = {1'b0, a} + 17'(b);
    return t[16] ? 16'hFFFF : t[15:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; sp <= '0; cnt <= '0;
      sec_cnt <= '0; ded_cnt <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      if (do_push && !do_pop) cnt <= cnt + 1'b1;
      else if (do_pop && !do_push) cnt <= cnt - 1'b1;
      sp  <= (int'(sp) == DEPTH - 1) ? '0 : sp + 1'b1;
      // the scrubber and the read port may both correct a word in one cycle
      sec_cnt <= sat_add(sec_cnt, 2'(s_fix) + 2'(do_pop && rd_sec));
      if (do_pop && rd_ded && ded_cnt != 16'hFFFF) ded_cnt <= ded_cnt + 1'b1;
    end
  end

  // storage array: write port, scrub write-back, upset emulation
  always_ff @(posedge clk) begin
    if (s_fix) mem[sp] <= scode_fix;
    if (do_push) mem[wp] <= wcode;
    if (seu_we) mem[seu_addr] <= mem[seu_addr] ^ seu_mask;
  end
endmodule
