// fflynx_pkg: types, constants and helper functions shared by the FF-LYNX
// transmitter, receiver, rad-hard FIFO and test-chip modules.
//
// The link carries, in every reference-clock cycle, N bits (N = 4, 8 or 16
// for the 4xF, 8xF and 16xF speed options): the first two bits belong to the
// THS channel (triggers, frame headers, synchronization), the remaining N-2
// bits to the FRM channel (frame data). THS commands are 6-bit patterns sent
// two bits per cycle over three consecutive cycles. The three pattern values
// below are this design's choice (the protocol only fixes their length); they
// are at Hamming distance 3 or more from each other and from the idle value
// 000000, so a single flipped bit is still recognised.
package fflynx_pkg;

  // THS command patterns, sent MSB pair first.
  localparam logic [5:0] THS_TRG = 6'b110100;
  localparam logic [5:0] THS_HDR = 6'b101011;
  localparam logic [5:0] THS_SYN = 6'b011101;

  typedef enum logic [1:0] {THS_NONE = 2'd0, THS_K_TRG = 2'd1, THS_K_HDR = 2'd2, THS_K_SYN = 2'd3} ths_kind_e;

  // Frame descriptor (7 bits before Hamming coding into 12 bits).
  // len = number of 16-bit words in the frame (label included) minus one.
  typedef struct packed {
    logic [3:0] len;
    logic       label_on;
    logic       data_type;
    logic       last_frame;
  } fd_t;

  localparam int FD_BITS   = 7;
  localparam int FDC_BITS  = 12;  // coded frame descriptor
  localparam int WORD_BITS = 16;
  localparam int CRC_BITS  = 8;
  localparam int FLW_BITS  = 6;   // FL parallel port width

  // Number of parity bits r of a shortened Hamming code for k data bits
  // (smallest r with 2^r >= k + r + 1); the SEC/DED code adds one more.
  function automatic int hamming_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  function automatic int secded_n(input int k);
    return k + hamming_r(k) + 1;
  endfunction

  // CRC-8, polynomial x^8 + x^2 + x + 1, one 16-bit word, MSB first.
  function automatic logic [7:0] crc8_word(input logic [7:0] crc, input logic [15:0] w);
    logic [7:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ w[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

  function automatic int popcount6(input logic [5:0] v);
    int c;
    c = 0;
    for (int i = 0; i < 6; i++) c += int'(v[i]);
    return c;
  endfunction

  // Nearest THS pattern within one flipped bit; THS_NONE if none is that close.
  function automatic ths_kind_e ths_decode(input logic [5:0] p);
    if (popcount6(p ^ THS_TRG) <= 1) return THS_K_TRG;
    if (popcount6(p ^ THS_HDR) <= 1) return THS_K_HDR;
    if (popcount6(p ^ THS_SYN) <= 1) return THS_K_SYN;
    return THS_NONE;
  endfunction

endpackage
