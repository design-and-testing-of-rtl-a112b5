// ff_bist: Built-In Test Module of the FF-TC1 test chip.
//
// Generates the traffic for a transmitter under test from two one-cycle
// pulses: dav_pin starts a variable-latency packet, trg_pin a trigger (and,
// in FL mode, a fixed-latency frame). Three pseudo random generators are
// used: PRG1 draws the packet length (1 + (value & len_mask), so 1..64
// words), PRG2 the packet words, PRG3 the FL data. A generated packet is
// written into the test word FIFO and its length into the test length FIFO
// (both 64-entry rad-hard FIFOs); a sender drains them to the transmitter's
// 16-bit port with data_valid/get_data, one packet per data_valid burst.
// FL words (flw per FL frame: 1, 3 or 7 for the 4x, 8x, 16x options) are
// kept two frames ahead in the transmitter's FL FIFO so that a trigger
// always finds its frame there; trg_pin is passed straight on as the
// transmitter trigger.
//
// Everything moves at ref_en (the transmitter's reference cycle). The
// control state (generator, sender, FL credit) is protected by full triple
// modular redundancy: three state copies, three copies of the next-state
// logic, each fed by its own majority voter, and voted outputs.
// Length range, credit depth and the queueing of pulses are this design's
// choices.
module ff_bist (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ref_en,
  input  logic        trg_pin,
  input  logic        dav_pin,
  input  logic [5:0]  len_mask,
  input  logic [2:0]  flw,
  input  logic        flf_mode,
  // to the transmitter
  output logic [15:0] word_in,
  output logic        data_valid,
  input  logic        get_data,
  output logic [5:0]  flf_word,
  output logic        flf_valid,
  input  logic        flf_get,
  output logic        trg,
  // status
  output logic [15:0] fifo_sec_cnt,
  output logic [15:0] fifo_ded_cnt,
  output logic [15:0] pkt_cnt,
  input  logic [2:0]  seu         // upset emulation on the state copies
);
  typedef struct packed {
    logic       gen_act;
    logic [6:0] gen_left;
    logic [6:0] gen_len;
    logic [7:0] pend;
    logic       snd_act;
    logic [6:0] snd_left;
    logic [1:0] fl_ahead;
    logic [2:0] fl_cnt;
  } bst_t;

  typedef struct packed {
    logic w_push;
    logic l_push;
    logic w_pop;
    logic l_pop;
    logic fl_valid;
    logic p1_en;
    logic p2_en;
    logic p3_en;
  } bout_t;

  // inputs shared by the three copies
  logic [15:0] p1, p2, p3;
  logic        w_full, l_empty, w_empty;
  logic [7:0]  l_rdata;

  function automatic void step(input bst_t s, output bst_t n, output bout_t o);
    n = s;
    o = '0;
    if (!ref_en) return;
    // pulse queue
    if (dav_pin && s.pend != 8'hFF) n.pend = s.pend + 8'd1;
    // generator
    if (!s.gen_act) begin
      if (s.pend != 0) begin
        n.gen_act  = 1'b1;
        n.gen_len  = {1'b0, p1[5:0] & len_mask} + 7'd1;
        n.gen_left = n.gen_len;
        n.pend     = n.pend - 8'd1;
        o.p1_en    = 1'b1;
      end
    end else if (!w_full) begin
      o.w_push   = 1'b1;
      o.p2_en    = 1'b1;
      n.gen_left = s.gen_left - 7'd1;
      if (s.gen_left == 7'd1) begin
        o.l_push  = 1'b1;
        n.gen_act = 1'b0;
      end
    end
    // sender
    if (!s.snd_act) begin
      if (!l_empty) begin
        o.l_pop    = 1'b1;
        n.snd_act  = 1'b1;
        n.snd_left = l_rdata[6:0];
      end
    end else if (get_data && !w_empty) begin
      o.w_pop    = 1'b1;
      n.snd_left = s.snd_left - 7'd1;
      if (s.snd_left == 7'd1) n.snd_act = 1'b0;
    end
    // FL frames kept ahead of the triggers
    if (flf_mode) begin
      if (trg_pin && s.fl_ahead != 0) n.fl_ahead = n.fl_ahead - 2'd1;
      o.fl_valid = (s.fl_ahead < 2'd2);
      if (o.fl_valid && flf_get) begin
        o.p3_en = 1'b1;
        if (s.fl_cnt + 3'd1 >= flw) begin
          n.fl_cnt   = '0;
          n.fl_ahead = n.fl_ahead + 2'd1;
        end else n.fl_cnt = s.fl_cnt + 3'd1;
      end
    end
  endfunction

  bst_t  c   [3];
  bst_t  v   [3];
  bst_t  nx  [3];
  bout_t oc  [3];
  bout_t o;

  function automatic bst_t vote(input bst_t a, input bst_t b, input bst_t d);
    return (a & b) | (a & d) | (b & d);
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_tmr
    assign v[i] = vote(c[0], c[1], c[2]);
    always_comb step(v[i], nx[i], oc[i]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) c[i] <= '0;
      else c[i] <= nx[i] ^ (seu[i] ? bst_t'({$bits(bst_t){1'b1}}) : bst_t'(0));
    end
  end
  assign o = (oc[0] & oc[1]) | (oc[0] & oc[2]) | (oc[1] & oc[2]);

  // pseudo random generators
  prg_lfsr #(.SEED(16'hACE1)) u_prg1 (.clk(clk), .rst_n(rst_n), .en(o.p1_en), .load(1'b0), .seed('0), .value(p1));
  prg_lfsr #(.SEED(16'h1D2B)) u_prg2 (.clk(clk), .rst_n(rst_n), .en(o.p2_en), .load(1'b0), .seed('0), .value(p2));
  prg_lfsr #(.SEED(16'h5A17)) u_prg3 (.clk(clk), .rst_n(rst_n), .en(o.p3_en), .load(1'b0), .seed('0), .value(p3));

  // test module FIFOs
  logic [15:0] ws, wd, ls, ld;
  logic w_ded_u, l_ded_u, w_af_u, l_af_u, l_full_u;
  logic [6:0] w_lvl_u, l_lvl_u;
  logic [7:0] l_wdata;
  assign l_wdata = {1'b0, v[0].gen_len};
  rh_fifo #(.W(16), .DEPTH(64)) u_wfifo (.clk(clk), .rst_n(rst_n), .push(o.w_push), .wdata(p2),
    .pop(o.w_pop), .rdata(word_in), .rd_ded(w_ded_u), .empty(w_empty), .full(w_full), .afull(w_af_u),
    .level(w_lvl_u), .sec_cnt(ws), .ded_cnt(wd), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(8), .DEPTH(64)) u_lfifo (.clk(clk), .rst_n(rst_n), .push(o.l_push), .wdata(l_wdata),
    .pop(o.l_pop), .rdata(l_rdata), .rd_ded(l_ded_u), .empty(l_empty), .full(l_full_u), .afull(l_af_u),
    .level(l_lvl_u), .sec_cnt(ls), .ded_cnt(ld), .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  assign data_valid   = v[0].snd_act && !w_empty;
  assign flf_valid    = flf_mode && (v[0].fl_ahead < 2'd2);
  assign flf_word     = p3[5:0];
  assign trg          = trg_pin;
  assign fifo_sec_cnt = ws + ls;
  assign fifo_ded_cnt = wd + ld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pkt_cnt <= '0;
    else if (o.l_pop) pkt_cnt <= pkt_cnt + 16'd1;
  end
endmodule
