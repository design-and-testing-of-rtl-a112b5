// ff_ths_sch: THS channel scheduler of the FF-LYNX transmitter.
//
// Triggers have priority over frame headers and synchronization patterns
// and every THS command occupies three reference cycles. A trigger taken
// from the host is delayed by exactly three reference cycles in a shift
// register; a header or a sync pattern is started only when the scheduler
// is free and no trigger is waiting in that shift register, so it finishes
// before the next trigger is due and sequences never overlap. This gives
// all triggers (and fixed-latency frames) the same 3-cycle latency; the
// look-ahead mechanism is this design's way of meeting the document's rule
// that headers and syncs use only trigger-free windows of three cycles.
// A trigger that falls due while another sequence is still running (host
// broke the 3-cycle minimum spacing) is dropped and reported on trg_lost.
//
// All decisions are taken at ref_en, the last link-clock tick of each
// reference cycle; trg_go/hdr_go/syn_go are combinational and say which
// sequence starts in the reference cycle that begins after this ref_en.
// The state (delay line and busy counter) is kept in a TMR register.
module ff_ths_sch (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_en,
  input  logic trg_in,    // host trigger request, sampled at ref_en
  input  logic hdr_req,   // frame builder has a frame ready
  input  logic sync_en,   // fill free THS slots with sync patterns
  output logic trg_go,
  output logic hdr_go,
  output logic syn_go,
  output logic trg_lost
);
  typedef struct packed {
    logic [2:0] dly;
    logic [1:0] busy;
  } sch_t;

  sch_t s, s_n;
  logic mism_unused;

  always_comb begin
    logic due, free, clear;
    due   = s.dly[2];
    free  = (s.busy == 2'd0);
    clear = (s.dly[1:0] == 2'b00);
    trg_go   = ref_en && due && free;
    trg_lost = ref_en && due && !free;
    hdr_go   = ref_en && free && !due && clear && hdr_req;
    syn_go   = ref_en && free && !due && clear && !hdr_req && sync_en;
    s_n.dly  = {s.dly[1:0], trg_in};
    s_n.busy = (trg_go || hdr_go || syn_go) ? 2'd2 : (free ? 2'd0 : s.busy - 2'd1);
  end

  tmr_reg #(.W($bits(sch_t))) u_state (
    .clk(clk), .rst_n(rst_n), .en(ref_en), .d(s_n), .q(s), .mism(mism_unused),
    .seu(3'b000), .seu_mask('0));
endmodule
