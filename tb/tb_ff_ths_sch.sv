// tb_ff_ths_sch: self-checking test of the THS channel scheduler.
// ref_en pulses every 4th clock. Inputs change after a falling edge; the
// combinational decisions are sampled in the ref_en cycle. Random triggers
// (at least 3 reference cycles apart), random header requests and sync
// enable. Checks:
//  * every trigger starts exactly 3 reference cycles after it was taken;
//  * no two sequences overlap (after any start, the next 2 reference
//    cycles start nothing);
//  * a header starts only on request, a sync only when enabled and no
//    header is requested, and never more than one start at a time;
//  * a waiting header request is served within 6 reference cycles when no
//    trigger arrives;
//  * triggers closer than 3 cycles make trg_lost pulse instead of trg_go.
module tb_ff_ths_sch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ref_en, trg_in = 0, hdr_req = 0, sync_en = 0;
  logic trg_go, hdr_go, syn_go, trg_lost;

  ff_ths_sch dut (.clk, .rst_n, .ref_en, .trg_in, .hdr_req, .sync_en, .trg_go, .hdr_go, .syn_go, .trg_lost);

  int rc = 0;
  always @(posedge clk) if (rst_n) rc <= rc + 1;
  assign ref_en = rst_n && (rc % 4 == 3);

  int n_trg = 0, n_hdr = 0, n_syn = 0, n_lost = 0;
  int trg_hist[$];   // reference-cycle index of each trigger taken
  int refi = 0, last_start = -100, hdr_wait = 0, last_trg = -100;

  task automatic ref_cycle(input logic t, input logic h, input logic s);
    @(negedge clk);
    while (!ref_en) @(negedge clk);
    trg_in = t; hdr_req = h; sync_en = s;
    #1;
    // sample decisions
    checks++;
    if (int'(trg_go) + int'(hdr_go) + int'(syn_go) > 1) begin failures++; $display("two starts at %0d", refi); end
    if (trg_go || hdr_go || syn_go) begin
      checks++;
      if (refi - last_start < 3) begin failures++; $display("overlap at %0d (last %0d)", refi, last_start); end
      last_start = refi;
    end
    checks++;
    if (trg_go !== (trg_hist.size() > 0 && trg_hist[0] == refi - 3)) begin
      failures++; $display("trg_go %b at ref %0d", trg_go, refi);
    end
    if (trg_hist.size() > 0 && trg_hist[0] == refi - 3) void'(trg_hist.pop_front());
    checks++;
    if ((hdr_go && !h) || (syn_go && (!s || h))) begin failures++; $display("unrequested start"); end
    if (trg_go) n_trg++;
    if (hdr_go) n_hdr++;
    if (syn_go) n_syn++;
    if (h && !hdr_go && !t && !trg_go && trg_hist.size() == 0) hdr_wait++; else hdr_wait = 0;
    checks++;
    if (hdr_wait > 6) begin failures++; $display("header starved at %0d", refi); hdr_wait = 0; end
    if (t) begin trg_hist.push_back(refi); last_trg = refi; end
    @(posedge clk);
    refi++;
  endtask

  initial begin
    logic t, h, s;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      t = (refi - last_trg >= 3) && ($urandom_range(0, 9) == 0);
      h = ($urandom_range(0, 2) != 0);
      s = ($urandom_range(0, 1) == 1);
      ref_cycle(t, h, s);
    end
    repeat (4) ref_cycle(0, 0, 0);
    // back-to-back triggers: the second one cannot be served
    ref_cycle(1, 0, 0);
    ref_cycle(1, 0, 0);
    trg_hist.delete();
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); while (!ref_en) @(negedge clk);
      trg_in = 0; #1;
      if (trg_lost) n_lost++;
      @(posedge clk);
    end
    checks++;
    if (n_lost != 1) begin failures++; $display("trg_lost pulses %0d", n_lost); end
    $display("triggers %0d headers %0d syncs %0d", n_trg, n_hdr, n_syn);
    checks++;
    if (n_trg < 50 || n_hdr < 100 || n_syn < 20) begin failures++; $display("too few sequences"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
