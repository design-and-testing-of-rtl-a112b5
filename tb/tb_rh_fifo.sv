// tb_rh_fifo: self-checking test of the radiation-hardened FIFO at its
// default size (16-bit words, 64 entries, stored as 22-bit SEC/DED codes).
// Phase 1: random push/pop traffic against a queue model, with random
// upsets injected into occupied entries through the test port: single-bit
// flips (at most one per entry between scrubber passes) must never show
// at the read port; double-bit flips must be flagged by rd_ded when read.
// Checks data order, empty/full/afull/level against the model, and at the
// end that sec_cnt equals the single upsets and ded_cnt the double ones.
// Phase 2: fill, upset, wait one scrubber pass with no reads: sec_cnt must
// rise without any read (the scrubber repaired the array), and the
// following reads must add nothing to it.
module tb_rh_fifo;
  localparam int W = 16, DEPTH = 64, NC = 22;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, seu_we = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic rd_ded, empty, full, afull;
  logic [6:0] level;
  logic [15:0] sec_cnt, ded_cnt;
  logic [5:0] seu_addr = '0;
  logic [NC-1:0] seu_mask = '0;

  rh_fifo dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .rd_ded, .empty, .full, .afull, .level,
    .sec_cnt, .ded_cnt, .seu_we, .seu_addr, .seu_mask);

  logic [W-1:0] q[$];
  logic         qd[$];      // entry expected to be uncorrectable
  int           qa[$];      // storage address of each entry
  int wp = 0, n_single = 0, n_double = 0;
  longint last_hit[DEPTH];
  longint cyc = 0;

  function automatic logic [NC-1:0] one_bit();
    return NC'(1) << $urandom_range(0, NC - 1);
  endfunction

  task automatic step(input bit allow_pop, input int upset_pct);
    int k, a, b;
    @(negedge clk);
    cyc++;
    push = ($urandom_range(0, 99) < 55);
    pop  = allow_pop && ($urandom_range(0, 99) < 50);
    wdata = W'($urandom);
    seu_we = 1'b0;
    // status against the model
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || int'(level) != q.size() ||
        afull !== (q.size() >= DEPTH - 2)) begin
      failures++; $display("flags: level %0d model %0d empty %b full %b afull %b", level, q.size(), empty, full, afull);
    end
    if (pop && q.size() > 0) begin
      checks++;
      if (qd[0]) begin
        if (rd_ded !== 1'b1) begin failures++; $display("double upset not flagged"); end
      end else if (rdata !== q[0] || rd_ded !== 1'b0) begin
        failures++; $display("read %h exp %h ded %b", rdata, q[0], rd_ded);
      end
    end
    // upset an occupied entry that is not read in this cycle
    if (q.size() > 2 && $urandom_range(0, 99) < upset_pct) begin
      k = $urandom_range(1, q.size() - 1);
      a = qa[k];
      if (!qd[k] && cyc - last_hit[a] > 2 * DEPTH) begin
        seu_we = 1'b1; seu_addr = 6'(a);
        last_hit[a] = cyc;
        if ($urandom_range(0, 3) == 0) begin
          b = $urandom_range(0, NC - 1);
          seu_mask = (NC'(1) << b) | (NC'(1) << ((b + 1 + $urandom_range(0, NC - 2)) % NC));
          qd[k] = 1'b1; n_double++;
        end else begin
          seu_mask = one_bit(); n_single++;
        end
      end
    end
    @(posedge clk);
    // a push into a full FIFO is ignored even if a pop happens in the same cycle
    k = q.size();
    if (pop && q.size() > 0) begin void'(q.pop_front()); void'(qd.pop_front()); void'(qa.pop_front()); end
    if (push && k < DEPTH) begin q.push_back(wdata); qd.push_back(1'b0); qa.push_back(wp); wp = (wp + 1) % DEPTH; end
  endtask

  initial begin
    logic [15:0] s0;
    for (int i = 0; i < DEPTH; i++) last_hit[i] = -1000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 6000; i++) step(1, 4);
    // drain
    while (q.size() > 0) begin
      @(negedge clk); push = 0; seu_we = 0; pop = 1;
      checks++;
      if (qd[0] ? (rd_ded !== 1'b1) : (rdata !== q[0] || rd_ded !== 1'b0)) begin failures++; $display("drain read"); end
      @(posedge clk); void'(q.pop_front()); void'(qd.pop_front()); void'(qa.pop_front());
    end
    @(negedge clk); pop = 0; push = 0;
    repeat (2 * DEPTH) @(negedge clk);   // let the scrubber reach any last fix
    checks++;
    if (int'(sec_cnt) != n_single) begin failures++; $display("sec_cnt %0d singles %0d", sec_cnt, n_single); end
    checks++;
    if (int'(ded_cnt) != n_double) begin failures++; $display("ded_cnt %0d doubles %0d", ded_cnt, n_double); end
    $display("singles %0d doubles %0d", n_single, n_double);

    // phase 2: scrubbing without reads
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); push = 1; wdata = 16'(i * 1111); pop = 0;
      q.push_back(wdata); qd.push_back(1'b0); qa.push_back(wp); wp = (wp + 1) % DEPTH;
      @(posedge clk);
    end
    @(negedge clk); push = 0;
    s0 = sec_cnt;
    for (int i = 0; i < 20; i += 2) begin
      @(negedge clk); seu_we = 1; seu_addr = 6'(qa[i]); seu_mask = one_bit();
      @(posedge clk);
    end
    @(negedge clk); seu_we = 0;
    repeat (DEPTH + 2) @(negedge clk);
    checks++;
    if (int'(sec_cnt - s0) != 10) begin failures++; $display("scrubber fixed %0d of 10", sec_cnt - s0); end
    s0 = sec_cnt;
    while (q.size() > 0) begin
      @(negedge clk); pop = 1;
      checks++;
      if (rdata !== q[0] || rd_ded !== 1'b0) begin failures++; $display("phase 2 read %h exp %h", rdata, q[0]); end
      @(posedge clk); void'(q.pop_front());
    end
    @(negedge clk); pop = 0;
    checks++;
    if (sec_cnt != s0) begin failures++; $display("reads still found errors after scrubbing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
