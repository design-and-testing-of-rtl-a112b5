// tb_ff_frm_bld: self-checking test of the transmitter Frame Builder at
// 8xF, with its data-word and descriptor FIFOs (64 words each).
// The testbench plays the host and the scheduler/serializer side:
// random packets of 1..50 words with random label and data type, random
// gaps, a serializer that asks for the next frame at random and is
// sometimes stalled for long stretches (so both FIFOs fill up and
// get_data must fall), random FL words and random triggers.
// All inputs change after a falling edge; everything the builder decides
// for a reference edge is sampled just before that edge.
// Checks:
//  * every descriptor decodes (own Hamming model) to a frame of at most
//    16 words, fd_len equals its length field, frames of one packet carry
//    the label flag only on the first frame, the packet's data type, and
//    last_frame only on the final frame, whose length completes the packet;
//  * the data-word FIFO holds exactly the accepted words in order;
//  * get_data is low whenever either FIFO is almost full;
//  * at each trigger the FL frame is the next 3 accepted FL words packed
//    first-word-high, or zero with flf_underrun when none is complete.
module tb_ff_frm_bld;
  localparam int N = 8, FLW = 3, FB = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ref_en = 0, data_valid = 0, label_on = 0, data_type = 0, get_data;
  logic [15:0] word_in = '0;
  logic [5:0] flf_word = '0;
  logic flf_valid = 0, flf_get, hdr_req, hdr_go = 0, trg_go = 0, ser_busy = 0, flf_underrun;
  logic dw_push, dw_afull, fd_push, fd_afull, fd_pop, fd_empty, dw_pop = 0, dw_empty;
  logic [15:0] dw_wdata, dw_rdata;
  logic [11:0] fd_wdata, fd_rdata, fdc;
  logic [3:0] fd_len;
  logic [FB-1:0] flf_frame;

  ff_frm_bld #(.N(N)) dut (.clk, .rst_n, .ref_en, .word_in, .data_valid, .label_on, .data_type, .get_data,
    .flf_word, .flf_valid, .flf_get, .dw_push, .dw_wdata, .dw_afull, .fd_push, .fd_wdata, .fd_afull,
    .fd_pop, .fd_rdata, .fd_empty, .hdr_req, .hdr_go, .trg_go, .flf_mode(1'b1), .ser_busy, .fdc, .fd_len,
    .flf_frame, .flf_underrun);
  rh_fifo #(.W(16), .DEPTH(64)) u_dw (.clk, .rst_n, .push(dw_push), .wdata(dw_wdata), .pop(dw_pop), .rdata(dw_rdata),
    .rd_ded(), .empty(dw_empty), .full(), .afull(dw_afull), .level(), .sec_cnt(), .ded_cnt(),
    .seu_we(1'b0), .seu_addr('0), .seu_mask('0));
  rh_fifo #(.W(12), .DEPTH(64)) u_fd (.clk, .rst_n, .push(fd_push), .wdata(fd_wdata), .pop(fd_pop), .rdata(fd_rdata),
    .rd_ded(), .empty(fd_empty), .full(), .afull(fd_afull), .level(), .sec_cnt(), .ded_cnt(),
    .seu_we(1'b0), .seu_addr('0), .seu_mask('0));

  // data bits of a 7-bit Hamming code word (positions 3,5,6,7,9,10,11)
  function automatic logic [6:0] fd_data(input logic [11:0] c);
    return {c[11], c[10], c[9], c[7], c[6], c[5], c[3]};
  endfunction

  logic [15:0] acc_w[$];     // accepted words not yet popped
  logic [2:0]  pkt_q[$];     // {label, data type, unused} of accepted packets
  int          pkt_len[$];   // length of each accepted packet
  logic [5:0]  acc_f[$];
  int cur_len = 0, pkt_left = 0, pops = 0, frames = 0, stall_cnt = 0, nstall = 0, nund = 0, nflf = 0;
  int in_pkt_words = 0;      // words of the current packet already framed
  int busy_left = 0, gap = 0, nwait = 0;
  logic [15:0] plan_w;

  initial begin
    logic [6:0] fd;
    logic lbl, dt;
    int plen;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 60000; c++) begin
      @(negedge clk);
      ref_en = (c % 2 == 1);
      dw_pop = 0; hdr_go = 0; trg_go = 0;
      if (pops > 0) begin
        dw_pop = 1;
        #1;
        checks++;
        if (acc_w.size() == 0 || dw_rdata !== acc_w[0]) begin failures++; $display("DW FIFO word %h", dw_rdata); end
        else void'(acc_w.pop_front());
        pops--;
      end
      if (ref_en) begin
        // host data port
        if (pkt_left == 0 && gap == 0 && $urandom_range(0, 3) == 0) begin
          pkt_left = $urandom_range(1, 50);
          lbl = 1'($urandom); dt = 1'($urandom);
          label_on = lbl; data_type = dt;
          plan_w = 16'($urandom);
          pkt_q.push_back({lbl, dt, 1'b0}); pkt_len.push_back(pkt_left);
        end
        data_valid = (pkt_left > 0);
        word_in = plan_w;
        // FL port and triggers
        if (!flf_valid || flf_get) begin flf_valid = ($urandom_range(0, 2) == 0); flf_word = 6'($urandom); end
        trg_go = ($urandom_range(0, 7) == 0);
        // serializer side: busy while sending a frame, sometimes stalled
        if (busy_left > 0) busy_left--;
        if ($urandom_range(0, 400) == 0) begin stall_cnt = $urandom_range(100, 400); nstall++; end
        if (stall_cnt > 0) stall_cnt--;
        ser_busy = (busy_left > 0) || (stall_cnt > 0);
        #1;
        hdr_go = hdr_req && !trg_go && ($urandom_range(0, 1) == 0);
        #1;
        checks++;
        if (get_data !== !(dw_afull || fd_afull)) begin failures++; $display("get_data %b with afull %b/%b", get_data, dw_afull, fd_afull); end
        if (data_valid && !get_data) nwait++;
        if (data_valid && get_data) begin
          acc_w.push_back(word_in);
          pkt_left--;
          plan_w = 16'($urandom);
          if (pkt_left == 0) gap = $urandom_range(1, 4);
        end else if (!data_valid && gap > 0) gap--;
        // a word accepted at this edge is not yet in a frame for a trigger at the same edge
        if (trg_go) begin
          checks++;
          if (acc_f.size() >= FLW && !flf_underrun) begin
            if (flf_frame !== {acc_f[0], acc_f[1], acc_f[2]}) begin failures++; $display("FL frame %h", flf_frame); end
            repeat (FLW) void'(acc_f.pop_front());
            nflf++;
          end else if (acc_f.size() < FLW) begin
            if (!flf_underrun || flf_frame !== '0) begin failures++; $display("no underrun with %0d FL words", acc_f.size()); end
            nund++;
          end else begin
            failures++; $display("underrun with %0d FL words queued", acc_f.size());
          end
        end
        if (flf_valid && flf_get) acc_f.push_back(flf_word);
        if (hdr_go) begin
          fd = fd_data(fdc);
          frames++;
          checks++;
          if (fd_len !== fd[6:3]) begin failures++; $display("fd_len %0d field %0d", fd_len, fd[6:3]); end
          plen = int'(fd[6:3]) + 1;
          checks++;
          if (pkt_q.size() == 0) begin failures++; $display("descriptor without packet"); end
          else begin
            if (fd[2] !== (pkt_q[0][2] && in_pkt_words == 0) || fd[1] !== pkt_q[0][1]) begin
              failures++; $display("label/type %b%b pkt %b%b first %0d", fd[2], fd[1], pkt_q[0][2], pkt_q[0][1], in_pkt_words == 0);
            end
            in_pkt_words += plen;
            checks++;
            if (fd[0] !== (in_pkt_words == pkt_len[0]) || in_pkt_words > pkt_len[0] ||
                (!fd[0] && plen != 16)) begin
              failures++; $display("frame split: len %0d last %b of %0d/%0d", plen, fd[0], in_pkt_words, pkt_len[0]);
            end
            if (fd[0] || in_pkt_words >= pkt_len[0]) begin
              void'(pkt_q.pop_front()); void'(pkt_len.pop_front()); in_pkt_words = 0;
            end
          end
          pops += plen;
          busy_left = plen + 3;
        end
      end
    end
    $display("frames %0d stalls %0d host waits %0d FL frames %0d underruns %0d", frames, nstall, nwait, nflf, nund);
    checks++;
    if (frames < 500 || nwait < 10 || nflf < 100 || nund < 10) begin failures++; $display("too little activity"); end
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
