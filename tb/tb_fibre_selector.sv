// tb_fibre_selector: the selector fed from packet buffers and verdict
// queues that the testbench fills. Covers: both copies good (A forwarded),
// A bad (B forwarded), both bad (preferred fibre forwarded, both ways), a
// missing copy of B (timeout, A forwarded alone) followed by the late copy
// (dropped), and the same for A; two late copies of B, both dropped; a dead
// fibre A, where only the first packet of B waits for the timeout, then a
// reset. Every forwarded packet is compared word by word; the output must
// run at one word per clock inside a packet.
module tb_fibre_selector;
  import omb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int TMO = 64;
  int checks = 0, failures = 0;

  logic        wa, wb, pa, pb, oka, okb, prefer_b;
  logic [17:0] da, db;
  logic        a_empty, b_empty, a_rd, b_rd, ra_empty, rb_empty, ra_rd, rb_rd, ra_ok, rb_ok;
  logic [17:0] a_word, b_word;
  stream_t     out;
  logic        ev_pkt, ev_sel_b, ev_bothbad, ev_timeout;

  sync_fifo #(.WIDTH(18), .DEPTH(256)) fa (.clk, .rst_n, .wr_en(wa), .wdata(da), .rd_en(a_rd), .rdata(a_word), .empty(a_empty), .full(), .count());
  sync_fifo #(.WIDTH(18), .DEPTH(256)) fb (.clk, .rst_n, .wr_en(wb), .wdata(db), .rd_en(b_rd), .rdata(b_word), .empty(b_empty), .full(), .count());
  sync_fifo #(.WIDTH(1),  .DEPTH(16))  qa (.clk, .rst_n, .wr_en(pa), .wdata(oka), .rd_en(ra_rd), .rdata(ra_ok), .empty(ra_empty), .full(), .count());
  sync_fifo #(.WIDTH(1),  .DEPTH(16))  qb (.clk, .rst_n, .wr_en(pb), .wdata(okb), .rd_en(rb_rd), .rdata(rb_ok), .empty(rb_empty), .full(), .count());

  fibre_selector #(.TIMEOUT(TMO)) dut (.*);

  // expected output packets, flattened with a marker per packet start
  logic [15:0] exp_q[$];
  int n_pkt = 0, n_selb = 0, n_bb = 0, n_tmo = 0;
  int gap_in_pkt = 0, in_pkt = 0;

  always @(posedge clk) if (rst_n) begin
    if (out.valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected word %h", out.data); end
      else begin
        if (out.data != exp_q[0]) begin failures++; $display("word %h expected %h", out.data, exp_q[0]); end
        void'(exp_q.pop_front());
      end
      in_pkt = !out.eop;
    end else if (in_pkt) gap_in_pkt++;
    if (ev_pkt) n_pkt++;
    if (ev_sel_b) n_selb++;
    if (ev_bothbad) n_bb++;
    if (ev_timeout) n_tmo++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // push one copy of a packet into buffer A (f=0) or B (f=1) with its verdict
  task automatic push(input int f, input logic [15:0] w[$], input logic good, input logic pref = 1'b0);
    for (int i = 0; i < w.size(); i++) begin
      if (f == 0) begin wa <= 1; da <= {i == 0, i == w.size() - 1, w[i]}; end
      else        begin wb <= 1; db <= {i == 0, i == w.size() - 1, w[i]}; end
      @(posedge clk);
    end
    wa <= 0; wb <= 0;
    // the decision follows the second verdict, so the preference goes with it
    if (f == 0) begin pa <= 1; oka <= good; end else begin pb <= 1; okb <= good; prefer_b <= pref; end
    @(posedge clk);
    pa <= 0; pb <= 0;
  endtask

  task automatic pair(input logic ga, input logic gb, input logic pref, input int expect_f);
    logic [15:0] w[$], v[$];
    int n;
    n = 2 + $urandom % 20;
    for (int i = 0; i < n; i++) begin w.push_back(16'($urandom)); v.push_back(16'($urandom)); end
    if (expect_f == 0) foreach (w[i]) exp_q.push_back(w[i]);
    else               foreach (v[i]) exp_q.push_back(v[i]);
    push(0, w, ga);
    push(1, v, gb, pref);
  endtask

  task automatic drain();
    int t = 0;
    while ((exp_q.size() != 0 || !a_empty || !b_empty) && t < 5000) begin @(posedge clk); t++; end
    repeat (4) @(posedge clk);
  endtask

  initial begin
    logic [15:0] w[$];
    int p0, s0, b0, t0;
    wa = 0; wb = 0; pa = 0; pb = 0; oka = 0; okb = 0; da = 0; db = 0; prefer_b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // normal traffic
    for (int k = 0; k < 40; k++) begin
      case (k % 5)
        0: pair(1, 1, 0, 0);
        1: pair(0, 1, 0, 1);
        2: pair(1, 0, 1, 0);
        3: pair(0, 0, 0, 0);
        4: pair(0, 0, 1, 1);
      endcase
    end
    drain();
    checks++; if (n_pkt != 40)  begin failures++; $display("pkts %0d", n_pkt); end
    checks++; if (n_bb != 16)   begin failures++; $display("bothbad %0d", n_bb); end
    checks++; if (n_selb != 16) begin failures++; $display("selb %0d", n_selb); end
    // fibre B loses a packet: A is forwarded after the timeout
    p0 = n_pkt; t0 = n_tmo;
    w = '{16'h1111, 16'h2222, 16'h3333};
    foreach (w[i]) exp_q.push_back(w[i]);
    push(0, w, 1);
    repeat (TMO + 10) @(posedge clk);
    checks++; if (n_tmo != t0 + 1 || exp_q.size() != 0) begin failures++; $display("timeout A not forwarded"); end
    // the late copy of B comes in: dropped, nothing forwarded
    push(1, '{16'h9999, 16'h8888, 16'h7777}, 1);
    repeat (20) @(posedge clk);
    checks++; if (!b_empty || !rb_empty) begin failures++; $display("late B not dropped"); end
    // fibres are aligned again
    pair(1, 1, 0, 0);
    drain();
    // same with A missing
    t0 = n_tmo; s0 = n_selb;
    w = '{16'h4444, 16'h5555};
    foreach (w[i]) exp_q.push_back(w[i]);
    push(1, w, 1);
    repeat (TMO + 10) @(posedge clk);
    checks++; if (n_tmo != t0 + 1 || exp_q.size() != 0 || n_selb != s0 + 1) begin failures++; $display("timeout B not forwarded"); end
    push(0, '{16'h6666, 16'h6667}, 1);
    repeat (20) @(posedge clk);
    checks++; if (!a_empty) begin failures++; $display("late A not dropped"); end
    pair(0, 1, 0, 1);
    drain();
    checks++; if (n_pkt != p0 + 4) begin failures++; $display("pkts after loss %0d", n_pkt - p0); end
    // two copies of B late: A's first waits for the timeout, the second goes
    // at once; the two late B copies are both dropped, then pairs line up
    t0 = n_tmo;
    w = '{16'hAA01, 16'hAA02, 16'hAA03};
    foreach (w[i]) exp_q.push_back(w[i]);
    push(0, w, 1);
    repeat (TMO + 10) @(posedge clk);
    w = '{16'hAB01, 16'hAB02};
    foreach (w[i]) exp_q.push_back(w[i]);
    push(0, w, 0);
    repeat (8) @(posedge clk);
    checks++; if (n_tmo != t0 + 2 || exp_q.size() != 0) begin failures++; $display("second copy of A not sent at once"); end
    push(1, '{16'h0B01, 16'h0B02, 16'h0B03}, 1);
    push(1, '{16'h0B11, 16'h0B12}, 1);
    repeat (20) @(posedge clk);
    checks++; if (!b_empty || !rb_empty) begin failures++; $display("late B copies not dropped"); end
    pair(0, 1, 0, 1);
    pair(1, 0, 0, 0);
    drain();
    checks++; if (n_tmo != t0 + 2) begin failures++; $display("timeouts after realignment %0d", n_tmo - t0); end
    // fibre A dead: only the first of 12 packets waits for the timeout, the
    // rest leave as they arrive
    begin
      int t_start, t_end, words;
      t0 = n_tmo; words = 0;
      t_start = $time / 10;
      for (int k = 0; k < 12; k++) begin
        w.delete();
        for (int i = 0; i < 6; i++) w.push_back(16'($urandom));
        foreach (w[i]) exp_q.push_back(w[i]);
        push(1, w, 1);
        words += w.size() + 1;
      end
      while (exp_q.size() != 0 && $time / 10 - t_start < 5 * TMO) @(posedge clk);
      t_end = $time / 10;
      checks++;
      if (exp_q.size() != 0 || t_end - t_start > words + TMO + 10) begin
        failures++; $display("dead fibre A: %0d words left after %0d clocks", exp_q.size(), t_end - t_start);
      end
      checks++; if (n_tmo != t0 + 12) begin failures++; $display("dead fibre A: %0d copies counted missing", n_tmo - t0); end
      // a reset clears what A owes; pairs work again
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      pair(1, 1, 0, 0);
      drain();
    end
    checks++; if (gap_in_pkt != 0) begin failures++; $display("output not one word per clock (%0d gaps)", gap_in_pkt); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d words never came", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
