// tb_event_injector: checks the default event (15 words 0xA000+i and their
// CRC), the trigger-to-first-word latency, back-to-back events from queued
// triggers, loading a new event and length, and that no event leaves while
// the injector is disabled.
module tb_event_injector;
  import omb_pkg::*;
  import omb_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, trig, mem_we, sending;
  logic [10:0] len;
  logic [9:0]  mem_addr;
  word_t       mem_wdata;
  stream_t     out;

  event_injector #(.DEPTH(1024)) dut (.*);

  word_t got[$];
  int    n_ev = 0, widx = 0, bad_flags = 0;
  int    trig_t = -1, first_t = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (trig) trig_t = cyc;
    if (out.valid) begin
      if (out.sop && first_t < 0) first_t = cyc;
      if (out.sop) widx = 0;
      if (out.sop != (widx == 0)) bad_flags++;
      if (out.eop && widx + 1 != int'(len)) bad_flags++;
      widx++;
      got.push_back(out.data);
      if (out.eop) n_ev++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_event(input word_t w[$], input string what);
    checks++;
    if (got.size() < w.size()) begin failures++; $display("%s: %0d words, expected %0d", what, got.size(), w.size()); return; end
    for (int i = 0; i < w.size(); i++) begin
      checks++;
      if (got[i] != w[i]) begin failures++; $display("%s word %0d = %h expected %h", what, i, got[i], w[i]); end
    end
    repeat (w.size()) void'(got.pop_front());
  endtask

  initial begin
    word_t d[$], e[$];
    int ev0;
    enable = 0; trig = 0; mem_we = 0; len = 16; mem_addr = 0; mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: trigger ignored
    trig <= 1; @(posedge clk); trig <= 0;
    repeat (40) @(posedge clk);
    checks++; if (got.size() != 0) begin failures++; $display("event while disabled"); end
    // default event
    enable <= 1;
    @(posedge clk);
    trig <= 1; @(posedge clk); trig <= 0;
    repeat (30) @(posedge clk);
    for (int i = 0; i < 15; i++) d.push_back(16'hA000 + 16'(i));
    e = d;
    e.push_back(crc_ref(d));
    checks++; if (first_t - trig_t != 3) begin failures++; $display("latency %0d", first_t - trig_t); end
    expect_event(e, "default");
    // three triggers in a row: three events back to back
    ev0 = n_ev;
    repeat (3) begin trig <= 1; @(posedge clk); end
    trig <= 0;
    repeat (80) @(posedge clk);
    checks++; if (n_ev != ev0 + 3) begin failures++; $display("queued events %0d", n_ev - ev0); end
    repeat (3) expect_event(e, "queued");
    // load a new 5-word event
    d = '{16'h1234, 16'h5678, 16'h9ABC, 16'hDEF0, 16'h0F0F};
    for (int i = 0; i < 5; i++) begin
      mem_we <= 1; mem_addr <= 10'(i); mem_wdata <= d[i]; @(posedge clk);
    end
    mem_we <= 0; len <= 5;
    @(posedge clk);
    trig <= 1; @(posedge clk); trig <= 0;
    repeat (20) @(posedge clk);
    expect_event(d, "loaded");
    checks++; if (got.size() != 0) begin failures++; $display("extra words %0d", got.size()); end
    checks++; if (bad_flags != 0) begin failures++; $display("%0d misplaced sop/eop flags", bad_flags); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
