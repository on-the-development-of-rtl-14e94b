// tb_crc_fpga: one channel with its serial bus driven by an sbus_master.
// Sends the same packets on both fibres with random CRC corruption of
// either copy and a random skew between them, and checks that every output
// packet is the good copy (fibre A when both are good), that packets leave
// at one word per clock within a few clocks of the later copy's end, and
// that the error, packet, both-bad and fibre-B counters read over the bus
// agree. Then 200 short packets back to back on both fibres, which must
// leave at the full word rate with nothing lost. Then: a copy lost on fibre
// B (timeout), the channel reset, and
// injection mode with the default event and with an event loaded over the
// bus.
module tb_crc_fpga;
  import omb_pkg::*;
  import omb_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int TMO = 300;
  stream_t fib_a, fib_b, tx;
  logic trig, ch_rst, sb_clk, s_do, s_oe, m_do, m_oe, sb_line;
  logic req, we, done, err;
  logic [10:0] addr;
  logic [31:0] wdata, rdata;

  crc_fpga #(.SLOT(4'd2), .FIFO_DEPTH(256), .EVT_DEPTH(1024), .TIMEOUT(TMO)) dut (
    .clk, .rst_n, .ch_rst, .fib_a, .fib_b, .tx, .trig,
    .sb_clk, .sb_di(sb_line), .sb_do(s_do), .sb_oe(s_oe));

  sbus_master u_m (.clk, .rst_n, .req, .we, .slot(4'd2), .addr, .wdata, .done, .rdata, .err,
    .sb_clk, .sb_do(m_do), .sb_oe(m_oe), .sb_di(sb_line));
  assign sb_line = (m_oe & m_do) | (s_oe & s_do);

  task automatic reg_wr(input logic [10:0] a, input logic [31:0] d);
    req <= 1; we <= 1; addr <= a; wdata <= d;
    @(posedge clk); while (!done) @(posedge clk);
    req <= 0; @(posedge clk);
  endtask
  task automatic reg_rd(input logic [10:0] a, output logic [31:0] q);
    req <= 1; we <= 0; addr <= a;
    @(posedge clk); while (!done) @(posedge clk);
    q = rdata;
    checks++; if (err) begin failures++; $display("no reply from slot 2"); end
    req <= 0; @(posedge clk);
  endtask
  task automatic expect_reg(input logic [10:0] a, input logic [31:0] v, input string what);
    logic [31:0] q;
    reg_rd(a, q);
    checks++;
    if (q != v) begin failures++; $display("%s = %0d expected %0d", what, q, v); end
  endtask

  // output monitor
  word_t exp_q[$];
  int gaps = 0, inpk = 0, cyc = 0, last_eop_in = 0, last_eop_out = 0, worst_lat = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx.valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected word %h", tx.data); end
      else begin
        if (tx.data != exp_q[0]) begin failures++; $display("word %h expected %h", tx.data, exp_q[0]); end
        void'(exp_q.pop_front());
      end
      // latency from the later of: end of the input copies, end of the previous output packet
      if (tx.sop && cyc - ((last_eop_in > last_eop_out) ? last_eop_in : last_eop_out) > worst_lat)
        worst_lat = cyc - ((last_eop_in > last_eop_out) ? last_eop_in : last_eop_out);
      if (tx.eop) last_eop_out = cyc;
      inpk = !tx.eop;
    end else if (inpk) gaps++;
  end

  // drive one fibre
  task automatic drive(input int f, input word_t w[$], input int skew);
    repeat (skew) @(negedge clk);
    foreach (w[i]) begin
      @(negedge clk);
      if (f == 0) fib_a = '{valid: 1'b1, sop: i == 0, eop: i == w.size() - 1, data: w[i]};
      else        fib_b = '{valid: 1'b1, sop: i == 0, eop: i == w.size() - 1, data: w[i]};
    end
    @(negedge clk);
    if (f == 0) fib_a = '0; else fib_b = '0;
  endtask

  function automatic void make(output word_t w[$], input int n);
    w.delete();
    for (int i = 0; i < n - 1; i++) w.push_back(word_t'($urandom));
    w.push_back(crc_ref(w));
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w[$], va[$], vb[$], d[$];
    int ea = 0, eb = 0, bb = 0, sb = 0, np = 0, kind, skew;
    fib_a = '0; fib_b = '0; trig = 0; ch_rst = 0; req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int p = 0; p < 40; p++) begin
      make(w, 2 + $urandom % 60);
      va = w; vb = w;
      kind = $urandom % 4;          // 0 good, 1 A bad, 2 B bad, 3 both bad
      if (kind == 1 || kind == 3) begin va[$urandom % va.size()] ^= 16'h0100; ea++; end
      if (kind == 2 || kind == 3) begin vb[$urandom % vb.size()] ^= 16'h0010; eb++; end
      if (kind == 3) bb++;
      if (kind == 1) sb++;
      d = (kind == 1) ? vb : va;
      foreach (d[i]) exp_q.push_back(d[i]);
      np++;
      skew = $urandom % 8;
      fork
        drive(0, va, (p % 2) ? skew : 0);
        drive(1, vb, (p % 2) ? 0 : skew);
      join
      last_eop_in = cyc;
      repeat ($urandom % 3) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    // packets back to back on both fibres, no idle word between them: the
    // output must keep the full word rate and lose nothing
    begin
      int t_end;
      for (int p = 0; p < 200; p++) begin
        make(w, 2 + $urandom % 7);
        va = w; vb = w;
        kind = $urandom % 4;
        if (kind == 1 || kind == 3) begin va[$urandom % va.size()] ^= 16'h0800; ea++; end
        if (kind == 2 || kind == 3) begin vb[$urandom % vb.size()] ^= 16'h0002; eb++; end
        if (kind == 3) bb++;
        if (kind == 1) sb++;
        d = (kind == 1) ? vb : va;
        foreach (d[i]) exp_q.push_back(d[i]);
        np++;
        foreach (w[i]) begin
          @(negedge clk);
          fib_a = '{valid: 1'b1, sop: i == 0, eop: i == w.size() - 1, data: va[i]};
          fib_b = '{valid: 1'b1, sop: i == 0, eop: i == w.size() - 1, data: vb[i]};
        end
        last_eop_in = cyc + 1;
      end
      @(negedge clk);
      fib_a = '0; fib_b = '0;
      t_end = cyc;
      repeat (100) @(posedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("back to back: %0d words missing", exp_q.size()); end
      checks++;
      // store and forward: the output may trail by the pipeline (4 clocks)
      // plus one packet (at most 8 words); a lost clock per packet would
      // make it trail by up to 200 more
      if (last_eop_out - t_end > 8 + 4 + 1) begin
        failures++; $display("back to back: output ends %0d clocks after the input", last_eop_out - t_end);
      end
    end
    checks++; if (gaps != 0) begin failures++; $display("gaps inside output packets: %0d", gaps); end
    checks++; if (worst_lat > 6) begin failures++; $display("latency after the later copy %0d", worst_lat); end
    $display("worst first-word latency %0d clocks", worst_lat);
    expect_reg(R_ERR_A, ea, "errors A");
    expect_reg(R_ERR_B, eb, "errors B");
    expect_reg(R_PKTS, np, "packets");
    expect_reg(R_BOTHBAD, bb, "both bad");
    expect_reg(R_SELB, sb, "from B");
    // a copy lost on fibre B
    make(w, 10);
    foreach (w[i]) exp_q.push_back(w[i]);
    drive(0, w, 0);
    repeat (TMO + 40) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("lone copy not forwarded"); end
    expect_reg(R_TMO, 1, "timeouts");
    // channel reset keeps registers
    reg_wr(R_CTRL, 32'h2);
    ch_rst <= 1; repeat (16) @(posedge clk); ch_rst <= 0; repeat (2) @(posedge clk);
    expect_reg(R_CTRL, 2, "ctrl after channel reset");
    // counters clear
    reg_wr(R_CTRL, 32'h4);
    expect_reg(R_ERR_A, 0, "errors A after clear");
    // injection: default event
    reg_wr(R_CTRL, 32'h1);
    d.delete();
    for (int i = 0; i < 15; i++) d.push_back(16'hA000 + 16'(i));
    d.push_back(crc_ref(d));
    foreach (d[i]) exp_q.push_back(d[i]);
    trig <= 1; @(posedge clk); trig <= 0;
    repeat (40) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("default event not injected"); end
    // load a 6-word event over the bus
    make(w, 6);
    foreach (w[i]) reg_wr(R_EVMEM + 11'(i), 32'(w[i]));
    reg_wr(R_EVLEN, 6);
    foreach (w[i]) exp_q.push_back(w[i]);
    foreach (w[i]) exp_q.push_back(w[i]);
    trig <= 1; @(posedge clk); trig <= 0; @(posedge clk);
    trig <= 1; @(posedge clk); trig <= 0;
    // input traffic during injection is not forwarded
    make(w, 8);
    fork drive(0, w, 0); drive(1, w, 0); join
    repeat (60) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("loaded events not injected (%0d left)", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
