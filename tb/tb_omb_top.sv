// tb_omb_top: the whole board at its default size (8 channels, 16 fibres,
// 1024-word buffers), controlled only through VME.
// Phase 1: all channels receive packets at once, each copy corrupted at
//   random; every output must be the good copy, and the per-channel CRC
//   error, packet and both-bad counters read over VME must agree.
// Phase 2: a copy lost on one fibre (timeout), then a board reset through
//   VME, after which the channel carries packets again; then a dead fibre
//   on another channel, where only the first of five packets waits for the
//   timeout, again followed by a reset.
// Phase 3: injection mode on two channels, a new event loaded over VME into
//   one of them, and triggers from the VME command, the internal generator,
//   the external NIM input and the TTC L1 accept; the ROD busy then blocks
//   the external trigger.
// Each of these mechanisms is counted and must have happened at least once.
module tb_omb_top;
  import omb_pkg::*;
  import omb_tb_pkg::*;

  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  stream_t     fib_in [2*N];
  stream_t     tx_out [N];
  stream_t     pmc_out [N];
  logic [7:0]  board_base;
  logic        vme_as_n, vme_write_n, vme_lword_n, vme_data_oe, vme_dtack_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [31:0] vme_data_i, vme_data_o;
  logic        nim_trig, rod_busy, ttc_l1a;

  omb_top dut (.*);

  `include "vme_master.svh"

  function automatic logic [31:0] loc(input logic [7:0] r);
    return {8'hC1, 4'h0, 12'h0, r};
  endfunction
  function automatic logic [31:0] rem(input int ch, input logic [10:0] r);
    return {8'hC1, 4'(ch + 1), 7'h0, r, 2'b00};
  endfunction

  // mechanisms seen
  int m_good = 0, m_err_a = 0, m_err_b = 0, m_bothbad = 0, m_timeout = 0, m_reset = 0;
  int m_inj_vme = 0, m_inj_gen = 0, m_inj_nim = 0, m_inj_ttc = 0, m_busy = 0, m_load = 0, m_dead = 0;

  // per-channel expectations
  word_t exp_q [N][$];
  logic  inj [N];
  word_t tmpl [N][$];
  int    inj_ev [N], inj_idx [N];

  for (genvar c = 0; c < N; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (tx_out[c] != pmc_out[c]) begin failures++; $display("ch %0d: PMC copy differs", c); end
      if (tx_out[c].valid) begin
        checks++;
        if (inj[c]) begin
          if (tx_out[c].sop) inj_idx[c] = 0;
          if (inj_idx[c] >= tmpl[c].size() || tx_out[c].data != tmpl[c][inj_idx[c]]) begin
            failures++; $display("ch %0d: injected word %0d = %h", c, inj_idx[c], tx_out[c].data);
          end
          inj_idx[c]++;
          if (tx_out[c].eop) begin
            inj_ev[c]++;
            if (inj_idx[c] != tmpl[c].size()) begin failures++; $display("ch %0d: event of %0d words", c, inj_idx[c]); end
          end
        end else if (exp_q[c].size() == 0) begin
          failures++; $display("ch %0d: unexpected word %h", c, tx_out[c].data);
        end else begin
          if (tx_out[c].data != exp_q[c][0]) begin failures++; $display("ch %0d: word %h expected %h", c, tx_out[c].data, exp_q[c][0]); end
          void'(exp_q[c].pop_front());
        end
      end
    end
  end

  task automatic drive(input int fi, input word_t w[$]);
    foreach (w[i]) begin
      @(negedge clk);
      fib_in[fi] = '{valid: 1'b1, sop: i == 0, eop: i == w.size() - 1, data: w[i]};
    end
    @(negedge clk);
    fib_in[fi] = '0;
  endtask

  function automatic void make(output word_t w[$], input int n);
    w.delete();
    for (int i = 0; i < n - 1; i++) w.push_back(word_t'($urandom));
    w.push_back(crc_ref(w));
  endfunction

  int ea [N], eb [N], bb [N], np [N];

  task automatic channel_traffic(input int c, input int npk);
    word_t w[$], va[$], vb[$];
    int kind;
    for (int p = 0; p < npk; p++) begin
      make(w, 2 + $urandom % 100);
      va = w; vb = w;
      kind = $urandom % 4;
      if (kind == 1 || kind == 3) begin va[$urandom % va.size()] ^= 16'h8000; ea[c]++; end
      if (kind == 2 || kind == 3) begin vb[$urandom % vb.size()] ^= 16'h0001; eb[c]++; end
      case (kind)
        0: m_good++;
        1: m_err_a++;
        2: m_err_b++;
        3: begin m_bothbad++; bb[c]++; end
      endcase
      np[c]++;
      if (kind == 1) foreach (vb[i]) exp_q[c].push_back(vb[i]);
      else           foreach (va[i]) exp_q[c].push_back(va[i]);
      fork
        drive(2 * c, va);
        drive(2 * c + 1, vb);
      join
    end
  endtask

  // phase 1 runs one traffic process per channel
  logic go = 1'b0;
  int   fin = 0;
  for (genvar c = 0; c < N; c++) begin : g_drv
    initial begin
      wait (go);
      channel_traffic(c, 12);
      fin++;
    end
  end

  task automatic wait_empty(input int limit);
    int t = 0, left;
    do begin
      @(posedge clk); t++;
      left = 0;
      for (int c = 0; c < N; c++) left += exp_q[c].size();
    end while (left != 0 && t < limit);
    checks++;
    if (left != 0) begin failures++; $display("%0d expected words never came out", left); end
  endtask

  task automatic check_reg(input int c, input logic [10:0] r, input int v, input string what);
    logic [31:0] q;
    vme_rd(rem(c, r), q);
    checks++;
    if (q != 32'(v)) begin failures++; $display("ch %0d %s = %0d expected %0d", c, what, q, v); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    word_t w[$], d[$];
    int e0[N];
    for (int i = 0; i < 2 * N; i++) fib_in[i] = '0;
    for (int c = 0; c < N; c++) begin inj[c] = 0; inj_ev[c] = 0; inj_idx[c] = 0; ea[c] = 0; eb[c] = 0; bb[c] = 0; np[c] = 0; end
    vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 1; vme_am = 0;
    vme_addr = 0; vme_data_i = 0; board_base = 8'hC1;
    nim_trig = 0; rod_busy = 0; ttc_l1a = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    vme_rd(loc(V_ID), q);
    checks++; if (q != OMB_ID) begin failures++; $display("board ID %h", q); end

    // ---- phase 1: all channels, random corruption ----
    go = 1;
    wait (fin == N);
    wait_empty(2000);
    for (int c = 0; c < N; c++) begin
      check_reg(c, R_ERR_A, ea[c], "CRC errors A");
      check_reg(c, R_ERR_B, eb[c], "CRC errors B");
      check_reg(c, R_PKTS, np[c], "packets");
      check_reg(c, R_BOTHBAD, bb[c], "both bad");
    end

    // ---- phase 2: lost copy, then board reset ----
    make(w, 20);
    foreach (w[i]) exp_q[3].push_back(w[i]);
    drive(6, w);                       // channel 3, fibre A only
    repeat (512 + 100) @(posedge clk);
    wait_empty(100);
    check_reg(3, R_TMO, 1, "timeouts");
    vme_rd(rem(3, R_TMO), q);
    if (q == 1) m_timeout++;
    vme_wr(loc(V_RESET), 32'h1);
    repeat (30) @(posedge clk);
    check_reg(3, R_PKTS, np[3] + 1, "packets kept over reset");
    m_reset++;
    np[3]++;
    channel_traffic(3, 3);
    wait_empty(2000);

    // ---- phase 2b: fibre B of channel 6 dead; only the first packet waits ----
    begin
      int t_start, t_used;
      t_start = $time / 10;
      for (int k = 0; k < 5; k++) begin
        make(w, 30);
        foreach (w[i]) exp_q[6].push_back(w[i]);
        drive(12, w);
        np[6]++;
      end
      wait_empty(2000);
      t_used = $time / 10 - t_start;
      checks++;
      if (t_used > 512 + 5 * 31 + 40) begin failures++; $display("dead fibre: 5 packets took %0d clocks", t_used); end
      else m_dead++;
      check_reg(6, R_TMO, 5, "copies missing on a dead fibre");
      vme_wr(loc(V_RESET), 32'h1);
      repeat (30) @(posedge clk);
      channel_traffic(6, 2);
      wait_empty(2000);
    end

    // ---- phase 3: injection ----
    d.delete();
    for (int i = 0; i < 15; i++) d.push_back(16'hA000 + 16'(i));
    d.push_back(crc_ref(d));
    tmpl[0] = d;
    make(w, 5);
    foreach (w[i]) vme_wr(rem(5, R_EVMEM + 11'(i)), 32'(w[i]));
    vme_wr(rem(5, R_EVLEN), 32'd5);
    tmpl[5] = w;
    m_load++;
    vme_wr(rem(0, R_CTRL), 32'h1);
    vme_wr(rem(5, R_CTRL), 32'h1);
    inj[0] = 1; inj[5] = 1;
    // VME command to channels 0 and 5
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0010_0001, 4'h0, 4'b0100});
    e0 = inj_ev;
    vme_wr(loc(V_SWTRIG), 32'h1);
    repeat (40) @(posedge clk);
    checks++; if (inj_ev[0] != e0[0] + 1 || inj_ev[5] != e0[5] + 1) begin failures++; $display("VME trigger: no events"); end
    else m_inj_vme++;
    // internal generator, period 300, channel 0 only, ~2000 clocks
    vme_wr(loc(V_PERIOD), 32'd300);
    e0 = inj_ev;
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0000_0001, 4'h0, 4'b0010});
    repeat (2000) @(posedge clk);
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0000_0001, 4'h0, 4'b0000});
    repeat (40) @(posedge clk);
    checks++; if (inj_ev[0] - e0[0] < 6 || inj_ev[0] - e0[0] > 8 || inj_ev[5] != e0[5]) begin failures++; $display("generator: %0d events", inj_ev[0] - e0[0]); end
    else m_inj_gen++;
    // external NIM trigger, both channels
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0010_0001, 4'h0, 4'b0001});
    e0 = inj_ev;
    @(negedge clk) nim_trig = 1; repeat (5) @(negedge clk); nim_trig = 0;
    repeat (40) @(posedge clk);
    checks++; if (inj_ev[0] != e0[0] + 1 || inj_ev[5] != e0[5] + 1) begin failures++; $display("NIM trigger: no events"); end
    else m_inj_nim++;
    // TTC L1 accept
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0010_0001, 4'h0, 4'b1000});
    e0 = inj_ev;
    @(negedge clk) ttc_l1a = 1; @(negedge clk) ttc_l1a = 0;
    repeat (40) @(posedge clk);
    checks++; if (inj_ev[0] != e0[0] + 1 || inj_ev[5] != e0[5] + 1) begin failures++; $display("TTC trigger: no events"); end
    else m_inj_ttc++;
    // ROD busy stops the injection
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0010_0001, 3'h0, 1'b1, 4'b0001});
    e0 = inj_ev;
    @(negedge clk) rod_busy = 1; repeat (4) @(negedge clk);
    nim_trig = 1; repeat (5) @(negedge clk); nim_trig = 0;
    repeat (40) @(posedge clk);
    rod_busy = 0;
    vme_rd(loc(V_VETOCNT), q);
    checks++; if (inj_ev[0] != e0[0] || q != 1) begin failures++; $display("busy did not stop injection (vetoed %0d)", q); end
    else m_busy++;
    // channels not in injection mode still forward fibre data meanwhile
    channel_traffic(2, 3);
    wait_empty(2000);

    checks++; if (m_good == 0)    begin failures++; $display("never: both copies good"); end
    checks++; if (m_err_a == 0)   begin failures++; $display("never: CRC error on fibre A"); end
    checks++; if (m_err_b == 0)   begin failures++; $display("never: CRC error on fibre B"); end
    checks++; if (m_bothbad == 0) begin failures++; $display("never: both copies bad"); end
    checks++; if (m_timeout == 0) begin failures++; $display("never: lost copy timeout"); end
    checks++; if (m_reset == 0)   begin failures++; $display("never: board reset"); end
    checks++; if (m_dead == 0)    begin failures++; $display("never: dead fibre at full pace"); end
    checks++; if (m_load == 0)    begin failures++; $display("never: event memory load"); end
    checks++; if (m_inj_vme == 0) begin failures++; $display("never: VME trigger"); end
    checks++; if (m_inj_gen == 0) begin failures++; $display("never: generator trigger"); end
    checks++; if (m_inj_nim == 0) begin failures++; $display("never: NIM trigger"); end
    checks++; if (m_inj_ttc == 0) begin failures++; $display("never: TTC trigger"); end
    checks++; if (m_busy == 0)    begin failures++; $display("never: busy veto"); end
    $display("mechanisms: good=%0d errA=%0d errB=%0d bothbad=%0d timeout=%0d dead=%0d reset=%0d load=%0d vme=%0d gen=%0d nim=%0d ttc=%0d busy=%0d",
             m_good, m_err_a, m_err_b, m_bothbad, m_timeout, m_dead, m_reset, m_load, m_inj_vme, m_inj_gen, m_inj_nim, m_inj_ttc, m_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
