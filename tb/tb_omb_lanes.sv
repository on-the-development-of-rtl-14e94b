// tb_omb_lanes: a small board (3 channels, 64-word buffers) whose serial
// control bus uses all three data lines. Everything is reached through VME:
// the board ID, write and read-back of the control and event-length
// registers of every CRC FPGA, a packet checked on one channel and counted
// in its registers, and an event loaded into the event memory of another
// channel and injected by a VME trigger command. It also checks that a VME
// write to a CRC FPGA register, which waits for the serial frame, is
// acknowledged in fewer clocks than a one-line frame alone takes (100).
module tb_omb_lanes;
  import omb_pkg::*;
  import omb_tb_pkg::*;

  localparam int N = 3;
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

  omb_top #(.N_CH(N), .FIFO_DEPTH(64), .EVT_DEPTH(64), .SB_LANES(3)) dut (.*);

  `include "vme_master.svh"

  function automatic logic [31:0] loc(input logic [7:0] r);
    return {8'h5A, 4'h0, 12'h0, r};
  endfunction
  function automatic logic [31:0] rem(input int ch, input logic [10:0] r);
    return {8'h5A, 4'(ch + 1), 7'h0, r, 2'b00};
  endfunction

  // words seen on each output, in order
  word_t seen [N][$];
  for (genvar c = 0; c < N; c++) begin : g_mon
    always @(posedge clk) if (rst_n && tx_out[c].valid) seen[c].push_back(tx_out[c].data);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(input logic [31:0] a, input logic [31:0] v, input string what);
    logic [31:0] q;
    vme_rd(a, q);
    checks++;
    if (q != v) begin failures++; $display("%s: read %h expected %h", what, q, v); end
  endtask

  initial begin
    word_t w[$];
    logic [31:0] q;
    logic ack;
    int t0, wclk;
    for (int i = 0; i < 2 * N; i++) fib_in[i] = '0;
    vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 1; vme_am = 0;
    vme_addr = 0; vme_data_i = 0; board_base = 8'h5A;
    nim_trig = 0; rod_busy = 0; ttc_l1a = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    expect_rd(loc(V_ID), OMB_ID, "board ID");

    // register write and read-back in every CRC FPGA
    for (int c = 0; c < N; c++) begin
      t0 = $time / 10;
      vme_cycle(1'b1, rem(c, R_EVLEN), 32'(7 + c), 6'h09, q, ack);
      wclk = $time / 10 - t0;
      checks++;
      if (!ack || wclk >= 100) begin failures++; $display("ch %0d: write ack=%0d after %0d clocks", c, ack, wclk); end
      if (c == 0) $display("VME write to a CRC FPGA register: %0d clocks", wclk);
      vme_wr(rem(c, R_CTRL), 32'h2);
    end
    for (int c = 0; c < N; c++) begin
      expect_rd(rem(c, R_EVLEN), 32'(7 + c), "event length");
      expect_rd(rem(c, R_CTRL), 32'h2, "control");
      vme_wr(rem(c, R_CTRL), 32'h0);
    end

    // a good packet on both fibres of channel 2
    w.delete();
    for (int i = 0; i < 9; i++) w.push_back(word_t'($urandom));
    w.push_back(crc_ref(w));
    foreach (w[i]) begin
      @(negedge clk);
      fib_in[4] = '{valid: 1'b1, sop: (i == 0), eop: (i == w.size() - 1), data: w[i]};
      fib_in[5] = fib_in[4];
    end
    @(negedge clk);
    fib_in[4] = '0; fib_in[5] = '0;
    repeat (50) @(posedge clk);
    checks++;
    if (seen[2] != w) begin failures++; $display("channel 2 output differs from the packet"); end
    expect_rd(rem(2, R_PKTS), 1, "packets");
    expect_rd(rem(2, R_ERR_A), 0, "errors A");

    // an event loaded over VME into channel 1 and injected
    w.delete();
    for (int i = 0; i < 5; i++) w.push_back(16'hC000 + 16'(i));
    w.push_back(crc_ref(w));
    foreach (w[i]) vme_wr(rem(1, R_EVMEM + 11'(i)), 32'(w[i]));
    vme_wr(rem(1, R_EVLEN), 32'(w.size()));
    vme_wr(rem(1, R_CTRL), 32'h1);
    seen[1].delete();
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'b0000_0010, 4'h0, 4'b0100});
    vme_wr(loc(V_SWTRIG), 32'h1);
    repeat (40) @(posedge clk);
    checks++;
    if (seen[1] != w) begin failures++; $display("injected event on channel 1: %0d words", seen[1].size()); end
    checks++;
    if (seen[0].size() != 0) begin failures++; $display("channel 0 sent %0d words", seen[0].size()); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
