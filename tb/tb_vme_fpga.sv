// tb_vme_fpga: the VME control FPGA driven over VME, with two serial-bus
// slaves (slots 0 and 1) standing in for CRC FPGAs. Checks the local
// registers, remote writes and reads through the serial bus, the answer to
// an absent slot, the VME trigger command with a channel mask, the internal
// generator, the external trigger, the busy veto, the trigger counters and
// the board reset pulse.
module tb_vme_fpga;
  import omb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        vme_as_n, vme_write_n, vme_lword_n, vme_data_oe, vme_dtack_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [31:0] vme_data_i, vme_data_o;
  logic [7:0]  board_base;
  logic        nim_trig, rod_busy, ttc_l1a, ch_rst, sb_clk, m_do, m_oe, sb_line;
  logic [7:0]  trig_out;
  logic [1:0]  s_do, s_oe, swe;
  logic [10:0] saddr [2];
  logic [31:0] swdata [2];
  logic [31:0] regs [2][8];

  vme_fpga #(.N_CH(8)) dut (.clk, .rst_n, .board_base,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr,
    .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n,
    .nim_trig, .rod_busy, .ttc_l1a, .trig_out, .ch_rst,
    .sb_clk, .sb_do(m_do), .sb_oe(m_oe), .sb_di(sb_line));

  for (genvar i = 0; i < 2; i++) begin : g_s
    sbus_slave #(.SLOT(4'(i))) u (
      .clk, .rst_n, .sb_clk, .sb_di(sb_line), .sb_do(s_do[i]), .sb_oe(s_oe[i]),
      .reg_we(swe[i]), .reg_re(), .reg_addr(saddr[i]), .reg_wdata(swdata[i]),
      .reg_rdata(regs[i][saddr[i][2:0]]));
    always @(posedge clk) if (swe[i]) regs[i][saddr[i][2:0]] <= swdata[i];
  end
  assign sb_line = (m_oe & m_do) | |(s_oe & s_do);

  int n_trig[8], rst_len = 0;
  always @(posedge clk) begin
    for (int c = 0; c < 8; c++) if (trig_out[c]) n_trig[c]++;
    if (ch_rst) rst_len++;
  end

  `include "vme_master.svh"

  function automatic logic [31:0] loc(input logic [7:0] r);
    return {8'h40, 4'h0, 12'h0, r};
  endfunction
  function automatic logic [31:0] rem(input int slot, input int r);
    return {8'h40, 4'(slot + 1), 7'h0, 11'(r), 2'b00};
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    int t0[8];
    vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 1; vme_am = 0;
    vme_addr = 0; vme_data_i = 0; board_base = 8'h40;
    nim_trig = 0; rod_busy = 0; ttc_l1a = 0;
    foreach (regs[x, y]) regs[x][y] = 0;
    foreach (n_trig[c]) n_trig[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    vme_rd(loc(V_ID), q);
    checks++; if (q != OMB_ID) begin failures++; $display("ID %h", q); end
    vme_wr(loc(V_PERIOD), 32'd25);
    vme_rd(loc(V_PERIOD), q);
    checks++; if (q != 25) begin failures++; $display("period %0d", q); end
    // remote registers
    vme_wr(rem(1, 5), 32'hCAFE_0001);
    vme_wr(rem(0, 2), 32'h1234_5678);
    checks++; if (regs[1][5] != 32'hCAFE_0001 || regs[0][2] != 32'h1234_5678) begin failures++; $display("remote writes lost"); end
    checks++; if (regs[0][5] != 0) begin failures++; $display("write reached wrong slot"); end
    regs[1][3] = 32'h0BAD_F00D;
    vme_rd(rem(1, 3), q);
    checks++; if (q != 32'h0BAD_F00D) begin failures++; $display("remote read %h", q); end
    vme_rd(rem(5, 3), q);
    checks++; if (q != 32'hFFFF_FFFF) begin failures++; $display("absent slot read %h", q); end
    vme_rd(loc(V_SBERR), q);
    checks++; if (q != 1) begin failures++; $display("serial bus error count %0d", q); end
    // VME trigger command to channels 1 and 6
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'h42, 4'h0, 4'b0100});
    foreach (t0[c]) t0[c] = n_trig[c];
    vme_wr(loc(V_SWTRIG), 32'h1);
    vme_wr(loc(V_SWTRIG), 32'h1);
    repeat (5) @(posedge clk);
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (n_trig[c] - t0[c] != ((c == 1 || c == 6) ? 2 : 0)) begin failures++; $display("ch %0d got %0d triggers", c, n_trig[c] - t0[c]); end
    end
    // internal generator, period 25, on channel 0
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'h01, 4'h0, 4'b0010});
    t0[0] = n_trig[0];
    repeat (1000) @(posedge clk);
    vme_wr(loc(V_TRIGCTRL), 32'h0);
    checks++; if (n_trig[0] - t0[0] < 38 || n_trig[0] - t0[0] > 44) begin failures++; $display("generator gave %0d", n_trig[0] - t0[0]); end
    // external trigger, then blocked by busy
    vme_wr(loc(V_TRIGCTRL), {16'h0, 8'h80, 4'h1, 4'b0001});
    t0[7] = n_trig[7];
    nim_trig <= 1; repeat (6) @(posedge clk); nim_trig <= 0; repeat (6) @(posedge clk);
    checks++; if (n_trig[7] != t0[7] + 1) begin failures++; $display("NIM trigger missing"); end
    rod_busy <= 1; repeat (4) @(posedge clk);
    nim_trig <= 1; repeat (6) @(posedge clk); nim_trig <= 0; repeat (6) @(posedge clk);
    checks++; if (n_trig[7] != t0[7] + 1) begin failures++; $display("trigger passed busy"); end
    vme_rd(loc(V_VETOCNT), q);
    checks++; if (q != 1) begin failures++; $display("vetoed %0d", q); end
    vme_rd(loc(V_TRIGCNT), q);
    checks++; if (q != 32'(2 + n_trig[0] + 1)) begin failures++; $display("trigger count %0d", q); end
    // board reset
    rst_len = 0;
    vme_wr(loc(V_RESET), 32'h1);
    repeat (30) @(posedge clk);
    checks++; if (rst_len != 16) begin failures++; $display("reset pulse %0d clocks", rst_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
