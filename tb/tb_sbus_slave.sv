// tb_sbus_slave: two slaves (slots 3 and 5) on one line, driven by a
// bit-by-bit master in the testbench. Checks that writes reach only the
// addressed slave with the right address and data, that reads are answered
// with the register contents by the addressed slave only, that a read of an
// absent slot gets no answer, and that never two devices drive the line.
// The slaves use one data line here; the three-line frame is exercised by
// the master's testbench and by the three-line board test.
module tb_sbus_slave;
  import omb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sb_clk, sb_m, sb_line;
  logic [1:0] s_do, s_oe, we, re;
  logic [10:0] addr [2];
  logic [31:0] wdata [2];
  logic [31:0] regs [2][16];

  for (genvar i = 0; i < 2; i++) begin : g_s
    sbus_slave #(.SLOT(i == 0 ? 4'd3 : 4'd5)) u (
      .clk, .rst_n, .sb_clk, .sb_di(sb_line), .sb_do(s_do[i]), .sb_oe(s_oe[i]),
      .reg_we(we[i]), .reg_re(re[i]), .reg_addr(addr[i]), .reg_wdata(wdata[i]),
      .reg_rdata(regs[i][addr[i][3:0]]));
    always @(posedge clk) if (we[i]) regs[i][addr[i][3:0]] <= wdata[i];
  end

  assign sb_line = sb_m | |(s_oe & s_do);

  int n_we[2] = '{0, 0}, clash = 0, drove_wrong = 0;
  always @(posedge clk) begin
    if (we[0]) n_we[0]++;
    if (we[1]) n_we[1]++;
    if (s_oe[0] && s_oe[1]) clash++;
  end

  `include "sbus_bitbang.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, model [2][16];
    logic got;
    int s, a;
    sb_clk = 0; sb_m = 0;
    foreach (regs[i, j]) begin regs[i][j] = 0; model[i][j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      s = $urandom % 2; a = $urandom % 16;
      if ($urandom % 2) begin
        d = $urandom;
        sb_write(s ? 4'd5 : 4'd3, 11'(a), d);
        model[s][a] = d;
      end else begin
        sb_read(s ? 4'd5 : 4'd3, 11'(a), d, got);
        checks++;
        if (!got || d != model[s][a]) begin failures++; $display("read slot %0d addr %0d: got=%0d %h expected %h", s, a, got, d, model[s][a]); end
      end
    end
    foreach (model[i, j]) begin
      checks++;
      if (regs[i][j] != model[i][j]) begin failures++; $display("reg %0d/%0d = %h expected %h", i, j, regs[i][j], model[i][j]); end
    end
    // absent slot: no answer, nothing written
    sb_read(4'd11, 11'd1, d, got);
    checks++; if (got) begin failures++; $display("absent slot answered"); end
    sb_write(4'd11, 11'd1, 32'hDEAD);
    sb_read(4'd3, 11'd1, d, got);
    checks++; if (!got || d != model[0][1]) begin failures++; $display("slot 3 disturbed by slot 11 frame"); end
    checks++; if (clash != 0) begin failures++; $display("two slaves drove"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
