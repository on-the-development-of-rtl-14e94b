// tb_sbus_master: the master talks to two sbus_slave devices (slots 0 and 2)
// that front testbench register arrays. The same test runs on a bus with one
// data line and, at the same time, on a separate bus with three data lines.
// Checks write and read data, the error result of a read to an absent slot,
// the frame durations (a write is 2 x (1 + 16/L + 32/L) clocks for L lines,
// rounded up, plus a few clocks of handshake) and that master and slaves
// never drive the lines together.
module tb_sbus_master;
  import omb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] fin = '0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_bus
    localparam int unsigned L  = (g == 0) ? 1 : 3;
    localparam int          WF = 2 * (1 + (16 + L - 1) / L + (32 + L - 1) / L);

    logic req, we, done, err, sb_clk, m_oe;
    logic [L-1:0] m_do, sb_line;
    logic [L-1:0] s_do [2];
    logic [1:0] s_oe, swe;
    logic [3:0] slot;
    logic [10:0] addr;
    logic [31:0] wdata, rdata;
    logic [10:0] saddr [2];
    logic [31:0] swdata [2];
    logic [31:0] regs [2][8];

    sbus_master #(.REPLY_TIMEOUT(64), .LANES(L)) dut (.clk, .rst_n, .req, .we, .slot, .addr,
      .wdata, .done, .rdata, .err, .sb_clk, .sb_do(m_do), .sb_oe(m_oe), .sb_di(sb_line));

    for (genvar i = 0; i < 2; i++) begin : g_s
      sbus_slave #(.SLOT(4'(2 * i)), .LANES(L)) u (
        .clk, .rst_n, .sb_clk, .sb_di(sb_line), .sb_do(s_do[i]), .sb_oe(s_oe[i]),
        .reg_we(swe[i]), .reg_re(), .reg_addr(saddr[i]), .reg_wdata(swdata[i]),
        .reg_rdata(regs[i][saddr[i][2:0]]));
      always @(posedge clk) if (swe[i]) regs[i][saddr[i][2:0]] <= swdata[i];
    end

    assign sb_line = (m_oe ? m_do : '0) | (s_oe[0] ? s_do[0] : '0) | (s_oe[1] ? s_do[1] : '0);
    int clash = 0;
    always @(posedge clk) if ($countones({m_oe, s_oe}) > 1) clash++;

    task automatic access(input logic w, input logic [3:0] s, input logic [10:0] a,
                          input logic [31:0] d, output logic [31:0] q, output logic e,
                          output int cycles);
      cycles = 0;
      req <= 1; we <= w; slot <= s; addr <= a; wdata <= d;
      @(posedge clk);
      while (!done) begin @(posedge clk); cycles++; end
      q = rdata; e = err;
      req <= 0;
      @(posedge clk);
    endtask

    initial begin
      logic [31:0] q, model [2][8];
      logic e;
      int cy, i, a, wcy_bad = 0, wmin = 1000, wmax = 0;
      req = 0; we = 0; slot = 0; addr = 0; wdata = 0;
      foreach (regs[x, y]) begin regs[x][y] = 0; model[x][y] = 0; end
      wait (rst_n);
      for (int k = 0; k < 50; k++) begin
        i = $urandom % 2; a = $urandom % 8;
        if ($urandom % 2) begin
          model[i][a] = $urandom;
          access(1, 4'(2 * i), 11'(a), model[i][a], q, e, cy);
          if (cy < WF || cy > WF + 5) wcy_bad++;
          if (cy < wmin) wmin = cy;
          if (cy > wmax) wmax = cy;
        end else begin
          access(0, 4'(2 * i), 11'(a), 0, q, e, cy);
          checks++;
          if (e || q != model[i][a]) begin
            failures++;
            $display("%0d lines: read %0d/%0d = %h expected %h", L, i, a, q, model[i][a]);
          end
        end
      end
      $display("%0d data lines: write takes %0d..%0d clocks", L, wmin, wmax);
      checks++;
      if (wcy_bad != 0) begin failures++; $display("%0d lines: %0d writes off the frame time", L, wcy_bad); end
      access(0, 4'd1, 11'd0, 0, q, e, cy);
      checks++;
      if (!e || q != 32'hFFFF_FFFF) begin failures++; $display("%0d lines: absent slot err=%0d q=%h", L, e, q); end
      access(0, 4'd2, 11'd3, 0, q, e, cy);
      checks++;
      if (e || q != model[1][3]) begin failures++; $display("%0d lines: read after timeout %h", L, q); end
      checks++;
      if (clash != 0) begin failures++; $display("%0d lines: bus clash %0d", L, clash); end
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
