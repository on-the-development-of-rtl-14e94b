// tb_trigger_gen: measures the spacing of the generated pulses for several
// periods and checks that none come while disabled.
module tb_trigger_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, trig;
  logic [31:0] period;

  trigger_gen dut (.*);

  int cyc = 0, last = -1, n = 0, bad_gap = 0, exp_gap = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (trig) begin
      if (last >= 0 && cyc - last != exp_gap) bad_gap++;
      last = cyc;
      n++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[4] = '{1, 2, 7, 40};
    en = 0; period = 10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    checks++; if (n != 0) begin failures++; $display("pulse while disabled"); end
    foreach (p[k]) begin
      en <= 0; repeat (3) @(posedge clk);
      period <= p[k]; exp_gap = p[k]; last = -1; n = 0; bad_gap = 0;
      en <= 1;
      repeat (20 * p[k] + 2) @(posedge clk);
      checks++; if (bad_gap != 0) begin failures++; $display("period %0d: %0d wrong gaps", p[k], bad_gap); end
      checks++; if (n < 19 || n > 21) begin failures++; $display("period %0d: %0d pulses", p[k], n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
