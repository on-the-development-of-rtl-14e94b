// tb_trigger_ctrl: each trigger source with its enable on and off, the
// channel mask, the busy veto with and without its enable, the latencies
// (3 clocks from an external edge, 1 from an internal pulse) and the counters.
module tb_trigger_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic nim_trig, gen_trig, sw_trig, ttc_l1a, busy, busy_en;
  logic [3:0] src_en;
  logic [7:0] ch_mask, trig_out;
  logic [31:0] trig_cnt, vetoed_cnt;

  trigger_ctrl #(.N_CH(8)) dut (.*);

  int cyc = 0, out_t = -1, n_out = 0;
  logic [7:0] last_out;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (trig_out != 0) begin out_t = cyc; n_out++; last_out = trig_out; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fire source s (0 nim, 1 gen, 2 sw, 3 ttc): lat = clocks from the edge
  // that applies the source to the first trig_out, -1 if none, -2 if several
  task automatic fire(input int s, output int lat);
    int n0, k;
    n0 = n_out;
    lat = -1;
    @(posedge clk);
    case (s)
      0: nim_trig <= 1;
      1: gen_trig <= 1;
      2: sw_trig  <= 1;
      3: ttc_l1a  <= 1;
    endcase
    for (k = 1; k <= 12; k++) begin
      @(posedge clk);
      if (k == 1) begin gen_trig <= 0; sw_trig <= 0; end
      if (k == 4) begin nim_trig <= 0; ttc_l1a <= 0; end
      #1 if (trig_out != 0 && lat < 0) lat = k;
    end
    if (n_out > n0 + 1) lat = -2;
  endtask

  initial begin
    int lat, exp_lat, c0, v0;
    nim_trig = 0; gen_trig = 0; sw_trig = 0; ttc_l1a = 0; busy = 0; busy_en = 0;
    src_en = 0; ch_mask = 8'hA5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      exp_lat = (s == 0 || s == 3) ? 3 : 1;
      src_en = 0;
      fire(s, lat);
      checks++; if (lat != -1) begin failures++; $display("source %0d fired while disabled", s); end
      src_en = 4'(1 << s);
      c0 = trig_cnt;
      fire(s, lat);
      checks++; if (lat != exp_lat) begin failures++; $display("source %0d latency %0d expected %0d", s, lat, exp_lat); end
      checks++; if (last_out != ch_mask) begin failures++; $display("mask %h", last_out); end
      checks++; if (trig_cnt != c0 + 1) begin failures++; $display("trig_cnt"); end
    end
    // busy veto
    src_en = 4'hF; ch_mask = 8'h03;
    busy = 1; busy_en = 1;
    repeat (4) @(posedge clk);
    v0 = vetoed_cnt;
    fire(2, lat);
    checks++; if (lat != -1) begin failures++; $display("trigger passed busy"); end
    checks++; if (vetoed_cnt != v0 + 1) begin failures++; $display("vetoed_cnt"); end
    busy_en = 0;
    fire(2, lat);
    checks++; if (lat != 1 || last_out != 8'h03) begin failures++; $display("busy ignored when disabled failed"); end
    busy = 0; busy_en = 1;
    repeat (4) @(posedge clk);
    fire(0, lat);
    checks++; if (lat != 3) begin failures++; $display("after busy %0d", lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
