// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty, full and count, including runs to full and to empty.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int D = 16;
  logic wr_en, rd_en, empty, full;
  logic [17:0] wdata, rdata;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [17:0] q[$];
  int saw_full = 0;

  sync_fifo #(.WIDTH(18), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wdata, .rd_en, .rdata, .empty, .full, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    wr_en = 0; rd_en = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      bias = ((t / 500) % 2 == 0) ? 3 : 1;   // phases that fill, then drain
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || count != q.size()) begin
        failures++; $display("flags: empty=%0d full=%0d count=%0d model=%0d", empty, full, count, q.size());
      end
      if (!empty) begin
        checks++;
        if (rdata != q[0]) begin failures++; $display("data %h expected %h", rdata, q[0]); end
      end
      if (full) saw_full++;
      wr_en = ($urandom % 4 < bias) && (q.size() < D);
      rd_en = ($urandom % 4 >= bias) && (q.size() > 0);
      wdata = 18'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
