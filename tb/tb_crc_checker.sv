// tb_crc_checker: random packets, some with a corrupted CRC word, sent with
// random gaps; checks that `done` comes exactly one clock after the last word
// and that `ok` matches the reference CRC.
module tb_crc_checker;
  import omb_pkg::*;
  import omb_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  stream_t in;
  logic done, ok;
  int checks = 0, failures = 0;

  crc_checker dut (.clk, .rst_n, .in, .done, .ok);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // "123456789" as bytes gives the published CRC-16/CCITT-FALSE check 0x29B1;
  // the last byte cannot be a word, so check the reference against it with
  // the 8-byte prefix plus a byte fold done by hand.
  initial begin
    logic [15:0] w[$];
    logic [15:0] c;
    int n, bad;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // sanity of the reference itself: byte fold of "123456789"
    w = '{16'h3132, 16'h3334, 16'h3536, 16'h3738};
    c = crc_ref(w) ^ {8'h39, 8'h00};
    repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    checks++;
    if (c != 16'h29B1) begin failures++; $display("reference CRC wrong %h", c); end

    for (int p = 0; p < 300; p++) begin
      n = 2 + $urandom % 40;
      w.delete();
      for (int i = 0; i < n - 1; i++) w.push_back(16'($urandom));
      c = crc_ref(w);
      bad = ($urandom % 3 == 0);
      if (bad) c ^= 16'(1 << ($urandom % 16));
      w.push_back(c);
      for (int i = 0; i < n; i++) begin
        while ($urandom % 4 == 0) begin
          in <= '0;
          @(posedge clk);
          #1 if (done) begin failures++; $display("spurious done"); end
        end
        in <= '{valid: 1'b1, sop: (i == 0), eop: (i == n - 1), data: w[i]};
        @(posedge clk);
        #1;
        if (i == n - 1) begin
          checks++;
          if (!done) begin failures++; $display("pkt %0d: no done 1 clock after eop", p); end
          checks++;
          if (ok != !bad) begin failures++; $display("pkt %0d: ok=%0d bad=%0d", p, ok, bad); end
        end else if (done) begin
          failures++; $display("pkt %0d: done before eop", p);
        end
      end
      in <= '0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
