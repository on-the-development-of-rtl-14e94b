// Bus-master side of the serial control bus, written out bit by bit by the
// testbench (independent of sbus_master). Needs in scope: clk, sb_clk,
// sb_m (master drive), sb_line (resolved line). The bus clock runs at half
// the board clock; a bit is changed when sb_clk falls and sampled while it
// is high.
task automatic sb_bit(input logic b);
  sb_clk <= 1'b0; sb_m <= b; @(posedge clk);
  sb_clk <= 1'b1;             @(posedge clk);
endtask

task automatic sb_write(input logic [3:0] slot, input logic [10:0] addr, input logic [31:0] data);
  logic [48:0] f;
  f = {1'b1, 1'b0, slot, addr, data};
  for (int i = 48; i >= 0; i--) sb_bit(f[i]);
  sb_bit(1'b0);
endtask

// returns 1 and the data if a reply came within 60 bus clocks
task automatic sb_read(input logic [3:0] slot, input logic [10:0] addr,
                       output logic [31:0] data, output logic got);
  logic [16:0] f;
  int k;
  f = {1'b1, 1'b1, slot, addr};
  for (int i = 16; i >= 0; i--) sb_bit(f[i]);
  got = 0; data = '0;
  for (k = 0; k < 60 && !got; k++) begin
    sb_clk <= 1'b0; sb_m <= 1'b0; @(posedge clk);
    sb_clk <= 1'b1; @(posedge clk);
    #1 if (sb_line) got = 1;
  end
  if (got) for (int i = 0; i < 32; i++) begin
    sb_clk <= 1'b0; @(posedge clk);
    sb_clk <= 1'b1; @(posedge clk);
    #1 data = {data[30:0], sb_line};
  end
  repeat (4) sb_bit(1'b0);
endtask
