// VME master for the testbenches: single A32/D32 cycles (AM 0x09) with a
// timeout. Needs in scope: clk and the vme_* signals of the slave.
task automatic vme_cycle(input logic wr, input logic [31:0] a, input logic [31:0] d,
                         input logic [5:0] am, output logic [31:0] q, output logic acked);
  int t;
  vme_addr <= a[31:1]; vme_am <= am; vme_write_n <= !wr; vme_lword_n <= 1'b0;
  vme_data_i <= d;
  @(posedge clk);
  vme_as_n <= 1'b0;
  @(posedge clk);
  vme_ds_n <= 2'b00;
  t = 0;
  while (vme_dtack_n && t < 2000) begin @(posedge clk); t++; end
  acked = !vme_dtack_n;
  q = vme_data_oe ? vme_data_o : 32'hBAD0_BAD0;
  vme_ds_n <= 2'b11; vme_as_n <= 1'b1;
  t = 0;
  while (!vme_dtack_n && t < 100) begin @(posedge clk); t++; end
  repeat (2) @(posedge clk);
endtask

task automatic vme_wr(input logic [31:0] a, input logic [31:0] d);
  logic [31:0] q;
  logic ack;
  vme_cycle(1'b1, a, d, 6'h09, q, ack);
  checks++;
  if (!ack) begin failures++; $display("VME write %h: no DTACK", a); end
endtask

task automatic vme_rd(input logic [31:0] a, output logic [31:0] q);
  logic ack;
  vme_cycle(1'b0, a, 32'h0, 6'h09, q, ack);
  checks++;
  if (!ack) begin failures++; $display("VME read %h: no DTACK", a); end
endtask
