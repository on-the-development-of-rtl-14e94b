// tb_vme_slave: a VME master in the testbench against the slave, with a
// register bus that answers after a random delay. Checks writes (address,
// data), reads (data on the bus with DTACK), that cycles with another base
// address, a non-A32 address modifier or a 16-bit transfer get no DTACK,
// and that the slave lets go of DTACK and the data bus after the cycle.
module tb_vme_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        vme_as_n, vme_write_n, vme_lword_n, vme_data_oe, vme_dtack_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [31:0] vme_data_i, vme_data_o;
  logic [7:0]  board_base;
  logic        bus_req, bus_we, bus_ack;
  logic [23:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  vme_slave dut (.*);

  // register bus model: 64 words, answer 1..8 clocks after the request
  logic [31:0] mem [64];
  int n_req = 0;
  initial begin
    bus_ack = 0; bus_rdata = 0;
    foreach (mem[i]) mem[i] = 0;
    forever begin
      @(posedge clk);
      if (bus_req) begin
        n_req++;
        repeat ($urandom % 8) @(posedge clk);
        if (bus_we) mem[bus_addr[7:2]] = bus_wdata;
        bus_rdata <= mem[bus_addr[7:2]];
        bus_ack <= 1;
        @(posedge clk);
        bus_ack <= 0;
        while (bus_req) @(posedge clk);
      end
    end
  end

  `include "vme_master.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, model [64];
    logic ack;
    int a, r0;
    vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 1; vme_am = 0;
    vme_addr = 0; vme_data_i = 0; board_base = 8'h5A;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 80; k++) begin
      a = $urandom % 64;
      if ($urandom % 2) begin
        model[a] = $urandom;
        vme_wr({8'h5A, 16'h0, 6'(a), 2'b00}, model[a]);
      end else begin
        vme_rd({8'h5A, 16'h0, 6'(a), 2'b00}, q);
        checks++;
        if (q != model[a]) begin failures++; $display("read %0d = %h expected %h", a, q, model[a]); end
      end
      checks++;
      if (!vme_dtack_n || vme_data_oe) begin failures++; $display("DTACK or data still driven after the cycle"); end
    end
    r0 = n_req;
    vme_cycle(1'b1, 32'h5B00_0000, 32'h1, 6'h09, q, ack);
    checks++; if (ack) begin failures++; $display("answered another base"); end
    vme_cycle(1'b1, 32'h5A00_0004, 32'h1, 6'h39, q, ack);
    checks++; if (ack) begin failures++; $display("answered A24 modifier"); end
    vme_cycle(1'b0, 32'h5A00_0004, 32'h1, 6'h0D, q, ack);
    checks++; if (!ack || q != model[1]) begin failures++; $display("AM 0x0D read failed"); end
    vme_lword_n <= 1'b1;
    vme_addr <= 31'h2D00_0004; vme_am <= 6'h09; vme_write_n <= 1'b0;
    @(posedge clk); vme_as_n <= 0; @(posedge clk); vme_ds_n <= 2'b00;
    repeat (40) @(posedge clk);
    checks++; if (!vme_dtack_n) begin failures++; $display("answered a D16 cycle"); end
    vme_ds_n <= 2'b11; vme_as_n <= 1; repeat (5) @(posedge clk);
    checks++; if (n_req != r0 + 1) begin failures++; $display("register bus used by ignored cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
