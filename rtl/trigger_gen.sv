// trigger_gen: internal trigger generator of the VME control FPGA.
//
// While `en` is high it emits a one-clock pulse on `trig` every `period`
// clocks (a period of 0 or 1 gives a pulse every clock). The first pulse
// comes `period` clocks after `en` rises. The board description only says
// that a trigger generator is programmed inside the VME FPGA; a periodic
// generator with a programmable period is this design's choice.
module trigger_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] period,
  output logic        trig
);

  logic [31:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      trig <= 1'b0;
    end else begin
      trig <= 1'b0;
      if (!en) begin
        cnt <= '0;
      end else if (cnt + 1 >= period) begin
        cnt  <= '0;
        trig <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
