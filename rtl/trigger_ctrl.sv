// trigger_ctrl: source selection, busy veto and fan-out of the injection
// trigger.
//
// Four sources can trigger an injected event: the external trigger input
// (NIM level, already converted), the internal generator, a VME command and
// the L1 accept of the TTC receiver. External inputs are synchronised with
// two flip-flops and reduced to a one-clock pulse on their rising edge;
// internal sources are already pulses. Each source has an enable bit
// (src_en = {ttc, vme, generator, nim}). When `busy_en` is set the (also
// synchronised) ROD busy signal blocks triggers, which stops the injection.
// A trigger is sent, registered, to every CRC FPGA whose bit is set in
// `ch_mask`, so one or several channels inject together. `trig_cnt` counts
// the triggers issued and `vetoed_cnt` those blocked by busy.
//
// The four sources, the channel choice and the busy stop follow the board
// description; the synchronisers and the counters are this design's choice.
// Latency: an external edge reaches trig_out 3 clocks later, an internal
// pulse 1 clock later.
module trigger_ctrl #(
  parameter int unsigned N_CH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            nim_trig,
  input  logic            gen_trig,
  input  logic            sw_trig,
  input  logic            ttc_l1a,
  input  logic            busy,
  input  logic [3:0]      src_en,
  input  logic            busy_en,
  input  logic [N_CH-1:0] ch_mask,
  output logic [N_CH-1:0] trig_out,
  output logic [31:0]     trig_cnt,
  output logic [31:0]     vetoed_cnt
);

  logic [2:0] nim_s, ttc_s;
  logic [1:0] busy_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nim_s  <= '0;
      ttc_s  <= '0;
      busy_s <= '0;
    end else begin
      nim_s  <= {nim_s[1:0], nim_trig};
      ttc_s  <= {ttc_s[1:0], ttc_l1a};
      busy_s <= {busy_s[0], busy};
    end
  end

  logic any_trig, veto;
  assign any_trig = (src_en[0] && nim_s[1] && !nim_s[2])
                 || (src_en[1] && gen_trig)
                 || (src_en[2] && sw_trig)
                 || (src_en[3] && ttc_s[1] && !ttc_s[2]);
  assign veto = busy_en && busy_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_out   <= '0;
      trig_cnt   <= '0;
      vetoed_cnt <= '0;
    end else begin
      trig_out <= (any_trig && !veto) ? ch_mask : '0;
      if (any_trig && !veto) trig_cnt   <= trig_cnt + 1'b1;
      if (any_trig &&  veto) vetoed_cnt <= vetoed_cnt + 1'b1;
    end
  end

endmodule
