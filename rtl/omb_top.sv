// omb_top: Optical Multiplexer Board, 9U version.
//
// The front end sends every channel twice, on two fibres, so that data hit
// by radiation on one fibre can be replaced by the other copy. The board
// takes N_CH = 8 such channels (16 fibres) and gives the ROD one fibre per
// channel (8 outputs). It holds one crc_fpga per channel and one vme_fpga.
// Each crc_fpga checks the CRC of both copies and forwards a good one, or
// injects test events on triggers. The vme_fpga is the VME slave of the
// crate CPU, generates and selects the injection triggers (external NIM,
// internal generator, VME command, TTC L1 accept, with the ROD busy as a
// veto), resets the channels on request and reaches the registers of every
// crc_fpga over the shared serial control bus.
//
// The serial bus is one clock line and SB_LANES data lines shared by the
// VME FPGA and all CRC FPGAs. The board has three data lines and uses one
// unless more bandwidth is needed, so SB_LANES is 1 by default and may be
// set to 2 or 3. Each device drives the data lines only with its output
// enable; each line here is the OR of the enabled drivers, which is 0 when
// nobody drives, as the terminated line idles low. An assertion
// checks that no two devices drive together.
//
// Ports are plain signals: the G-Link receiver words (fib_in[2c] and
// fib_in[2c+1] are the two copies of channel c), the words to the G-Link
// transmitters (tx_out), the same words towards the mezzanine (PMC)
// connectors (pmc_out), the VME bus with its data split into in/out/enable,
// and the external trigger, ROD busy and TTC L1 accept inputs.
// The channel count follows the board; buffer sizes are this design's.
module omb_top
  import omb_pkg::*;
#(
  parameter int unsigned N_CH       = 8,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned EVT_DEPTH  = 1024,
  parameter int unsigned SB_LANES   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  stream_t     fib_in  [2*N_CH],
  output stream_t     tx_out  [N_CH],
  output stream_t     pmc_out [N_CH],
  input  logic [7:0]  board_base,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  input  logic        nim_trig,
  input  logic        rod_busy,
  input  logic        ttc_l1a
);

  logic [N_CH-1:0] trig;
  logic            ch_rst;
  logic                sb_clk, m_oe;
  logic [SB_LANES-1:0] sb_line, m_do;
  logic [SB_LANES-1:0] s_do [N_CH];
  logic [N_CH-1:0]     s_oe;

  vme_fpga #(.N_CH(N_CH), .SB_LANES(SB_LANES)) u_vme (
    .clk, .rst_n, .board_base,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr,
    .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n,
    .nim_trig, .rod_busy, .ttc_l1a,
    .trig_out(trig), .ch_rst,
    .sb_clk, .sb_do(m_do), .sb_oe(m_oe), .sb_di(sb_line)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    crc_fpga #(
      .SLOT(SB_SLOT_W'(c)), .FIFO_DEPTH(FIFO_DEPTH), .EVT_DEPTH(EVT_DEPTH),
      .SB_LANES(SB_LANES)
    ) u_crc (
      .clk, .rst_n, .ch_rst,
      .fib_a(fib_in[2*c]), .fib_b(fib_in[2*c+1]),
      .tx(tx_out[c]), .trig(trig[c]),
      .sb_clk, .sb_di(sb_line), .sb_do(s_do[c]), .sb_oe(s_oe[c])
    );
    assign pmc_out[c] = tx_out[c];
  end

  // shared serial data lines: OR of the enabled drivers
  always_comb begin
    sb_line = m_oe ? m_do : '0;
    for (int c = 0; c < N_CH; c++)
      if (s_oe[c]) sb_line |= s_do[c];
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({m_oe, s_oe}));

endmodule
