// sbus_slave: CRC FPGA end of the serial control bus.
//
// The VME control FPGA reaches the registers of the eight CRC FPGAs over one
// shared serial bus: a bus clock (sb_clk, driven by the master) and LANES
// data lines (one by default, up to the three the board provides) that the
// master and the addressed slave take turns to drive. A frame is:
//   start   one bus clock with line 0 high
//   header  rw(1: read) slot(4) addr(11), 16 bits
//   data    32 bits, for a write only
// Header and data are sent most significant bit first, LANES bits per bus
// clock (the highest line carries the earliest bit), each padded with zeros
// to a whole number of bus clocks. For a read, after SB_TURN idle bus clocks
// the slave whose SLOT matches answers with a start clock and the 32 data
// bits in the same way, then lets go of the lines. Slaves that are not
// addressed count the clocks of the frame (and of the reply) so they stay
// aligned with it. Bits are sampled in the clock where sb_clk has just risen
// and changed right after it has fallen; all devices share the board clock,
// so sb_clk is used as a strobe, not as a clock.
//
// The bus (a clock plus data lines, one of them used unless more bandwidth
// is needed, reads and writes between the VME FPGA and each CRC FPGA only)
// follows the board description; the frame format and the timing are this
// design's choices.
//
// Register side: `reg_we` pulses with reg_addr/reg_wdata after a write frame;
// `reg_re` pulses with reg_addr after a read header and `reg_rdata` must be
// valid on the next clock.
module sbus_slave
  import omb_pkg::*;
#(
  parameter logic [SB_SLOT_W-1:0] SLOT  = '0,
  parameter int unsigned          LANES = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sb_clk,
  input  logic [LANES-1:0]     sb_di,
  output logic [LANES-1:0]     sb_do,
  output logic                 sb_oe,
  output logic                 reg_we,
  output logic                 reg_re,
  output logic [SB_ADDR_W-1:0] reg_addr,
  output logic [31:0]          reg_wdata,
  input  logic [31:0]          reg_rdata
);

  localparam int unsigned HC = (16 + LANES - 1) / LANES;   // header clocks
  localparam int unsigned DC = (32 + LANES - 1) / LANES;   // data clocks
  localparam int unsigned HW = HC * LANES;
  localparam int unsigned DW = DC * LANES;

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_WDATA, S_SKIP, S_TURN, S_REPLY} state_e;

  state_e          state;
  logic            clk_q;
  logic [5:0]      cnt;
  logic [HW-1:0]   hdr;
  logic [DW-1:0]   wsh, sh;
  logic            load_rdata;

  wire rise = sb_clk && !clk_q;
  wire fall = !sb_clk && clk_q;

  wire [HW-1:0]        hdr_n  = {hdr[HW-LANES-1:0], sb_di};
  wire [15:0]          h_bits = hdr_n[HW-1 -: 16];
  wire                 h_rw   = h_bits[15];
  wire [SB_SLOT_W-1:0] h_slot = h_bits[14:11];
  wire [DW-1:0]        wsh_n  = {wsh[DW-LANES-1:0], sb_di};
  wire                 hdr_rw = hdr[HW-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      clk_q      <= 1'b0;
      cnt        <= '0;
      hdr        <= '0;
      wsh        <= '0;
      sh         <= '0;
      sb_do      <= '0;
      sb_oe      <= 1'b0;
      reg_we     <= 1'b0;
      reg_re     <= 1'b0;
      reg_addr   <= '0;
      reg_wdata  <= '0;
      load_rdata <= 1'b0;
    end else begin
      clk_q      <= sb_clk;
      reg_we     <= 1'b0;
      reg_re     <= 1'b0;
      load_rdata <= reg_re;
      if (load_rdata) sh <= DW'({reg_rdata, {(DW-32){1'b0}}});
      unique case (state)
        S_IDLE:
          if (rise && sb_di[0]) begin
            state <= S_HDR;
            cnt   <= '0;
          end
        S_HDR:
          if (rise) begin
            hdr <= hdr_n;
            cnt <= cnt + 1'b1;
            if (cnt == 6'(HC - 1)) begin
              cnt <= '0;
              if (h_slot != SLOT) begin
                state <= S_SKIP;
              end else if (h_rw) begin
                reg_re   <= 1'b1;
                reg_addr <= h_bits[SB_ADDR_W-1:0];
                state    <= S_TURN;
              end else begin
                reg_addr <= h_bits[SB_ADDR_W-1:0];
                state    <= S_WDATA;
              end
            end
          end
        S_WDATA:
          if (rise) begin
            wsh <= wsh_n;
            cnt <= cnt + 1'b1;
            if (cnt == 6'(DC - 1)) begin
              reg_wdata <= wsh_n[DW-1 -: 32];
              reg_we    <= 1'b1;
              state     <= S_IDLE;
            end
          end
        S_SKIP:
          if (rise) begin
            cnt <= cnt + 1'b1;
            if (cnt == (hdr_rw ? 6'(SB_TURN + 1 + DC - 1) : 6'(DC - 1))) state <= S_IDLE;
          end
        S_TURN:
          if (fall) begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'(SB_TURN)) begin
              cnt   <= '0;
              sb_oe <= 1'b1;
              sb_do <= LANES'(1);           // start: line 0 high
              state <= S_REPLY;
            end
          end
        S_REPLY:
          if (fall) begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'(DC)) begin
              sb_oe <= 1'b0;
              sb_do <= '0;
              state <= S_IDLE;
            end else begin
              sb_do <= sh[DW-1 -: LANES];
              sh    <= sh << LANES;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
