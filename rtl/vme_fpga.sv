// vme_fpga: the VME control FPGA of the board.
//
// Joins the VME slave interface to the board's control functions:
//   A[23:20] = 0        local registers of this FPGA (A[7:0] below)
//   A[23:20] = 1..N_CH  registers of CRC FPGA slot 0..N_CH-1, A[12:2] being
//                       the register address sent over the serial bus
//   other               reads 0, writes ignored
// Local registers:
//   0x00 ID (read only)
//   0x04 trigger control: [3:0] source enables {TTC, VME, generator, NIM},
//        [4] busy veto enable, [15:8] channels that receive triggers
//   0x08 internal generator period in clocks (generator runs when enabled)
//   0x0C write: one trigger from VME (the "VME command")
//   0x10 write: reset the CRC FPGAs (16-clock pulse on ch_rst), e.g. after
//        the two fibres of a channel lost step
//   0x14 triggers issued (read only)
//   0x18 triggers blocked by the ROD busy (read only)
//   0x1C serial bus reads left unanswered, count (read only)
// A remote access holds the VME cycle (no DTACK) until the serial bus frame
// is over, about 100 clocks for a write and 110 for a read.
//
// Keeping the VME interface, the trigger generator, the trigger selection
// and the link to the CRC FPGAs in this FPGA follows the board description;
// the address map and register layout are this design's choices.
module vme_fpga
  import omb_pkg::*;
#(
  parameter int unsigned N_CH     = 8,
  parameter int unsigned SB_LANES = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      board_base,
  input  logic            vme_as_n,
  input  logic [1:0]      vme_ds_n,
  input  logic            vme_write_n,
  input  logic            vme_lword_n,
  input  logic [5:0]      vme_am,
  input  logic [31:1]     vme_addr,
  input  logic [31:0]     vme_data_i,
  output logic [31:0]     vme_data_o,
  output logic            vme_data_oe,
  output logic            vme_dtack_n,
  input  logic            nim_trig,
  input  logic            rod_busy,
  input  logic            ttc_l1a,
  output logic [N_CH-1:0] trig_out,
  output logic            ch_rst,
  output logic            sb_clk,
  output logic [SB_LANES-1:0] sb_do,
  output logic            sb_oe,
  input  logic [SB_LANES-1:0] sb_di
);

  logic        bus_req, bus_we, bus_ack;
  logic [23:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  vme_slave u_vme (
    .clk, .rst_n, .board_base,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr,
    .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata
  );

  // local registers
  logic [15:0] trig_ctrl;
  logic [31:0] period;
  logic        sw_trig;
  logic [4:0]  rst_cnt;
  logic [31:0] trig_cnt, vetoed_cnt;
  logic        gen_trig;

  // serial bus master
  logic        m_req, m_done, m_err;
  logic [31:0] m_rdata;
  logic        taken;
  logic [31:0] sb_err_cnt;

  wire [3:0] target = bus_addr[23:20];
  wire       is_local  = (target == 4'd0);
  wire       is_remote = (target >= 4'd1) && (target <= 4'(N_CH));

  sbus_master #(.LANES(SB_LANES)) u_sbm (
    .clk, .rst_n,
    .req(m_req), .we(bus_we), .slot(SB_SLOT_W'(target - 4'd1)),
    .addr(bus_addr[SB_ADDR_W+1:2]), .wdata(bus_wdata),
    .done(m_done), .rdata(m_rdata), .err(m_err),
    .sb_clk, .sb_do, .sb_oe, .sb_di
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_ctrl <= '0;
      period    <= 32'd4000;
      sw_trig   <= 1'b0;
      rst_cnt   <= '0;
      taken     <= 1'b0;
      m_req     <= 1'b0;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
      sb_err_cnt <= '0;
    end else begin
      bus_ack <= 1'b0;
      sw_trig <= 1'b0;
      if (rst_cnt != 0) rst_cnt <= rst_cnt - 1'b1;
      if (!bus_req) taken <= 1'b0;
      if (bus_req && !taken) begin
        taken <= 1'b1;
        if (is_remote) begin
          m_req <= 1'b1;
        end else begin
          bus_ack   <= 1'b1;
          bus_rdata <= '0;
          if (is_local) begin
            if (bus_we) begin
              unique case (bus_addr[7:0])
                V_TRIGCTRL: trig_ctrl <= bus_wdata[15:0];
                V_PERIOD:   period    <= bus_wdata;
                V_SWTRIG:   sw_trig   <= 1'b1;
                V_RESET:    rst_cnt   <= 5'd16;
                default: ;
              endcase
            end else begin
              unique case (bus_addr[7:0])
                V_ID:       bus_rdata <= OMB_ID;
                V_TRIGCTRL: bus_rdata <= {16'h0, trig_ctrl};
                V_PERIOD:   bus_rdata <= period;
                V_TRIGCNT:  bus_rdata <= trig_cnt;
                V_VETOCNT:  bus_rdata <= vetoed_cnt;
                V_SBERR:    bus_rdata <= sb_err_cnt;
                default:    bus_rdata <= '0;
              endcase
            end
          end
        end
      end
      if (m_done) begin
        m_req     <= 1'b0;
        bus_ack   <= 1'b1;
        bus_rdata <= m_rdata;
        if (m_err) sb_err_cnt <= sb_err_cnt + 1'b1;
      end
    end
  end

  assign ch_rst = (rst_cnt != 0);

  trigger_gen u_gen (
    .clk, .rst_n, .en(trig_ctrl[1]), .period, .trig(gen_trig)
  );

  trigger_ctrl #(.N_CH(N_CH)) u_trig (
    .clk, .rst_n,
    .nim_trig, .gen_trig, .sw_trig, .ttc_l1a, .busy(rod_busy),
    .src_en(trig_ctrl[3:0]), .busy_en(trig_ctrl[4]), .ch_mask(trig_ctrl[8 +: N_CH]),
    .trig_out, .trig_cnt, .vetoed_cnt
  );

endmodule
