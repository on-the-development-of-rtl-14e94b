// sbus_master: VME control FPGA end of the serial control bus.
//
// Generates the free-running bus clock (board clock divided by two) and turns
// one register request into a frame (see sbus_slave for the format): a start
// clock, the 16-bit header and, for a write, 32 data bits, LANES bits per bus
// clock. For a read it lets go of the data lines after the header, waits for
// the addressed CRC FPGA's start clock (line 0 high) and shifts in 32 data
// bits. A read with no start within REPLY_TIMEOUT bus clocks ends with `err`
// set and data 0xFFFF_FFFF. The master changes the lines in the clock where
// sb_clk falls and samples them in the clock where sb_clk is high.
//
// Interface: hold `req` with we/slot/addr/wdata until `done` pulses; `rdata`
// and `err` are valid with `done`. With one data line a write takes 50 bus
// clocks (100 board clocks) and a read about 55 bus clocks; with three lines
// a write takes 18 bus clocks. The clock division, frame format and timeout
// are this design's choices; using one of the board's three data lines by
// default follows the board description.
module sbus_master
  import omb_pkg::*;
#(
  parameter int unsigned REPLY_TIMEOUT = 256,
  parameter int unsigned LANES         = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req,
  input  logic                 we,
  input  logic [SB_SLOT_W-1:0] slot,
  input  logic [SB_ADDR_W-1:0] addr,
  input  logic [31:0]          wdata,
  output logic                 done,
  output logic [31:0]          rdata,
  output logic                 err,
  output logic                 sb_clk,
  output logic [LANES-1:0]     sb_do,
  output logic                 sb_oe,
  input  logic [LANES-1:0]     sb_di
);

  localparam int unsigned HC = (16 + LANES - 1) / LANES;   // header clocks
  localparam int unsigned DC = (32 + LANES - 1) / LANES;   // data clocks
  localparam int unsigned HW = HC * LANES;
  localparam int unsigned DW = DC * LANES;
  localparam int unsigned FW = HW + DW;                    // frame after start

  typedef enum logic [2:0] {M_IDLE, M_START, M_SEND, M_WAIT, M_RECV, M_DONE, M_GAP} state_e;

  state_e        state;
  logic [FW-1:0] sh;
  logic [DW-1:0] rsh;
  logic [5:0]    left;
  logic          is_read;
  logic [$clog2(REPLY_TIMEOUT+1)-1:0] tmo;

  wire [HW-1:0] hdr = HW'({!we, slot, addr, {(HW-16){1'b0}}});
  wire [DW-1:0] dat = DW'({wdata, {(DW-32){1'b0}}});
  wire [DW-1:0] rsh_n = {rsh[DW-LANES-1:0], sb_di};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      sb_clk  <= 1'b0;
      sb_do   <= '0;
      sb_oe   <= 1'b0;
      sh      <= '0;
      rsh     <= '0;
      left    <= '0;
      is_read <= 1'b0;
      tmo     <= '0;
      done    <= 1'b0;
      rdata   <= '0;
      err     <= 1'b0;
    end else begin
      sb_clk <= !sb_clk;
      done   <= 1'b0;
      unique case (state)
        M_IDLE:
          if (req) begin
            is_read <= !we;
            err     <= 1'b0;
            sh      <= {hdr, dat};
            left    <= we ? 6'(HC + DC) : 6'(HC);
            state   <= M_START;
          end
        M_START:
          if (sb_clk) begin                 // edge where the bus clock falls
            sb_oe <= 1'b1;
            sb_do <= LANES'(1);             // start: line 0 high
            state <= M_SEND;
          end
        M_SEND:
          if (sb_clk) begin
            if (left != 0) begin
              sb_do <= sh[FW-1 -: LANES];
              sh    <= sh << LANES;
              left  <= left - 1'b1;
            end else begin
              sb_oe <= 1'b0;
              sb_do <= '0;
              tmo   <= '0;
              state <= is_read ? M_WAIT : M_DONE;
            end
          end
        M_WAIT:
          if (sb_clk) begin                 // bus clock high: sample
            if (sb_di[0]) begin
              left  <= 6'(DC);
              state <= M_RECV;
            end else if (tmo == REPLY_TIMEOUT[$bits(tmo)-1:0]) begin
              rdata <= 32'hFFFF_FFFF;
              err   <= 1'b1;
              state <= M_DONE;
            end else begin
              tmo <= tmo + 1'b1;
            end
          end
        M_RECV:
          if (sb_clk) begin
            rsh  <= rsh_n;
            left <= left - 1'b1;
            if (left == 6'd1) begin
              rdata <= rsh_n[DW-1 -: 32];
              state <= M_DONE;
            end
          end
        M_DONE: begin
          done  <= 1'b1;
          state <= M_GAP;
        end
        M_GAP: state <= M_IDLE;          // requester drops req here
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
