// vme_slave: VME64 slave interface of the board, A32/D32 single cycles.
//
// The crate CPU controls the board as a VME slave with 32-bit addresses and
// 32-bit data. The address strobe and the two data strobes are synchronised
// to the 40 MHz board clock with two flip-flops. When both data strobes are
// low with the address strobe, the cycle is accepted if the address
// modifier is an A32 data access (0x09 or 0x0D), the transfer is a
// long-word one (LWORD* low, A1 low) and A[31:24] equals `board_base`.
// An accepted cycle becomes a request on the internal register bus
// (bus_req held until bus_ack, with bus_addr = A[23:0]); on bus_ack the slave
// pulls DTACK* low, driving D[31:0] for a read, and releases both once the
// data strobes rise. Other cycles are ignored and left to other boards.
//
// A32D32 slave operation follows the board description; block transfers,
// interrupts and the VME64x configuration space are not implemented.
// Timing: DTACK* falls 4 clocks after the data strobes plus the register
// bus latency.
module vme_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_base,
  // VME bus (active-low strobes, data split into in/out/enable)
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
  // internal register bus
  output logic        bus_req,
  output logic        bus_we,
  output logic [23:0] bus_addr,
  output logic [31:0] bus_wdata,
  input  logic        bus_ack,
  input  logic [31:0] bus_rdata
);

  typedef enum logic [1:0] {V_IDLE, V_REQ, V_ACK, V_IGNORE} state_e;

  state_e     state;
  logic [1:0] as_s;
  logic [3:0] ds_s;   // {ds1 sync, ds0 sync} x 2 stages

  wire as_low  = !as_s[1];
  wire ds_low  = !ds_s[3] && !ds_s[2];
  wire ds_high =  ds_s[3] &&  ds_s[2];

  wire am_a32d = (vme_am == 6'h09) || (vme_am == 6'h0D);
  wire hit     = am_a32d && !vme_lword_n && !vme_addr[1]
              && (vme_addr[31:24] == board_base);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s        <= '1;
      ds_s        <= '1;
      state       <= V_IDLE;
      vme_data_o  <= '0;
      vme_data_oe <= 1'b0;
      vme_dtack_n <= 1'b1;
      bus_req     <= 1'b0;
      bus_we      <= 1'b0;
      bus_addr    <= '0;
      bus_wdata   <= '0;
    end else begin
      as_s <= {as_s[0], vme_as_n};
      ds_s <= {ds_s[1:0], vme_ds_n};
      unique case (state)
        V_IDLE:
          if (as_low && ds_low) begin
            if (hit) begin
              bus_req   <= 1'b1;
              bus_we    <= !vme_write_n;
              bus_addr  <= {vme_addr[23:1], 1'b0};
              bus_wdata <= vme_data_i;
              state     <= V_REQ;
            end else begin
              state <= V_IGNORE;
            end
          end
        V_REQ:
          if (bus_ack) begin
            bus_req     <= 1'b0;
            vme_data_o  <= bus_rdata;
            vme_data_oe <= !bus_we;
            vme_dtack_n <= 1'b0;
            state       <= V_ACK;
          end
        V_ACK:
          if (ds_high) begin
            vme_dtack_n <= 1'b1;
            vme_data_oe <= 1'b0;
            state       <= V_IDLE;
          end
        V_IGNORE:
          if (ds_high) state <= V_IDLE;
        default: state <= V_IDLE;
      endcase
    end
  end

endmodule
