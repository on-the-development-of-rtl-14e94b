// event_injector: Data Injection Mode of one CRC FPGA.
//
// Holds an event memory of DEPTH 16-bit words. At power-up it holds a
// default event (the "firmware" event: 15 words 0xA000+i followed by their
// CRC-16, length omb_pkg::DEF_EVLEN); the VME control FPGA can overwrite any
// word through the serial control bus (`mem_we`). Each trigger pulse, while
// `enable` is high, sends words 0..len-1 of the memory on `out`, one per
// clock, with sop on the first and eop on the last, so the ROD sees a packet
// exactly as from the front end. Triggers that arrive while an event is
// being sent are counted (up to 15) and served one after another.
//
// Sending memory contents on a trigger follows the board description; the
// default contents, the pending-trigger count and the timing are this
// design's choices. Timing: the memory is read synchronously; the first word
// is on `out` at the third clock edge after the one that samples `trig`, and
// an event of N words then takes N consecutive clocks.
module event_injector
  import omb_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic                   trig,
  input  logic [$clog2(DEPTH):0] len,
  input  logic                   mem_we,
  input  logic [$clog2(DEPTH)-1:0] mem_addr,
  input  word_t                  mem_wdata,
  output stream_t                out,
  output logic                   sending
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  // firmware contents of the event memory
  initial begin
    logic [15:0] c;
    c = CRC_INIT;
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < DEF_EVLEN - 1; i++) begin
      mem[i] = 16'hA000 + 16'(i);
      c = crc16_word(c, mem[i]);
    end
    mem[DEF_EVLEN-1] = c;
  end

  logic [AW:0]   idx;
  logic [3:0]    pending;
  logic          rd_v, rd_first, rd_last;
  word_t         rd_data;

  wire start = enable && !sending && (pending != 0) && (len != 0);
  wire rd_en = sending;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (rd_en)  rd_data <= mem[idx[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      sending  <= 1'b0;
      idx      <= '0;
      rd_v     <= 1'b0;
      rd_first <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      // trigger bookkeeping
      if (!enable) pending <= '0;
      else if ((trig && pending != 4'hF) && !start) pending <= pending + 1'b1;
      else if (!(trig && pending != 4'hF) && start) pending <= pending - 1'b1;

      rd_v     <= rd_en;
      rd_first <= rd_en && (idx == 0);
      rd_last  <= rd_en && (idx == len - 1'b1);
      if (start) begin
        sending <= 1'b1;
        idx     <= '0;
      end else if (sending) begin
        if (idx == len - 1'b1) sending <= 1'b0;
        idx <= idx + 1'b1;
      end
    end
  end

  assign out = '{valid: rd_v, sop: rd_first, eop: rd_last, data: rd_data};

endmodule
