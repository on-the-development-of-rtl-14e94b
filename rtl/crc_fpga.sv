// crc_fpga: one CRC FPGA, serving one redundant input channel.
//
// Each front-end channel arrives twice, on fibres A and B, as 16-bit words
// at 40 MHz from two G-Link receivers. For each fibre a crc_checker
// recomputes the CRC of every packet while its words are stored in a packet
// buffer (sync_fifo), and the verdict goes to a queue of FIFO_DEPTH/2
// entries. The fibre_selector pairs the verdicts of the two copies and sends
// the copy with a correct CRC to the G-Link transmitter (`tx`), discarding
// the other.
// In injection mode (CTRL bit 0) `tx` carries instead the events of the
// event_injector, one per trigger pulse on `trig`; the input path keeps
// running and counting but its output is not used.
//
// The VME control FPGA reaches the registers below through the serial
// control bus (sbus_slave, slot SLOT):
//   0x000 CTRL  [0] injection mode, [1] prefer fibre B when both copies are
//               bad, [2] write 1: clear all counters
//   0x001 injection event length in words (default 16)
//   0x002 CRC errors on fibre A      0x003 CRC errors on fibre B
//   0x004 packets forwarded          0x005 packets with both copies bad
//   0x006 copies missing (timeouts)  0x007 packets forwarded from fibre B
//   0x400 + n  word n of the event memory (write only)
// `ch_rst` (from the VME FPGA's board reset) resets the channel logic but
// keeps the registers and the event memory.
//
// The split of work (CRC check of both fibres, decision, injection from an
// event memory loaded over the VME FPGA, CRC error counters and mode
// control) follows the board description; the buffering, the register map
// and the sizes are this design's choices. Latency in checking mode: the
// first word of a packet leaves at most 4 clocks after the later of the two
// copies has ended (or after the previous output packet); a packet of N
// words then leaves in N clocks.
module crc_fpga
  import omb_pkg::*;
#(
  parameter logic [SB_SLOT_W-1:0] SLOT = '0,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned EVT_DEPTH  = 1024,
  parameter int unsigned TIMEOUT    = 512,
  parameter int unsigned SB_LANES   = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ch_rst,
  input  stream_t fib_a,
  input  stream_t fib_b,
  output stream_t tx,
  input  logic    trig,
  input  logic    sb_clk,
  input  logic [SB_LANES-1:0] sb_di,
  output logic [SB_LANES-1:0] sb_do,
  output logic    sb_oe
);

  localparam int unsigned EAW = $clog2(EVT_DEPTH);

  // A packet has at least two words, so a full packet buffer holds at most
  // FIFO_DEPTH/2 packets: a verdict queue of that depth never fills first.
  localparam int unsigned VQ_DEPTH = (FIFO_DEPTH / 2 < 2) ? 2 : FIFO_DEPTH / 2;

  logic rst_ch_n;
  assign rst_ch_n = rst_n && !ch_rst;

  // ---------------- checking path ----------------
  logic        done_a, ok_a, done_b, ok_b;
  logic        a_empty, a_full, a_rd, b_empty, b_full, b_rd;
  logic [17:0] a_word, b_word;
  logic        ra_empty, ra_full, ra_ok, ra_rd, rb_empty, rb_full, rb_ok, rb_rd;
  stream_t     sel_out, inj_out;
  logic        ev_pkt, ev_sel_b, ev_bothbad, ev_timeout;
  logic        prefer_b, inj_mode;

  crc_checker u_chk_a (.clk, .rst_n(rst_ch_n), .in(fib_a), .done(done_a), .ok(ok_a));
  crc_checker u_chk_b (.clk, .rst_n(rst_ch_n), .in(fib_b), .done(done_b), .ok(ok_b));

  sync_fifo #(.WIDTH(18), .DEPTH(FIFO_DEPTH)) u_buf_a (
    .clk, .rst_n(rst_ch_n), .wr_en(fib_a.valid && !a_full),
    .wdata({fib_a.sop, fib_a.eop, fib_a.data}),
    .rd_en(a_rd), .rdata(a_word), .empty(a_empty), .full(a_full), .count());
  sync_fifo #(.WIDTH(18), .DEPTH(FIFO_DEPTH)) u_buf_b (
    .clk, .rst_n(rst_ch_n), .wr_en(fib_b.valid && !b_full),
    .wdata({fib_b.sop, fib_b.eop, fib_b.data}),
    .rd_en(b_rd), .rdata(b_word), .empty(b_empty), .full(b_full), .count());

  sync_fifo #(.WIDTH(1), .DEPTH(VQ_DEPTH)) u_res_a (
    .clk, .rst_n(rst_ch_n), .wr_en(done_a && !ra_full), .wdata(ok_a),
    .rd_en(ra_rd), .rdata(ra_ok), .empty(ra_empty), .full(ra_full), .count());
  sync_fifo #(.WIDTH(1), .DEPTH(VQ_DEPTH)) u_res_b (
    .clk, .rst_n(rst_ch_n), .wr_en(done_b && !rb_full), .wdata(ok_b),
    .rd_en(rb_rd), .rdata(rb_ok), .empty(rb_empty), .full(rb_full), .count());

  fibre_selector #(.TIMEOUT(TIMEOUT)) u_sel (
    .clk, .rst_n(rst_ch_n), .prefer_b,
    .a_empty, .a_word, .a_rd, .b_empty, .b_word, .b_rd,
    .ra_empty, .ra_ok, .ra_rd, .rb_empty, .rb_ok, .rb_rd,
    .out(sel_out), .ev_pkt, .ev_sel_b, .ev_bothbad, .ev_timeout);

  // ---------------- registers over the serial bus ----------------
  logic                 reg_we, reg_re;
  logic [SB_ADDR_W-1:0] reg_addr;
  logic [31:0]          reg_wdata, reg_rdata;
  logic [EAW:0]         ev_len;
  logic [31:0]          cnt_err_a, cnt_err_b, cnt_pkts, cnt_bothbad, cnt_tmo, cnt_selb;
  logic                 clr;

  sbus_slave #(.SLOT(SLOT), .LANES(SB_LANES)) u_sbs (
    .clk, .rst_n, .sb_clk, .sb_di, .sb_do, .sb_oe,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata);

  assign clr = reg_we && (reg_addr == R_CTRL) && reg_wdata[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_mode <= 1'b0;
      prefer_b <= 1'b0;
      ev_len   <= (EAW+1)'(DEF_EVLEN);
    end else if (reg_we) begin
      if (reg_addr == R_CTRL) begin
        inj_mode <= reg_wdata[0];
        prefer_b <= reg_wdata[1];
      end
      if (reg_addr == R_EVLEN) ev_len <= reg_wdata[EAW:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_err_a   <= '0;
      cnt_err_b   <= '0;
      cnt_pkts    <= '0;
      cnt_bothbad <= '0;
      cnt_tmo     <= '0;
      cnt_selb    <= '0;
    end else if (clr) begin
      cnt_err_a   <= '0;
      cnt_err_b   <= '0;
      cnt_pkts    <= '0;
      cnt_bothbad <= '0;
      cnt_tmo     <= '0;
      cnt_selb    <= '0;
    end else begin
      if (done_a && !ok_a) cnt_err_a   <= cnt_err_a + 1'b1;
      if (done_b && !ok_b) cnt_err_b   <= cnt_err_b + 1'b1;
      if (ev_pkt)          cnt_pkts    <= cnt_pkts + 1'b1;
      if (ev_bothbad)      cnt_bothbad <= cnt_bothbad + 1'b1;
      if (ev_timeout)      cnt_tmo     <= cnt_tmo + 1'b1;
      if (ev_sel_b)        cnt_selb    <= cnt_selb + 1'b1;
    end
  end

  always_comb begin
    unique case (reg_addr)
      R_CTRL:    reg_rdata = {30'h0, prefer_b, inj_mode};
      R_EVLEN:   reg_rdata = 32'(ev_len);
      R_ERR_A:   reg_rdata = cnt_err_a;
      R_ERR_B:   reg_rdata = cnt_err_b;
      R_PKTS:    reg_rdata = cnt_pkts;
      R_BOTHBAD: reg_rdata = cnt_bothbad;
      R_TMO:     reg_rdata = cnt_tmo;
      R_SELB:    reg_rdata = cnt_selb;
      default:   reg_rdata = '0;
    endcase
  end

  // ---------------- injection path ----------------
  event_injector #(.DEPTH(EVT_DEPTH)) u_inj (
    .clk, .rst_n(rst_ch_n), .enable(inj_mode), .trig, .len(ev_len),
    .mem_we(reg_we && reg_addr[SB_ADDR_W-1]), .mem_addr(reg_addr[EAW-1:0]),
    .mem_wdata(reg_wdata[15:0]), .out(inj_out), .sending());

  assign tx = inj_mode ? inj_out : sel_out;

endmodule
