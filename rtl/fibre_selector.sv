// fibre_selector: decision logic between the two redundant fibres of one
// channel.
//
// Both fibres carry the same packets. Each fibre's words wait in its own
// packet buffer and each fibre's CRC verdicts in its own result queue. When
// both queues hold a verdict, the selector takes one verdict from each and
// picks the fibre to forward: fibre A if its CRC is good, otherwise fibre B
// if its CRC is good, otherwise the preferred fibre (`prefer_b`). It then
// reads both packets out of the buffers together, one word per clock,
// sending the chosen one to `out` and discarding the other.
//
// A copy that never arrives (a fibre that stopped) would stall the channel,
// so when only one verdict has waited TIMEOUT clocks that copy is forwarded
// alone and the other fibre now owes one copy. While a fibre owes copies,
// the other fibre's packets are forwarded as soon as their verdicts arrive,
// each adding one to what is owed, so a dead fibre costs one timeout and not
// one per packet. Copies that the owing fibre then delivers are taken to be
// the late ones and are dropped, one per copy owed, which realigns the two
// fibres when the copies were only late. A fibre that died and came back
// keeps being dropped until a reset, leaving the channel on the good fibre.
// Choosing by the CRC result follows the board description; the order of
// preference, the timeout and the realignment rule are this design's
// choices.
//
// Timing: `out` is registered. The first word of the chosen packet leaves two
// clocks after both verdicts are present, and the rest follow one per clock,
// the 40 MHz word rate of the output link. When the next pair of verdicts is
// already waiting as a packet ends, the next packet follows with no idle
// clock, so the channel keeps up with packets arriving back to back.
module fibre_selector
  import omb_pkg::*;
#(
  parameter int unsigned TIMEOUT = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prefer_b,
  // packet buffers: {sop, eop, data}, first-word-fall-through
  input  logic        a_empty,
  input  logic [17:0] a_word,
  output logic        a_rd,
  input  logic        b_empty,
  input  logic [17:0] b_word,
  output logic        b_rd,
  // CRC verdict queues
  input  logic        ra_empty,
  input  logic        ra_ok,
  output logic        ra_rd,
  input  logic        rb_empty,
  input  logic        rb_ok,
  output logic        rb_rd,
  // selected stream
  output stream_t     out,
  // event pulses for the counters
  output logic        ev_pkt,      // a packet was forwarded
  output logic        ev_sel_b,    // ... and it came from fibre B
  output logic        ev_bothbad,  // both copies failed their CRC
  output logic        ev_timeout   // one copy missing, the other forwarded
);

  typedef enum logic {S_IDLE, S_DRAIN} state_e;
  localparam int unsigned OW = 16;          // width of the owed-copy counts

  state_e state;
  logic   drain_a, drain_b, fwd_a, fwd_b;
  logic [OW-1:0] owe_a, owe_b;              // late copies still to drop
  logic [$clog2(TIMEOUT+1)-1:0] tmo_cnt;

  // read one word per clock from every buffer being drained
  assign a_rd = (state == S_DRAIN) && drain_a && !a_empty;
  assign b_rd = (state == S_DRAIN) && drain_b && !b_empty;

  // verdict pops: in IDLE, or in the last clock of a drain so that the next
  // packet follows the current one without a gap
  logic both, only_a, only_b, tmo_hit, drain_end, take_both, next_fwd_a;
  logic drop_a, drop_b, alone_a, alone_b;
  assign both    = !ra_empty && !rb_empty;
  assign only_a  = !ra_empty &&  rb_empty;
  assign only_b  =  ra_empty && !rb_empty;
  assign tmo_hit = (tmo_cnt == TIMEOUT[$bits(tmo_cnt)-1:0] - 1'b1);
  assign drain_end = (state == S_DRAIN)
                  && !(drain_a && !(a_rd && a_word[16]))
                  && !(drain_b && !(b_rd && b_word[16]));
  // a normal pair of verdicts: decide on both copies
  assign take_both = both && (owe_a == 0) && (owe_b == 0) && ((state == S_IDLE) || drain_end);
  // A if good, else B if good, else the preferred fibre
  assign next_fwd_a = ra_ok || (!rb_ok && !prefer_b);
  // in IDLE: drop a late copy, or forward a copy whose partner is missing
  assign drop_a  = (state == S_IDLE) && !ra_empty && (owe_a != 0);
  assign drop_b  = (state == S_IDLE) && !rb_empty && (owe_b != 0) && !drop_a;
  assign alone_a = (state == S_IDLE) && only_a && (owe_a == 0) && ((owe_b != 0) || tmo_hit);
  assign alone_b = (state == S_IDLE) && only_b && (owe_b == 0) && ((owe_a != 0) || tmo_hit);

  assign ra_rd = take_both || drop_a || alone_a;
  assign rb_rd = take_both || drop_b || alone_b;

  function automatic logic [OW-1:0] inc_sat(input logic [OW-1:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      drain_a    <= 1'b0;
      drain_b    <= 1'b0;
      fwd_a      <= 1'b0;
      fwd_b      <= 1'b0;
      owe_a      <= '0;
      owe_b      <= '0;
      tmo_cnt    <= '0;
      out        <= '0;
      ev_pkt     <= 1'b0;
      ev_sel_b   <= 1'b0;
      ev_bothbad <= 1'b0;
      ev_timeout <= 1'b0;
    end else begin
      out        <= '0;
      ev_pkt     <= 1'b0;
      ev_sel_b   <= 1'b0;
      ev_bothbad <= 1'b0;
      ev_timeout <= 1'b0;
      unique case (state)
        S_IDLE: begin
          // the timeout runs while one copy waits alone for its partner
          if ((only_a && owe_a == 0 && owe_b == 0) || (only_b && owe_a == 0 && owe_b == 0))
            tmo_cnt <= tmo_hit ? '0 : tmo_cnt + 1'b1;
          else
            tmo_cnt <= '0;
          if (drop_a) begin                // late copy on A: read it out unsent
            owe_a   <= owe_a - 1'b1;
            drain_a <= 1'b1; fwd_a <= 1'b0;
            state   <= S_DRAIN;
          end else if (drop_b) begin
            owe_b   <= owe_b - 1'b1;
            drain_b <= 1'b1; fwd_b <= 1'b0;
            state   <= S_DRAIN;
          end else if (alone_a) begin      // B's copy missing: send A alone
            owe_b      <= inc_sat(owe_b);
            drain_a    <= 1'b1; fwd_a <= 1'b1;
            state      <= S_DRAIN;
            ev_timeout <= 1'b1;
            ev_pkt     <= 1'b1;
          end else if (alone_b) begin
            owe_a      <= inc_sat(owe_a);
            drain_b    <= 1'b1; fwd_b <= 1'b1;
            state      <= S_DRAIN;
            ev_timeout <= 1'b1;
            ev_pkt     <= 1'b1;
            ev_sel_b   <= 1'b1;
          end
        end
        S_DRAIN: begin
          if (a_rd) begin
            if (fwd_a) out <= '{valid: 1'b1, sop: a_word[17], eop: a_word[16], data: a_word[15:0]};
            if (a_word[16]) begin drain_a <= 1'b0; fwd_a <= 1'b0; end
          end
          if (b_rd) begin
            if (fwd_b) out <= '{valid: 1'b1, sop: b_word[17], eop: b_word[16], data: b_word[15:0]};
            if (b_word[16]) begin drain_b <= 1'b0; fwd_b <= 1'b0; end
          end
          if (drain_end) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // both copies present: drain both, forward the chosen one
      if (take_both) begin
        tmo_cnt    <= '0;
        state      <= S_DRAIN;
        drain_a    <= 1'b1;
        drain_b    <= 1'b1;
        fwd_a      <= next_fwd_a;
        fwd_b      <= !next_fwd_a;
        ev_pkt     <= 1'b1;
        ev_sel_b   <= !next_fwd_a;
        ev_bothbad <= !ra_ok && !rb_ok;
      end
    end
  end

  a_one_forwarded: assert property (@(posedge clk) disable iff (!rst_n) !(fwd_a && fwd_b));

endmodule
