// crc_checker: real-time CRC check of the packets of one input fibre.
//
// Every valid word except the last of a packet is folded into a running
// CRC-16 (omb_pkg::crc16_word). The last word (eop) is the CRC sent by the
// front end; it is compared with the running value. One cycle after the eop
// word, `done` pulses for one cycle with `ok` telling whether they matched.
// A word with sop restarts the CRC, so a packet cut short by a lost eop is
// absorbed into the next one and fails its check.
//
// Checking the CRC carried in the data against a recomputed value follows
// the board description; the polynomial (parameter POLY), the initial value
// and the sop/eop framing are this design's choices.
module crc_checker
  import omb_pkg::*;
#(
  parameter logic [15:0] POLY = CRC_POLY,
  parameter logic [15:0] INIT = CRC_INIT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t in,
  output logic    done,
  output logic    ok
);

  logic [15:0] crc_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_run <= INIT;
      done    <= 1'b0;
      ok      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in.valid) begin
        if (in.eop) begin
          done    <= 1'b1;
          ok      <= ((in.sop ? INIT : crc_run) == in.data);
          crc_run <= INIT;
        end else begin
          crc_run <= crc16_word(in.sop ? INIT : crc_run, in.data, POLY);
        end
      end
    end
  end

endmodule
