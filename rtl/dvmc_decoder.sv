`timescale 1ns/1ps
// dvmc_decoder: turns a DVMC readout word into a delay in ring stage delays.
//
// word holds the bits in the order they left the DVMC: word[NCNT-1:0] is the
// round count, word[NCNT+j] is tap TAPS-1-j. At rest tap k is 1 for even k;
// after m stage delays (m < 2*TAPS) the taps differ from rest in the first m
// positions when m <= TAPS, and in all positions except the first m-TAPS
// when m > TAPS. The decoder finds m (the phase) from that pattern and
// returns delay = 2*TAPS*count + phase; valid = 0 if the taps match neither
// form. Purely combinational. The design only says that the delay value is
// calculated from the captured taps and count; this decoding is derived from
// the ring's structure.
module dvmc_decoder
  import odm_pkg::*;
#(
  parameter int unsigned TAPS = RING_TAPS,
  parameter int unsigned NCNT = TRC_BITS,
  parameter int unsigned DW   = NCNT + $clog2(2 * TAPS)
) (
  input  logic [NCNT+TAPS-1:0] word,
  output logic [DW-1:0]        delay,
  output logic                 valid
);
  logic [TAPS-1:0] taps;
  logic [TAPS-1:0] diff;
  logic [TAPS-1:0] rest;
  logic [NCNT-1:0] count;
  logic [DW-1:0]   phase;

  always_comb begin
    count = word[NCNT-1:0];
    for (int unsigned j = 0; j < TAPS; j++) begin
      taps[TAPS-1-j] = word[NCNT+j];
      rest[j]        = (j % 2 == 0);
    end
    diff  = taps ^ rest;
    phase = '0;
    valid = 1'b0;
    for (int unsigned m = 0; m <= TAPS; m++) begin
      if (diff == TAPS'((1 << m) - 1)) begin
        phase = DW'(m);
        valid = 1'b1;
      end
    end
    for (int unsigned m = 1; m < TAPS; m++) begin
      if (diff == ~TAPS'((1 << m) - 1)) begin
        phase = DW'(TAPS + m);
        valid = 1'b1;
      end
    end
    delay = DW'(count) * DW'(2 * TAPS) + phase;
  end
endmodule
