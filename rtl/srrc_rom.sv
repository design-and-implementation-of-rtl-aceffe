// srrc_rom: one phase of the modulator's filter-and-mixer lookup table.
//
// For a window of SPAN binary symbols (bit j = symbol of age j, 0 -> +1,
// 1 -> -1) the table holds the root-raised-cosine filter output at the time
// offset PHASE/4 of a symbol:
//   rom[w] = sum_{j=0}^{SPAN-1} (+/-1)_j * SRRC_TAPS[4*j + PHASE]
// so no multiplier or adder is needed at run time. The 2^SPAN entries of
// OUT_W bits are computed at elaboration from the tap table in tx_pkg.
// Combinational read: data follows addr in the same cycle.
//
// Storing the filter sums of a binary symbol window in ROM follows the
// transmitter description; the span and the word width are tx_pkg settings.
module srrc_rom
  import tx_pkg::*;
#(
  parameter int unsigned PHASE = 0
) (
  input  logic [SPAN-1:0] addr,
  output tap_t            data
);

  typedef tap_t rom_t [2**SPAN];

  function automatic rom_t build_rom();
    rom_t t;
    for (int w = 0; w < 2**SPAN; w++) t[w] = rom_value(PHASE, SPAN'(w));
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[addr];

endmodule
