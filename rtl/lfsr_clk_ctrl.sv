// lfsr_clk_ctrl: decides when the reseeding LFSR is clocked.
//
// The LFSR is not stepped every cycle: it steps only when the hash output
// takes a value of the designer's choice, so that the CRC input changes more
// slowly than the keystream. This design compares the low CTRL_BITS bits of
// the newly generated hash output (`hash_lo`, the value the hash register
// takes on this edge) with CTRL_VALUE. With the defaults (2 bits, value
// 2'b00) the LFSR steps on about one cycle in four. The width and the value
// are this design's own choice. The output is a clock enable, not a gated
// clock, and is qualified by `advance` (the generator iterates this cycle).
// Purely combinational.
module lfsr_clk_ctrl #(
  parameter int unsigned CTRL_BITS            = 2,
  parameter logic [CTRL_BITS-1:0] CTRL_VALUE  = '0
) (
  input  logic [CTRL_BITS-1:0] hash_lo,  // low bits of the current hash output
  input  logic                 advance,  // generator iterates this cycle
  output logic                 step      // step the LFSR on this clock edge
);

  assign step = advance && (hash_lo == CTRL_VALUE);

endmodule
