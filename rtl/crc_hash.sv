// crc_hash: the reseeded CRC polynomial-division circuit; its register is
// the keystream word.
//
// The core is the usual Galois-form divider by the generator polynomial
// G (bit j of G set means x^j is present, x^N implied): on each step every
// stage takes the stage below it, and stages j with G[j] set also XOR in the
// feedback bit fb = x[N-1]. On top of the plain divider every stage gets one
// extra XOR input, alternating along the register:
//   even j : the LFSR bit s[j]      -> at a tap the stage sees s[j] ^ fb,
//   odd j  : the Boolean bit f[j]   -> at a tap the stage sees f[j] ^ fb,
// so that
//   x'[j] = x[j-1] ^ (G[j] & fb) ^ (j even ? s[j] : f[j]),   x[-1] = 0.
// The register structure, the generator taps and the alternating LFSR and
// Boolean inputs follow the published design; which stages take which input
// (even/odd) is this design's own choice.
//
// One hash iteration is one clock: with `advance` high the register moves to
// x', which is the next keystream word X(t). `load` (priority) writes `init`
// (the initial hash value X0). `x` is the register output.
module crc_hash #(
  parameter int unsigned  N = 128,
  parameter logic [N-1:0] G = N'(sc_pkg::default_crc_poly(N))
) (
  input  logic         clk,
  input  logic         rst_n,    // asynchronous, active low: clears to 0
  input  logic         load,
  input  logic [N-1:0] init,
  input  logic         advance,
  input  logic [N-1:0] s,        // LFSR state
  input  logic [N-1:0] f,        // Boolean function output
  output logic [N-1:0] x,        // current hash output
  output logic [N-1:0] x_next    // value x takes on the next advance
);

  logic fb;

  always_comb begin
    fb = x[N-1];
    for (int j = 0; j < N; j++) begin
      x_next[j] = ((j == 0) ? 1'b0 : x[(j == 0) ? 0 : j-1])
                ^ (G[j] & fb)
                ^ ((j % 2 == 0) ? s[j] : f[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        x <= '0;
    else if (load)     x <= init;
    else if (advance)  x <= x_next;
  end

endmodule
