// nl_bool_fn: the nonlinear Boolean function f that perturbs the CRC hash.
//
// The published design feeds some CRC stages with a nonlinear Boolean
// function of hash output bits and LFSR bits, chosen for nonlinearity and
// balancedness, but does not give the function. This design uses, for every
// output bit j,
//
//   f[j] = xr(j-2) ^ (xr(j-3) & s[j+1]) ^ (s[j+2] & x[N-1])
//
// where x is the current hash output, s the LFSR state (indices modulo N),
// and xr(k) is x[k] for k >= 0 and the CRC feedback bit x[N-1] for k < 0.
// For j >= 5 each f[j] is a 5-variable function that is balanced (linear in
// x[j-2]) and has nonlinearity 12, the largest a balanced 5-variable
// function can have.
//
// f[j] is fed to CRC stage j, which holds x[j-1] after the shift. Drawing f[j]
// only from hash bits below j-1 and from the feedback bit keeps one hash
// iteration invertible for a fixed LFSR state (stage by stage, from stage 0
// upwards, each old bit can be recovered), so the generator cannot collapse
// into short cycles that leave the LFSR idle. This choice of taps is this
// design's own. Purely combinational; N >= 8.
module nl_bool_fn #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0] x,   // CRC hash output (current keystream word)
  input  logic [N-1:0] s,   // LFSR state
  output logic [N-1:0] f
);

  for (genvar j = 0; j < N; j++) begin : g_bit
    localparam int unsigned A  = (j >= 2) ? j - 2 : N - 1;
    localparam int unsigned B  = (j >= 3) ? j - 3 : N - 1;
    localparam int unsigned S1 = (j + 1) % N;
    localparam int unsigned S2 = (j + 2) % N;
    assign f[j] = x[A] ^ (x[B] & s[S1]) ^ (s[S2] & x[N-1]);
  end

endmodule
