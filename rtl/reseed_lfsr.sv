// reseed_lfsr: the key-seeded Fibonacci LFSR that reseeds the CRC hash.
//
// The register holds N stages s[N-1:0]. On each step every stage moves one
// place towards stage 0 (s[i] <= s[i+1]) and stage N-1 takes the XOR of the
// stages selected by the feedback polynomial POLY (bit j of POLY set means
// s[j] is tapped, x^N implied). With a primitive POLY every non-zero seed runs
// through all 2^N - 1 non-zero states before repeating. This is the structure
// and the stepping rule of the published design.
//
// Loading: when `load` is high the register takes `key ^ iv`, i.e. the first
// state is the key combined with an initial state (S1 = Key xor S0). An
// all-zero seed would lock an LFSR, so this design replaces it with
// 0...01; that substitution is this design's own choice.
//
// Timing: one step per clock with `step` high; `load` wins over `step`.
// `state` is the register itself (no combinational path from inputs).
module reseed_lfsr #(
  parameter int unsigned N    = 128,
  parameter logic [N-1:0] POLY = N'(sc_pkg::default_lfsr_poly(N))
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low: clears to 0...01
  input  logic         load,    // load key ^ iv
  input  logic [N-1:0] key,
  input  logic [N-1:0] iv,
  input  logic         step,    // advance one LFSR step
  output logic [N-1:0] state
);

  logic [N-1:0] seed;
  logic         fb;

  always_comb begin
    seed = key ^ iv;
    if (seed == '0) seed = N'(1);
    fb = ^(state & POLY);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= N'(1);
    else if (load)  state <= seed;
    else if (step)  state <= {fb, state[N-1:1]};
  end

  // A maximum-length LFSR must never reach the all-zero lock-up state.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
