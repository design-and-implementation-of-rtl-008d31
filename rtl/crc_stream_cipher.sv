// crc_stream_cipher: stream cipher whose keystream comes from a CRC hash
// circuit reseeded by an LFSR and a nonlinear Boolean function.
//
// Idea: an LFSR alone is linear and easy to predict, and feeding a hash with
// fresh random input every iteration costs throughput. Here the N-bit CRC
// hash register iterates once per clock on its own previous output, and is
// perturbed by (a) the state of a key-seeded maximum-length LFSR and (b) a
// nonlinear Boolean function of hash and LFSR bits. The LFSR itself steps only
// when the newly generated hash output shows a chosen value (low two bits 00
// by default), so it changes at a slower pace, about one cycle in four.
// Because each iteration is invertible and the step decision depends on the
// new hash value, the whole (LFSR, hash) state update is a permutation: every
// state lies on a cycle and the generator never falls into a short tail.
// Each hash output X(t) is one N-bit keystream word; the keystream is
// X(1) || X(2) || ...
//
//   load     : LFSR <= key ^ lfsr_iv (all-zero replaced by 1), hash <= crc_iv
//   pt_valid : one iteration; ct <= pt ^ X(t) on that edge, ct_valid next cycle
//
// Decryption is the same operation with the same key and IVs. The key size N
// is the plaintext word size, as in the published design; the default is the
// 128-bit configuration. Word-wide encryption (N plaintext bits per clock),
// the IV ports and the valid handshake are this design's own choices.
//
// Timing: latency one clock from pt to ct, throughput one N-bit word per
// clock. `ks` is the last keystream word produced (the hash register).
module crc_stream_cipher #(
  parameter int unsigned  N         = 128,
  parameter logic [N-1:0] LFSR_POLY = N'(sc_pkg::default_lfsr_poly(N)),
  parameter logic [N-1:0] CRC_POLY  = N'(sc_pkg::default_crc_poly(N)),
  parameter int unsigned  CTRL_BITS = 2,
  parameter logic [CTRL_BITS-1:0] CTRL_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] key,
  input  logic [N-1:0] lfsr_iv,    // S0, combined with the key
  input  logic [N-1:0] crc_iv,     // X0, initial hash value
  input  logic         pt_valid,
  input  logic [N-1:0] pt,
  output logic         ct_valid,
  output logic [N-1:0] ct,
  output logic [N-1:0] ks,
  output logic         lfsr_step   // the LFSR steps on this clock edge
);

  logic [N-1:0] s, f, x, x_next;
  logic         advance;

  assign advance = pt_valid && !load;

  reseed_lfsr #(.N(N), .POLY(LFSR_POLY)) u_lfsr (
    .clk, .rst_n, .load, .key, .iv(lfsr_iv), .step(lfsr_step), .state(s)
  );

  nl_bool_fn #(.N(N)) u_f (.x, .s, .f);

  crc_hash #(.N(N), .G(CRC_POLY)) u_crc (
    .clk, .rst_n, .load, .init(crc_iv), .advance, .s, .f, .x, .x_next
  );

  lfsr_clk_ctrl #(.CTRL_BITS(CTRL_BITS), .CTRL_VALUE(CTRL_VALUE)) u_ctrl (
    .hash_lo(x_next[CTRL_BITS-1:0]), .advance, .step(lfsr_step)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_valid <= 1'b0;
      ct       <= '0;
    end else begin
      ct_valid <= advance;
      if (advance) ct <= pt ^ x_next;
    end
  end

  assign ks = x;

  // Handshake rule: a result appears exactly one clock after each accepted
  // word, and only then.
  a_ct_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                 ct_valid == $past(advance));

endmodule
