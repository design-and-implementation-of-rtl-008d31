// tb_crc_stream_cipher: end-to-end test of the stream cipher at its default
// (128-bit) configuration.
//
// A reference model written in this file (LFSR by its taps 128,126,101,99,
// CRC division by x^128+x^7+x^2+x+1 with LFSR bits on even stages and f on
// odd stages, LFSR stepped when the low two bits of the new hash word are 00) predicts every
// ciphertext word. The test encrypts a random message with random gaps in
// pt_valid, reloads in the middle of a stream (load must win over pt_valid),
// decrypts the ciphertext with the same key and IVs, and loads an all-zero
// LFSR seed. It counts each mechanism (load, LFSR step, LFSR hold, stall,
// zero-seed substitution, decryption round trip) and fails if one never
// happened. The latency check is that ct_valid rises exactly one clock after
// each accepted word.
module tb_crc_stream_cipher;
  localparam int N = 128;
  localparam int NW = 1500;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, load, pt_valid, ct_valid, lfsr_step;
  logic [N-1:0] key, lfsr_iv, crc_iv, pt, ct, ks;

  crc_stream_cipher dut (
    .clk, .rst_n, .load, .key, .lfsr_iv, .crc_iv, .pt_valid, .pt,
    .ct_valid, .ct, .ks, .lfsr_step);

  // ---------------- reference model ----------------
  logic [N-1:0] m_s, m_x;
  int n_load = 0, n_step = 0, n_hold = 0, n_stall = 0, n_zero = 0, n_round = 0;

  task automatic m_load(input logic [N-1:0] k, input logic [N-1:0] iv, input logic [N-1:0] xi);
    m_s = k ^ iv;
    if (m_s == '0) begin
      m_s = 1;
      n_zero++;
    end
    m_x = xi;
    n_load++;
  endtask

  function automatic logic m_f(input logic [N-1:0] x, input logic [N-1:0] s, input int j);
    logic a, b;
    a = (j >= 2) ? x[j-2] : x[N-1];
    b = (j >= 3) ? x[j-3] : x[N-1];
    return a ^ (b & s[(j+1)%N]) ^ (s[(j+2)%N] & x[N-1]);
  endfunction

  // one iteration; returns the new keystream word
  task automatic m_iter(output logic [N-1:0] word);
    logic [N:0] t;
    logic [N-1:0] nx;
    logic stepit;
    t = {m_x, 1'b0};
    if (t[N]) t = t ^ {1'b1, 120'b0, 8'h87};
    nx = t[N-1:0];
    for (int j = 0; j < N; j++) nx[j] ^= (j % 2 == 0) ? m_s[j] : m_f(m_x, m_s, j);
    stepit = (nx[1:0] == 2'b00);
    if (stepit) begin
      m_s = {m_s[0] ^ m_s[99] ^ m_s[101] ^ m_s[126], m_s[N-1:1]};
      n_step++;
    end else n_hold++;
    m_x = nx;
    word = nx;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  logic [N-1:0] msg [NW];
  logic [N-1:0] cip [NW];

  initial begin
    repeat (50 * NW) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_load(input logic [N-1:0] k, input logic [N-1:0] iv, input logic [N-1:0] xi);
    key = k; lfsr_iv = iv; crc_iv = xi;
    load = 1;
    @(negedge clk);
    load = 0;
    m_load(k, iv, xi);
    check(ks == m_x, "hash register after load");
    check(!ct_valid, "no ct_valid after load");
  endtask

  // run words through the cipher; out[i] = result for in[i]
  task automatic run(input bit record_ct, input bit decrypt, input int nwords, input bit gaps);
    int i;
    logic [N-1:0] w, want;
    i = 0;
    while (i < nwords) begin
      if (gaps && $urandom_range(0, 5) == 0) begin
        pt_valid = 0;
        @(negedge clk);
        check(!ct_valid, "ct_valid low after stall");
        n_stall++;
        continue;
      end
      pt_valid = 1;
      pt = decrypt ? cip[i] : msg[i];
      m_iter(w);
      #1;
      check(lfsr_step == (w[1:0] == 2'b00), "lfsr_step flag");
      @(negedge clk);
      pt_valid = 0;
      want = pt ^ w;
      check(ct_valid, "ct_valid one clock after the word");
      check(ct == want, $sformatf("ct word %0d", i));
      check(ks == w, $sformatf("keystream word %0d", i));
      if (record_ct) cip[i] = ct;
      if (decrypt) begin
        check(ct == msg[i], $sformatf("decrypted word %0d", i));
        if (ct == msg[i]) n_round++;
      end
      i++;
    end
  endtask

  initial begin
    logic [N-1:0] k1, iv1, x1, held;
    rst_n = 0; load = 0; pt_valid = 0; pt = '0;
    key = '0; lfsr_iv = '0; crc_iv = '0;
    #12;
    check(!ct_valid && ks == '0, "reset");
    rst_n = 1;
    @(negedge clk);

    for (int i = 0; i < NW; i++) msg[i] = rnd();
    k1 = rnd(); iv1 = rnd(); x1 = rnd();

    // encrypt
    do_load(k1, iv1, x1);
    run(1, 0, NW, 1);

    // load wins over pt_valid mid-stream
    pt_valid = 1; pt = rnd(); key = k1; lfsr_iv = iv1; crc_iv = x1; load = 1;
    @(negedge clk);
    load = 0; pt_valid = 0;
    m_load(k1, iv1, x1);
    check(!ct_valid, "load blocks the word presented with it");
    check(ks == x1, "reload mid-stream");

    // decrypt (state restarted by the reload above)
    run(0, 1, NW, 1);

    // different key gives a different keystream
    do_load(k1 ^ 128'h1, iv1, x1);
    run(0, 0, 64, 0);

    // all-zero LFSR seed
    do_load(k1, k1, rnd());
    run(0, 0, 200, 1);

    // hold: nothing changes without pt_valid
    held = ks;
    repeat (5) @(negedge clk);
    check(ks == held, "hold without pt_valid");

    $display("mechanisms: load=%0d lfsr_step=%0d lfsr_hold=%0d stall=%0d zero_seed=%0d round_trip=%0d",
             n_load, n_step, n_hold, n_stall, n_zero, n_round);
    check(n_load > 0, "load happened");
    check(n_step > 0, "LFSR step happened");
    check(n_hold > 0, "LFSR hold happened");
    check(n_stall > 0, "stall happened");
    check(n_zero > 0, "zero-seed substitution happened");
    check(n_round == NW, "every word decrypted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
