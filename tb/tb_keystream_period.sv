// tb_keystream_period: keystream period of the 8-bit and 16-bit
// configurations.
//
// The generator state is the pair (LFSR state, hash register). Its update is
// a permutation, so the state loaded at the start must come back; the number
// of iterations until it does is the period in words, and N times that is the
// period in keystream bits. For the 8-bit configuration (published
// polynomials) two seeds are run and their periods compared with values from
// an independent software model of the same equations:
//   key 8'hA5, iv 0, X0 8'h3C : 29355 words (234,840 bits), 7395 LFSR steps
//   key 8'h5B, iv 0, X0 8'hC4 : 27199 words (217,592 bits), 6885 LFSR steps
// For scale: an 8-bit shrinking generator repeats after 248 bits and a
// maximum-length 8-bit LFSR after 255 bits. The 16-bit configuration must not
// repeat within 2^20 words (16.7 Mbit).
module tb_keystream_period;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, load, pt_valid;
  logic [7:0]  key8, iv8, x08, ct8, ks8;
  logic [15:0] key16, iv16, x016, ct16, ks16;
  logic ctv8, ctv16, st8, st16;

  crc_stream_cipher #(.N(8)) dut8 (
    .clk, .rst_n, .load, .key(key8), .lfsr_iv(iv8), .crc_iv(x08), .pt_valid, .pt(8'h00),
    .ct_valid(ctv8), .ct(ct8), .ks(ks8), .lfsr_step(st8));
  crc_stream_cipher #(.N(16)) dut16 (
    .clk, .rst_n, .load, .key(key16), .lfsr_iv(iv16), .crc_iv(x016), .pt_valid, .pt(16'h0000),
    .ct_valid(ctv16), .ct(ct16), .ks(ks16), .lfsr_step(st16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure8(input logic [7:0] k, input logic [7:0] x0, input int want, input int want_steps);
    logic [7:0] s0;
    int t, steps;
    key8 = k; iv8 = '0; x08 = x0; load = 1;
    @(negedge clk);
    load = 0;
    s0 = dut8.u_lfsr.state;
    t = 0; steps = 0;
    pt_valid = 1;
    do begin
      #1 steps += int'(st8);
      @(negedge clk);
      t++;
      // the keystream word is the plaintext-0 ciphertext
      check(ct8 == ks8, "ct = keystream for zero plaintext");
    end while (!(dut8.u_lfsr.state == s0 && ks8 == x0) && t < 100000);
    pt_valid = 0;
    $display("8-bit key %02h: period %0d words = %0d bits, %0d LFSR steps", k, t, 8 * t, steps);
    check(t == want, $sformatf("period %0d, expected %0d", t, want));
    check(steps == want_steps, $sformatf("LFSR steps %0d, expected %0d", steps, want_steps));
    check(8 * t > 255, "longer than a maximum-length 8-bit LFSR");
  endtask

  initial begin
    logic [15:0] s16;
    int t;
    bit back;
    rst_n = 0; load = 0; pt_valid = 0;
    key8 = '0; iv8 = '0; x08 = '0; key16 = '0; iv16 = '0; x016 = '0;
    #12 rst_n = 1;
    @(negedge clk);

    measure8(8'hA5, 8'h3C, 29355, 7395);
    measure8(8'h5B, 8'hC4, 27199, 6885);

    key16 = 16'hBEEF; iv16 = '0; x016 = 16'h1234; load = 1;
    @(negedge clk);
    load = 0;
    s16 = dut16.u_lfsr.state;
    pt_valid = 1;
    back = 0;
    for (t = 1; t <= (1 << 20); t++) begin
      @(negedge clk);
      if (dut16.u_lfsr.state == s16 && ks16 == x016) back = 1;
    end
    pt_valid = 0;
    check(!back, "16-bit configuration does not repeat within 2^20 words");
    $display("16-bit: no repeat within %0d words", 1 << 20);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
