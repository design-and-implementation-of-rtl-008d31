// tb_crc_hash: self-checking test of the reseeded CRC division circuit.
//
// 8-bit instance with g(x) = x^8+x^7+x^6+x^5+x^4+x^2+1, 128-bit instance with
// the default generator x^128+x^7+x^2+x+1.
// 1. Plain division (s = f = 0): loading a message M and stepping N times must
//    give the CRC hash M(x) x^N mod g(x), worked out here by long division of
//    the 2N-bit polynomial M(x) x^N.
// 2. Plain division from 1: g is primitive, so x^k mod g returns to 1 first
//    at k = 2^8 - 1 = 255.
// 3. Reseeded steps with random s and f against x' = (x * x mod g) ^ r, where
//    r takes s on even stages and f on odd stages; holds and load priority.
module tb_crc_hash;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [8:0]   G8   = 9'b1_1111_0101;
  localparam logic [128:0] G128 = {1'b1, 120'b0, 8'h87};

  logic rst_n, load, adv;
  logic [7:0]   init8, s8, f8, x8, xn8;
  logic [127:0] init128, s128, f128, x128, xn128;

  crc_hash #(.N(8), .G(8'hF5)) dut8 (
    .clk, .rst_n, .load, .init(init8), .advance(adv), .s(s8), .f(f8), .x(x8), .x_next(xn8));
  crc_hash dut128 (
    .clk, .rst_n, .load, .init(init128), .advance(adv), .s(s128), .f(f128), .x(x128), .x_next(xn128));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // remainder of a (degree < 2n) divided by g (degree n), bit by bit
  function automatic logic [127:0] polymod(input logic [255:0] a, input logic [128:0] g, input int n);
    for (int d = 2*n - 1; d >= n; d--)
      if (a[d]) a = a ^ (256'(g) << (d - n));
    return a[127:0];
  endfunction

  function automatic logic [127:0] ref_step(input logic [127:0] x, input logic [127:0] s,
                                            input logic [127:0] f, input logic [128:0] g, input int n);
    logic [255:0] t;
    logic [127:0] r;
    t = 256'(x) << 1;
    r = polymod(t, g, n);
    for (int j = 0; j < n; j++) r[j] ^= (j % 2 == 0) ? s[j] : f[j];
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m8, e8;
    logic [127:0] m128, e128;
    int k;
    rst_n = 0; load = 0; adv = 0;
    s8 = '0; f8 = '0; s128 = '0; f128 = '0; init8 = '0; init128 = '0;
    #12;
    check(x8 == 0 && x128 == 0, "reset clears");
    rst_n = 1;
    @(negedge clk);

    // 1. CRC hash of random messages, eq. (2)
    for (int i = 0; i < 10; i++) begin
      m8 = 8'($urandom);
      m128 = {$urandom, $urandom, $urandom, $urandom};
      init8 = m8; init128 = m128;
      load = 1; adv = 1; @(negedge clk); load = 0;
      check(x8 == m8 && x128 == m128, "load priority over advance");
      for (int t = 0; t < 8; t++) @(negedge clk);
      e8 = polymod(256'(m8) << 8, 129'(G8), 8)[7:0];
      check(x8 == e8, $sformatf("CRC8 hash of %02h: got %02h want %02h", m8, x8, e8));
      for (int t = 8; t < 128; t++) @(negedge clk);
      adv = 0;
      e128 = polymod(256'(m128) << 128, G128, 128);
      check(x128 == e128, "CRC128 hash");
    end

    // 2. order of x modulo g8
    init8 = 8'h01; load = 1; @(negedge clk); load = 0;
    adv = 1; k = 0;
    do begin
      @(negedge clk);
      k++;
    end while (x8 != 8'h01 && k < 600);
    adv = 0;
    check(k == 255, $sformatf("order of x mod g8 is 255, got %0d", k));

    // 3. reseeded steps
    init8 = 8'($urandom); init128 = {$urandom, $urandom, $urandom, $urandom};
    load = 1; @(negedge clk); load = 0;
    for (int t = 0; t < 300; t++) begin
      s8 = 8'($urandom); f8 = 8'($urandom);
      s128 = {$urandom, $urandom, $urandom, $urandom};
      f128 = {$urandom, $urandom, $urandom, $urandom};
      adv = ($urandom_range(0, 4) != 0);
      e8   = adv ? ref_step({120'b0, x8}, {120'b0, s8}, {120'b0, f8}, 129'(G8), 8)[7:0] : x8;
      e128 = adv ? ref_step(x128, s128, f128, G128, 128) : x128;
      #1;
      check(xn8 == ref_step({120'b0, x8}, {120'b0, s8}, {120'b0, f8}, 129'(G8), 8)[7:0], "x_next (8)");
      @(negedge clk);
      check(x8 == e8, $sformatf("reseeded step %0d (8)", t));
      check(x128 == e128, $sformatf("reseeded step %0d (128)", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
