// tb_mont_crypto_top: end-to-end test of the top level at its default
// parameters (32-bit operands, 32-bit exponent).
//
//   * modular multiplier: X=11, Y=17, N=19 and X=11, Y=7, N=13, then
//     random full-width operands; Result = X*Y mod N, `state` timing.
//   * exponentiation: a 32-bit RSA round trip. With p = 65521, q = 65537
//     (n = 4294049777), e = 65537 and d = e^-1 mod (p-1)(q-1), a message is
//     encrypted and the ciphertext decrypted back; then random cases.
//   * iterative multiplier: random operands, congruence and range.
// It counts how often each mechanism of the design occurred and fails if
// one never did: both Montgomery passes of the multiplier, the final
// subtraction taken and skipped, a square, a multiply, a skipped multiply
// (zero exponent bit), a start ignored while busy, and an iterative result
// left in [M, 2M).
module tb_mont_crypto_top;
  import tb_mont_ref_pkg::*;
  localparam int N = 32;
  localparam int E = 32;

  logic clk = 1'b0, reset = 1'b1;
  logic start = 1'b0, state;
  logic [N-1:0] X, Y, Nm, constant, Result;
  logic [4:0]   count = 5'd31;
  logic exp_start = 1'b0, exp_busy, exp_done;
  logic [N-1:0] exp_base, exp_modulus, exp_r2, exp_result;
  logic [E-1:0] exp_exponent;
  logic [5:0]   exp_n_sq, exp_n_mul;
  logic it_start = 1'b0, it_done;
  logic [N-1:0] it_A, it_B, it_M;
  logic [N:0]   it_R;

  int checks = 0, failures = 0;
  int n_pass1 = 0, n_pass2 = 0, n_sub_taken = 0, n_sub_skipped = 0;
  int n_squares = 0, n_multiplies = 0, n_skipped_mult = 0, n_ignored_start = 0;
  int n_it_unreduced = 0;

  mont_crypto_top dut (
    .clk(clk), .reset(reset),
    .start(start), .X(X), .Y(Y), .N(Nm), .constant(constant), .count(count),
    .Result(Result), .state(state),
    .exp_start(exp_start), .exp_base(exp_base), .exp_exponent(exp_exponent),
    .exp_modulus(exp_modulus), .exp_r2(exp_r2), .exp_busy(exp_busy),
    .exp_done(exp_done), .exp_result(exp_result),
    .exp_n_squares(exp_n_sq), .exp_n_multiplies(exp_n_mul),
    .it_start(it_start), .it_A(it_A), .it_B(it_B), .it_M(it_M),
    .it_done(it_done), .it_R(it_R));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the multiplier inside the modular multiplier.
  always @(posedge clk) begin
    if (!reset && dut.u_modmul.u_mont.state == dut.u_modmul.u_mont.FINISH) begin
      if (dut.u_modmul.phase == dut.u_modmul.PASS1) n_pass1++;
      if (dut.u_modmul.phase == dut.u_modmul.PASS2) n_pass2++;
      if (dut.u_modmul.u_mont.diff[N+1]) n_sub_skipped++;
      else                               n_sub_taken++;
    end
    if (!reset && dut.u_modmul.u_mont.state != dut.u_modmul.u_mont.IDLE && start)
      n_ignored_start++;
  end

  task automatic modmul(big_t xx, big_t yy, big_t nn, bit poke);
    int cycles;
    big_t e = mod_mul(xx, yy, nn);
    @(negedge clk);
    X = N'(xx); Y = N'(yy); Nm = N'(nn); constant = N'(r2_ref(nn, N));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!state) begin
      @(negedge clk);
      cycles++;
      start = poke && (cycles == 10);   // try to restart mid-operation
    end
    start = 1'b0;
    checks++;
    if (big_t'(Result) != e) begin
      failures++;
      $display("FAIL modmul %0d*%0d mod %0d: got %0d expected %0d", xx, yy, nn, Result, e);
    end
    checks++;
    if (cycles != 2 * N + 6) begin
      failures++;
      $display("FAIL modmul latency %0d", cycles);
    end
  endtask

  task automatic modexp(big_t bb, big_t ee, big_t mm, output big_t got);
    big_t e = mod_pow(bb, ee, mm);
    @(negedge clk);
    exp_base = N'(bb); exp_exponent = E'(ee); exp_modulus = N'(mm);
    exp_r2 = N'(r2_ref(mm, N));
    exp_start = 1'b1;
    @(negedge clk);
    exp_start = 1'b0;
    while (!exp_done) @(negedge clk);
    got = big_t'(exp_result);
    n_squares      += int'(exp_n_sq);
    n_multiplies   += int'(exp_n_mul);
    n_skipped_mult += int'(exp_n_sq) - int'(exp_n_mul);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL modexp %0d^%0d mod %0d: got %0d expected %0d", bb, ee, mm, got, e);
    end
  endtask

  task automatic iterative(big_t aa, big_t bb, big_t mm);
    big_t e = mont_ref(aa, bb, mm, N);
    @(negedge clk);
    it_A = N'(aa); it_B = N'(bb); it_M = N'(mm);
    it_start = 1'b1;
    @(negedge clk);
    it_start = 1'b0;
    while (it_done) @(negedge clk);
    while (!it_done) @(negedge clk);
    checks++;
    if (big_t'(it_R) >= 2 * mm || big_t'(it_R) % mm != e) begin
      failures++;
      $display("FAIL iterative %0d*%0d mod %0d: got %0d", aa, bb, mm, it_R);
    end
    if (big_t'(it_R) >= mm) n_it_unreduced++;
  endtask

  initial begin
    big_t p, q, n, phi, e, d, msg, c, back;
    X = '0; Y = '0; Nm = 32'd3; constant = '0;
    exp_base = '0; exp_exponent = '0; exp_modulus = 32'd3; exp_r2 = '0;
    it_A = '0; it_B = '0; it_M = 32'd3;
    repeat (3) @(posedge clk);
    reset <= 1'b0;

    modmul(11, 17, 19, 0);
    modmul(11, 7, 13, 1);
    for (int t = 0; t < 40; t++) begin
      big_t nn = rand_modulus(N, 1);
      modmul(rand_below(nn), rand_below(nn), nn, t[0]);
    end

    // RSA round trip
    p = 65521; q = 65537; n = p * q; phi = (p - 1) * (q - 1); e = 65537;
    d = 0;
    for (big_t k = 1; k < e; k++)
      if (((k * phi + 1) % e) == 0) begin d = (k * phi + 1) / e; break; end
    msg = 32'h1234_5678 % n;
    modexp(msg, e, n, c);
    modexp(c, d, n, back);
    checks++;
    if (back != msg) begin
      failures++;
      $display("FAIL RSA round trip: %0d -> %0d -> %0d", msg, c, back);
    end
    for (int t = 0; t < 6; t++) begin
      big_t mm = rand_modulus(N, t[0]);
      modexp(rand_below(mm), big_t'($urandom), mm, back);
    end

    for (int t = 0; t < 60; t++) begin
      big_t mm = rand_modulus(N, 1);
      iterative(big_t'($urandom), rand_below(mm), mm);
    end

    $display("mechanisms: pass1=%0d pass2=%0d sub_taken=%0d sub_skipped=%0d squares=%0d",
             n_pass1, n_pass2, n_sub_taken, n_sub_skipped, n_squares);
    $display("mechanisms: multiplies=%0d skipped_multiplies=%0d ignored_starts=%0d it_unreduced=%0d",
             n_multiplies, n_skipped_mult, n_ignored_start, n_it_unreduced);
    check_seen("pass 1", n_pass1);
    check_seen("pass 2", n_pass2);
    check_seen("final subtraction taken", n_sub_taken);
    check_seen("final subtraction skipped", n_sub_skipped);
    check_seen("square", n_squares);
    check_seen("multiply", n_multiplies);
    check_seen("skipped multiply", n_skipped_mult);
    check_seen("ignored start", n_ignored_start);
    check_seen("iterative result in [M, 2M)", n_it_unreduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endfunction
endmodule
