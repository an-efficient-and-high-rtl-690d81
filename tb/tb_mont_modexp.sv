// tb_mont_modexp: square-and-multiply exponentiation at 8 bits.
// Worked examples: 7^22 mod 11 = 5; the small RSA key n = 187, e = 7,
// d = 23 (88^7 mod 187 = 11 and 11^23 mod 187 = 88); 2^5 mod 7 = 4 (the
// inverse of 2 mod 7 by Fermat); exponent 0. Then random cases against
// reference arithmetic. Also checks the number of squarings (E_BITS) and
// multiplications (the exponent's weight), and the cycle count
// (E_BITS + weight + 3) * (N_BITS + 3).
module tb_mont_modexp;
  import tb_mont_ref_pkg::*;
  localparam int N = 8;
  localparam int E = 8;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] base, m, r2, result;
  logic [E-1:0] exponent;
  logic [2:0]   count = 3'd7;
  logic busy, done;
  logic [3:0] n_sq, n_mul;
  int checks = 0, failures = 0;

  mont_modexp #(.N_BITS(N), .E_BITS(E)) dut (
    .clk(clk), .rst(rst), .start(start), .base(base), .exponent(exponent), .m(m),
    .r2(r2), .count(count), .busy(busy), .done(done), .result(result),
    .n_squares(n_sq), .n_multiplies(n_mul));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(big_t bb, big_t ee, big_t mm, big_t expected);
    int cycles;
    big_t e = mod_pow(bb, ee, mm);
    @(negedge clk);
    base = N'(bb); exponent = E'(ee); m = N'(mm); r2 = N'(r2_ref(mm, N));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (big_t'(result) != e || (expected != '1 && big_t'(result) != expected)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d^%0d mod %0d: got %0d expected %0d", bb, ee, mm, result, e);
    end
    checks++;
    if (int'(n_sq) != E || int'(n_mul) != $countones(E'(ee))) begin
      failures++;
      $display("FAIL counts: %0d squarings %0d multiplies", n_sq, n_mul);
    end
    checks++;
    if (cycles != (E + $countones(E'(ee)) + 3) * (N + 3)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles,
               (E + $countones(E'(ee)) + 3) * (N + 3));
    end
  endtask

  initial begin
    base = '0; exponent = '0; m = 8'd3; r2 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(7, 22, 11, 5);
    run(88, 7, 187, 11);
    run(11, 23, 187, 88);
    run(2, 5, 7, 4);
    run(100, 0, 187, 1);
    run(186, 255, 187, '1);
    for (int t = 0; t < 100; t++) begin
      big_t mm = rand_modulus(2 + (t % 7), t[0]);
      run(rand_below(mm), big_t'($urandom % 256), mm, '1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
