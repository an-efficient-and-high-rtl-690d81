// tb_mont_iterative: the bit-serial Montgomery multiplier at 16 bits.
// Random odd moduli, B < M, any A; checks R < 2M, R = A*B*2^-16 mod M
// after reduction, and that done rises 3*N_BITS+1 cycles after start.
module tb_mont_iterative;
  import tb_mont_ref_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] A, B, M;
  logic [N:0]   R;
  logic done;
  int checks = 0, failures = 0;

  mont_iterative #(.N_BITS(N)) dut (.clk(clk), .rst(rst), .start(start), .A(A), .B(B),
                                    .M(M), .done(done), .R(R));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(big_t aa, big_t bb, big_t mm);
    int cycles;
    big_t e;
    @(negedge clk);
    A = N'(aa); B = N'(bb); M = N'(mm);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (done) begin     // leaving the stop state of the previous run
      @(negedge clk);
      cycles++;
    end
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    e = mont_ref(aa, bb, mm, N);
    checks++;
    if (big_t'(R) >= 2 * mm || big_t'(R) % mm != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL A=%0d B=%0d M=%0d: got %0d expected %0d (mod M)", aa, bb, mm, R, e);
    end
    checks++;
    if (cycles != 3 * N + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, 3 * N + 1);
    end
  endtask

  initial begin
    A = '0; B = '0; M = 16'd3;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(0, 5, 7);
    run(65535, 65520, 65521);
    for (int t = 0; t < 300; t++) begin
      big_t mm = rand_modulus(2 + (t % 15), t[0]);
      run(big_t'($urandom % 65536), rand_below(mm), mm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
