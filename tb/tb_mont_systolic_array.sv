// tb_mont_systolic_array: the registered array at 10 bits.
// Operands are applied and held; after N_BITS clock cycles the output must
// lie in [0, 2M) and be congruent to A*B*2^-n mod M. One cycle earlier
// (N_BITS-1 cycles) the last row must not yet be final for at least some
// operand sets, which checks the latency of one row per cycle.
module tb_mont_systolic_array;
  import tb_mont_ref_pkg::*;
  localparam int N = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] a, b, m;
  logic [N:0]   mb, r;
  int checks = 0, failures = 0, early_differs = 0;

  mont_systolic_array #(.N_BITS(N)) dut (.clk(clk), .rst(rst), .a(a), .b(b),
                                         .m(m), .mb(mb), .r_out(r));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; m = 10'd1; mb = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 300; t++) begin
      big_t mm, bb, aa, expect_v;
      logic [N:0] early;
      mm = rand_modulus(N, t[0]);
      bb = rand_below(mm);
      aa = big_t'($urandom) & ((big_t'(1) << N) - 1);
      @(negedge clk);
      a = N'(aa); b = N'(bb); m = N'(mm); mb = (N+1)'(mm + bb);
      repeat (N - 1) @(posedge clk);
      #1 early = r;
      @(posedge clk);
      #1;
      expect_v = mont_ref(aa, bb, mm, N);
      checks++;
      if (big_t'(r) >= 2 * mm || (big_t'(r) % mm) != expect_v) begin
        failures++;
        if (failures < 10)
          $display("FAIL A=%0d B=%0d M=%0d: got %0d expected %0d (mod M)",
                   aa, bb, mm, r, expect_v);
      end
      if (early != r) early_differs++;
    end
    checks++;
    if (early_differs == 0) begin
      failures++;
      $display("FAIL result was already final one cycle early in every test");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
