// tb_workload_operand_sizes: the modular multiplier at the three operand
// sizes evaluated for it, 8, 16 and 32 bits, each run on its own
// example operand set and on random operands:
//   8 bits : X=5,  Y=3,  N=5   (X*Y mod N = 0; X may equal N, only Y must be below it)
//   16 bits: X=11, Y=7,  N=13  (= 12)
//   32 bits: X=11, Y=17, N=19  (= 16)
// Results are checked against reference arithmetic and the latency of
// 2*N_BITS+6 cycles is checked at each size.
module tb_workload_operand_sizes;
  import tb_mont_ref_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instance per size, driven from generic signals
  logic        start8 = 0, start16 = 0, start32 = 0;
  logic [31:0] X, Y, Nm, C;
  logic [7:0]  res8;
  logic [15:0] res16;
  logic [31:0] res32;
  logic        st8, st16, st32;

  mont_modmul #(.N_BITS(8))  u8  (.clk(clk), .reset(reset), .start(start8),  .X(X[7:0]),
    .Y(Y[7:0]), .N(Nm[7:0]), .constant(C[7:0]), .count(3'd7), .Result(res8), .state(st8));
  mont_modmul #(.N_BITS(16)) u16 (.clk(clk), .reset(reset), .start(start16), .X(X[15:0]),
    .Y(Y[15:0]), .N(Nm[15:0]), .constant(C[15:0]), .count(4'd15), .Result(res16), .state(st16));
  mont_modmul #(.N_BITS(32)) u32 (.clk(clk), .reset(reset), .start(start32), .X(X),
    .Y(Y), .N(Nm), .constant(C), .count(5'd31), .Result(res32), .state(st32));

  task automatic run(int n, big_t xx, big_t yy, big_t nn);
    int cycles = 0;
    big_t got, e = mod_mul(xx, yy, nn);
    @(negedge clk);
    X = 32'(xx); Y = 32'(yy); Nm = 32'(nn); C = 32'(r2_ref(nn, n));
    start8 = (n == 8); start16 = (n == 16); start32 = (n == 32);
    @(negedge clk);
    start8 = 0; start16 = 0; start32 = 0;
    forever begin
      if ((n == 8 && st8) || (n == 16 && st16) || (n == 32 && st32)) break;
      @(negedge clk);
      cycles++;
    end
    got = (n == 8) ? big_t'(res8) : (n == 16) ? big_t'(res16) : big_t'(res32);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL %0d-bit %0d*%0d mod %0d: got %0d expected %0d", n, xx, yy, nn, got, e);
    end
    checks++;
    if (cycles != 2 * n + 6) begin
      failures++;
      $display("FAIL %0d-bit latency %0d", n, cycles);
    end
  endtask

  initial begin
    X = '0; Y = '0; Nm = 32'd3; C = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    run(8, 5, 3, 5);
    run(16, 11, 7, 13);
    run(32, 11, 17, 19);
    for (int t = 0; t < 100; t++) begin
      int n = (t % 3 == 0) ? 8 : (t % 3 == 1) ? 16 : 32;
      big_t nn = rand_modulus(n, 1);
      run(n, big_t'($urandom) & ((big_t'(1) << n) - 1), rand_below(nn), nn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
