// tb_mont_mult: the systolic Montgomery multiplier at its default 32 bits.
// Random odd moduli (full-width and short ones), b < m, any 32-bit a,
// plus corner cases a = 0, a = 2^32-1, b = m-1. Checks r = a*b*2^-32 mod m
// fully reduced, done exactly N_BITS+1 cycles after the start cycle, and
// that a start while busy is ignored.
module tb_mont_mult;
  import tb_mont_ref_pkg::*;
  localparam int N = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] a, b, m, r;
  logic [4:0]   count = 5'd31;
  logic busy, done;
  int checks = 0, failures = 0;

  mont_mult #(.N_BITS(N)) dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b),
                               .m(m), .count(count), .busy(busy), .done(done), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(big_t aa, big_t bb, big_t mm, bit poke_start);
    int cycles = 0;
    big_t e;
    @(negedge clk);
    a = N'(aa); b = N'(bb); m = N'(mm); start = 1'b1;
    @(negedge clk);
    start = poke_start;          // a second start while busy must be ignored
    a = ~a;
    cycles = 0;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    e = mont_ref(aa, bb, mm, N);
    checks++;
    if (big_t'(r) != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h m=%h: got %h expected %h", aa, bb, mm, r, e);
    end
    checks++;
    if (cycles != N + 1) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, N + 1);
    end
  endtask

  initial begin
    a = '0; b = '0; m = 32'd3;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(0, 5, 7, 0);
    run(64'hFFFF_FFFF, 32'hFFFF_FFFE, 32'hFFFF_FFFF, 0);
    run(12345, 186, 187, 1);
    for (int t = 0; t < 300; t++) begin
      big_t mm = rand_modulus((t % 3 == 0) ? 1 + 2 + (t % 29) : N, t[1]);
      run(big_t'($urandom), rand_below(mm), mm, t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
