// tb_mont_row: one Montgomery iteration of the row, at 12 bits.
// Random odd moduli M, multiplicands B < M, partial results R < 2M and
// multiplier bits a; the expected row result is (R + a*B + q*M) / 2 with
// q = (R + a*B) mod 2, computed with integer arithmetic.
module tb_mont_row;
  localparam int N = 12;
  logic          a;
  logic [N-1:0]  b, m;
  logic [N:0]    mb, r_in, r_out;
  logic          q;
  int checks = 0, failures = 0;

  mont_row #(.N_BITS(N)) dut (.a_i(a), .b(b), .m(m), .mb(mb),
                              .r_in(r_in), .r_out(r_out), .q_i(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint mm, bb, rr, sum, qq;
      mm = longint'($urandom_range((1 << N) - 1, 3)) | 1;
      bb = longint'($urandom) % mm;
      rr = longint'($urandom) % (2 * mm);
      if (t < 4) rr = (t[0]) ? 2 * mm - 1 : 0;   // range ends
      a    = 1'($urandom);
      m    = N'(mm);
      b    = N'(bb);
      mb   = (N+1)'(mm + bb);
      r_in = (N+1)'(rr);
      #1;
      sum = rr + (a ? bb : 0);
      qq  = sum % 2;
      sum = (sum + qq * mm) / 2;
      checks++;
      if (longint'(r_out) != sum || longint'(q) != qq) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=%0d B=%0d R=%0d a=%b: got %0d q=%b expected %0d q=%0d",
                   mm, bb, rr, a, r_out, q, sum, qq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
