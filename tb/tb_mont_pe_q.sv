// tb_mont_pe_q: exhaustive check of the quotient processing element.
// For every a, b0, m0 = 1, r0 and both consistent values of mb0
// (mb0 = b0 xor m0 as the low bit of M+B) it checks that q makes
// r0 + a*b0 + q*m0 even and that the carry is (r0 + x0) / 2. It also sweeps
// all 32 raw input combinations for the quotient rule q = r0 xor (a and b0).
module tb_mont_pe_q;
  logic a, b0, m0, mb0, r0, q, c;
  int checks = 0, failures = 0;

  mont_pe_q dut (.a_i(a), .b_0(b0), .m_0(m0), .mb_0(mb0), .r_0(r0),
                 .q_i(q), .c_out(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int low_sum, x0;
      {a, b0, r0} = 3'(v);
      m0  = 1'b1;
      mb0 = b0 ^ m0;
      #1;
      // full integer sum of the low column with the chosen addend
      x0 = (a && q) ? int'(mb0) : a ? int'(b0) : q ? int'(m0) : 0;
      low_sum = int'(r0) + int'(a & b0) + int'(q & m0);
      checks++;
      if (low_sum % 2 != 0) begin
        failures++;
        $display("FAIL a=%b b0=%b r0=%b: q=%b leaves the sum odd", a, b0, r0, q);
      end
      checks++;
      if (int'(c) != (int'(r0) + x0) / 2) begin
        failures++;
        $display("FAIL a=%b b0=%b r0=%b: carry %b", a, b0, r0, c);
      end
    end
    for (int v = 0; v < 32; v++) begin
      {a, b0, m0, mb0, r0} = 5'(v);
      #1;
      checks++;
      if (q != (r0 ^ (a & b0))) begin
        failures++;
        $display("FAIL raw %b: q=%b", 5'(v), q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
