// tb_mont_pe: exhaustive check of the general processing element.
// All 128 combinations of a, q, b, m, mb, r_in, c_in are applied and the
// outputs compared with r_in + x + c_in computed as an integer, where x is
// the addend bit named by the {a, q} table (00:0, 01:m, 10:b, 11:mb).
module tb_mont_pe;
  logic a, q, b, m, mb, r_in, c_in, r_out, c_out;
  int checks = 0, failures = 0;

  mont_pe dut (
    .a_i(a), .q_i(q), .b_j(b), .m_j(m), .mb_j(mb),
    .r_in(r_in), .c_in(c_in), .r_out(r_out), .c_out(c_out)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int x, s;
      {a, q, b, m, mb, r_in, c_in} = 7'(v);
      #1;
      case ({a, q})
        2'b00: x = 0;
        2'b01: x = int'(m);
        2'b10: x = int'(b);
        default: x = int'(mb);
      endcase
      s = int'(r_in) + x + int'(c_in);
      checks++;
      if ({c_out, r_out} != 2'(s)) begin
        failures++;
        $display("FAIL v=%b: got c=%b s=%b expected %0d", 7'(v), c_out, r_out, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
