// tb_dq52_approx_part: exhaustive check of the approximate part over all 128
// input patterns in both settings of apx_en. The shared full adder must give
// the count of x1..x3 in both settings; the approximate pair must match the
// reference equations when enabled and be quiet (0) when isolated.
module tb_dq52_approx_part;
  logic [4:0] x;
  logic cin1, cin2, apx_en;
  logic s1, c1, sum_a, carry_a;
  int checks = 0, failures = 0;

  dq52_approx_part dut (.x(x), .cin1(cin1), .cin2(cin2), .apx_en(apx_en),
                        .s1(s1), .c1(c1), .sum_a(sum_a), .carry_a(carry_a));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n123;
    logic es, ec;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 128; v++) begin
        apx_en = logic'(m);
        {cin2, cin1, x} = 7'(v);
        #1;
        n123 = int'(x[0]) + int'(x[1]) + int'(x[2]);
        es = apx_en && ((n123 % 2 == 1) || (x[3] != x[4]) || (cin1 != cin2));
        ec = apx_en && ((n123 >= 2) || (x[3] && x[4]) || (cin1 && cin2));
        checks++;
        if (int'(s1) + 2 * int'(c1) != n123 || sum_a != es || carry_a != ec) begin
          failures++;
          $display("FAIL en=%0d x=%b cin=%b%b: s1=%0d c1=%0d sa=%0d ca=%0d (exp sa=%0d ca=%0d)",
                   apx_en, x, cin2, cin1, s1, c1, sum_a, carry_a, es, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
