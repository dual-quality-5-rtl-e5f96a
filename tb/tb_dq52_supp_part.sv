// tb_dq52_supp_part: exhaustive check of the supplementary part. Enabled, it
// must satisfy s1+x4+x5+cin1+cin2 = sum + 2*(carry + cout2) with
// cout2 = [s1+x4+cin1 >= 2]; isolated, all outputs must be 0.
module tb_dq52_supp_part;
  logic s1, x4, x5, cin1, cin2, en;
  logic sum, carry, cout2;
  int checks = 0, failures = 0;

  dq52_supp_part dut (.s1(s1), .x4(x4), .x5(x5), .cin1(cin1), .cin2(cin2), .en(en),
                      .sum(sum), .carry(carry), .cout2(cout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    logic eco2;
    bit ok;
    for (int v = 0; v < 64; v++) begin
      {en, cin2, cin1, x5, x4, s1} = 6'(v);
      #1;
      tot  = int'(s1) + int'(x4) + int'(x5) + int'(cin1) + int'(cin2);
      eco2 = (int'(s1) + int'(x4) + int'(cin1)) >= 2;
      if (en) ok = (int'(sum) + 2 * (int'(carry) + int'(cout2)) == tot) && (cout2 == eco2);
      else    ok = !sum && !carry && !cout2;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL en=%0d in=%b%b%b%b%b -> sum=%0d carry=%0d cout2=%0d",
                 en, s1, x4, x5, cin1, cin2, sum, carry, cout2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
