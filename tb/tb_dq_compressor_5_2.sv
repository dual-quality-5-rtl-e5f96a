// tb_dq_compressor_5_2: exhaustive check of the dual-quality 5:2 compressor
// in both modes (2 x 128 patterns) against the column model of dq_ref_pkg,
// plus the conservation law x1+..+x5+cin1+cin2 = sum + 2*(carry+cout1+cout2)
// in exact mode and the one-sided error (never above the true count, no
// output carries) in approximate mode. It also replays one known vector:
// approximate mode, x = 1,0,1,0,0, cin1 = 1, cin2 = 0 gives sum = 1,
// carry = 1, cout1 = cout2 = 0.
module tb_dq_compressor_5_2;
  import dq_ref_pkg::*;
  logic [4:0] x;
  logic cin1, cin2, exact;
  logic sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  dq_compressor_5_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .exact(exact),
                         .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec, eo1, eo2;
    int tot, val;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 128; v++) begin
        exact = logic'(m);
        {cin2, cin1, x} = 7'(v);
        #1;
        comp(x, cin1, cin2, exact, es, ec, eo1, eo2);
        tot = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(x[4])
            + int'(cin1) + int'(cin2);
        val = int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2));
        checks++;
        if ({sum, carry, cout1, cout2} != {es, ec, eo1, eo2}) begin
          failures++;
          $display("FAIL exact=%0d x=%b cin=%b%b: got %b%b%b%b exp %b%b%b%b", exact, x,
                   cin2, cin1, sum, carry, cout1, cout2, es, ec, eo1, eo2);
        end
        checks++;
        if (exact ? (val != tot) : (val > tot || cout1 || cout2)) begin
          failures++;
          $display("FAIL value exact=%0d x=%b cin=%b%b: %0d vs count %0d", exact, x,
                   cin2, cin1, val, tot);
        end
      end
    end
    exact = 0; x = 5'b00101; cin1 = 1; cin2 = 0;
    #1;
    checks++;
    if ({sum, carry, cout1, cout2} != 4'b1100) begin
      failures++;
      $display("FAIL known vector: %b%b%b%b", sum, carry, cout1, cout2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
