// tb_comp52_row: random check of one 16-column row of dual-quality 5:2
// compressors (approximate columns 0-7). Exact mode: sum_row + carry_row
// must equal the sum of the five rows modulo 2^16. Approximate mode: the
// outputs must match the column model of dq_ref_pkg, and the upper eight
// columns must still be exact. Also counts the cases where a carry crossed
// columns (exact sum differs from the column-local model).
module tb_comp52_row;
  import dq_ref_pkg::*;
  localparam int W = 16, AC = 8;
  logic [W-1:0] rows [5];
  logic         exact;
  logic [W-1:0] sum_row, carry_row;
  int checks = 0, failures = 0;

  comp52_row #(.W(W), .APPROX_COLS(AC)) dut (
    .rows(rows), .exact(exact), .sum_row(sum_row), .carry_row(carry_row));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 r [5];
    u64 es, ec, tot;
    for (int i = 0; i < 4000; i++) begin
      exact = logic'(i % 2);
      tot = '0;
      for (int k = 0; k < 5; k++) begin
        rows[k] = (i < 8) ? '1 : W'($urandom);
        r[k] = u64'(rows[k]);
        tot += r[k];
      end
      #1;
      row(r, W, exact, AC, es, ec);
      checks++;
      if (u64'(sum_row) != es || u64'(carry_row) != ec) begin
        failures++;
        $display("FAIL exact=%0d: sum %h carry %h exp %h %h", exact, sum_row, carry_row, es, ec);
      end
      if (exact) begin
        checks++;
        if (((u64'(sum_row) + u64'(carry_row)) & wmask(W)) != (tot & wmask(W))) begin
          failures++;
          $display("FAIL exact sum law");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
