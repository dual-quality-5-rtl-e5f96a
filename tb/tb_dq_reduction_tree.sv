// tb_dq_reduction_tree: exhaustive 8 x 8 check of the reduction tree. The
// partial products are formed in the testbench; in exact mode the two output
// rows must add to a * b, in approximate mode their sum must match the
// reference multiplier model and never exceed a * b.
module tb_dq_reduction_tree;
  import dq_ref_pkg::*;
  localparam int N = 8;
  logic [2*N-1:0] pp [N];
  logic           exact;
  logic [2*N-1:0] row_a, row_b;
  int checks = 0, failures = 0;

  dq_reduction_tree #(.N(N), .APPROX_COLS(N)) dut (
    .pp(pp), .exact(exact), .row_a(row_a), .row_b(row_b));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, prod;
    for (int m = 0; m < 2; m++) begin
      for (int va = 0; va < 256; va++) begin
        for (int vb = 0; vb < 256; vb++) begin
          exact = logic'(m);
          for (int i = 0; i < N; i++) pp[i] = (((vb >> i) & 1) != 0) ? (2*N)'(va << i) : '0;
          #1;
          got  = (int'(row_a) + int'(row_b)) % 65536;
          prod = va * vb;
          checks++;
          if (exact ? (got != prod)
                    : (u64'(got) != mult(u64'(va), u64'(vb), N, 1'b0, N) || got > prod)) begin
            failures++;
            if (failures < 10) $display("FAIL exact=%0d %0d*%0d -> %0d", exact, va, vb, got);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
