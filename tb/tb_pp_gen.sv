// tb_pp_gen: exhaustive check of the 8 x 8 partial-product generator: every
// row must equal a * b[i] * 2^i, and the rows must add up to a * b.
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = N'(va); b = N'(vb);
        #1;
        total = 0;
        for (int i = 0; i < N; i++) begin
          total += int'(pp[i]);
          checks++;
          if (int'(pp[i]) != va * ((vb >> i) & 1) * (1 << i)) begin
            failures++;
            $display("FAIL a=%0d b=%0d row %0d = %h", va, vb, i, pp[i]);
          end
        end
        checks++;
        if (total != va * vb) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
