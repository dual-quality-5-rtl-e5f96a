// tb_dq_dadda_multiplier: end-to-end test of the 8 x 8 dual-quality
// multiplier at its default parameters.
//
// Every operand pair is applied in exact and in approximate mode, with the
// mode toggled on every cycle, so the mode changes at run time between
// back-to-back products. Each product is checked one cycle after its
// operands (the latency of the output register): exact products against
// a * b, approximate products against the reference model and against the
// one-sided error bound (never above a * b). The reset value is checked too.
// Counted mechanisms, each of which must occur: exact products, approximate
// products, mode switches between consecutive cycles, approximate products
// that differ from a * b, and approximate products that are still exact.
module tb_dq_dadda_multiplier;
  import dq_ref_pkg::*;
  localparam int N = 8;

  logic           clk;
  logic           rst_n = 1'b0;
  logic           exact = 1'b1;
  logic [N-1:0]   a = '0, b = '0;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_switch = 0, n_apx_err = 0, n_apx_ok = 0;
  longint cycles;

  dq_dadda_multiplier dut (.clk(clk), .rst_n(rst_n), .exact(exact), .a(a), .b(b), .p(p));

  initial clk = 1'b0;
  always #5 clk = ~clk;
  initial cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(input string what, input int n);
    checks++;
    $display("mechanism %s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    int  va, vb, prod, refp;
    logic mode, prev_mode;
    longint t0;

    // Reset clears the product register.
    a = 8'hff; b = 8'hff;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (p != '0) begin failures++; $display("FAIL reset value %h", p); end
    @(negedge clk) rst_n = 1'b1;

    prev_mode = 1'b1;
    t0 = cycles;
    for (int i = 0; i < 2 * 65536; i++) begin
      va   = (i >> 1) & 255;
      vb   = (i >> 9) & 255;
      mode = logic'(i & 1);
      a = N'(va); b = N'(vb); exact = mode;
      if (mode != prev_mode) n_switch++;
      prev_mode = mode;
      @(posedge clk);
      #1;                              // product of the edge just passed
      prod = va * vb;
      checks++;
      if (mode) begin
        n_exact++;
        if (int'(p) != prod) begin
          failures++;
          if (failures < 10) $display("FAIL exact %0d*%0d = %0d, got %0d", va, vb, prod, p);
        end
      end else begin
        n_approx++;
        refp = int'(mult(u64'(va), u64'(vb), N, 1'b0, N));
        if (int'(p) != refp || int'(p) > prod) begin
          failures++;
          if (failures < 10) $display("FAIL approx %0d*%0d: got %0d ref %0d", va, vb, p, refp);
        end
        if (int'(p) != prod) n_apx_err++;
        else                 n_apx_ok++;
      end
      @(negedge clk);
    end
    // One product per cycle, one cycle of latency.
    checks++;
    if (cycles - t0 != 2 * 65536) begin
      failures++;
      $display("FAIL throughput: %0d cycles for %0d products", cycles - t0, 2 * 65536);
    end

    mech("exact_products", n_exact);
    mech("approx_products", n_approx);
    mech("mode_switches", n_switch);
    mech("approx_products_with_error", n_apx_err);
    mech("approx_products_without_error", n_apx_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
