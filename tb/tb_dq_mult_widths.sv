// tb_dq_mult_widths: the multiplier at the wider operand sizes, 16 x 16 and
// 32 x 32, in both accuracy modes. Random operands (plus all-ones corner
// cases) are applied every cycle with the mode alternating; each product is
// checked one cycle later: exact products against a * b, approximate
// products against the reference model and the bound p <= a * b. The mean
// relative error of the approximate products is printed for each size.
module tb_dq_mult_widths;
  import dq_ref_pkg::*;
  localparam int NV = 3000;

  logic clk;
  logic rst_n = 1'b0;
  logic exact = 1'b1;
  logic [15:0] a16 = '0, b16 = '0;
  logic [31:0] a32 = '0, b32 = '0;
  logic [31:0] p16;
  logic [63:0] p32;
  int checks = 0, failures = 0;

  dq_dadda_multiplier #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .exact(exact),
                                       .a(a16), .b(b16), .p(p16));
  dq_dadda_multiplier #(.N(32)) dut32 (.clk(clk), .rst_n(rst_n), .exact(exact),
                                       .a(a32), .b(b32), .p(p32));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20 * NV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input u64 va, input u64 vb, input logic ex,
                       input u64 got, inout real rel_sum, inout int n_apx);
    u64 prod, refp;
    prod = va * vb;
    checks++;
    if (ex) begin
      if (got != prod) begin
        failures++;
        $display("FAIL N=%0d exact %h*%h got %h", n, va, vb, got);
      end
    end else begin
      refp = mult(va, vb, n, 1'b0, n);
      if (got != refp || got > prod) begin
        failures++;
        $display("FAIL N=%0d approx %h*%h got %h ref %h", n, va, vb, got, refp);
      end
      if (prod != 0) begin
        rel_sum += real'(prod - got) / real'(prod);
        n_apx++;
      end
    end
  endtask

  initial begin
    real rel16, rel32;
    int  n16, n32;
    u64  x16, y16, x32, y32;
    rel16 = 0.0; rel32 = 0.0; n16 = 0; n32 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NV; i++) begin
      x16 = (i < 2) ? 64'hffff : u64'($urandom_range(65535));
      y16 = (i < 2) ? 64'hffff : u64'($urandom_range(65535));
      x32 = (i < 2) ? 64'hffff_ffff : u64'($urandom);
      y32 = (i < 2) ? 64'hffff_ffff : u64'($urandom);
      a16 = x16[15:0]; b16 = y16[15:0];
      a32 = x32[31:0]; b32 = y32[31:0];
      exact = logic'(i & 1);
      @(posedge clk);
      #1;
      check(16, x16, y16, exact, u64'(p16), rel16, n16);
      check(32, x32, y32, exact, p32, rel32, n32);
      @(negedge clk);
    end
    $display("16x16 approximate mode: mean relative error %f over %0d products",
             rel16 / real'(n16), n16);
    $display("32x32 approximate mode: mean relative error %e over %0d products",
             rel32 / real'(n32), n32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
