// tb_dq_image_mult: image multiplication on the 8 x 8 multiplier. Two
// synthetic 8-bit grey-scale images of 128 x 128 pixels are generated (a
// diagonal gradient and a smooth ring pattern) and multiplied pixel by
// pixel; the result pixel is the upper byte of the 16-bit product. The image
// is computed once in exact mode, which must equal the integer result, and
// once in approximate mode, which must match the reference model pixel by
// pixel. The PSNR of the approximate image against the exact one and the
// number of changed pixels are printed.
module tb_dq_image_mult;
  import dq_ref_pkg::*;
  localparam int DIM = 128;

  logic        clk;
  logic        rst_n = 1'b0;
  logic        exact = 1'b1;
  logic [7:0]  a = '0, b = '0;
  logic [15:0] p;
  int checks = 0, failures = 0;

  dq_dadda_multiplier dut (.clk(clk), .rst_n(rst_n), .exact(exact), .a(a), .b(b), .p(p));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (3 * DIM * DIM) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pix1(int x, int y);
    return ((x + y) * 255) / (2 * DIM - 2);
  endfunction

  function automatic int pix2(int x, int y);
    int dx = x - DIM / 2, dy = y - DIM / 2;
    int r2 = dx * dx + dy * dy;
    return 128 + ((r2 % 512) < 256 ? (r2 % 256) / 2 : 127 - (r2 % 256) / 2);
  endfunction

  initial begin
    int  img_ex [DIM*DIM];
    int  img_ap [DIM*DIM];
    int  v1, v2, changed;
    real mse, psnr;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int m = 1; m >= 0; m--) begin
      exact = logic'(m);
      for (int k = 0; k < DIM * DIM; k++) begin
        v1 = pix1(k % DIM, k / DIM);
        v2 = pix2(k % DIM, k / DIM);
        a = 8'(v1); b = 8'(v2);
        @(posedge clk);
        #1;
        checks++;
        if (m == 1) begin
          img_ex[k] = int'(p[15:8]);
          if (int'(p) != v1 * v2) failures++;
        end else begin
          img_ap[k] = int'(p[15:8]);
          if (u64'(p) != mult(u64'(v1), u64'(v2), 8, 1'b0, 8)) failures++;
        end
        @(negedge clk);
      end
    end
    mse = 0.0; changed = 0;
    for (int k = 0; k < DIM * DIM; k++) begin
      mse += real'((img_ex[k] - img_ap[k]) * (img_ex[k] - img_ap[k]));
      if (img_ex[k] != img_ap[k]) changed++;
    end
    mse = mse / real'(DIM * DIM);
    psnr = (mse > 0.0) ? 10.0 * $log10(255.0 * 255.0 / mse) : 99.0;
    $display("image multiplication %0dx%0d: %0d of %0d pixels changed, PSNR %f dB",
             DIM, DIM, changed, DIM * DIM, psnr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
