// tb_final_adder: random and corner-case check of the 16-bit final adder
// against integer addition modulo 2^16.
module tb_final_adder;
  localparam int W = 16;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.x(x), .y(y), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int vx, input int vy);
    x = W'(vx); y = W'(vy);
    #1;
    checks++;
    if (int'(s) != (vx + vy) % 65536) begin
      failures++;
      $display("FAIL %0d + %0d = %0d", vx, vy, s);
    end
  endtask

  initial begin
    check(0, 0);
    check(65535, 1);
    check(65535, 65535);
    check(32768, 32768);
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(65535)), int'($urandom_range(65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
