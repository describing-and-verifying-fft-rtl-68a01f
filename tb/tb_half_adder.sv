// tb_half_adder: exhaustive check of the half adder against integer addition
// of the two input bits (sum = low bit, carry = high bit).
module tb_half_adder;
  logic x, y, sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  half_adder dut (.x(x), .y(y), .sum(sum), .carry(carry));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int s;
      x = i[0];
      y = i[1];
      @(posedge clk);
      s = int'(x) + int'(y);
      checks++;
      if ({carry, sum} != 2'(s)) begin
        failures++;
        $display("FAIL x=%b y=%b got carry=%b sum=%b", x, y, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
