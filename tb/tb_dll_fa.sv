// tb_dll_fa -- exhaustive self-check of the three-input adder cell.
// Applies all eight input combinations and compares {co, s} with the integer
// sum of the three bits.
module tb_dll_fa;
  logic x, y, z, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dll_fa dut (.x(x), .y(y), .z(z), .s(s), .co(co));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {x, y, z} = 3'(v);
      @(posedge clk);
      total = int'(x) + int'(y) + int'(z);
      checks++;
      if ({co, s} != 2'(total)) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%0d got co=%0d s=%0d", x, y, z, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
