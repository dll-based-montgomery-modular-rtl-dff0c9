// tb_dll_ha -- exhaustive self-check of the XOR/AND cell.
// Applies all four input pairs and compares s and co with the sum and carry
// of the two bits computed as an integer addition.
module tb_dll_ha;
  logic x, y, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dll_ha dut (.x(x), .y(y), .s(s), .co(co));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {x, y} = 2'(v);
      @(posedge clk);
      total = int'(x) + int'(y);
      checks++;
      if ({co, s} != 2'(total)) begin
        failures++;
        $display("FAIL x=%0d y=%0d got co=%0d s=%0d", x, y, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
