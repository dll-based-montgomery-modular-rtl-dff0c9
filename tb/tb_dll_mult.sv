// tb_dll_mult -- self-check of the dual-logic-level multiplier at the three
// sizes it is described at: 2 x 2, 3 x 3 and 4 x 4 (checked exhaustively) and
// 32 x 32 (corner cases plus 20000 random pairs). Every product is compared
// with the simulator's own multiplication, and cout must stay 0.
module tb_dll_mult;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  a2, b2;
  logic [3:0]  c2;
  logic        co2;
  logic [2:0]  a3, b3;
  logic [5:0]  c3;
  logic        co3;
  logic [3:0]  a4, b4;
  logic [7:0]  c4;
  logic        co4;
  logic [31:0] a32, b32;
  logic [63:0] c32;
  logic        co32;

  dll_mult #(.W(2)) dut2  (.a(a2),  .b(b2),  .c(c2),  .cout(co2));
  dll_mult #(.W(3)) dut3  (.a(a3),  .b(b3),  .c(c3),  .cout(co3));
  dll_mult #(.W(4)) dut4  (.a(a4),  .b(b4),  .c(c4),  .cout(co4));
  dll_mult          dut32 (.a(a32), .b(b32), .c(c32), .cout(co32));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] expect_p;
    a32 = x;
    b32 = y;
    #1;
    expect_p = 64'(x) * 64'(y);
    checks++;
    if (c32 !== expect_p || co32 !== 1'b0) begin
      failures++;
      if (failures < 10)
        $display("FAIL 32: %h * %h got %h cout=%0d expected %h", x, y, c32, co32, expect_p);
    end
  endtask

  initial begin
    a2 = '0; b2 = '0; a3 = '0; b3 = '0; a4 = '0; b4 = '0; a32 = '0; b32 = '0;
    @(posedge clk);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j);
        #1;
        checks++;
        if (c2 !== 4'(i * j) || co2 !== 1'b0) begin
          failures++;
          $display("FAIL 2: %0d * %0d got %0d cout=%0d", i, j, c2, co2);
        end
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        checks++;
        if (c3 !== 6'(i * j) || co3 !== 1'b0) begin
          failures++;
          $display("FAIL 3: %0d * %0d got %0d cout=%0d", i, j, c3, co3);
        end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (c4 !== 8'(i * j) || co4 !== 1'b0) begin
          failures++;
          $display("FAIL 4: %0d * %0d got %0d cout=%0d", i, j, c4, co4);
        end
      end
    check32(32'h0, 32'h0);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'hFFFF_FFFF, 32'h1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'hAAAA_AAAA, 32'h5555_5555);
    for (int k = 0; k < 32; k++) begin
      check32(32'h1 << k, 32'hFFFF_FFFF);
      check32(32'hFFFF_FFFF, 32'h1 << k);
    end
    for (int k = 0; k < 20000; k++) begin
      @(posedge clk);
      check32($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
