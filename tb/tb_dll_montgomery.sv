// tb_dll_montgomery -- end-to-end self-check of the Montgomery multiplier at
// its default width (K = 32).
//
// For each operation the testbench picks an odd modulus N, operands A, B < N,
// and works out N' = -N^-1 mod 2^K itself by Newton iteration. The result is
// checked twice, independently of the design's word-level reduction:
//   * against a bit-serial (radix-2) Montgomery reference, one shift-and-add
//     step per bit of A, and
//   * by the defining identity result * 2^K = A * B (mod N), result < N.
// The latency from the capturing edge to done must be 4 cycles, busy must be
// high meanwhile, and a start pulse given while busy (with other operands)
// must be ignored. The testbench counts how often the final correction
// (U >= N) was and was not needed, how often a start was ignored, and how
// many operations ran back to back; each must happen at least once.
module tb_dll_montgomery;
  import dll_mm_pkg::*;
  localparam int unsigned K = MM_K;
  localparam int unsigned LATENCY = 4;
  localparam int NUM_OPS = 4000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [K-1:0] a, b, n, n_prime;
  logic         busy, done;
  logic [K-1:0] result;

  int checks = 0, failures = 0;
  int n_corr_taken = 0, n_corr_skipped = 0, n_ignored = 0, n_back_to_back = 0;

  always #5 clk = ~clk;

  dll_montgomery dut (
    .clk, .rst_n, .start, .a, .b, .n, .n_prime, .busy, .done, .result
  );

  initial begin
    repeat (NUM_OPS * 12 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Whether the word-level reduction U = (A*B + Q*N) / 2^K of these operands
  // lands at or above N, so that the final correction is needed. Used only to
  // count how often each branch of the correction is exercised.
  function automatic bit needs_correction(input logic [K-1:0] x,
                                          input logic [K-1:0] y,
                                          input logic [K-1:0] m,
                                          input logic [K-1:0] mp);
    logic [2*K-1:0] t_full;
    logic [K-1:0]   q;
    logic [2*K:0]   s;
    t_full = (2*K)'(x) * (2*K)'(y);
    q = K'(t_full[K-1:0] * mp);
    s = (2*K+1)'(t_full) + (2*K+1)'(q) * (2*K+1)'(m);
    return (s >> K) >= (2*K+1)'(m);
  endfunction

  function automatic logic [K-1:0] neg_inverse(input logic [K-1:0] m);
    logic [K-1:0] x;
    x = m;                         // m*m = 1 mod 8 for odd m
    for (int i = 0; i < 6; i++)
      x = x * (K'(2) - m * x);     // doubles the correct low bits
    return -x;
  endfunction

  function automatic logic [K-1:0] ref_serial(input logic [K-1:0] x,
                                              input logic [K-1:0] y,
                                              input logic [K-1:0] m);
    logic [K+1:0] s;
    s = '0;
    for (int i = 0; i < K; i++) begin
      if (x[i]) s = s + (K+2)'(y);
      if (s[0]) s = s + (K+2)'(m);
      s = s >> 1;
    end
    if (s >= (K+2)'(m)) s = s - (K+2)'(m);
    return s[K-1:0];
  endfunction

  function automatic logic [K-1:0] rand_below(input logic [K-1:0] m);
    logic [63:0] r;
    r = {$urandom, $urandom};
    return K'(r % 64'(m));
  endfunction

  task automatic check_result(input logic [K-1:0] x, input logic [K-1:0] y,
                              input logic [K-1:0] m);
    logic [K-1:0] expect_r;
    logic [4*K-1:0] lhs, rhs;
    expect_r = ref_serial(x, y, m);
    checks++;
    if (result !== expect_r) begin
      failures++;
      if (failures < 10)
        $display("FAIL A=%h B=%h N=%h got %h expected %h", x, y, m, result, expect_r);
    end
    lhs = ({(3*K)'(0), result} << K) % (4*K)'(m);
    rhs = ((4*K)'(x) * (4*K)'(y)) % (4*K)'(m);
    checks++;
    if (lhs !== rhs || result >= m) begin
      failures++;
      if (failures < 10)
        $display("FAIL identity A=%h B=%h N=%h result=%h", x, y, m, result);
    end
  endtask

  // One operation: start on a negative edge, wait for done, check latency,
  // busy and the result. With disturb set, a start with other operands is
  // given while busy.
  task automatic run_op(input logic [K-1:0] x, input logic [K-1:0] y,
                        input logic [K-1:0] m, input bit disturb);
    int cycles;
    a = x; b = y; n = m; n_prime = neg_inverse(m);
    checks++;
    if (K'(m * n_prime) !== '1) begin
      failures++;
      $display("FAIL testbench N' for N=%h", m);
    end
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during operation");
      end
      if (disturb && cycles == 1) begin
        start = 1'b1;
        a = ~x; b = ~y; n = m ^ K'(2);
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(posedge clk);
      #1;
      cycles++;
      if (cycles > 20) break;
    end
    start = 1'b0;
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, LATENCY);
    end
    check_result(x, y, m);
    if (needs_correction(x, y, m, neg_inverse(m))) n_corr_taken++;
    else                                           n_corr_skipped++;
  endtask

  initial begin
    logic [K-1:0] m;
    start = 1'b0; a = '0; b = '0; n = 'd3; n_prime = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    checks++;
    if (busy || done || result != '0) begin
      failures++;
      $display("FAIL reset state");
    end
    @(posedge clk);
    #1;

    // Corner moduli and operands.
    run_op('0, '0, 'd3, 1'b0);
    run_op('d2, 'd2, 'd3, 1'b0);
    run_op('d1, 'd1, 'd3, 1'b1);
    run_op('1 - K'(1), '1 - K'(1), '1, 1'b0);
    run_op('1 - K'(1), 'd1, '1, 1'b0);
    run_op('d12345, 'd67890, 'd1000003, 1'b0);

    for (int i = 0; i < NUM_OPS; i++) begin
      unique case (i % 3)
        0: m = {1'b1, K'($urandom) >> 1} | K'(1);        // full K-bit modulus
        1: m = K'($urandom) | K'(1);                     // any width
        default: m = (K'($urandom) >> ($urandom % K)) | K'(1);
      endcase
      if (m == K'(1)) m = K'(3);
      // Back to back: the next start follows the done cycle directly.
      if (i % 2 == 0) n_back_to_back++;
      else begin
        @(posedge clk);
        #1;
      end
      run_op(rand_below(m), rand_below(m), m, (i % 7) == 0);
    end

    $display("correction taken=%0d skipped=%0d start ignored=%0d back-to-back=%0d",
             n_corr_taken, n_corr_skipped, n_ignored, n_back_to_back);
    checks++;
    if (n_corr_taken == 0 || n_corr_skipped == 0 || n_ignored == 0 || n_back_to_back == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
