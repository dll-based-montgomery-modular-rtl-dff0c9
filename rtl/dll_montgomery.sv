// dll_montgomery -- Montgomery modular multiplier built on the dual-logic-level
// (DLL) multiplier.
//
// Computes result = A * B * R^-1 mod N for an odd K-bit modulus N, with
// R = 2^K. Montgomery's method replaces the division by N with a quotient
// that depends only on the least significant digit of the running value; here
// the digit is a whole K-bit word, so the reduction is:
//   T = A * B                       (2K bits)
//   Q = (T mod R) * N' mod R        (N' = -N^-1 mod R, supplied by the user)
//   U = (T + Q * N) / R             (exact: the low K bits of T + Q*N are 0)
//   result = U >= N ? U - N : U
// All three products are formed by one K x K dll_mult, which the controller
// hands from step to step through an operand multiplexer. The additions and
// the final subtraction are ordinary adders.
//
// Interface: on a clock edge with start high and busy low, a, b, n and n_prime
// are captured. Requirements: n odd, a < n, b < n, n_prime * n = -1 mod 2^K.
// busy is high while the operation runs; done pulses high for one cycle with
// the result, which is held until the next operation finishes. start is
// ignored while busy.
// Timing: done is high 4 cycles after the edge that captured start (one cycle
// per product and one for the correction); a new start is accepted on the
// following cycle, so one multiplication every 5 cycles. Each cycle holds one
// pass through the combinational multiplier.
// Reset: asynchronous, active low; clears the controller and the result.
//
// The formula A*B*R^-1 mod N with R = 2^K, and K = 32 from the 32-bit DLL
// multiplier, follow the document. The word-level reduction, the shared
// multiplier, the externally supplied N', the handshake and the timing are
// this design's choices.
module dll_montgomery
  import dll_mm_pkg::*;
#(
  parameter int unsigned K = MM_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] n,
  input  logic [K-1:0] n_prime,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] result
);
  mm_state_e state;

  logic [K-1:0]   a_r, b_r, n_r, np_r;
  logic [2*K-1:0] t_r;      // A * B
  logic [K-1:0]   q_r;      // Montgomery quotient
  logic [K:0]     u_r;      // (T + Q*N) / R, below 2N

  // Shared multiplier and its operand multiplexer.
  logic [K-1:0]   mul_x, mul_y;
  logic [2*K-1:0] mul_p;
  logic           mul_cout;

  always_comb begin
    unique case (state)
      ST_MUL_Q:  begin mul_x = t_r[K-1:0]; mul_y = np_r; end
      ST_MUL_QN: begin mul_x = q_r;        mul_y = n_r;  end
      default:   begin mul_x = a_r;        mul_y = b_r;  end
    endcase
  end

  dll_mult #(.W(K)) u_mult (
    .a   (mul_x),
    .b   (mul_y),
    .c   (mul_p),
    .cout(mul_cout)
  );

  // T + Q*N; its low K bits are zero when n_prime is right.
  logic [2*K:0] t_plus_qn;
  assign t_plus_qn = {1'b0, t_r} + {1'b0, mul_p};

  // Final correction.
  // When U >= N, U - N < N fits in K bits, so the subtraction is done modulo
  // 2^K.
  logic [K-1:0] u_minus_n;
  logic         u_ge_n;
  assign u_minus_n = u_r[K-1:0] - n_r;
  assign u_ge_n    = (u_r >= {1'b0, n_r});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      a_r    <= '0;
      b_r    <= '0;
      n_r    <= '0;
      np_r   <= '0;
      t_r    <= '0;
      q_r    <= '0;
      u_r    <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            a_r   <= a;
            b_r   <= b;
            n_r   <= n;
            np_r  <= n_prime;
            state <= ST_MUL_AB;
          end
        end
        ST_MUL_AB: begin
          t_r   <= mul_p;
          state <= ST_MUL_Q;
        end
        ST_MUL_Q: begin
          q_r   <= mul_p[K-1:0];
          state <= ST_MUL_QN;
        end
        ST_MUL_QN: begin
          u_r   <= t_plus_qn[2*K:K];
          state <= ST_CORRECT;
        end
        ST_CORRECT: begin
          result <= u_ge_n ? u_minus_n : u_r[K-1:0];
          done   <= 1'b1;
          state  <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);

  // The multiplier never carries out of its 2K product bits.
  a_mult_no_cout: assert property (@(posedge clk) disable iff (!rst_n)
    !mul_cout);
  // Exactness of the division by R: holds when n_prime = -n^-1 mod 2^K.
  a_exact_div: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_MUL_QN |-> t_plus_qn[K-1:0] == '0);
  // The result is fully reduced (a, b < n).
  a_reduced: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> result < n_r);
endmodule
