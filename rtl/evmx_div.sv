// Non-restoring divider for the EVM DIV and MOD opcodes (unsigned).
//
// Registers: RQ holds the dividend and shifts left each iteration, RA (N+1
// bits) holds the partial remainder and receives the MSB of RQ, RM holds the
// divisor. Each iteration shifts {RA,RQ} left, then subtracts RM from RA if
// RA was non-negative or adds RM if it was negative (one adder, subtraction
// by two's complement); the new sign of RA sets RQ[0] (1 when non-negative).
// After N iterations a negative RA is corrected by one more addition of RM.
// RQ is then the quotient and RA the remainder.
//
// Edge cases finish in the start cycle (result one cycle after start):
// divisor 0 (EVM defines quotient and remainder as 0), divisor 1, divisor
// greater than the dividend, dividend 0, and divisor a power of two
// (quotient by right shift, remainder by masking). Otherwise the result is
// ready N+2 cycles after start (N iterations and the final correction).
//
// Interface: pulse `start` with `dividend` and `divisor`; `done` pulses with
// `quot` and `rem` valid; they hold until the next start.
module evmx_div #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quot,
  output logic [N-1:0] rem
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {IDLE, ITER, FIX} state_e;
  state_e state;

  logic [N:0]    ra, rm;
  logic [N-1:0]  rq;
  logic [CW-1:0] cnt;

  function automatic logic is_pow2(input logic [N-1:0] v);
    return (v != '0) && ((v & (v - 1'b1)) == '0);
  endfunction

  function automatic int unsigned log2_of(input logic [N-1:0] v);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < N; i++) if (v[i]) r = i;
    return r;
  endfunction

  logic [N:0] ra_sh, ra_nx;
  always_comb begin
    ra_sh = {ra[N-1:0], rq[N-1]};
    ra_nx = ra[N] ? (ra_sh + rm) : (ra_sh - rm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done <= 1'b0; quot <= '0; rem <= '0;
      ra <= '0; rm <= '0; rq <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          if (divisor == '0 || dividend == '0) begin
            quot <= '0; rem <= '0; done <= 1'b1;
          end else if (divisor == N'(1)) begin
            quot <= dividend; rem <= '0; done <= 1'b1;
          end else if (divisor > dividend) begin
            quot <= '0; rem <= dividend; done <= 1'b1;
          end else if (is_pow2(divisor)) begin
            quot <= dividend >> log2_of(divisor);
            rem  <= dividend & (divisor - 1'b1);
            done <= 1'b1;
          end else begin
            ra <= '0; rm <= {1'b0, divisor}; rq <= dividend; cnt <= '0;
            state <= ITER;
          end
        end
        ITER: begin
          ra  <= ra_nx;
          rq  <= {rq[N-2:0], ~ra_nx[N]};
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) state <= FIX;
        end
        FIX: begin
          quot  <= rq;
          rem   <= ra[N] ? N'(ra + rm) : ra[N-1:0];
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
