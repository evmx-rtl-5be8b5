// Radix-2 Booth multiplier for the EVM MUL opcode (result modulo 2^N).
//
// Operation: RM holds the multiplicand, RQ (N+1 bits) holds the multiplier
// with an extra zero bit appended on the right, RA is the partial-product
// accumulator. Each iteration inspects RQ[1:0]: "10" subtracts RM from RA,
// "01" adds RM, "00"/"11" do nothing; then {RA,RQ} shift right one place
// (RA arithmetically, RA[0] entering RQ). After N iterations RQ[N:1] holds
// the low N bits of the product, which is the EVM result. Subtraction uses
// the two's complement of RM so one adder does both.
//
// Edge cases resolved in the start cycle (done one cycle after start):
// either operand 0, either operand 1, or either operand a power of two
// (the other operand is shifted left). Otherwise the result is ready N+1
// cycles after start.
//
// Interface: pulse `start` with `a` (multiplicand) and `b` (multiplier);
// `done` pulses for one cycle with `p` valid; `p` holds until the next start.
// The flow follows the document's Booth diagram; the RA width of N+1 bits and
// the handshake are this design's own choices.
module evmx_booth_mult #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] p
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N:0]   ra, rm;     // N+1 bits so the partial sum keeps its sign
  logic [N:0]   rq;         // multiplier plus Booth extension bit
  logic [CW-1:0] cnt;

  function automatic logic is_pow2(input logic [N-1:0] v);
    return (v != '0) && ((v & (v - 1'b1)) == '0);
  endfunction

  function automatic int unsigned log2_of(input logic [N-1:0] v);
    int unsigned pos;
    pos = 0;
    for (int unsigned i = 0; i < N; i++) if (v[i]) pos = i;
    return pos;
  endfunction

  logic [N:0] sum;
  always_comb begin
    unique case (rq[1:0])
      2'b10:   sum = ra - rm;
      2'b01:   sum = ra + rm;
      default: sum = ra;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; p <= '0;
      ra <= '0; rm <= '0; rq <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (a == '0 || b == '0) begin
          p <= '0; done <= 1'b1; busy <= 1'b0;
        end else if (a == N'(1)) begin
          p <= b; done <= 1'b1; busy <= 1'b0;
        end else if (b == N'(1)) begin
          p <= a; done <= 1'b1; busy <= 1'b0;
        end else if (is_pow2(a)) begin
          p <= b << log2_of(a); done <= 1'b1; busy <= 1'b0;
        end else if (is_pow2(b)) begin
          p <= a << log2_of(b); done <= 1'b1; busy <= 1'b0;
        end else begin
          ra <= '0;
          rm <= {1'b0, a};
          rq <= {b, 1'b0};
          cnt <= '0;
          busy <= 1'b1;
        end
      end else if (busy) begin
        // arithmetic right shift of {sum, rq}
        ra <= {sum[N], sum[N:1]};
        rq <= {sum[0], rq[N:1]};
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          p <= {sum[0], rq[N:2]};
        end
      end
    end
  end
endmodule
