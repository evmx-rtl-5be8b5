// Binary (square-and-multiply) exponentiation for the EVM EXP opcode,
// result modulo 2^N.
//
// RA starts at 1, RM at the base and RQ at the exponent. Each iteration runs
// two Booth multipliers in parallel: one forms RA*RM (used only when RQ[0]
// is 1), the other squares RM. When both have finished, RA and RM are
// updated and RQ shifts right by one. The loop ends after N iterations, or
// early when RM has become 1 or RA has become 0 (the result can no longer
// change), or when the remaining exponent RQ is 0 (this last exit is this
// design's addition; it is equivalent to running out the zero bits).
//
// Edge cases resolved in the start cycle: exponent 0 (result 1), base 0,
// base 1, and base 2 (result 1 << exponent, or 0 when the exponent is N or
// more).
//
// Interface: pulse `start` with `base` and `expo`; `done` pulses with `r`.
module evmx_exp #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] base,
  input  logic [N-1:0] expo,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] r
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {IDLE, LAUNCH, WAIT} state_e;
  state_e state;

  logic [N-1:0]  ra, rm, rq;
  logic [CW-1:0] cnt;

  logic          m_start;
  logic          m1_busy, m1_done, m2_busy, m2_done;
  logic [N-1:0]  m1_p, m2_p;
  logic          m1_fin, m2_fin;

  evmx_booth_mult #(.N(N)) u_mul_ra (
    .clk, .rst_n, .start(m_start), .a(ra), .b(rm),
    .busy(m1_busy), .done(m1_done), .p(m1_p)
  );
  evmx_booth_mult #(.N(N)) u_mul_rm (
    .clk, .rst_n, .start(m_start), .a(rm), .b(rm),
    .busy(m2_busy), .done(m2_done), .p(m2_p)
  );

  assign m_start = (state == LAUNCH);

  logic [N-1:0] ra_nx, rm_nx, rq_nx;
  logic         both_done;
  always_comb begin
    both_done = (m1_fin || m1_done) && (m2_fin || m2_done);
    ra_nx = rq[0] ? m1_p : ra;
    rm_nx = m2_p;
    rq_nx = rq >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done <= 1'b0; r <= '0;
      ra <= '0; rm <= '0; rq <= '0; cnt <= '0;
      m1_fin <= 1'b0; m2_fin <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          if (expo == '0) begin
            r <= N'(1); done <= 1'b1;
          end else if (base == '0 || base == N'(1)) begin
            r <= base; done <= 1'b1;
          end else if (base == N'(2)) begin
            r <= (expo < N'(N)) ? (N'(1) << expo[CW-1:0]) : '0; done <= 1'b1;
          end else begin
            ra <= N'(1); rm <= base; rq <= expo; cnt <= '0;
            state <= LAUNCH;
          end
        end
        LAUNCH: begin
          m1_fin <= 1'b0; m2_fin <= 1'b0;
          state  <= WAIT;
        end
        WAIT: begin
          if (m1_done) m1_fin <= 1'b1;
          if (m2_done) m2_fin <= 1'b1;
          if (both_done) begin
            ra  <= ra_nx;
            rm  <= rm_nx;
            rq  <= rq_nx;
            cnt <= cnt + 1'b1;
            if (rm_nx == N'(1) || ra_nx == '0 || rq_nx == '0 || cnt == CW'(N - 1)) begin
              r     <= ra_nx;
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              state <= LAUNCH;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
