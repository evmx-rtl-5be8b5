// Arithmetic and logic unit of EVMx.
//
// Holds the adder, logic, comparison and shift units (single cycle) and the
// three iterative units: the Booth multiplier (MUL), the non-restoring
// divider (DIV, SDIV, MOD, SMOD) and the binary exponentiation unit (EXP).
// No DSP-style multiplier is inferred anywhere.
//
// Operands follow EVM stack order: `a` is the value that was on top of the
// stack, `b` the one beneath it (e.g. SUB gives a-b, SHL gives b<<a, EXP
// gives a**b). Signed division and modulo run the unsigned divider on
// magnitudes and fix the sign afterwards (an implementation choice).
//
// Timing: pulse `start`; `done` pulses with `y` valid. Single-cycle
// operations are done one cycle after start; iterative units add their own
// latency (edge cases of MUL/DIV/EXP also finish one cycle after start).
module evmx_alu
  import evmx_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output logic    busy,
  output logic    done,
  output word_t   y
);
  // ---------------- single-cycle units ----------------
  word_t comb_y;
  always_comb begin
    comb_y = '0;
    unique case (op)
      ALU_ADD:    comb_y = a + b;
      ALU_SUB:    comb_y = a - b;
      ALU_LT:     comb_y = word_t'(a < b);
      ALU_GT:     comb_y = word_t'(a > b);
      ALU_SLT:    comb_y = word_t'($signed(a) < $signed(b));
      ALU_SGT:    comb_y = word_t'($signed(a) > $signed(b));
      ALU_EQ:     comb_y = word_t'(a == b);
      ALU_ISZERO: comb_y = word_t'(a == '0);
      ALU_AND:    comb_y = a & b;
      ALU_OR:     comb_y = a | b;
      ALU_XOR:    comb_y = a ^ b;
      ALU_NOT:    comb_y = ~a;
      ALU_BYTE:   comb_y = (a < 32) ? word_t'(b[8*(31 - a[4:0]) +: 8]) : '0;
      ALU_SHL:    comb_y = (a < 256) ? (b << a[7:0]) : '0;
      ALU_SHR:    comb_y = (a < 256) ? (b >> a[7:0]) : '0;
      ALU_SAR:    comb_y = (a < 256) ? word_t'($signed(b) >>> a[7:0])
                                     : {WORD_W{b[WORD_W-1]}};
      ALU_SIGNEXT: begin
        comb_y = b;
        if (a < 31) begin
          for (int i = 0; i < WORD_W; i++)
            if (i >= 8 * (int'(a[4:0]) + 1)) comb_y[i] = b[8 * (int'(a[4:0]) + 1) - 1];
        end
      end
      default:    comb_y = '0;
    endcase
  end

  // ---------------- iterative units ----------------
  logic  is_mul, is_div, is_exp;
  assign is_mul = (op == ALU_MUL);
  assign is_div = (op == ALU_DIV) || (op == ALU_SDIV) || (op == ALU_MOD) || (op == ALU_SMOD);
  assign is_exp = (op == ALU_EXP);

  logic  is_signed;
  assign is_signed = (op == ALU_SDIV) || (op == ALU_SMOD);

  word_t a_mag, b_mag;
  assign a_mag = (is_signed && a[WORD_W-1]) ? -a : a;
  assign b_mag = (is_signed && b[WORD_W-1]) ? -b : b;

  logic  mul_busy, mul_done, div_busy, div_done, exp_busy, exp_done;
  word_t mul_p, div_q, div_r, exp_r;

  evmx_booth_mult #(.N(WORD_W)) u_mul (
    .clk, .rst_n, .start(start && is_mul), .a(a), .b(b),
    .busy(mul_busy), .done(mul_done), .p(mul_p)
  );
  evmx_div #(.N(WORD_W)) u_div (
    .clk, .rst_n, .start(start && is_div), .dividend(a_mag), .divisor(b_mag),
    .busy(div_busy), .done(div_done), .quot(div_q), .rem(div_r)
  );
  evmx_exp #(.N(WORD_W)) u_exp (
    .clk, .rst_n, .start(start && is_exp), .base(a), .expo(b),
    .busy(exp_busy), .done(exp_done), .r(exp_r)
  );

  // operation and operand signs captured at start for the result select
  alu_op_e op_q;
  logic    sa_q, sb_q, comb_pend;
  word_t   comb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= ALU_ADD; sa_q <= 1'b0; sb_q <= 1'b0; comb_pend <= 1'b0; comb_q <= '0;
    end else begin
      comb_pend <= 1'b0;
      if (start) begin
        op_q <= op;
        sa_q <= is_signed && a[WORD_W-1];
        sb_q <= is_signed && b[WORD_W-1];
        comb_pend <= !(is_mul || is_div || is_exp);
        comb_q <= comb_y;
      end
    end
  end

  always_comb begin
    done = comb_pend || mul_done || div_done || exp_done;
    unique case (op_q)
      ALU_MUL:  y = mul_p;
      ALU_EXP:  y = exp_r;
      ALU_DIV:  y = div_q;
      ALU_MOD:  y = div_r;
      ALU_SDIV: y = (sa_q ^ sb_q) ? -div_q : div_q;
      ALU_SMOD: y = sa_q ? -div_r : div_r;
      default:  y = comb_q;
    endcase
  end

  assign busy = mul_busy || div_busy || exp_busy;
endmodule
