// Test of the ALU: every operation on random and corner operands against
// the simulator's own arithmetic (EVM semantics: a is the top of stack).
module tb_evmx_alu;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  alu_op_e op = ALU_ADD;
  word_t a = '0, b = '0, y;
  int checks = 0, failures = 0;
  evmx_alu dut (.*);

  function automatic word_t rnd(); return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}; endfunction

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    word_t r; logic signed [255:0] sx, sz;
    sx = x; sz = z;
    case (o)
      ALU_ADD: r = x + z;   ALU_SUB: r = x - z;   ALU_MUL: r = x * z;
      ALU_DIV: r = (z == 0) ? 0 : x / z;
      ALU_MOD: r = (z == 0) ? 0 : x % z;
      ALU_SDIV: r = (z == 0) ? 0 : ((sx == {1'b1, 255'b0} && sz == -1) ? x : word_t'(sx / sz));
      ALU_SMOD: r = (z == 0) ? 0 : word_t'(sx % sz);
      ALU_EXP: begin r = 1; for (int i = 255; i >= 0; i--) begin r = r * r; if (z[i]) r = r * x; end end
      ALU_SIGNEXT: begin
        r = z;
        if (x < 31) for (int i = 0; i < 256; i++) if (i >= 8 * (x + 1)) r[i] = z[8 * (x + 1) - 1];
      end
      ALU_LT: r = word_t'(x < z);  ALU_GT: r = word_t'(x > z);
      ALU_SLT: r = word_t'(sx < sz); ALU_SGT: r = word_t'(sx > sz);
      ALU_EQ: r = word_t'(x == z); ALU_ISZERO: r = word_t'(x == 0);
      ALU_AND: r = x & z; ALU_OR: r = x | z; ALU_XOR: r = x ^ z; ALU_NOT: r = ~x;
      ALU_BYTE: r = (x < 32) ? word_t'(z >> (8 * (31 - x))) & 256'hff : 0;
      ALU_SHL: r = (x < 256) ? z << x : 0;
      ALU_SHR: r = (x < 256) ? z >> x : 0;
      default: r = (x < 256) ? word_t'(sz >>> x) : (sz < 0 ? '1 : '0);  // SAR
    endcase
    return r;
  endfunction

  task automatic run(alu_op_e o, word_t x, word_t z);
    word_t e;
    e = model(o, x, z);
    op = o; a = x; b = z; start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (y !== e) begin failures++; $display("FAIL %s %h %h -> %h exp %h", o.name(), x, z, y, e); end
    @(negedge clk);
  endtask

  initial begin
    #50000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int k = 0; k < 23; k++) begin
      alu_op_e o; o = alu_op_e'(k);
      for (int i = 0; i < 6; i++) begin
        word_t x, z;
        x = rnd(); z = rnd();
        if (i == 1) x = 256'(i * 5);                 // small first operand (shifts, BYTE, SIGNEXTEND)
        if (i == 2) begin x = 256'd17; z = rnd() >> 200; end
        if (i == 3) z = '0;
        if (i == 4) x = -256'sd9;
        if (i == 5) begin x = 256'(1 + $urandom % 255); z[255] = 1'b1; end  // negative value, in-range shift
        if (o == ALU_EXP) z = z >> 250;             // keep EXP short
        run(o, x, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
