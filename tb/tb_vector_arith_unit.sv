// tb_vector_arith_unit: drives one operation per cycle into the unit (random division and
// multiply-subtract operands plus exact cases), checks every result against real
// arithmetic and checks that each result appears exactly VAU_LAT cycles after its input.
// The two operations follow the original core's arithmetic unit; the latency is this
// design's own.
module tb_vector_arith_unit;
  import emt_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid = 0, out_valid;
  vau_op_e op = VAU_DIV;
  fp32_t   a = '0, b = '0, s = '0, y;

  vector_arith_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .a(a),
                         .b(b), .s(s), .out_valid(out_valid), .y(y));

  int checks = 0, failures = 0;
  localparam int NOPS = 200;
  real exp_q [$];
  int  exp_t [$];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    real e; int t0;
    e = exp_q.pop_front();
    t0 = exp_t.pop_front();
    checks++;
    if (!close(to_real(y), e, 1e-6, 1e-30) || cyc - t0 != int'(VAU_LAT)) begin
      failures++;
      $display("FAIL y=%g expected %g latency %0d", to_real(y), e, cyc - t0);
    end
  end

  function automatic real rnd();
    real r;
    r = (real'($urandom % 20000) - 10000.0) / 100.0;
    return (r == 0.0) ? 1.5 : r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NOPS; i++) begin
      real ra, rb, rs;
      ra = rnd(); rb = rnd(); rs = rnd();
      if (i == 0) begin ra = 6.0; rs = 3.0; end       // exact: 2
      if (i == 1) begin ra = 5.0; rb = 2.0; rs = 2.0; end  // exact: 1
      if (i == 2) begin ra = 4.0; rb = 2.0; rs = 2.0; end  // exact: 0
      op = (i == 0 || (i > 2 && i % 2 == 0)) ? VAU_DIV : VAU_MSUB;
      a = to_fp32(ra); b = to_fp32(rb); s = to_fp32(rs);
      in_valid = 1;
      exp_q.push_back(op == VAU_DIV ? to_real(a) / to_real(s)
                                    : to_real(a) - to_real(s) * to_real(b));
      exp_t.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (VAU_LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
