// vector_arith_unit: the floating-point unit of a Core_GJ. It processes one vector element
// per clock cycle and applies one of two operations of the Gauss-Jordan step:
//   VAU_DIV  : y = a / s        (normalisation, s = pivot held in register "den")
//   VAU_MSUB : y = a - s * b    (elimination,   s = factor held in register "fac",
//                                 b = element of the broadcast normalised row)
// Stage 1 computes the quotient or the product, stage 2 the subtraction; the remaining
// VAU_LAT-2 stages only delay the result, standing in for the deeper pipeline of a
// vendor floating-point core. The latency is fixed at VAU_LAT cycles, which is what lets the
// Early Start unit schedule the cores without a handshake.
// The document names the unit and its operations (divide/multiply a vector by a scalar,
// add/subtract two vectors); the two-operation encoding and the stage split are this
// design's own.
module vector_arith_unit
  import emt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  vau_op_e op,
  input  fp32_t   a,
  input  fp32_t   b,
  input  fp32_t   s,
  output logic    out_valid,
  output fp32_t   y
);
  fp32_t   s1_a, s1_p;
  vau_op_e s1_op;
  logic    s1_v;
  fp32_t   dly_y [VAU_LAT-1];
  logic    dly_v [VAU_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v  <= 1'b0;
      s1_a  <= FP_ZERO;
      s1_p  <= FP_ZERO;
      s1_op <= VAU_DIV;
      for (int i = 0; i < VAU_LAT-1; i++) begin
        dly_v[i] <= 1'b0;
        dly_y[i] <= FP_ZERO;
      end
    end else begin
      s1_v  <= in_valid;
      s1_op <= op;
      s1_a  <= a;
      s1_p  <= (op == VAU_DIV) ? fp_div(a, s) : fp_mul(s, b);
      dly_v[0] <= s1_v;
      dly_y[0] <= (s1_op == VAU_DIV) ? s1_p : fp_sub(s1_a, s1_p);
      for (int i = 1; i < VAU_LAT-1; i++) begin
        dly_v[i] <= dly_v[i-1];
        dly_y[i] <= dly_y[i-1];
      end
    end
  end

  assign out_valid = dly_v[VAU_LAT-2];
  assign y         = dly_y[VAU_LAT-2];
endmodule
