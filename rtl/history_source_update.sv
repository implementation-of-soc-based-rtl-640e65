// history_source_update (HSU): after the node voltages of a time step are known, computes
// the history current source of every element that has one, for use in the next step.
// With the trapezoidal rule a lumped element between nodes k and m is a conductance g in
// parallel with a history source h (branch current i_km = g*v_km + h). Both the inductor
// and the capacitor update their source with the same form
//     h <- alpha * h + beta * (v_k - v_m)
//   inductor : alpha =  1, beta =  2g    (g = dt / 2L)
//   capacitor: alpha = -1, beta = -2g    (g = 2C / dt)
// so each element is stored as {k, m, alpha, beta, h} and the unit needs no element type.
// Node 0 is ground (voltage 0).
// Interface: start pulses once per time step; one element is updated per cycle; done
// pulses one cycle after the last, so a step takes n_hist + 1 cycles. Elements are written
// through cfg_we/cfg_addr (index*4 + field: 0 nodes {m[15:8], k[7:0]}, 1 alpha, 2 beta,
// 3 h, the initial history value). hist_h/hist_k/hist_m give the current values to the
// G/I update unit.
// The document says only that this unit computes the history terms of the network
// elements; the coefficient form and the sequential one-element-per-cycle schedule are
// this design's own. Distributed-parameter (Bergeron) transmission lines, whose history
// sources need voltages from one travel time earlier, are not handled here.
module history_source_update
  import emt_pkg::*;
#(
  parameter int unsigned N     = 26,
  parameter int unsigned NHIST = 64,
  localparam int unsigned RW   = $clog2(N + 1),
  localparam int unsigned HW   = $clog2(NHIST + 1),
  localparam int unsigned IW   = (NHIST > 1) ? $clog2(NHIST) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [11:0]   cfg_addr,
  input  logic [31:0]   cfg_data,
  input  logic [HW-1:0] n_hist,
  input  fp32_t         v [N+1],
  input  logic          start,
  output logic          done,
  output fp32_t         hist_h [NHIST],
  output logic [RW-1:0] hist_k [NHIST],
  output logic [RW-1:0] hist_m [NHIST]
);
  fp32_t alpha [NHIST];
  fp32_t beta  [NHIST];

  logic          busy;
  logic [HW-1:0] e;
  logic [IW-1:0] ei;
  assign ei = IW'(e);
  logic [IW-1:0] wi;                 // element written by the host
  assign wi = IW'(cfg_addr[11:2]);

  fp32_t v_km, h_new;
  always_comb begin
    v_km  = fp_sub(v[hist_k[ei]], v[hist_m[ei]]);
    h_new = fp_add(fp_mul(alpha[ei], hist_h[ei]), fp_mul(beta[ei], v_km));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      e    <= '0;
      for (int j = 0; j < NHIST; j++) begin
        alpha[j]  <= FP_ZERO;
        beta[j]   <= FP_ZERO;
        hist_h[j] <= FP_ZERO;
        hist_k[j] <= '0;
        hist_m[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (cfg_we && cfg_addr[11:2] < 10'(NHIST)) begin
        unique case (cfg_addr[1:0])
          2'd0: begin
            hist_k[wi] <= RW'(cfg_data[7:0]);
            hist_m[wi] <= RW'(cfg_data[15:8]);
          end
          2'd1: alpha[wi]  <= cfg_data;
          2'd2: beta[wi]   <= cfg_data;
          2'd3: hist_h[wi] <= cfg_data;
          default: ;
        endcase
      end
      if (!busy) begin
        if (start) begin
          if (n_hist == '0) done <= 1'b1;
          else begin
            busy <= 1'b1;
            e    <= '0;
          end
        end
      end else begin
        hist_h[ei] <= h_new;
        if (e == n_hist - HW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          e <= e + HW'(1);
        end
      end
    end
  end
endmodule
