// link_compensation: final voltages of a subsystem that is joined to other subsystems by
// link (current) branches, by the compensation theorem. The subsystem is first solved as
// if it stood alone, giving the Thevenin voltages v_th; for every link port j (a node where
// link current i_j leaves the subsystem) the solver also returns the impedance column
// z_j = G^-1 e_node(j). Once the link currents are known, superposition gives
//     v[r] = v_th[r] - sum_j z_j[r] * i_j,        r = 1..n.
// Capture: while the solver returns its solution (sol_valid/sol_data, rows 1..n in order,
// 1 + NLINK words per row: v_th[r], z_1[r], ..., z_NLINK[r]) the words are stored;
// sol_start (the solver's start) rewinds the capture position.
// Compute: start pulses once the link currents i_link are valid; one row is completed per
// cycle (NLINK multiply-subtract steps in a chain) and done pulses one cycle after row n,
// so the pass takes n + 1 cycles. With all link currents zero, v equals v_th exactly.
// The superposition step and its place in the time step (after the link currents are
// solved, before the history update) follow the document's solution flow; the capture
// format and the one-row-per-cycle schedule are this design's own.
module link_compensation
  import emt_pkg::*;
#(
  parameter int unsigned N     = 26,
  parameter int unsigned NLINK = 3,
  localparam int unsigned RW   = $clog2(N + 1),
  localparam int unsigned NRHS = 1 + NLINK,
  localparam int unsigned KW   = $clog2(NRHS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] n_nodes,
  input  logic          sol_start,
  input  logic          sol_valid,
  input  fp32_t         sol_data,
  input  fp32_t         i_link [NLINK],
  input  logic          start,
  output logic          done,
  output fp32_t         vth [N+1],
  output fp32_t         zth [NLINK][N+1],
  output fp32_t         v   [N+1]
);
  // capture position
  logic [RW-1:0] crow;
  logic [KW-1:0] cword;

  // compute position
  logic          busy;
  logic [RW-1:0] r;
  fp32_t         acc;

  always_comb begin
    acc = vth[r];
    for (int j = 0; j < NLINK; j++) acc = fp_sub(acc, fp_mul(zth[j][r], i_link[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crow  <= RW'(1);
      cword <= '0;
      busy  <= 1'b0;
      r     <= RW'(1);
      done  <= 1'b0;
      for (int i = 0; i <= N; i++) begin
        vth[i] <= FP_ZERO;
        v[i]   <= FP_ZERO;
        for (int j = 0; j < NLINK; j++) zth[j][i] <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      if (sol_start) begin
        crow  <= RW'(1);
        cword <= '0;
      end else if (sol_valid) begin
        if (cword == '0) vth[crow] <= sol_data;
        for (int j = 0; j < NLINK; j++)
          if (cword == KW'(j + 1)) zth[j][crow] <= sol_data;
        if (cword == KW'(NRHS - 1)) begin
          cword <= '0;
          crow  <= crow + RW'(1);
        end else cword <= cword + KW'(1);
      end

      if (!busy) begin
        if (start) begin
          if (n_nodes == '0) done <= 1'b1;
          else begin
            busy <= 1'b1;
            r    <= RW'(1);
          end
        end
      end else begin
        v[r] <= acc;
        if (r == n_nodes) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else r <= r + RW'(1);
      end
    end
  end
endmodule
