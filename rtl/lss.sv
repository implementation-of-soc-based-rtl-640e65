// lss: Linear System Solver. Solves G x = b for an n-by-n system (n = n_active <= N) by
// parallel Gauss-Jordan elimination, with one Core_GJ per matrix row.
//
// Operation, after a start pulse:
//   INIT   : the augmented rows [a_r1 .. a_rn | b_r] are taken from the in_valid/in_data
//            stream, row 1 first, n + NRHS words per row (in_ready is high while a core
//            is accepting words).
//   ELIM   : for i = 1..n, core i divides its row by a_ii and broadcasts it over the
//            interconnection; all other cores subtract a_ki times that row from their own,
//            at the same time. After n iterations the matrix part is the identity and the
//            right-hand-side columns hold the solution.
//   RETURN : for r = 1..n the solution words of row r appear on out_valid/out_data, NRHS
//            words per row; finished pulses after the last one.
// Global Control sequences phase and reference row; Early Start times the non-reference
// cores; the cores' done pulses are collected and, once every core has answered, passed to
// Global Control as one done.
// Cycle count from start to finished for n active rows, W = n + NRHS, with an input
// stream that never stalls:  1 + n*(W + 2) + n*(W + ES_WB_CNT + 2) + n*(NRHS + 3)
// (start, INIT, ELIM, RETURN); 919 cycles for n = 17, NRHS = 1.
// There is no pivoting, as in the document: the matrix must have non-zero pivots (nodal
// conductance matrices are diagonally dominant).
module lss
  import emt_pkg::*;
#(
  parameter int unsigned N    = 26,
  parameter int unsigned NRHS = 1,
  localparam int unsigned RW  = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [RW-1:0] n_active,
  input  logic          in_valid,
  input  fp32_t         in_data,
  output logic          in_ready,
  output logic          out_valid,
  output fp32_t         out_data,
  output logic          busy,
  output logic          finished,
  output lss_phase_e    solution_phase,
  output logic [RW-1:0] reference_row
);
  logic         valid, all_done;
  logic         es_lu_elimination, es_lu_writeBackRE;
  logic         bus_valid;
  fp32_t        bus_data;
  logic [N-1:0] core_done, core_ld, core_ov;
  fp32_t        core_od [N];

  lss_global_control #(.N(N)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .n_active      (n_active),
    .done          (all_done),
    .solution_phase(solution_phase),
    .reference_row (reference_row),
    .valid         (valid),
    .busy          (busy),
    .finished      (finished)
  );

  early_start u_es (
    .clk              (clk),
    .rst_n            (rst_n),
    .phase            (solution_phase),
    .valid            (valid),
    .es_lu_elimination(es_lu_elimination),
    .es_lu_writeBackRE(es_lu_writeBackRE)
  );

  for (genvar g = 0; g < N; g++) begin : g_core
    core_gj #(.N(N), .NRHS(NRHS), .CORE_ID(g + 1)) u_core (
      .clk              (clk),
      .rst_n            (rst_n),
      .n_active         (n_active),
      .solution_phase   (solution_phase),
      .reference_row    (reference_row),
      .valid            (valid),
      .es_lu_elimination(es_lu_elimination),
      .es_lu_writeBackRE(es_lu_writeBackRE),
      .bus_valid        (bus_valid),
      .bus_data         (bus_data),
      .in_valid         (in_valid),
      .in_data          (in_data),
      .ld_accept        (core_ld[g]),
      .out_valid        (core_ov[g]),
      .out_data         (core_od[g]),
      .done             (core_done[g])
    );
  end

  gj_interconnect #(.N(N)) u_ic (
    .clk          (clk),
    .rst_n        (rst_n),
    .reference_row(reference_row),
    .core_valid   (core_ov),
    .core_data    (core_od),
    .bus_valid    (bus_valid),
    .bus_data     (bus_data)
  );

  assign in_ready  = |core_ld;
  assign out_valid = bus_valid && solution_phase == PH_RETURN;
  assign out_data  = bus_data;

  // done collection: one bit per core, cleared by each valid
  logic [N-1:0] seen;
  logic         waiting;
  assign all_done = waiting && (&(seen | core_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen    <= '0;
      waiting <= 1'b0;
    end else if (valid) begin
      seen    <= '0;
      waiting <= 1'b1;
    end else if (all_done) begin
      seen    <= '0;
      waiting <= 1'b0;
    end else begin
      seen    <= seen | core_done;
    end
  end
endmodule
