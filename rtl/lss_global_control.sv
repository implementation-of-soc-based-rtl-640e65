// lss_global_control: the Control Unit of the Linear System Solver. It produces the two
// synchronisation signals that every Core_GJ decodes, solution_phase and reference_row, and
// a one-cycle valid that starts each instruction.
// Three parts, as in the document: a sequence controller (FSM) that waits for the cores'
// done and issues go_next_phase, load_int_row and inc_row; a phase generator that steps
// solution_phase IDLE -> INIT -> ELIM -> RETURN -> IDLE on go_next_phase; and a row
// generator that loads reference_row with 1 on load_int_row and increments it on inc_row.
// In every phase reference_row walks 1..n_active; after the last row of RETURN the solver
// goes idle and pulses finished.
// Timing: valid is high the cycle after reference_row/solution_phase change, so the cores
// see stable values; the next valid follows in the cycle after done.
// The document's timing diagram labels the phases factorization, forward and backward
// substitution; this solver follows the Gauss-Jordan description of the text, whose phases
// are initialization, elimination and return, each walking the rows in ascending order.
module lss_global_control
  import emt_pkg::*;
#(
  parameter int unsigned N = 26,
  localparam int unsigned RW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [RW-1:0] n_active,
  input  logic          done,
  output lss_phase_e    solution_phase,
  output logic [RW-1:0] reference_row,
  output logic          valid,
  output logic          busy,
  output logic          finished
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} seq_state_e;
  seq_state_e state;

  logic go_next_phase, load_int_row, inc_row;

  // sequence controller
  always_comb begin
    go_next_phase = 1'b0;
    load_int_row  = 1'b0;
    inc_row       = 1'b0;
    unique case (state)
      S_IDLE: if (start && n_active != '0) begin
        go_next_phase = 1'b1;
        load_int_row  = 1'b1;
      end
      S_WAIT: if (done) begin
        if (reference_row == n_active) begin
          go_next_phase = 1'b1;
          load_int_row  = (solution_phase != PH_RETURN);
        end else begin
          inc_row = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      finished <= 1'b0;
    end else begin
      finished <= 1'b0;
      unique case (state)
        S_IDLE:  if (go_next_phase) state <= S_ISSUE;
        S_ISSUE: state <= S_WAIT;
        S_WAIT:  if (done) begin
          if (go_next_phase && solution_phase == PH_RETURN) begin
            state    <= S_IDLE;
            finished <= 1'b1;
          end else begin
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign valid = (state == S_ISSUE);
  assign busy  = (state != S_IDLE);

  // phase generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) solution_phase <= PH_IDLE;
    else if (go_next_phase) begin
      unique case (solution_phase)
        PH_IDLE:   solution_phase <= PH_INIT;
        PH_INIT:   solution_phase <= PH_ELIM;
        PH_ELIM:   solution_phase <= PH_RETURN;
        PH_RETURN: solution_phase <= PH_IDLE;
        default:   solution_phase <= PH_IDLE;
      endcase
    end
  end

  // row generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            reference_row <= '0;
    else if (load_int_row) reference_row <= RW'(1);
    else if (inc_row)      reference_row <= reference_row + RW'(1);
  end
endmodule
