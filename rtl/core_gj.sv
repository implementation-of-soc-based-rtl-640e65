// core_gj: one row processor of the Linear System Solver. Core number CORE_ID (1-based)
// owns row CORE_ID of the augmented matrix [A | b], kept in its own dual-port row RAM, so
// all rows can be read and updated at the same time.
//
// Inside, following the core block diagram of the document: a position decoder compares
// CORE_ID with reference_row ("equal"); an upper control section drives the read-only RAM
// port; a lower control section drives the write port; registers "den" (pivot) and "fac"
// (elimination factor) feed the vector arithmetic unit.
//
// Each valid pulse from Global Control starts one instruction, chosen by solution_phase and
// by whether this core is the reference row:
//   INIT,   equal     : store the next ncols words of the load stream (in_valid/in_data) in
//                      the RAM, ncols = n_active + NRHS.
//   ELIM,   equal     : read a_ii into den, then stream the row through the divider
//                      (normalised_row = row_i / a_ii, eq. 15), write it back and drive it
//                      onto the interconnection (out_valid/out_data).
//   ELIM,   not equal : read a_ki into fac; on es_lu_elimination start reading the row so
//                      that element j meets normalised element j on bus_data; the unit
//                      computes row_k - a_ki * normalised_row (eq. 16); on es_lu_writeBackRE
//                      start writing the results back.
//   RETURN, equal     : read the NRHS right-hand-side columns (now the solution) and drive
//                      them onto the interconnection.
// Every core pulses done once per valid, when its part is finished; a core with nothing to
// do (not the reference row in INIT/RETURN, or beyond n_active) pulses done one cycle
// after valid. Timing of ELIM relative to valid is fixed by emt_pkg (ES_ELIM_CNT,
// ES_WB_CNT); the document gives the mechanism but not the cycle numbers.
// The document's core also holds registers "num" and "row" and a richer instruction set;
// this core keeps only what the Gauss-Jordan flow uses.
module core_gj
  import emt_pkg::*;
#(
  parameter int unsigned N       = 26,
  parameter int unsigned NRHS    = 1,
  parameter int unsigned CORE_ID = 1,
  localparam int unsigned RW     = $clog2(N + 1),
  localparam int unsigned DEPTH  = N + NRHS,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] n_active,
  input  lss_phase_e    solution_phase,
  input  logic [RW-1:0] reference_row,
  input  logic          valid,
  input  logic          es_lu_elimination,
  input  logic          es_lu_writeBackRE,
  input  logic          bus_valid,
  input  fp32_t         bus_data,
  input  logic          in_valid,
  input  fp32_t         in_data,
  output logic          ld_accept,
  output logic          out_valid,
  output fp32_t         out_data,
  output logic          done
);
  // ------------------------------------------------------------------ position decoder
  logic equal, active;
  assign equal  = (reference_row == RW'(CORE_ID));
  assign active = (RW'(CORE_ID) <= n_active);

  logic [AW:0] ncols;
  assign ncols = (AW+1)'(n_active) + (AW+1)'(NRHS);

  // ------------------------------------------------------------------ registers
  fp32_t den, fac;
  logic  valid_d;                 // cycle after valid: column i word is on qa
  lss_phase_e phase_d;
  logic  equal_d;

  // upper section: read sequencer
  typedef enum logic [1:0] {RD_NONE, RD_NORM, RD_ELIM, RD_RET} rd_kind_e;
  rd_kind_e    rd_kind, rd_kind_d;
  logic [AW:0] rd_cnt, rd_last;
  logic        rd_issue_d;        // a sequential read was issued last cycle

  // lower section: write sequencer
  logic        ld_busy;           // INIT load in progress
  logic        wb_busy;           // ELIM write-back in progress (not reference)
  logic [AW:0] wr_cnt;

  logic [AW-1:0] addra, addrb;
  fp32_t         qa, db;
  logic          web;

  logic          vau_in_valid, vau_out_valid;
  vau_op_e       vau_op;
  fp32_t         vau_y;

  // ------------------------------------------------------------------ RAM
  gj_row_ram #(.DEPTH(DEPTH), .WIDTH(32)) u_ram (
    .clk  (clk),
    .addra(addra),
    .qa   (qa),
    .web  (web),
    .addrb(addrb),
    .db   (db)
  );

  // read port address: column i at valid in ELIM, otherwise the sequencer
  always_comb begin
    if (valid && solution_phase == PH_ELIM)
      addra = AW'(reference_row - RW'(1));
    else if (rd_kind == RD_RET)
      addra = AW'(n_active) + AW'(rd_cnt);
    else
      addra = AW'(rd_cnt);
  end

  // ------------------------------------------------------------------ arithmetic
  assign vau_in_valid = rd_issue_d && (rd_kind_d == RD_NORM || rd_kind_d == RD_ELIM);
  assign vau_op       = (rd_kind_d == RD_NORM) ? VAU_DIV : VAU_MSUB;

  vector_arith_unit u_vau (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (vau_in_valid),
    .op       (vau_op),
    .a        (qa),
    .b        (bus_data),
    .s        ((rd_kind_d == RD_NORM) ? den : fac),
    .out_valid(vau_out_valid),
    .y        (vau_y)
  );

  // ------------------------------------------------------------------ write port
  logic norm_wr;                  // reference core writing its normalised row
  assign norm_wr = vau_out_valid && equal && solution_phase == PH_ELIM;

  always_comb begin
    web   = 1'b0;
    addrb = AW'(wr_cnt);
    db    = vau_y;
    if (ld_busy && in_valid) begin
      web = 1'b1;
      db  = in_data;
    end else if (norm_wr || wb_busy) begin
      web = 1'b1;
    end
  end

  assign ld_accept = ld_busy;

  // interconnection output: normalised row in ELIM, solution words in RETURN
  always_comb begin
    out_valid = 1'b0;
    out_data  = vau_y;
    if (norm_wr) begin
      out_valid = 1'b1;
    end else if (rd_issue_d && rd_kind_d == RD_RET) begin
      out_valid = 1'b1;
      out_data  = qa;
    end
  end

  // ------------------------------------------------------------------ control
  logic wr_last;
  assign wr_last = (wr_cnt == ncols - (AW+1)'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      den        <= FP_ONE;
      fac        <= FP_ZERO;
      valid_d    <= 1'b0;
      phase_d    <= PH_IDLE;
      equal_d    <= 1'b0;
      rd_kind    <= RD_NONE;
      rd_kind_d  <= RD_NONE;
      rd_cnt     <= '0;
      rd_last    <= '0;
      rd_issue_d <= 1'b0;
      ld_busy    <= 1'b0;
      wb_busy    <= 1'b0;
      wr_cnt     <= '0;
      done       <= 1'b0;
    end else begin
      done       <= 1'b0;
      valid_d    <= valid;
      phase_d    <= solution_phase;
      equal_d    <= equal;
      rd_kind_d  <= rd_kind;
      rd_issue_d <= (rd_kind != RD_NONE);

      // pivot / factor capture, one cycle after valid in ELIM
      if (valid_d && phase_d == PH_ELIM) begin
        if (equal_d) den <= qa;
        else         fac <= qa;
      end

      // upper section: sequential reads
      if (rd_kind != RD_NONE) begin
        if (rd_cnt == rd_last) rd_kind <= RD_NONE;
        else                   rd_cnt  <= rd_cnt + (AW+1)'(1);
      end

      if (valid) begin
        wr_cnt <= '0;
        rd_cnt <= '0;
        if (!active) begin
          done <= 1'b1;
        end else begin
          unique case (solution_phase)
            PH_INIT: begin
              if (equal) ld_busy <= 1'b1;
              else       done    <= 1'b1;
            end
            PH_ELIM: begin
              if (equal) begin
                rd_kind <= RD_NORM;
                rd_last <= ncols - (AW+1)'(1);
              end
            end
            PH_RETURN: begin
              if (equal) begin
                rd_kind <= RD_RET;
                rd_last <= (AW+1)'(NRHS - 1);
              end else begin
                done <= 1'b1;
              end
            end
            default: done <= 1'b1;
          endcase
        end
      end

      if (es_lu_elimination && active && !equal && solution_phase == PH_ELIM) begin
        rd_kind <= RD_ELIM;
        rd_cnt  <= '0;
        rd_last <= ncols - (AW+1)'(1);
      end

      if (es_lu_writeBackRE && active && !equal && solution_phase == PH_ELIM) begin
        wb_busy <= 1'b1;
        wr_cnt  <= '0;
      end

      // lower section: write counter
      if (ld_busy && in_valid) begin
        wr_cnt <= wr_cnt + (AW+1)'(1);
        if (wr_last) begin
          ld_busy <= 1'b0;
          done    <= 1'b1;
        end
      end else if (norm_wr || wb_busy) begin
        wr_cnt <= wr_cnt + (AW+1)'(1);
        if (wr_last) begin
          wb_busy <= 1'b0;
          done    <= 1'b1;
        end
      end

      // RETURN: done with the last solution word
      if (rd_issue_d && rd_kind_d == RD_RET && rd_kind == RD_NONE) done <= 1'b1;
    end
  end

  // The read window opened by Early Start must meet the broadcast normalised row, and the
  // write-back window must line up with the arithmetic pipeline.
  a_elim_aligned : assert property (@(posedge clk) disable iff (!rst_n)
                                    (vau_in_valid && rd_kind_d == RD_ELIM) |-> bus_valid);
  a_wb_aligned : assert property (@(posedge clk) disable iff (!rst_n)
                                  wb_busy |-> vau_out_valid);
endmodule
