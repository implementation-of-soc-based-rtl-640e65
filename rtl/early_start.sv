// early_start: tells the Core_GJ modules in advance when processed data will reach them, so
// that they can start their internal steps without a handshake.
// A "latency cyc counter" is cleared and enabled by the valid pulse of Global Control and
// counts clock cycles; a sequence controller compares the count with a constant table
// (ES_ELIM_CNT, ES_WB_CNT in emt_pkg) and pulses, for one cycle each:
//   es_lu_elimination  : cores other than the reference row start reading their rows, so
//                        that their pipelines fill while the reference row is normalised;
//   es_lu_writeBackRE  : the same cores start writing back the eliminated row; the cores'
//                        done follows W cycles later (the interval k of the document).
// Only elimination iterations are scheduled here. The document's Early Start also has
// outputs for forward and backward substitution phases (es_fw_*, es_bw_*); this solver
// follows the Gauss-Jordan flow, which has neither, so they are left out.
module early_start
  import emt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  lss_phase_e phase,
  input  logic       valid,
  output logic       es_lu_elimination,
  output logic       es_lu_writeBackRE
);
  localparam int unsigned CW = $clog2(ES_WB_CNT + 1);

  // latency cyc counter
  logic          cnt_en, cnt_rst;
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (cnt_rst) count <= CW'(1);
    else if (cnt_en)  count <= count + CW'(1);
  end

  // sequence controller
  logic running;
  assign cnt_rst = valid && phase == PH_ELIM;
  assign cnt_en  = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               running <= 1'b0;
    else if (cnt_rst)                         running <= 1'b1;
    else if (running && count == CW'(ES_WB_CNT)) running <= 1'b0;
  end

  assign es_lu_elimination = running && count == CW'(ES_ELIM_CNT);
  assign es_lu_writeBackRE = running && count == CW'(ES_WB_CNT);
endmodule
