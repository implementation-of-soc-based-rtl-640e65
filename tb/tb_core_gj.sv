// tb_core_gj: exercises one core (row 2 of a 4-unknown system, one right-hand side) through
// the four instructions, acting itself as Global Control, Early Start and interconnection:
//   INIT as reference     : load 5 words, expect one done;
//   ELIM as reference     : expect the row divided by its pivot on out_valid/out_data, the
//                           first word 2 + VAU_LAT cycles after valid;
//   ELIM as non-reference : drive Early Start pulses and a normalised row on the bus at the
//                           scheduled cycles, then read the result back with RETURN-style
//                           reads of every column through ELIM as reference of a unit row;
//   RETURN as reference   : expect the right-hand-side word.
// Expected values are computed here in double precision.
// The instruction set checked is the reduced one this core implements; stimulus and
// expected values are this test's own.
module tb_core_gj;
  import emt_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 4, NRHS = 1, ID = 2, W = N + NRHS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lss_phase_e phase = PH_IDLE;
  logic [2:0] ref_row = '0;
  logic valid = 0, es_e = 0, es_w = 0, bus_valid = 0, in_valid = 0;
  fp32_t bus_data = '0, in_data = '0;
  logic ld_accept, out_valid, done;
  fp32_t out_data;

  core_gj #(.N(N), .NRHS(NRHS), .CORE_ID(ID)) dut (
    .clk(clk), .rst_n(rst_n), .n_active(3'(N)), .solution_phase(phase), .reference_row(ref_row),
    .valid(valid), .es_lu_elimination(es_e), .es_lu_writeBackRE(es_w), .bus_valid(bus_valid),
    .bus_data(bus_data), .in_valid(in_valid), .in_data(in_data), .ld_accept(ld_accept),
    .out_valid(out_valid), .out_data(out_data), .done(done));

  int checks = 0, failures = 0;
  real row [W], norm [W];
  fp32_t outs [$];
  int    out_cyc [$];
  int    ndone;

  // run one instruction for `len` cycles; bus words norm[] are driven at their scheduled
  // cycles when drive_bus is set
  task automatic instr(lss_phase_e ph, int r, bit drive_bus, int len);
    outs.delete(); out_cyc.delete(); ndone = 0;
    @(negedge clk); phase = ph; ref_row = 3'(r); valid = 1;
    for (int c = 0; c < len; c++) begin
      #1;
      if (out_valid) begin outs.push_back(out_data); out_cyc.push_back(c); end
      if (done) ndone++;
      @(negedge clk);
      valid = 0;
      es_e  = drive_bus && (c + 1 == int'(ES_ELIM_CNT));
      es_w  = drive_bus && (c + 1 == int'(ES_WB_CNT));
      bus_valid = drive_bus && (c + 1 >= 3 + int'(VAU_LAT)) && (c + 1 < 3 + int'(VAU_LAT) + W);
      bus_data  = bus_valid ? to_fp32(norm[c + 1 - 3 - int'(VAU_LAT)]) : FP_ZERO;
      in_valid  = ld_accept;
    end
    checks++;
    if (ndone != 1) begin failures++; $display("FAIL phase %0d: %0d done pulses", ph, ndone); end
  endtask

  function automatic void expect_words(string what, real e [W], int first_cyc, int cnt);
    checks++;
    if (outs.size() != cnt) begin
      failures++; $display("FAIL %s: %0d words", what, outs.size()); return;
    end
    for (int j = 0; j < cnt; j++) begin
      checks++;
      if (!close(to_real(outs[j]), e[j], 1e-6, 1e-6) || out_cyc[j] != first_cyc + j) begin
        failures++;
        $display("FAIL %s word %0d = %f at %0d, expected %f at %0d", what, j,
                 to_real(outs[j]), out_cyc[j], e[j], first_cyc + j);
      end
    end
  endfunction

  int k;
  initial begin
    row = '{4.0, 8.0, -2.0, 1.0, 6.0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // INIT: the stream supplies one word per cycle while ld_accept
    k = 0;
    fork
      instr(PH_INIT, ID, 0, 12);
      forever begin #2; in_data = to_fp32(row[k < W ? k : 0]); @(posedge clk); if (in_valid) k++; end
    join_any
    disable fork;
    checks++;
    if (k != W) begin failures++; $display("FAIL loaded %0d words", k); end
    // ELIM as reference: row / a_22 (column index 1)
    instr(PH_ELIM, ID, 0, 20);
    for (int j = 0; j < W; j++) norm[j] = row[j] / row[ID - 1];
    expect_words("normalise", norm, 2 + int'(VAU_LAT), W);
    for (int j = 0; j < W; j++) row[j] = norm[j];
    // ELIM as non-reference (reference row 1): row -= row[0] * norm1
    norm = '{1.0, 0.5, 0.25, -1.0, 3.0};
    instr(PH_ELIM, 1, 1, 30);
    begin
      real f;
      f = row[0];
      for (int j = 0; j < W; j++) row[j] = row[j] - f * norm[j];
    end
    checks++;
    if (outs.size() != 0) begin failures++; $display("FAIL non-reference drove the bus"); end
    // RETURN as reference: the right-hand-side column
    instr(PH_RETURN, ID, 0, 10);
    begin
      real e [W];
      e[0] = row[N];
      expect_words("return", e, 2, NRHS);
    end
    // read the whole row back by normalising it again (pivot column 1)
    instr(PH_ELIM, ID, 0, 20);
    for (int j = 0; j < W; j++) norm[j] = row[j] / row[ID - 1];
    expect_words("row after elimination", norm, 2 + int'(VAU_LAT), W);
    // a non-reference core has nothing to do in INIT: done one cycle after valid
    instr(PH_INIT, 3, 0, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
