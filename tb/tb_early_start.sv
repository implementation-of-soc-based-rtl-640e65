// tb_early_start: pulses valid in the elimination phase and checks that es_lu_elimination
// and es_lu_writeBackRE each pulse exactly once, ES_ELIM_CNT and ES_WB_CNT cycles after
// valid; then pulses valid in the INIT and RETURN phases and checks that nothing fires.
// The strobe names follow the original design; the cycle constants are this design's own
// and are taken from emt_pkg.
module tb_early_start;
  import emt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lss_phase_e phase = PH_IDLE;
  logic valid = 0, es_e, es_w;

  early_start dut (.clk(clk), .rst_n(rst_n), .phase(phase), .valid(valid),
                   .es_lu_elimination(es_e), .es_lu_writeBackRE(es_w));

  int checks = 0, failures = 0;

  task automatic issue(lss_phase_e ph, int expect_e, int expect_w);
    int seen_e, seen_w, cnt_e, cnt_w;
    seen_e = -1; seen_w = -1; cnt_e = 0; cnt_w = 0;
    @(negedge clk); phase = ph; valid = 1;
    for (int c = 0; c < 40; c++) begin
      #1;
      if (es_e) begin seen_e = c; cnt_e++; end
      if (es_w) begin seen_w = c; cnt_w++; end
      @(negedge clk); valid = 0;
    end
    checks += 2;
    if (seen_e != expect_e || (expect_e >= 0 && cnt_e != 1)) begin
      failures++; $display("FAIL es_lu_elimination at %0d expected %0d", seen_e, expect_e);
    end
    if (seen_w != expect_w || (expect_w >= 0 && cnt_w != 1)) begin
      failures++; $display("FAIL es_lu_writeBackRE at %0d expected %0d", seen_w, expect_w);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    issue(PH_ELIM, int'(ES_ELIM_CNT), int'(ES_WB_CNT));
    issue(PH_INIT, -1, -1);
    issue(PH_ELIM, int'(ES_ELIM_CNT), int'(ES_WB_CNT));
    issue(PH_RETURN, -1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
