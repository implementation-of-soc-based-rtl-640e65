// tb_lss_global_control: models the cores' done with a random delay after each valid and
// checks the sequence of (solution_phase, reference_row) seen at every valid:
// INIT rows 1..n, ELIM rows 1..n, RETURN rows 1..n, for n = 3 and n = 26; that valid comes
// in the cycle after done; and that finished pulses once, after which the control is idle.
// The phase and row sequence follows the original global control; the done timing is
// random.
module tb_lss_global_control;
  import emt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, done = 0, valid, busy, finished;
  logic [4:0] n_active = 5'd3, ref_row;
  lss_phase_e phase;

  lss_global_control dut (.clk(clk), .rst_n(rst_n), .start(start), .n_active(n_active),
                          .done(done), .solution_phase(phase), .reference_row(ref_row),
                          .valid(valid), .busy(busy), .finished(finished));

  int checks = 0, failures = 0;

  task automatic run(int n);
    int k, nfin, gap;
    n_active = 5'(n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    k = 0; nfin = 0;
    while (k < 3 * n) begin
      lss_phase_e ep;
      gap = 0;
      while (!valid) begin @(negedge clk); gap++; end
      ep = (k < n) ? PH_INIT : (k < 2*n) ? PH_ELIM : PH_RETURN;
      checks++;
      if (phase != ep || ref_row != 5'((k % n) + 1)) begin
        failures++;
        $display("FAIL instr %0d: phase %0d row %0d", k, phase, ref_row);
      end
      if (k > 0) begin
        checks++;
        if (gap != 0) begin failures++; $display("FAIL valid %0d cycles late", gap); end
      end
      @(negedge clk);
      repeat ($urandom % 5) @(negedge clk);
      done = 1;
      @(negedge clk);
      done = 0;
      if (finished) nfin++;
      k++;
    end
    repeat (3) begin @(negedge clk); if (finished) nfin++; end
    checks += 2;
    if (nfin != 1) begin failures++; $display("FAIL finished pulses %0d", nfin); end
    if (busy || phase != PH_IDLE) begin failures++; $display("FAIL not idle at end"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3);
    run(26);
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
