// tb_semets_control: models the four units with random completion delays and checks the
// order SG -> (GU and LSS together) -> [link exchange] -> compensation -> HSU in every
// step, the step numbering, step_done and run_done counts; then runs in real-time mode
// with a period longer than a step (the control must wait, and each step must start
// exactly one period after the previous) and with a period shorter than a step (every
// step counts an overrun); finally in link mode, where each step waits after the solver
// for the processor's link_go.
// The step order follows the original solution flow; the real-time pacing checked here is
// this design's own.
module tb_semets_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, sg_done = 0, lss_finished = 0, hsu_done = 0, comp_done = 0;
  logic        link_mode = 0, link_go = 0, link_req, link_wait, comp_start;
  logic [23:0] n_steps = '0, step;
  logic [31:0] period = '0, wait_cycles;
  logic        sg_start, gu_start, lss_start, hsu_start, step_done, busy, run_done;
  logic [15:0] overruns;

  semets_control dut (.clk(clk), .rst_n(rst_n), .start(start), .n_steps(n_steps),
    .period(period), .sg_start(sg_start), .sg_done(sg_done), .gu_start(gu_start),
    .lss_start(lss_start), .lss_finished(lss_finished), .link_mode(link_mode),
    .link_req(link_req), .link_wait(link_wait), .link_go(link_go), .comp_start(comp_start),
    .comp_done(comp_done), .hsu_start(hsu_start),
    .hsu_done(hsu_done), .step_done(step_done), .step(step), .busy(busy),
    .run_done(run_done), .overruns(overruns), .wait_cycles(wait_cycles));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // unit models: answer each start after 3..10 cycles
  task automatic respond(ref logic st, ref logic dn);
    forever begin
      @(posedge clk iff st);
      repeat (3 + $urandom % 8) @(posedge clk);
      #1 dn = 1;
      @(posedge clk);
      #1 dn = 0;
    end
  endtask

  initial fork
    respond(sg_start, sg_done);
    respond(lss_start, lss_finished);
    respond(hsu_start, hsu_done);
    respond(comp_start, comp_done);
  join_none

  // processor model for the link exchange: answers link_req after a random delay
  int n_link_req = 0;
  initial forever begin
    @(posedge clk iff link_req);
    n_link_req++;
    repeat (2 + $urandom % 20) @(posedge clk);
    checks++;
    if (!link_wait) begin failures++; $display("FAIL link_wait low while waiting"); end
    #1 link_go = 1;
    @(posedge clk);
    #1 link_go = 0;
  end

  // order checker
  int stage = 0, steps_seen = 0, runs = 0, sg_cyc [$];
  always @(posedge clk) if (rst_n) begin
    if (sg_start) begin
      checks++; if (stage != 0) begin failures++; $display("FAIL sg_start out of order"); end
      stage <= 1; sg_cyc.push_back(cyc);
      checks++; if (step != 24'(steps_seen)) begin failures++; $display("FAIL step %0d", step); end
    end
    if (lss_start) begin
      checks++; if (stage != 1 || !gu_start) begin failures++; $display("FAIL lss_start"); end
      stage <= 2;
    end
    if (link_req) begin
      checks++; if (stage != 2 || !link_mode) begin failures++; $display("FAIL link_req"); end
      stage <= 3;
    end
    if (comp_start) begin
      checks++;
      if (stage != (link_mode ? 3 : 2)) begin failures++; $display("FAIL comp_start"); end
      stage <= 4;
    end
    if (hsu_start) begin
      checks++; if (stage != 4) begin failures++; $display("FAIL hsu_start"); end
      stage <= 5;
    end
    if (step_done) begin
      checks++; if (stage != 5) begin failures++; $display("FAIL step_done"); end
      stage <= 0; steps_seen <= steps_seen + 1;
    end
    if (run_done) runs <= runs + 1;
  end

  task automatic run(int n, int p);
    steps_seen = 0; runs = 0; sg_cyc.delete();
    n_steps = 24'(n); period = 32'(p);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(posedge clk iff run_done);
    @(negedge clk);
    checks += 2;
    if (steps_seen != n) begin failures++; $display("FAIL %0d steps", steps_seen); end
    if (runs != 1 || busy) begin failures++; $display("FAIL run_done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6, 0);                                   // offline
    checks++;
    if (overruns != 0 || wait_cycles != 0) begin failures++; $display("FAIL offline waited"); end
    run(5, 100);                                 // real time, steps shorter than the period
    for (int i = 1; i < sg_cyc.size(); i++) begin
      checks++;
      if (sg_cyc[i] - sg_cyc[i-1] != 100) begin
        failures++; $display("FAIL period %0d", sg_cyc[i] - sg_cyc[i-1]);
      end
    end
    checks += 2;
    if (overruns != 0) begin failures++; $display("FAIL overruns %0d", overruns); end
    if (wait_cycles == 0) begin failures++; $display("FAIL no waiting"); end
    run(4, 8);                                   // real time, steps longer than the period
    checks++;
    if (overruns != 4) begin failures++; $display("FAIL overruns %0d, expected 4", overruns); end
    link_mode = 1;                               // link exchange in every step
    run(5, 0);
    checks++;
    if (n_link_req != 5) begin failures++; $display("FAIL %0d link requests", n_link_req); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
