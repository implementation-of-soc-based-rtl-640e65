// tb_semets: runs one SEMETS (default sizes) on an 8-node RLC ladder with a sinusoidal and a
// constant current source and a fault switch that closes at step 6, for 12 time steps in
// offline mode. After every step it reads all node voltages over the host port and
// compares them with the double-precision reference model; it also checks the switch count
// before and after the fault, the completed-step register, and that the cycle count of a
// step equals source + stamping + solver + history update.
// The unit sequence follows the original SEMETS; the ladder network and fault step are this
// test's own.
module tb_semets;
  import emt_pkg::*;
  import tb_fp_pkg::*;
  import tb_emt_ref_pkg::*;

  localparam int NN = 8, STEPS = 12, TFAULT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en = 0, rd_en = 0, rvalid, busy, step_done, run_done, link_req;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0, rdata;

  semets dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .rd_en(rd_en), .addr(addr),
              .wdata(wdata), .rdata(rdata), .rvalid(rvalid), .busy(busy),
              .step_done(step_done), .run_done(run_done), .link_req(link_req));

  int checks = 0, failures = 0;
  emt_ref model;

  task automatic wr(int unsigned a, int unsigned d);
    @(negedge clk); wr_en = 1; addr = 16'(a); wdata = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(int unsigned a, output logic [31:0] d);
    @(negedge clk); rd_en = 1; addr = 16'(a);
    @(negedge clk); rd_en = 0;
    d = rdata;
    if (!rvalid) begin failures++; $display("FAIL no rvalid"); end
  endtask

  int unsigned qa[$], qd[$];
  int step_cycles, last_done, cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    logic [31:0] d;
    model = new();
    model.ladder(NN, 1.0, TFAULT);
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    model.regs(qa, qd, STEPS, 0);
    foreach (qa[i]) wr(qa[i], qd[i]);
    wr(32'h0000, 1);
    last_done = cyc;
    for (int t = 0; t < STEPS; t++) begin
      @(posedge clk iff step_done);
      step_cycles = cyc - last_done;
      last_done = cyc;
      model.step(t);
      rd(32'h000a, d);
      checks++;
      // the step counter already points at the next step
      if (d != (((t == STEPS-1 ? t : t+1) >= TFAULT) ? 1 : 0)) begin
        failures++; $display("FAIL step %0d closed switches %0d", t, d);
      end
      for (int i = 1; i <= NN; i++) begin
        rd(32'h5000 + i, d);
        checks++;
        if (!close(to_real(d), model.v[i], 2e-3, 1e-2)) begin
          failures++;
          $display("FAIL step %0d v[%0d] = %f expected %f", t, i, to_real(d), model.v[i]);
        end
      end
      if (t == 1) begin
        // per-step cycle count (offline): SG, G/I stamps, LSS, HSU
        int w, lss_c, expect_c;
        w = NN + 4;                       // voltages and three link columns
        lss_c = 1 + NN*(w + 2) + NN*(w + int'(ES_WB_CNT) + 2) + NN*(4 + 3);
        // the matrix stream starts after the branch, source and history stamps
        expect_c = 1 + (model.nsrc + 2) + (lss_c + 1) + (NN + 2) + (model.nh + 2)
                   + (model.nbr + model.nsrc + model.nh);
        checks++;
        if (step_cycles != expect_c) begin
          failures++; $display("FAIL step cycles %0d expected %0d", step_cycles, expect_c);
        end else $display("step of %0d nodes takes %0d cycles", NN, step_cycles);
      end
    end
    @(posedge clk iff !busy);
    rd(32'h0008, d);
    checks++;
    if (d != STEPS) begin failures++; $display("FAIL completed steps %0d", d); end
    rd(32'h0007, d);
    checks++;
    if (d[1] != 1'b1 || d[0] != 1'b0) begin failures++; $display("FAIL status %h", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
