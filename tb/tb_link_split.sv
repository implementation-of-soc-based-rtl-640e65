// tb_link_split: the segmented solution of the whole simulator, at its default size. A
// 30-node network (three 10-node RLC ladders joined in a chain by two link resistors) is
// split at the links into three subsystems, one per SEMETS unit (the fourth unit stays
// idle). Subsystem A has one link port, B two (one per link), C one. Every time step the
// units solve their subsystems standing alone and return Thevenin voltages and impedance
// columns; the testbench, playing the processor, reads them at the link nodes, solves the
// 2-by-2 system for the two link currents, writes each unit's port currents and starts the
// compensation of all units with one broadcast write. The final voltages of every node are
// compared with a double-precision solution of the unsplit 30-node network.
// The segmentation by link currents follows the original method; the three-ladder network
// and link resistances are this test's own.
module tb_link_split;
  import emt_pkg::*;
  import tb_fp_pkg::*;
  import tb_emt_ref_pkg::*;

  localparam int NU = 3, NN = 10, STEPS = 6, TFAULT = 3;
  localparam real R1 = 0.5, R2 = 2.0;        // link resistances

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         wr_en = 0, rd_en = 0, rvalid;
  logic [19:0]  addr = '0;
  logic [31:0]  wdata = '0, rdata;
  logic [3:0]   busy, step_done, run_done, link_req;

  emt_simulator dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .rd_en(rd_en), .addr(addr),
                     .wdata(wdata), .rdata(rdata), .rvalid(rvalid), .busy(busy),
                     .step_done(step_done), .run_done(run_done), .link_req(link_req));

  int checks = 0, failures = 0, n_exchange = 0, n_volt = 0;
  emt_ref full, unit [NU];

  task automatic wr(int unsigned u, int unsigned a, int unsigned d);
    @(negedge clk); wr_en = 1; addr = {4'(u), 16'(a)}; wdata = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(int unsigned u, int unsigned a, output logic [31:0] d);
    @(negedge clk); rd_en = 1; addr = {4'(u), 16'(a)};
    @(negedge clk); rd_en = 0;
    d = rdata;
  endtask

  function automatic real rr(logic [31:0] d);
    return to_real(d);
  endfunction

  // link ports: {unit, port, node}
  localparam int PU [4] = '{0, 1, 1, 2};
  localparam int PN [4] = '{NN, 1, NN, 1};
  localparam int PJ [4] = '{0, 0, 1, 0};

  initial begin
    int unsigned qa[$], qd[$];
    logic [31:0] d;
    full = new();
    for (int u = 0; u < NU; u++) begin
      full.ladder(NN, 1.0 + 0.5 * u, TFAULT, 1, u * NN);
      unit[u] = new();
      unit[u].ladder(NN, 1.0 + 0.5 * u, TFAULT, 1);
    end
    full.add_branch(NN, NN + 1, 1.0 / R1);
    full.add_branch(2 * NN, 2 * NN + 1, 1.0 / R2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < NU; u++) begin
      qa.delete(); qd.delete();
      unit[u].regs(qa, qd, STEPS, 0);
      foreach (qa[i]) wr(u, qa[i], qd[i]);
    end
    for (int p = 0; p < 4; p++) wr(PU[p], 16'h6000 + 4 * PJ[p], PN[p]);
    wr(0, 16'h000b, 1);
    wr(1, 16'h000b, 2);
    wr(2, 16'h000b, 1);
    wr(15, 16'h0000, 1);                      // start all units
    for (int t = 0; t < STEPS; t++) begin
      real a, b1, b10, c, za, zb01, zb11, zb010, zb110, zc, m11, m12, m21, m22, r1, r2, det,
           i1, i2;
      // wait until every unit waits for its link currents
      do begin
        @(negedge clk);
        d = '1;
        for (int u = 0; u < NU; u++) begin
          logic [31:0] st;
          rd(u, 16'h0007, st);
          d[u] = st[2];
        end
      end while (d[2:0] != 3'b111);
      n_exchange++;
      rd(0, 16'h7000 + NN, d); a = rr(d);
      rd(0, 16'h8000 + NN, d); za = rr(d);
      rd(1, 16'h7000 + 1, d);  b1 = rr(d);
      rd(1, 16'h7000 + NN, d); b10 = rr(d);
      rd(1, 16'h8000 + 1, d);  zb01 = rr(d);
      rd(1, 16'h8020 + 1, d);  zb11 = rr(d);
      rd(1, 16'h8000 + NN, d); zb010 = rr(d);
      rd(1, 16'h8020 + NN, d); zb110 = rr(d);
      rd(2, 16'h7000 + 1, d);  c = rr(d);
      rd(2, 16'h8000 + 1, d);  zc = rr(d);
      // v = v_th - sum z_j * (current leaving at port j); link k: v_k - v_m = R * i
      m11 = za + zb01 + R1;  m12 = -zb11;  r1 = a - b1;
      m21 = -zb010;          m22 = zb110 + zc + R2;  r2 = b10 - c;
      det = m11 * m22 - m12 * m21;
      i1 = (r1 * m22 - m12 * r2) / det;
      i2 = (m11 * r2 - m21 * r1) / det;
      wr(0, 16'h6001, to_fp32(i1));
      wr(1, 16'h6001, to_fp32(-i1));
      wr(1, 16'h6005, to_fp32(i2));
      wr(2, 16'h6001, to_fp32(-i2));
      wr(15, 16'h000c, 1);                    // all units continue
      full.step(t);
      for (int u = 0; u < NU; u++) begin
        // wait for this unit's step to end: its history update follows the compensation
        logic [31:0] sn;
        do rd(u, 16'h0008, sn); while (int'(sn) < t + 1);
        for (int i = 1; i <= NN; i++) begin
          rd(u, 16'h5000 + i, d);
          checks++;
          if (!close(rr(d), full.v[u * NN + i], 2e-3, 1e-2)) begin
            failures++;
            $display("FAIL step %0d unit %0d v[%0d] = %f expected %f", t, u, i, rr(d),
                     full.v[u * NN + i]);
          end else n_volt++;
        end
      end
    end
    $display("link exchanges %0d, voltages checked %0d", n_exchange, n_volt);
    checks += 2;
    if (n_exchange != STEPS) begin failures++; $display("FAIL link exchanges"); end
    if (n_volt == 0) begin failures++; $display("FAIL no voltage checked"); end
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
