// tb_emt_simulator: end-to-end test of the simulator at its default size (four SEMETS
// units of up to 26 nodes each), with no parameter overrides. The four units hold four
// different RLC ladder subsystems of 21, 21, 21 and 24 nodes (the partition sizes of the
// larger study case), each with a fault switch that closes at step 3.
//   unit 0: real-time mode, period longer than a step (the unit waits for each tick)
//   unit 1: offline mode
//   unit 2: real-time mode, period shorter than a step (every step overruns)
//   unit 3: offline mode, 24 nodes
// The waveform table is written once with a broadcast write, the netlists one unit at a
// time, and a broadcast write starts all four runs in the same cycle. After every step of
// every unit, a monitor reads all node voltages of that unit and compares them with the
// double-precision reference model. The test counts each mechanism it exercises (broadcast
// write, all units busy at once, switch closing, real-time wait, exact period spacing,
// overrun, offline back-to-back steps with the expected cycle count) and fails any that
// never happened.
// The unit count, the 26-node capacity and the subsystem sizes follow the original work;
// the ladder networks, periods and fault step are this test's own.
module tb_emt_simulator;
  import emt_pkg::*;
  import tb_fp_pkg::*;
  import tb_emt_ref_pkg::*;

  localparam int NU = 4, STEPS = 6, TFAULT = 3;
  localparam int SIZE [NU]   = '{21, 21, 21, 24};
  localparam int PERIOD [NU] = '{3000, 0, 500, 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en = 0, rd_en = 0, rvalid;
  logic [19:0]   addr = '0;
  logic [31:0]   wdata = '0, rdata;
  logic [NU-1:0] busy, step_done, run_done, link_req;

  emt_simulator dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .rd_en(rd_en), .addr(addr),
                     .wdata(wdata), .rdata(rdata), .rvalid(rvalid), .busy(busy),
                     .step_done(step_done), .run_done(run_done), .link_req(link_req));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  emt_ref model [NU];
  semaphore bus = new(1);

  // mechanism counters
  int n_bcast = 0, n_all_busy = 0, n_switch = 0, n_wait = 0, n_period = 0, n_overrun = 0,
      n_offline = 0, n_volt = 0;

  always @(posedge clk) if (busy == '1) n_all_busy <= n_all_busy + 1;

  task automatic wr(int unsigned u, int unsigned a, int unsigned d);
    bus.get(1);
    @(negedge clk); wr_en = 1; addr = {4'(u), 16'(a)}; wdata = d;
    @(negedge clk); wr_en = 0;
    bus.put(1);
  endtask

  task automatic rd(int unsigned u, int unsigned a, output logic [31:0] d);
    bus.get(1);
    @(negedge clk); rd_en = 1; addr = {4'(u), 16'(a)};
    @(negedge clk); rd_en = 0;
    d = rdata;
    checks++;
    if (!rvalid) begin failures++; $display("FAIL no rvalid"); end
    bus.put(1);
  endtask

  // per-unit monitor: voltages after every step, switch count, step spacing
  task automatic monitor(int u);
    int last = -1;
    logic [31:0] d;
    for (int t = 0; t < STEPS; t++) begin
      @(posedge clk iff step_done[u]);
      if (last >= 0) begin
        int w, lss_c, expect_c, gap;
        gap = cyc - last;
        if (PERIOD[u] == 0) begin
          w = SIZE[u] + 4;                  // voltages and three link columns
          lss_c = 1 + SIZE[u]*(w + 2) + SIZE[u]*(w + int'(ES_WB_CNT) + 2) + SIZE[u]*(4 + 3);
          expect_c = 1 + (model[u].nsrc + 2) + (lss_c + 1) + (SIZE[u] + 2) + (model[u].nh + 2)
                     + (model[u].nbr + model[u].nsrc + model[u].nh);
          checks++;
          if (gap != expect_c) begin
            failures++; $display("FAIL unit %0d step cycles %0d expected %0d", u, gap, expect_c);
          end else n_offline++;
        end else if (PERIOD[u] == 3000) begin
          checks++;
          if (gap != PERIOD[u]) begin
            failures++; $display("FAIL unit %0d step spacing %0d", u, gap);
          end else n_period++;
        end
      end
      last = cyc;
      model[u].step(t);
      rd(u, 16'h000a, d);
      checks++;
      if (d != (((t == STEPS-1 ? t : t+1) >= TFAULT) ? 1 : 0)) begin
        failures++; $display("FAIL unit %0d step %0d closed switches %0d", u, t, d);
      end else if (d == 1 && t + 1 == TFAULT) n_switch++;
      for (int i = 1; i <= SIZE[u]; i++) begin
        rd(u, 16'h5000 + i, d);
        checks++;
        if (!close(to_real(d), model[u].v[i], 2e-3, 1e-2)) begin
          failures++;
          $display("FAIL unit %0d step %0d v[%0d] = %f expected %f", u, t, i, to_real(d),
                   model[u].v[i]);
        end else n_volt++;
      end
    end
  endtask

  initial begin
    int unsigned qa[$], qd[$];
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < NU; u++) begin
      model[u] = new();
      model[u].ladder(SIZE[u], 1.0 + 0.5 * u, TFAULT, 1);
    end
    // shared waveform table, written to all units at once
    for (int i = 0; i < 256; i++) wr(15, 16'h1000 + i, to_fp32(model[0].tab[i]));
    n_bcast++;
    for (int u = 0; u < NU; u++) begin
      qa.delete(); qd.delete();
      model[u].regs(qa, qd, STEPS, PERIOD[u]);
      for (int i = 256; i < qa.size(); i++) wr(u, qa[i], qd[i]);
    end
    // the table reached every unit
    for (int u = 0; u < NU; u++) begin
      rd(u, 16'h0001, d);
      checks++;
      if (d != SIZE[u]) begin failures++; $display("FAIL unit %0d size %0d", u, d); end
    end
    wr(15, 16'h0000, 1);                    // broadcast start
    n_bcast++;
    fork
      monitor(0); monitor(1); monitor(2); monitor(3);
    join
    wait (busy == '0);
    for (int u = 0; u < NU; u++) begin
      rd(u, 16'h0008, d);
      checks++;
      if (d != STEPS) begin failures++; $display("FAIL unit %0d completed %0d", u, d); end
      rd(u, 16'h0007, d);
      checks++;
      if (d[1:0] != 2'b10) begin failures++; $display("FAIL unit %0d status %h", u, d); end
      checks++;
      if ((PERIOD[u] == 500) != (d[31:16] == 16'(STEPS))) begin
        failures++; $display("FAIL unit %0d overruns %0d", u, d[31:16]);
      end else if (d[31:16] != 0) n_overrun += int'(d[31:16]);
      rd(u, 16'h0009, d);
      checks++;
      if ((PERIOD[u] == 3000) != (d != 0)) begin
        failures++; $display("FAIL unit %0d wait cycles %0d", u, d);
      end else if (d != 0) n_wait++;
    end
    $display("mechanisms: broadcast %0d, all busy cycles %0d, switch %0d, rt wait %0d, period %0d, overrun %0d, offline steps %0d, voltages %0d",
             n_bcast, n_all_busy, n_switch, n_wait, n_period, n_overrun, n_offline, n_volt);
    checks += 8;
    if (n_bcast == 0)    begin failures++; $display("FAIL no broadcast"); end
    if (n_all_busy == 0) begin failures++; $display("FAIL units never ran together"); end
    if (n_switch != NU)  begin failures++; $display("FAIL switch closings %0d", n_switch); end
    if (n_wait == 0)     begin failures++; $display("FAIL no real-time wait"); end
    if (n_period == 0)   begin failures++; $display("FAIL no period spacing"); end
    if (n_overrun == 0)  begin failures++; $display("FAIL no overrun"); end
    if (n_offline == 0)  begin failures++; $display("FAIL no offline step"); end
    if (n_volt == 0)     begin failures++; $display("FAIL no voltage checked"); end
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
