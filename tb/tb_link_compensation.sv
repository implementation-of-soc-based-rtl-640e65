// tb_link_compensation: streams random solver output (rows of v_th and three impedance
// columns, with gaps in sol_valid) for several system sizes, sets random link currents and
// checks every final voltage against v_th - sum z_j * i_j computed in double precision,
// the captured v_th and z_j, and that done comes n + 1 cycles after start. A pass with
// all link currents zero must return v_th unchanged.
// The superposition formula follows the original segmentation method; the data are random.
module tb_link_compensation;
  import emt_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 26, NLINK = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sol_start = 0, sol_valid = 0, start = 0, done;
  logic [4:0]  n_nodes = '0;
  fp32_t       sol_data = '0;
  fp32_t       i_link [NLINK];
  fp32_t       vth [N+1], zth [NLINK][N+1], v [N+1];

  link_compensation #(.N(N), .NLINK(NLINK)) dut (
    .clk(clk), .rst_n(rst_n), .n_nodes(n_nodes), .sol_start(sol_start),
    .sol_valid(sol_valid), .sol_data(sol_data), .i_link(i_link), .start(start),
    .done(done), .vth(vth), .zth(zth), .v(v));

  int checks = 0, failures = 0;

  task automatic run(int n, bit zero_currents);
    real ev [N+1], ez [NLINK][N+1], ei [NLINK];
    int  t0;
    n_nodes = 5'(n);
    for (int j = 0; j < NLINK; j++) begin
      ei[j] = zero_currents ? 0.0 : (real'($urandom % 2001) - 1000.0) / 100.0;
      i_link[j] = to_fp32(ei[j]);
      ei[j] = to_real(i_link[j]);
    end
    @(negedge clk); sol_start = 1;
    @(negedge clk); sol_start = 0;
    for (int r = 1; r <= n; r++)
      for (int w = 0; w <= NLINK; w++) begin
        fp32_t x;
        while ($urandom % 4 == 0) @(negedge clk);
        x = to_fp32((real'($urandom % 20001) - 10000.0) / 1000.0);
        if (w == 0) ev[r] = to_real(x); else ez[w-1][r] = to_real(x);
        sol_valid = 1; sol_data = x;
        @(negedge clk);
        sol_valid = 0;
      end
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 1;
    while (!done) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != n + 1) begin failures++; $display("FAIL n=%0d done after %0d cycles", n, t0); end
    for (int r = 1; r <= n; r++) begin
      real e;
      e = ev[r];
      for (int j = 0; j < NLINK; j++) e -= ez[j][r] * ei[j];
      checks += 2;
      if (!close(to_real(v[r]), e, 1e-5, 1e-4)) begin
        failures++; $display("FAIL n=%0d v[%0d] = %f expected %f", n, r, to_real(v[r]), e);
      end
      if (to_real(vth[r]) != ev[r] || to_real(zth[NLINK-1][r]) != ez[NLINK-1][r]) begin
        failures++; $display("FAIL n=%0d capture of row %0d", n, r);
      end
      if (zero_currents) begin
        checks++;
        if (v[r] != vth[r]) begin failures++; $display("FAIL zero currents changed v[%0d]", r); end
      end
    end
  endtask

  initial begin
    for (int j = 0; j < NLINK; j++) i_link[j] = FP_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 0);
    run(26, 0);
    run(17, 1);
    run(1, 0);
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
