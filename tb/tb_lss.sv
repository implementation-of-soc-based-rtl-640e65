// tb_lss: self-checking test of the Linear System Solver at its default size (26 cores).
// Solves random diagonally dominant systems of size 26, 17 and 5, compares every solution
// word with a double-precision Gauss-Jordan reference computed here, and checks the cycle
// count from start to finished against the formula
//   1 + n*(W + 2) + n*(W + ES_WB_CNT + 2) + n*(NRHS + 3),  W = n + NRHS.
// The 26-row capacity and the Gauss-Jordan method follow the original solver; the cycle
// formula is this design's own timing.
module tb_lss;
  import emt_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 26;
  localparam int NRHS = 1;
  localparam int RW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start;
  logic [RW-1:0] n_active;
  logic          in_valid, in_ready, out_valid, busy, finished;
  fp32_t         in_data, out_data;
  lss_phase_e    phase;
  logic [RW-1:0] ref_row;

  lss #(.N(N), .NRHS(NRHS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .n_active(n_active),
    .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
    .out_valid(out_valid), .out_data(out_data), .busy(busy), .finished(finished),
    .solution_phase(phase), .reference_row(ref_row)
  );

  int checks = 0, failures = 0;
  real   A [N][N+1];
  fp32_t stream [N*(N+1)];
  real   x_ref [N];
  fp32_t got [N];
  int    idx, nwords, ngot;

  assign in_valid = in_ready && idx < nwords;
  assign in_data  = stream[idx];

  always_ff @(posedge clk) begin
    if (in_valid) idx <= idx + 1;
    if (out_valid && ngot < N) begin
      got[ngot] <= out_data;
      ngot <= ngot + 1;
    end
  end

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
  endfunction

  task automatic make_system(int n);
    real M [N][N+1];
    for (int r = 0; r < n; r++) begin
      real sum = 0.0;
      for (int c = 0; c < n; c++) begin
        A[r][c] = (r == c) ? 0.0 : (($urandom % 3 == 0) ? rnd(-2.0, 2.0) : 0.0);
        sum += (A[r][c] < 0) ? -A[r][c] : A[r][c];
      end
      A[r][r] = sum + rnd(0.5, 3.0);
      A[r][n] = rnd(-10.0, 10.0);
      // round to single precision so the reference starts from the same numbers
      for (int c = 0; c <= n; c++) A[r][c] = to_real(to_fp32(A[r][c]));
      for (int c = 0; c <= n; c++) stream[r*(n+1)+c] = to_fp32(A[r][c]);
    end
    // double-precision Gauss-Jordan reference
    for (int r = 0; r < n; r++) for (int c = 0; c <= n; c++) M[r][c] = A[r][c];
    for (int i = 0; i < n; i++) begin
      real p = M[i][i];
      for (int c = 0; c <= n; c++) M[i][c] = M[i][c] / p;
      for (int k = 0; k < n; k++) if (k != i) begin
        real f = M[k][i];
        for (int c = 0; c <= n; c++) M[k][c] = M[k][c] - f * M[i][c];
      end
    end
    for (int r = 0; r < n; r++) x_ref[r] = M[r][n];
  endtask

  task automatic run(int n);
    int cyc, expect_cyc, w;
    real g, e;
    make_system(n);
    idx = 0; nwords = n * (n + 1); ngot = 0;
    n_active = RW'(n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!finished) begin @(negedge clk); cyc++; end
    w = n + NRHS;
    expect_cyc = 1 + n*(w + 2) + n*(w + int'(ES_WB_CNT) + 2) + n*(NRHS + 3);
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("FAIL n=%0d cycles %0d expected %0d", n, cyc, expect_cyc);
    end else $display("n=%0d solved in %0d cycles", n, cyc);
    checks++;
    if (ngot != n) begin failures++; $display("FAIL n=%0d got %0d words", n, ngot); end
    for (int r = 0; r < n; r++) begin
      g = to_real(got[r]);
      e = x_ref[r];
      checks++;
      if (!close(g, e, 1e-4, 1.0)) begin
        failures++;
        $display("FAIL n=%0d x[%0d] = %f expected %f", n, r, g, e);
      end
    end
  endtask

  initial begin
    start = 0; n_active = RW'(N); idx = 0; nwords = 0; ngot = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run(26);
    run(17);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
