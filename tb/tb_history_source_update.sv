// tb_history_source_update: loads 20 elements (inductor- and capacitor-type coefficients,
// some to ground) with random initial history values, applies random node voltages for
// five steps and checks h <- alpha*h + beta*(v_k - v_m) for every element against double
// precision, plus the latency of n_hist + 1 cycles from start to done.
// The trapezoidal history form follows the original work; the coefficients and voltages are
// random.
module tb_history_source_update;
  import emt_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 26, NHIST = 64, NE = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we = 0, start = 0, done;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  fp32_t       v [N+1];
  fp32_t       hh [NHIST];
  logic [4:0]  hk [NHIST], hm [NHIST];

  history_source_update #(.N(N), .NHIST(NHIST)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .n_hist(7'(NE)), .v(v), .start(start), .done(done), .hist_h(hh), .hist_k(hk), .hist_m(hm));

  int checks = 0, failures = 0;
  int  k [NE], m [NE];
  real al [NE], be [NE], h [NE], vr [N+1];

  task automatic wcfg(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 12'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    for (int i = 0; i <= N; i++) v[i] = FP_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < NE; e++) begin
      real g;
      k[e] = 1 + $urandom % N;
      m[e] = (e % 3 == 0) ? 0 : 1 + $urandom % N;
      g = to_real(to_fp32(0.1 + real'($urandom % 100) / 50.0));
      al[e] = (e % 2) ? 1.0 : -1.0;
      be[e] = (e % 2) ? 2.0 * g : -2.0 * g;
      h[e]  = to_real(to_fp32(real'($urandom % 200) / 10.0 - 10.0));
      wcfg(4*e + 0, (m[e] << 8) | k[e]);
      wcfg(4*e + 1, to_fp32(al[e]));
      wcfg(4*e + 2, to_fp32(be[e]));
      wcfg(4*e + 3, to_fp32(h[e]));
    end
    for (int t = 0; t < 5; t++) begin
      int lat;
      vr[0] = 0.0;
      for (int i = 1; i <= N; i++) begin
        vr[i] = to_real(to_fp32(real'($urandom % 2000) / 100.0 - 10.0));
        v[i]  = to_fp32(vr[i]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != NE + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int e = 0; e < NE; e++) begin
        h[e] = al[e] * h[e] + be[e] * (vr[k[e]] - vr[m[e]]);
        checks++;
        if (!close(to_real(hh[e]), h[e], 1e-5, 1e-3)) begin
          failures++;
          $display("FAIL step %0d h[%0d] = %f expected %f", t, e, to_real(hh[e]), h[e]);
        end
        h[e] = to_real(hh[e]);   // follow the hardware value to keep errors from growing
      end
    end
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
