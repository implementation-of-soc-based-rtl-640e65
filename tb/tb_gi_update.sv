// tb_gi_update: a 4-node subsystem with five branches (one of them a switch that closes at
// step 3), two source injections and two history elements. For step 0 and step 5 it
// collects the streamed rows [G | I] under a randomly stalling out_ready and compares every
// word with a matrix stamped here in double precision, including the three link-port
// columns (ports at nodes 3 and 1, the third unused); it also checks the closed-switch
// count and that done follows the last word.
// The stamping rules are standard nodal analysis; the network is this test's own.
module tb_gi_update;
  import emt_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 26, NBR = 64, NSRC = 4, NHIST = 64, NLINK = 3, NN = 4, NB = 5, W = NN + 1 + NLINK;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we = 0, start = 0, out_valid, out_ready = 0, done;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic [23:0] step = '0;
  fp32_t       src_val [NSRC], hist_h [NHIST], out_data;
  logic [4:0]  src_node [NSRC], hist_k [NHIST], hist_m [NHIST];
  logic [4:0]  link_node [NLINK] = '{5'd3, 5'd1, 5'd0};
  logic [6:0]  n_closed;

  gi_update #(.N(N), .NBR(NBR), .NSRC(NSRC), .NHIST(NHIST)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .n_nodes(5'(NN)), .n_br(7'(NB)), .n_src(3'd2), .n_hist(7'd2), .step(step),
    .src_val(src_val), .src_node(src_node), .hist_h(hist_h), .hist_k(hist_k),
    .hist_m(hist_m), .link_node(link_node), .start(start), .out_valid(out_valid), .out_data(out_data),
    .out_ready(out_ready), .done(done), .n_closed(n_closed));

  int checks = 0, failures = 0;
  int  bk [NB] = '{1, 1, 2, 3, 4};
  int  bm [NB] = '{0, 2, 3, 4, 0};
  real gon [NB] = '{1.0, 0.5, 0.25, 2.0, 10.0};
  real goff [NB] = '{0.0, 0.0, 0.0, 0.0, 0.001};

  task automatic wcfg(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 12'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic check_step(int t);
    real G [NN+1][W+1];
    fp32_t got [$];
    bit seen_done;
    step = 24'(t);
    for (int r = 0; r <= NN; r++) for (int c = 0; c <= W; c++) G[r][c] = 0.0;
    G[3][NN+2] = 1.0; G[1][NN+3] = 1.0;            // link-port columns
    for (int b = 0; b < NB; b++) begin
      real g;
      g = (b == 4 && t < 3) ? goff[b] : gon[b];
      g = to_real(to_fp32(g));
      G[bk[b]][bk[b]] += g; G[bm[b]][bm[b]] += g; G[bk[b]][bm[b]] -= g; G[bm[b]][bk[b]] -= g;
    end
    G[1][NN+1] += 3.0;  G[3][NN+1] += -1.5;        // sources
    G[2][NN+1] -= 0.75; G[0][NN+1] += 0.75;        // history element 2 -> 0
    G[2][NN+1] -= -2.0; G[4][NN+1] += -2.0;        // history element 2 -> 4
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    seen_done = 0;
    while (got.size() < NN * W || !seen_done) begin
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) got.push_back(out_data);
      @(negedge clk);
      if (done) seen_done = 1;
      if (got.size() > NN * W) break;
    end
    out_ready = 0;
    checks++;
    if (got.size() != NN * W) begin failures++; $display("FAIL %0d words", got.size()); end
    else for (int r = 1; r <= NN; r++) for (int c = 1; c <= W; c++) begin
      checks++;
      if (!close(to_real(got[(r-1)*W + c-1]), G[r][c], 1e-6, 1e-6)) begin
        failures++;
        $display("FAIL step %0d [%0d][%0d] = %f expected %f", t, r, c,
                 to_real(got[(r-1)*W + c-1]), G[r][c]);
      end
    end
    checks++;
    if (n_closed != 7'((t >= 3) ? 1 : 0)) begin failures++; $display("FAIL n_closed %0d", n_closed); end
  endtask

  initial begin
    for (int i = 0; i < NSRC; i++) begin src_val[i] = FP_ZERO; src_node[i] = '0; end
    for (int i = 0; i < NHIST; i++) begin hist_h[i] = FP_ZERO; hist_k[i] = '0; hist_m[i] = '0; end
    src_val[0] = to_fp32(3.0);  src_node[0] = 5'd1;
    src_val[1] = to_fp32(-1.5); src_node[1] = 5'd3;
    hist_h[0] = to_fp32(0.75);  hist_k[0] = 5'd2; hist_m[0] = 5'd0;
    hist_h[1] = to_fp32(-2.0);  hist_k[1] = 5'd2; hist_m[1] = 5'd4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      wcfg(4*b + 0, (bm[b] << 8) | bk[b]);
      wcfg(4*b + 1, to_fp32(gon[b]));
      wcfg(4*b + 2, to_fp32(goff[b]));
      wcfg(4*b + 3, (b == 4) ? ((3 << 8) | 32'h1) : 32'h0);   // switch, open, closes at 3
    end
    check_step(0);
    check_step(5);
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
