// tb_source_generator: loads one period of a sine (256 points) and three sources (a
// sinusoid with a fractional phase step, a constant, and one with a phase offset), runs 40
// time steps and compares each value with interpolation done here in double precision. It
// also checks the step latency (n_src + 1 cycles from start to done) and the node outputs.
// Table lookup with interpolation follows the original source generator; the phase
// accumulator format is this design's own.
module tb_source_generator;
  import emt_pkg::*;
  import tb_fp_pkg::*;

  localparam int NSRC = 4, NS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tab_we = 0, src_we = 0, start = 0, done;
  logic [7:0]  tab_addr = '0;
  fp32_t       tab_data = '0;
  logic [11:0] src_addr = '0;
  logic [31:0] src_data = '0;
  fp32_t       val [NSRC];
  logic [4:0]  node [NSRC];

  source_generator #(.N(26), .NSRC(NSRC), .TAB_DEPTH(256)) dut (
    .clk(clk), .rst_n(rst_n), .tab_we(tab_we), .tab_addr(tab_addr), .tab_data(tab_data),
    .src_we(src_we), .src_addr(src_addr), .src_data(src_data), .n_src(3'(NS)),
    .start(start), .done(done), .src_val(val), .src_node(node));

  int checks = 0, failures = 0;
  real         tab [256];
  int unsigned ph [NS], inc [NS];
  real         amp [NS];

  task automatic wsrc(int s, int f, logic [31:0] d);
    @(negedge clk); src_we = 1; src_addr = 12'(4*s + f); src_data = d;
    @(negedge clk); src_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      tab[i] = to_real(to_fp32($sin(2.0 * 3.14159265358979 * i / 256.0)));
      @(negedge clk); tab_we = 1; tab_addr = 8'(i); tab_data = to_fp32(tab[i]);
    end
    @(negedge clk); tab_we = 0;
    ph  = '{32'h0, 32'h4000_0000, 32'h1234_5678};
    inc = '{32'h0123_4567, 32'h0, 32'h0345_6789};
    amp = '{10.0, 2.5, -3.0};
    for (int s = 0; s < NS; s++) begin
      wsrc(s, 0, ph[s]); wsrc(s, 1, inc[s]); wsrc(s, 2, to_fp32(amp[s])); wsrc(s, 3, 5 + s);
    end
    for (int t = 0; t < 40; t++) begin
      int lat;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != NS + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int s = 0; s < NS; s++) begin
        int  i0, i1;
        real f, e;
        i0 = int'(ph[s] >> 24); i1 = (i0 + 1) % 256;
        f  = real'(ph[s] & 32'h00ff_ffff) / 16777216.0;
        e  = amp[s] * (tab[i0] + f * (tab[i1] - tab[i0]));
        ph[s] += inc[s];
        checks++;
        if (!close(to_real(val[s]), e, 1e-5, 1e-5) || node[s] != 5'(5 + s)) begin
          failures++;
          $display("FAIL step %0d src %0d = %f expected %f", t, s, to_real(val[s]), e);
        end
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
