// tb_gj_interconnect: random core outputs and reference rows; checks that the bus carries,
// one cycle later, the valid and data of the core numbered reference_row, and nothing for
// reference row 0.
// The selection by reference row follows the original solver structure; the one-cycle
// latency is this design's own.
module tb_gj_interconnect;
  import emt_pkg::*;
  localparam int N = 26;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]   ref_row = '0;
  logic [N-1:0] cv = '0;
  fp32_t        cd [N];
  logic         bv;
  fp32_t        bd;

  gj_interconnect #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .reference_row(ref_row),
                                .core_valid(cv), .core_data(cd), .bus_valid(bv), .bus_data(bd));

  int checks = 0, failures = 0;

  initial begin
    logic  ev;
    fp32_t ed;
    for (int i = 0; i < N; i++) cd[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      ref_row = 5'($urandom % (N + 1));
      cv = N'({$urandom, $urandom});
      for (int i = 0; i < N; i++) cd[i] = $urandom;
      ev = (ref_row == 0) ? 1'b0 : cv[ref_row - 1];
      ed = (ref_row == 0) ? FP_ZERO : cd[ref_row - 1];
      @(negedge clk);
      checks++;
      if (bv !== ev || bd !== ed) begin
        failures++; $display("FAIL ref %0d: %b %h expected %b %h", ref_row, bv, bd, ev, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
