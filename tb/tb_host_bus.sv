// tb_host_bus: checks write decoding (one unit, or every unit for the broadcast number
// 4'hF), the address and data passed to the units, and that read data returns from the
// addressed unit only, one cycle after the read.
// The address layout and broadcast number are this design's own.
module tb_host_bus;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en = 0, rd_en = 0, rvalid;
  logic [19:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [NS-1:0] s_wr, s_rd, s_rvalid;
  logic [15:0] s_addr;
  logic [31:0] s_wdata, s_rdata [NS];

  host_bus #(.NS(NS)) dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .rd_en(rd_en),
    .addr(addr), .wdata(wdata), .rdata(rdata), .rvalid(rvalid), .s_wr(s_wr), .s_rd(s_rd),
    .s_addr(s_addr), .s_wdata(s_wdata), .s_rdata(s_rdata), .s_rvalid(s_rvalid));

  // units: register their read strobe and answer with their number and the address
  always_ff @(posedge clk) for (int i = 0; i < NS; i++) begin
    s_rvalid[i] <= s_rd[i];
    s_rdata[i]  <= {4'(i), 12'd0, s_addr};
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int u;
      u = (t % 5 == 4) ? 15 : t % NS;
      @(negedge clk);
      wr_en = 1; addr = {4'(u), 16'(t * 7)}; wdata = $urandom;
      #1;
      checks++;
      if (s_wr != ((u == 15) ? 4'hF : 4'(1 << u)) || s_addr != 16'(t * 7) || s_wdata != wdata) begin
        failures++; $display("FAIL write to %0d: s_wr %b", u, s_wr);
      end
      @(negedge clk);
      wr_en = 0;
      if (u == 15) continue;
      rd_en = 1; addr = {4'(u), 16'(t * 3)};
      #1;
      checks++;
      if (s_rd != 4'(1 << u)) begin failures++; $display("FAIL read strobe %b", s_rd); end
      @(negedge clk);
      rd_en = 0;
      #1;
      checks++;
      if (!rvalid || rdata != {4'(u), 12'd0, 16'(t * 3)}) begin
        failures++; $display("FAIL read data %h from %0d", rdata, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
