// gj_interconnect: the interconnection module of the Linear System Solver. It takes the
// output word of the core whose number equals reference_row and registers it onto a bus
// that every core reads (bus_valid/bus_data): the normalised row during elimination, the
// solution words during the return phase. Latency is BUS_LAT = 1 cycle.
// The document names this module and shows every core attached to it; the registered
// one-of-N selection is this design's own.
module gj_interconnect
  import emt_pkg::*;
#(
  parameter int unsigned N = 26,
  localparam int unsigned RW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] reference_row,
  input  logic [N-1:0]  core_valid,
  input  fp32_t         core_data [N],
  output logic          bus_valid,
  output fp32_t         bus_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      bus_data  <= FP_ZERO;
    end else if (reference_row >= RW'(1) && reference_row <= RW'(N)) begin
      bus_valid <= core_valid[reference_row - RW'(1)];
      bus_data  <= core_data[reference_row - RW'(1)];
    end else begin
      bus_valid <= 1'b0;
      bus_data  <= FP_ZERO;
    end
  end
endmodule
