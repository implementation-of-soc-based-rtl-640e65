// gj_row_ram: the dual-port block RAM that holds one matrix row inside a Core_GJ.
// Port A is read-only and belongs to the upper control section; port B is write-only and
// belongs to the lower section, so one read and one write can happen in the same cycle.
// Reads are synchronous: the word addressed in cycle c appears on qa in cycle c+1. A read
// and a write of the same address in one cycle return the old word.
// The document specifies a real dual-port BRAM per row; the read-first behaviour and the
// absence of reset are this design's choices (every word is written in the INIT phase
// before it is read).
module gj_row_ram #(
  parameter int unsigned DEPTH = 27,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addra,
  output logic [WIDTH-1:0] qa,
  input  logic             web,
  input  logic [AW-1:0]    addrb,
  input  logic [WIDTH-1:0] db
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    qa <= mem[addra];
    if (web) mem[addrb] <= db;
  end
endmodule
