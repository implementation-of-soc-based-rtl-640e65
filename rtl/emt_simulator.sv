// emt_simulator: the programmable-logic side of a real-time electromagnetic transient
// simulator. A power network is split into subsystems joined by link (current) branches;
// each subsystem is simulated by its own SEMETS unit, and all units run in parallel, each
// solving its nodal equations with a parallel Gauss-Jordan solver every time step. The
// processor loads each unit's netlist (branches, sources, history elements, link ports)
// and run settings through the host bus, starts the units (a broadcast write starts them
// together) and reads back node voltages after each step. When subsystems are linked,
// each unit stops after its solve with Thevenin voltages and impedances at its link
// ports (link_req); the processor solves the link currents, writes them back and lets all
// units complete the step with one broadcast write.
// Ports: the processor-side host bus (see host_bus) and, per unit, busy, step_done,
// run_done and link_req. Default: NSEMETS = 4 units of up to N = 26 nodes, 3 link ports
// each.
// The number of units, the maximum system size and the segmented solution flow are the
// document's; solving the link currents on the processor and the port sizes of the tables
// are this design's own.
module emt_simulator
  import emt_pkg::*;
#(
  parameter int unsigned NSEMETS   = 4,
  parameter int unsigned N         = 26,
  parameter int unsigned NBR       = 64,
  parameter int unsigned NSRC      = 4,
  parameter int unsigned NHIST     = 64,
  parameter int unsigned TAB_DEPTH = 256,
  parameter int unsigned NLINK     = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic               rd_en,
  input  logic [19:0]        addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  output logic               rvalid,
  output logic [NSEMETS-1:0] busy,
  output logic [NSEMETS-1:0] step_done,
  output logic [NSEMETS-1:0] run_done,
  output logic [NSEMETS-1:0] link_req
);
  logic [NSEMETS-1:0] s_wr, s_rd, s_rvalid;
  logic [15:0]        s_addr;
  logic [31:0]        s_wdata;
  logic [31:0]        s_rdata [NSEMETS];

  host_bus #(.NS(NSEMETS)) u_bus (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_en),
    .rd_en   (rd_en),
    .addr    (addr),
    .wdata   (wdata),
    .rdata   (rdata),
    .rvalid  (rvalid),
    .s_wr    (s_wr),
    .s_rd    (s_rd),
    .s_addr  (s_addr),
    .s_wdata (s_wdata),
    .s_rdata (s_rdata),
    .s_rvalid(s_rvalid)
  );

  for (genvar g = 0; g < NSEMETS; g++) begin : g_semets
    semets #(.N(N), .NBR(NBR), .NSRC(NSRC), .NHIST(NHIST), .TAB_DEPTH(TAB_DEPTH),
             .NLINK(NLINK)) u_semets (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_en    (s_wr[g]),
      .rd_en    (s_rd[g]),
      .addr     (s_addr),
      .wdata    (s_wdata),
      .rdata    (s_rdata[g]),
      .rvalid   (s_rvalid[g]),
      .busy     (busy[g]),
      .step_done(step_done[g]),
      .run_done (run_done[g]),
      .link_req (link_req[g])
    );
  end
endmodule
