// semets: Small ElectroMagnetic Transient Simulator unit. One SEMETS holds and simulates
// one subsystem of up to N nodes: every time step it generates the source values, forms
// the conductance matrix and current vector, solves the nodal equations G v = I with the
// parallel Gauss-Jordan solver, and updates the history sources from the new voltages.
// Several SEMETS run side by side, one per subsystem.
//
// Host port: single-cycle word writes (wr_en) and reads (rd_en, rdata valid the next cycle,
// rvalid) at a 16-bit word address: region in addr[15:12], offset in addr[11:0] (map in
// emt_pkg):
//   RG_CTRL   start, node / step / branch / source / history counts, real-time period,
//             status {overruns, run done, busy}, completed steps
//   RG_SGTAB  waveform table of the source generator
//   RG_SGSRC  source parameters            (index*4 + field)
//   RG_BRANCH conductance branches          (index*4 + field)
//   RG_HIST   history elements              (index*4 + field; field 3 reads back h)
//   RG_VOLT   node voltages of the last solved step (offset = node, 1..n)
//   RG_LINK   link ports (index*4 + field: 0 node, 1 link current of this step)
//   RG_VTH    Thevenin voltages of the subsystem standing alone (offset = node)
//   RG_ZTH    Thevenin impedance column of each link port (index*32 + node)
// step_done pulses after each time step, when new voltages can be read.
// Link exchange: with n_link > 0 the unit stops after the solver in every step, pulses
// link_req and sets the link-wait status bit; the processor reads v_th and z_j at the
// link nodes of all units, solves the link currents, writes them (RG_LINK field 1) and
// writes CR_LINKGO, and the unit completes the voltages and updates its history sources.
// The submodules (control unit, source generator, history update, G/I update, solver) and
// the segmented solution flow are the document's; the register map, the capture of the
// solver output and the link-exchange handshake are this design's own.
module semets
  import emt_pkg::*;
#(
  parameter int unsigned N         = 26,
  parameter int unsigned NBR       = 64,
  parameter int unsigned NSRC      = 4,
  parameter int unsigned NHIST     = 64,
  parameter int unsigned TAB_DEPTH = 256,
  parameter int unsigned NLINK     = 3,
  localparam int unsigned RW       = $clog2(N + 1),
  localparam int unsigned LW       = $clog2(NLINK + 1),
  localparam int unsigned LI       = (NLINK > 1) ? $clog2(NLINK) : 1,
  localparam int unsigned BW       = $clog2(NBR + 1),
  localparam int unsigned SW       = $clog2(NSRC + 1),
  localparam int unsigned HW       = $clog2(NHIST + 1),
  localparam int unsigned TW       = $clog2(TAB_DEPTH),
  localparam int unsigned HI       = (NHIST > 1) ? $clog2(NHIST) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic [15:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  output logic        busy,
  output logic        step_done,
  output logic        run_done,
  output logic        link_req
);
  logic [3:0]  region;
  logic [11:0] off;
  assign region = addr[15:12];
  assign off    = addr[11:0];

  // ------------------------------------------------------------------ registers
  logic [RW-1:0] n_nodes;
  logic [23:0]   n_steps;
  logic [BW-1:0] n_br;
  logic [SW-1:0] n_src;
  logic [HW-1:0] n_hist;
  logic [31:0]   period;
  logic [LW-1:0] n_link;
  logic [RW-1:0] link_node [NLINK];
  fp32_t         i_link    [NLINK];
  logic          link_go;
  logic          run_start;
  logic          finished_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_nodes       <= '0;
      n_steps       <= '0;
      n_br          <= '0;
      n_src         <= '0;
      n_hist        <= '0;
      period        <= '0;
      n_link        <= '0;
      link_go       <= 1'b0;
      for (int j = 0; j < NLINK; j++) begin
        link_node[j] <= '0;
        i_link[j]    <= FP_ZERO;
      end
      run_start     <= 1'b0;
      finished_flag <= 1'b0;
    end else begin
      run_start <= 1'b0;
      link_go   <= 1'b0;
      if (wr_en && region == RG_LINK && off[11:2] < 10'(NLINK)) begin
        if (off[1:0] == 2'd0) link_node[LI'(off[11:2])] <= RW'(wdata);
        if (off[1:0] == 2'd1) i_link[LI'(off[11:2])]    <= wdata;
      end
      if (wr_en && region == RG_CTRL) begin
        unique case (off)
          CR_START:  begin
            run_start     <= wdata[0];
            finished_flag <= 1'b0;
          end
          CR_NODES:  n_nodes <= RW'(wdata);
          CR_STEPS:  n_steps <= wdata[23:0];
          CR_NBR:    n_br    <= BW'(wdata);
          CR_NSRC:   n_src   <= SW'(wdata);
          CR_NHIST:  n_hist  <= HW'(wdata);
          CR_PERIOD: period  <= wdata;
          CR_NLINK:  n_link  <= LW'(wdata);
          CR_LINKGO: link_go <= wdata[0];
          default: ;
        endcase
      end
      if (run_done) finished_flag <= 1'b1;
    end
  end

  // ------------------------------------------------------------------ units
  logic sg_start, sg_done, gu_start, gu_done, lss_start, lss_finished, hsu_start, hsu_done;
  logic comp_start, comp_done, link_wait;
  logic [23:0] step;
  logic [15:0] overruns;
  logic [31:0] wait_cycles;
  logic [BW-1:0] n_closed;

  semets_control u_ctl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (run_start),
    .n_steps     (n_steps),
    .period      (period),
    .sg_start    (sg_start),
    .sg_done     (sg_done),
    .gu_start    (gu_start),
    .lss_start   (lss_start),
    .lss_finished(lss_finished),
    .link_mode   (n_link != '0),
    .link_req    (link_req),
    .link_wait   (link_wait),
    .link_go     (link_go),
    .comp_start  (comp_start),
    .comp_done   (comp_done),
    .hsu_start   (hsu_start),
    .hsu_done    (hsu_done),
    .step_done   (step_done),
    .step        (step),
    .busy        (busy),
    .run_done    (run_done),
    .overruns    (overruns),
    .wait_cycles (wait_cycles)
  );

  fp32_t         src_val  [NSRC];
  logic [RW-1:0] src_node [NSRC];

  source_generator #(.N(N), .NSRC(NSRC), .TAB_DEPTH(TAB_DEPTH)) u_sg (
    .clk     (clk),
    .rst_n   (rst_n),
    .tab_we  (wr_en && region == RG_SGTAB),
    .tab_addr(TW'(off)),
    .tab_data(wdata),
    .src_we  (wr_en && region == RG_SGSRC),
    .src_addr(off),
    .src_data(wdata),
    .n_src   (n_src),
    .start   (sg_start),
    .done    (sg_done),
    .src_val (src_val),
    .src_node(src_node)
  );

  fp32_t         v [N+1];
  fp32_t         hist_h [NHIST];
  logic [RW-1:0] hist_k [NHIST];
  logic [RW-1:0] hist_m [NHIST];

  history_source_update #(.N(N), .NHIST(NHIST)) u_hsu (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_we  (wr_en && region == RG_HIST),
    .cfg_addr(off),
    .cfg_data(wdata),
    .n_hist  (n_hist),
    .v       (v),
    .start   (hsu_start),
    .done    (hsu_done),
    .hist_h  (hist_h),
    .hist_k  (hist_k),
    .hist_m  (hist_m)
  );

  logic  gu_valid, lss_ready, lss_out_valid;
  fp32_t gu_data, lss_out_data;

  // ports beyond n_link are disabled (node 0 gives an all-zero impedance column)
  logic [RW-1:0] link_node_act [NLINK];
  always_comb
    for (int j = 0; j < NLINK; j++)
      link_node_act[j] = (LW'(j) < n_link) ? link_node[j] : '0;

  gi_update #(.N(N), .NBR(NBR), .NSRC(NSRC), .NHIST(NHIST), .NLINK(NLINK)) u_gu (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (wr_en && region == RG_BRANCH),
    .cfg_addr (off),
    .cfg_data (wdata),
    .n_nodes  (n_nodes),
    .n_br     (n_br),
    .n_src    (n_src),
    .n_hist   (n_hist),
    .step     (step),
    .src_val  (src_val),
    .src_node (src_node),
    .hist_h   (hist_h),
    .hist_k   (hist_k),
    .hist_m   (hist_m),
    .link_node(link_node_act),
    .start    (gu_start),
    .out_valid(gu_valid),
    .out_data (gu_data),
    .out_ready(lss_ready),
    .done     (gu_done),
    .n_closed (n_closed)
  );

  lss_phase_e    lss_phase;
  logic [RW-1:0] lss_row;
  logic          lss_busy;

  lss #(.N(N), .NRHS(1 + NLINK)) u_lss (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (lss_start),
    .n_active      (n_nodes),
    .in_valid      (gu_valid),
    .in_data       (gu_data),
    .in_ready      (lss_ready),
    .out_valid     (lss_out_valid),
    .out_data      (lss_out_data),
    .busy          (lss_busy),
    .finished      (lss_finished),
    .solution_phase(lss_phase),
    .reference_row (lss_row)
  );

  fp32_t vth [N+1];
  fp32_t zth [NLINK][N+1];

  link_compensation #(.N(N), .NLINK(NLINK)) u_comp (
    .clk      (clk),
    .rst_n    (rst_n),
    .n_nodes  (n_nodes),
    .sol_start(lss_start),
    .sol_valid(lss_out_valid),
    .sol_data (lss_out_data),
    .i_link   (i_link),
    .start    (comp_start),
    .done     (comp_done),
    .vth      (vth),
    .zth      (zth),
    .v        (v)
  );

  // ------------------------------------------------------------------ host reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd_en;
      rdata  <= '0;
      if (rd_en) begin
        unique case (region)
          RG_CTRL: begin
            unique case (off)
              CR_NODES:  rdata <= 32'(n_nodes);
              CR_STEPS:  rdata <= 32'(n_steps);
              CR_PERIOD: rdata <= period;
              CR_STATUS: rdata <= {overruns, 13'd0, link_wait, finished_flag, busy};
              CR_NLINK:  rdata <= 32'(n_link);
              CR_STEPNO: rdata <= 32'(step) + (finished_flag ? 32'd1 : 32'd0);
              CR_WAIT:   rdata <= wait_cycles;
              CR_CLOSED: rdata <= 32'(n_closed);
              default:   rdata <= '0;
            endcase
          end
          RG_HIST:  if (off[11:2] < 10'(NHIST)) rdata <= hist_h[HI'(off[11:2])];
          RG_VOLT:  if (off <= 12'(N)) rdata <= v[RW'(off)];
          RG_VTH:   if (off <= 12'(N)) rdata <= vth[RW'(off)];
          RG_ZTH:   if (off[11:5] < 7'(NLINK) && off[4:0] <= 5'(N))
                      rdata <= zth[LI'(off[11:5])][RW'(off[4:0])];
          RG_LINK:  if (off[11:2] < 10'(NLINK) && off[1:0] == 2'd0)
                      rdata <= 32'(link_node[LI'(off[11:2])]);
                    else if (off[11:2] < 10'(NLINK) && off[1:0] == 2'd1)
                      rdata <= i_link[LI'(off[11:2])];
          default:  rdata <= '0;
        endcase
      end
    end
  end

  // the solver takes the whole matrix stream the update unit produces
  a_stream_taken : assert property (@(posedge clk) disable iff (!rst_n)
                                    gu_done |-> lss_busy);
endmodule
