// semets_control: the Control Unit of a SEMETS. It runs the time-step loop of an
// electromagnetic transient simulation for one subsystem:
//   1. source generator   : source values for the step             (sg_start  -> sg_done)
//   2. G/I update + solver: form [G | I] and stream it into the LSS,
//                           which solves G v = I                    (gu_start, lss_start
//                                                                    -> lss_finished)
//   3. link exchange      : only with link ports (link_mode): link_req pulses and the
//                           control waits for link_go, the processor's signal that it
//                           has solved the link currents from the Thevenin equivalents
//   4. compensation       : final voltages from the link currents  (comp_start -> comp_done)
//   5. history update     : new history sources from v              (hsu_start -> hsu_done)
// then step_done pulses and the step counter advances, until n_steps steps are done.
// Two modes, set by period:
//   offline   (period = 0): each step starts as soon as the previous one ends;
//   real time (period > 0): a step starts every period clock cycles (20 us at 250 MHz is
//                           5000 cycles). A step that is still running when its period
//                           ends makes the next one start late and counts one overrun.
// Interface: start pulses once per run; busy is high during the run; run_done pulses at
// the end. step is the number of the step being computed (0-based).
// The order of the units follows the document's flow (update G, Thevenin equivalents and
// partial voltages, link currents, complete voltages, update history); the handshake, the
// period timer and the overrun count are this design's own. link_go is taken only while
// the control waits for it (link_wait).
module semets_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] n_steps,
  input  logic [31:0] period,
  output logic        sg_start,
  input  logic        sg_done,
  output logic        gu_start,
  output logic        lss_start,
  input  logic        lss_finished,
  input  logic        link_mode,
  output logic        link_req,
  output logic        link_wait,
  input  logic        link_go,
  output logic        comp_start,
  input  logic        comp_done,
  output logic        hsu_start,
  input  logic        hsu_done,
  output logic        step_done,
  output logic [23:0] step,
  output logic        busy,
  output logic        run_done,
  output logic [15:0] overruns,
  output logic [31:0] wait_cycles    // cycles spent waiting for the real-time tick
);
  typedef enum logic [2:0] {C_IDLE, C_WAIT, C_SG, C_SOLVE, C_LINK, C_COMP, C_HSU} ctl_state_e;
  ctl_state_e state;

  logic [31:0] timer;     // cycles since the current period began
  logic        tick;      // a new period may begin
  assign tick = (period == '0) || (timer >= period - 32'd1);

  assign busy      = (state != C_IDLE);
  assign link_wait = (state == C_LINK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      step        <= '0;
      timer       <= '0;
      sg_start    <= 1'b0;
      gu_start    <= 1'b0;
      lss_start   <= 1'b0;
      hsu_start   <= 1'b0;
      link_req    <= 1'b0;
      comp_start  <= 1'b0;
      step_done   <= 1'b0;
      run_done    <= 1'b0;
      overruns    <= '0;
      wait_cycles <= '0;
    end else begin
      sg_start  <= 1'b0;
      gu_start  <= 1'b0;
      lss_start <= 1'b0;
      hsu_start <= 1'b0;
      link_req  <= 1'b0;
      comp_start <= 1'b0;
      step_done <= 1'b0;
      run_done  <= 1'b0;
      timer     <= timer + 32'd1;
      unique case (state)
        C_IDLE: if (start) begin
          step     <= '0;
          overruns <= '0;
          if (n_steps == '0) run_done <= 1'b1;
          else begin
            state    <= C_SG;
            sg_start <= 1'b1;
            timer    <= '0;
          end
        end
        C_WAIT: begin
          if (tick) begin
            state    <= C_SG;
            sg_start <= 1'b1;
            timer    <= '0;
          end else begin
            wait_cycles <= wait_cycles + 32'd1;
          end
        end
        C_SG: if (sg_done) begin
          state     <= C_SOLVE;
          gu_start  <= 1'b1;
          lss_start <= 1'b1;
        end
        C_SOLVE: if (lss_finished) begin
          if (link_mode) begin
            state    <= C_LINK;
            link_req <= 1'b1;
          end else begin
            state      <= C_COMP;
            comp_start <= 1'b1;
          end
        end
        C_LINK: if (link_go) begin
          state      <= C_COMP;
          comp_start <= 1'b1;
        end
        C_COMP: if (comp_done) begin
          state     <= C_HSU;
          hsu_start <= 1'b1;
        end
        C_HSU: if (hsu_done) begin
          step_done <= 1'b1;
          if (period != '0 && timer >= period) overruns <= overruns + 16'd1;
          if (step == n_steps - 24'd1) begin
            state    <= C_IDLE;
            run_done <= 1'b1;
          end else begin
            step  <= step + 24'd1;
            state <= C_WAIT;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
