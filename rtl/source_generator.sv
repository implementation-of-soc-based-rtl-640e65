// source_generator: produces the value of every independent source of a subsystem for the
// current time step, from a waveform lookup table and linear interpolation between its
// points.
// All sources share one table of TAB_DEPTH binary32 points holding one period of the
// waveform (loaded by the host, e.g. a sine). Each source s has a 32-bit phase accumulator,
// a phase increment per time step, an amplitude and the node it injects into. The upper
// log2(TAB_DEPTH) phase bits select point y0 and its successor y1 (wrapping), the next 24
// bits are the fraction f (so TAB_DEPTH must be a power of two, at most 256), and
//     value_s = amplitude_s * (y0 + f * (y1 - y0)),   phase_s += increment_s.
// A source with increment 0 is constant. Values are Norton current injections, positive
// into the node.
// Interface: start pulses once per time step; one source is evaluated per cycle; done
// pulses one cycle after the last, so a step takes n_src + 1 cycles. Source parameters are
// written through src_we/src_addr (index*4 + field: 0 phase, 1 increment, 2 amplitude,
// 3 node) and table points through tab_we/tab_addr.
// The document states only that this unit works from lookup tables and interpolation of
// discrete waveform points; the shared table, the phase accumulator and the field layout
// are this design's own.
module source_generator
  import emt_pkg::*;
#(
  parameter int unsigned N         = 26,
  parameter int unsigned NSRC      = 4,
  parameter int unsigned TAB_DEPTH = 256,
  localparam int unsigned RW       = $clog2(N + 1),
  localparam int unsigned TW       = $clog2(TAB_DEPTH),
  localparam int unsigned SW       = $clog2(NSRC + 1),
  localparam int unsigned IW       = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tab_we,
  input  logic [TW-1:0] tab_addr,
  input  fp32_t         tab_data,
  input  logic          src_we,
  input  logic [11:0]   src_addr,
  input  logic [31:0]   src_data,
  input  logic [SW-1:0] n_src,
  input  logic          start,
  output logic          done,
  output fp32_t         src_val  [NSRC],
  output logic [RW-1:0] src_node [NSRC]
);
  fp32_t       table_q [TAB_DEPTH];
  logic [31:0] phase [NSRC];
  logic [31:0] incr  [NSRC];
  fp32_t       amp   [NSRC];

  logic          busy;
  logic [SW-1:0] s;
  logic [IW-1:0] si;
  assign si = IW'(s);
  logic [IW-1:0] wi;                 // source written by the host
  assign wi = IW'(src_addr[11:2]);

  // interpolation for source s
  logic [TW-1:0] i0, i1;
  logic [23:0]   frac;
  fp32_t         y0, y1, f, interp;
  always_comb begin
    i0     = phase[si][31 -: TW];
    i1     = i0 + TW'(1);
    frac   = phase[si][31-TW -: 24];
    y0     = table_q[i0];
    y1     = table_q[i1];
    f      = fp_from_frac24(frac);
    interp = fp_add(y0, fp_mul(f, fp_sub(y1, y0)));
  end

  always_ff @(posedge clk) begin
    if (tab_we) table_q[tab_addr] <= tab_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      s    <= '0;
      for (int k = 0; k < NSRC; k++) begin
        phase[k]    <= '0;
        incr[k]     <= '0;
        amp[k]      <= FP_ZERO;
        src_node[k] <= '0;
        src_val[k]  <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      if (src_we && src_addr[11:2] < 10'(NSRC)) begin
        unique case (src_addr[1:0])
          2'd0: phase[wi]    <= src_data;
          2'd1: incr[wi]     <= src_data;
          2'd2: amp[wi]      <= src_data;
          2'd3: src_node[wi] <= RW'(src_data);
          default: ;
        endcase
      end
      if (!busy) begin
        if (start) begin
          if (n_src == '0) done <= 1'b1;
          else begin
            busy <= 1'b1;
            s    <= '0;
          end
        end
      end else begin
        src_val[si] <= fp_mul(amp[si], interp);
        phase[si]   <= phase[si] + incr[si];
        if (s == n_src - SW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          s <= s + SW'(1);
        end
      end
    end
  end
endmodule
