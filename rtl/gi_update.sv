// gi_update (GU, "System GI Update"): forms the nodal conductance matrix G and the current
// vector I = I_src - I_hist of one subsystem for the current time step, and streams the
// augmented rows [G | I] to the linear system solver.
// Branches: every conductance of the subsystem (resistors and the equivalent conductances
// of discretised inductors, capacitors and line sections) is a branch {k, m, g_on, g_off,
// flags}. A branch marked as a switch is time variant: its conductance is g_on while closed
// and g_off while open. Its state is the initial state in flags[1], inverted from time step
// flags[31:8] on, so a fault or a breaker operation is scheduled by the host in advance.
// Node 0 is ground; stamps into row or column 0 are kept but not sent.
// Sequence after start (one cycle each unless stated):
//   clear G and I;
//   one branch per cycle: G[k][k] += g, G[m][m] += g, G[k][m] -= g, G[m][k] -= g;
//   one source per cycle: I[node] += value;
//   one history element per cycle: I[k] -= h, I[m] += h (branch current g*v_km + h);
//   stream rows 1..n, n+1+NLINK words each (G[r][1..n], I[r], then one unit-injection
//   column per link port: 1.0 where r is the port's node, else 0), under
//   out_valid/out_ready; pulse done.
// The link columns make the solver return, besides the voltages, the Thevenin impedance
// column z_j = G^-1 e_node(j) of every link port (level 2 of the segmented solution). An
// unused port has node 0, so its column is all zero.
// The matrix is rebuilt completely in every step, the worst case the document measures.
// The document says only that this unit forms and manages the conductance matrix and
// handles changes of time-variant elements; the branch-list representation, the switch
// schedule and the streaming interface are this design's own.
module gi_update
  import emt_pkg::*;
#(
  parameter int unsigned N     = 26,
  parameter int unsigned NBR   = 64,
  parameter int unsigned NSRC  = 4,
  parameter int unsigned NHIST = 64,
  parameter int unsigned NLINK = 3,
  localparam int unsigned RW   = $clog2(N + 1),
  localparam int unsigned BW   = $clog2(NBR + 1),
  localparam int unsigned SW   = $clog2(NSRC + 1),
  localparam int unsigned HW   = $clog2(NHIST + 1),
  localparam int unsigned BI   = (NBR > 1) ? $clog2(NBR) : 1,
  localparam int unsigned SI   = (NSRC > 1) ? $clog2(NSRC) : 1,
  localparam int unsigned HI   = (NHIST > 1) ? $clog2(NHIST) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [11:0]   cfg_addr,
  input  logic [31:0]   cfg_data,
  input  logic [RW-1:0] n_nodes,
  input  logic [BW-1:0] n_br,
  input  logic [SW-1:0] n_src,
  input  logic [HW-1:0] n_hist,
  input  logic [23:0]   step,
  input  fp32_t         src_val  [NSRC],
  input  logic [RW-1:0] src_node [NSRC],
  input  fp32_t         hist_h   [NHIST],
  input  logic [RW-1:0] hist_k   [NHIST],
  input  logic [RW-1:0] hist_m   [NHIST],
  input  logic [RW-1:0] link_node [NLINK],
  input  logic          start,
  output logic          out_valid,
  output fp32_t         out_data,
  input  logic          out_ready,
  output logic          done,
  output logic [BW-1:0] n_closed      // switches closed in the current step
);
  // branch table
  logic [RW-1:0] br_k     [NBR];
  logic [RW-1:0] br_m     [NBR];
  fp32_t         br_gon   [NBR];
  fp32_t         br_goff  [NBR];
  logic          br_sw    [NBR];
  logic          br_init  [NBR];
  logic [23:0]   br_tsw   [NBR];

  fp32_t G [N+1][N+1];
  fp32_t I [N+1];

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_BRANCH, S_SRC, S_HIST, S_STREAM} gu_state_e;
  gu_state_e state;
  logic [7:0]    idx;
  logic [RW:0]   row, col;     // stream position, col == n_nodes + 1 selects I

  function automatic logic sw_closed(int b, logic [23:0] t);
    return br_init[b] ^ (t >= br_tsw[b]);
  endfunction

  // conductance of the branch being stamped
  logic [BI-1:0] wi;               // branch written by the host
  assign wi = BI'(cfg_addr[11:2]);
  logic [BI-1:0] bi;
  fp32_t         g_eff;
  logic [RW-1:0] bk, bm;
  assign bi    = BI'(idx);
  assign bk    = br_k[bi];
  assign bm    = br_m[bi];
  assign g_eff = (br_sw[bi] && !sw_closed(int'(bi), step)) ? br_goff[bi] : br_gon[bi];

  // source and history element being added
  logic [SI-1:0] si;
  logic [HI-1:0] hi;
  assign si = SI'(idx);
  assign hi = HI'(idx);

  logic [RW:0]   icol, lcol;   // column of I, last column
  assign icol = (RW+1)'(n_nodes) + (RW+1)'(1);
  assign lcol = icol + (RW+1)'(NLINK);

  assign out_valid = (state == S_STREAM);
  always_comb begin
    out_data = FP_ZERO;
    if (col < icol) out_data = G[RW'(row)][RW'(col)];
    else if (col == icol) out_data = I[RW'(row)];
    else
      for (int j = 0; j < NLINK; j++)
        if (col == icol + (RW+1)'(j + 1) && link_node[j] == RW'(row)) out_data = FP_ONE;
  end

  always_comb begin
    n_closed = '0;
    for (int b = 0; b < NBR; b++)
      if (BW'(b) < n_br && br_sw[b] && sw_closed(b, step)) n_closed = n_closed + BW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      row   <= '0;
      col   <= '0;
      done  <= 1'b0;
      for (int b = 0; b < NBR; b++) begin
        br_k[b]    <= '0;
        br_m[b]    <= '0;
        br_gon[b]  <= FP_ZERO;
        br_goff[b] <= FP_ZERO;
        br_sw[b]   <= 1'b0;
        br_init[b] <= 1'b0;
        br_tsw[b]  <= '1;
      end
      for (int r = 0; r <= N; r++) begin
        I[r] <= FP_ZERO;
        for (int c = 0; c <= N; c++) G[r][c] <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      if (cfg_we && cfg_addr[11:2] < 10'(NBR)) begin
        unique case (cfg_addr[1:0])
          2'd0: begin
            br_k[wi] <= RW'(cfg_data[7:0]);
            br_m[wi] <= RW'(cfg_data[15:8]);
          end
          2'd1: br_gon[wi]  <= cfg_data;
          2'd2: br_goff[wi] <= cfg_data;
          2'd3: begin
            br_sw[wi]   <= cfg_data[0];
            br_init[wi] <= cfg_data[1];
            br_tsw[wi]  <= cfg_data[31:8];
          end
          default: ;
        endcase
      end

      unique case (state)
        S_IDLE: if (start) state <= S_CLEAR;
        S_CLEAR: begin
          for (int r = 0; r <= N; r++) begin
            I[r] <= FP_ZERO;
            for (int c = 0; c <= N; c++) G[r][c] <= FP_ZERO;
          end
          idx   <= '0;
          state <= (n_br != '0) ? S_BRANCH : (n_src != '0) ? S_SRC :
                   (n_hist != '0) ? S_HIST : S_STREAM;
          row   <= (RW+1)'(1);
          col   <= (RW+1)'(1);
        end
        S_BRANCH: begin
          G[bk][bk] <= fp_add(G[bk][bk], g_eff);
          G[bm][bm] <= fp_add(G[bm][bm], g_eff);
          G[bk][bm] <= fp_sub(G[bk][bm], g_eff);
          G[bm][bk] <= fp_sub(G[bm][bk], g_eff);
          if (BW'(idx) == n_br - BW'(1)) begin
            idx   <= '0;
            state <= (n_src != '0) ? S_SRC : (n_hist != '0) ? S_HIST : S_STREAM;
          end else idx <= idx + 8'd1;
        end
        S_SRC: begin
          I[src_node[si]] <= fp_add(I[src_node[si]], src_val[si]);
          if (SW'(idx) == n_src - SW'(1)) begin
            idx   <= '0;
            state <= (n_hist != '0) ? S_HIST : S_STREAM;
          end else idx <= idx + 8'd1;
        end
        S_HIST: begin
          if (hist_k[hi] == hist_m[hi]) begin
            // degenerate element: no net injection
          end else begin
            I[hist_k[hi]] <= fp_sub(I[hist_k[hi]], hist_h[hi]);
            I[hist_m[hi]] <= fp_add(I[hist_m[hi]], hist_h[hi]);
          end
          if (HW'(idx) == n_hist - HW'(1)) begin
            idx   <= '0;
            state <= S_STREAM;
          end else idx <= idx + 8'd1;
        end
        S_STREAM: if (out_ready) begin
          if (col == lcol) begin
            col <= (RW+1)'(1);
            if (row == (RW+1)'(n_nodes)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else row <= row + (RW+1)'(1);
          end else col <= col + (RW+1)'(1);
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
