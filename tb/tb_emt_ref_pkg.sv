// tb_emt_ref_pkg: double-precision reference model of one subsystem simulation, used by the
// SEMETS and top-level testbenches. It follows the textbook nodal formulation: each step it
// evaluates the sources (table interpolation), stamps the branch conductances and the
// source and history injections, solves G v = I by Gauss-Jordan elimination, and updates
// the trapezoidal history sources h <- alpha*h + beta*(v_k - v_m). It also writes the same
// netlist into a SEMETS through a caller-supplied register write task.
// The nodal formulation and trapezoidal history update follow the original work; the ladder
// test networks are this package's own.
package tb_emt_ref_pkg;
  import tb_fp_pkg::*;

  localparam int MAXN = 32;

  class emt_ref;
    int  n;
    real tab [256];
    int  nsrc;
    int unsigned s_phase [8];
    int unsigned s_inc   [8];
    real s_amp [8];
    int  s_node [8];
    int  nbr;
    int  b_k [64], b_m [64];
    real b_gon [64], b_goff [64];
    bit  b_sw [64], b_init [64];
    int  b_tsw [64];
    int  nh;
    int  h_k [64], h_m [64];
    real h_alpha [64], h_beta [64], h_val [64];
    real v [MAXN+1];

    function new();
      n = 0; nsrc = 0; nbr = 0; nh = 0;
      for (int i = 0; i < 256; i++) tab[i] = $sin(2.0 * 3.14159265358979 * i / 256.0);
      for (int i = 0; i <= MAXN; i++) v[i] = 0.0;
    endfunction

    // values are rounded to binary32 so that model and hardware start from equal numbers
    function real q(real x);
      return to_real(to_fp32(x));
    endfunction

    function void add_branch(int k, int m, real gon, real goff = 0.0, bit sw = 0,
                             bit init = 1, int tsw = 24'hffffff);
      b_k[nbr] = k; b_m[nbr] = m; b_gon[nbr] = q(gon); b_goff[nbr] = q(goff);
      b_sw[nbr] = sw; b_init[nbr] = init; b_tsw[nbr] = tsw;
      nbr++;
    endfunction

    function void add_hist(int k, int m, real alpha, real beta);
      h_k[nh] = k; h_m[nh] = m; h_alpha[nh] = q(alpha); h_beta[nh] = q(beta); h_val[nh] = 0.0;
      nh++;
    endfunction

    function void add_src(int node, real amp, int unsigned inc, int unsigned phase0);
      s_node[nsrc] = node; s_amp[nsrc] = q(amp); s_inc[nsrc] = inc; s_phase[nsrc] = phase0;
      nsrc++;
    endfunction

    // RLC ladder of nn nodes: sinusoidal current source into node 1, series inductors
    // between neighbours, a capacitor and a resistor from every node to ground, and a
    // fault switch from the last node to ground that closes at step tfault. With merge_rc
    // the resistor and capacitor of a node form one branch (parallel conductances add);
    // off shifts the node numbers, so that several ladders can share one network.
    function void ladder(int nn, real scale, int tfault, bit merge_rc = 0, int off = 0);
      if (off + nn > n) n = off + nn;
      for (int i = off + 1; i <= off + nn; i++) begin
        if (merge_rc) add_branch(i, 0, 0.1 * scale + 2.0);
        else begin
          add_branch(i, 0, 0.1 * scale);               // resistor to ground
          add_branch(i, 0, 2.0);                       // capacitor, g = 2C/dt
        end
        add_hist(i, 0, -1.0, -4.0);
        if (i < off + nn) begin
          add_branch(i, i + 1, 0.5);                   // inductor, g = dt/2L
          add_hist(i, i + 1, 1.0, 1.0);
        end
      end
      add_branch(off + nn, 0, 5.0, 0.0, 1, 0, tfault); // fault switch, open until tfault
      add_src(off + 1, 10.0 * scale, 32'h0200_0000, 32'h0);      // 128 steps per period
      add_src(off + nn / 2 + 1, 1.0, 32'h0, 32'h4000_0000);      // constant (point 64 = 1.0)
    endfunction

    // register writes (16-bit word address, data) that load this netlist into a SEMETS
    function void regs(ref int unsigned a[$], ref int unsigned d[$], input int steps,
                       input int unsigned period);
      for (int i = 0; i < 256; i++) begin a.push_back(32'h1000 + i); d.push_back(to_fp32(tab[i])); end
      for (int s = 0; s < nsrc; s++) begin
        a.push_back(32'h2000 + 4*s + 0); d.push_back(s_phase[s]);
        a.push_back(32'h2000 + 4*s + 1); d.push_back(s_inc[s]);
        a.push_back(32'h2000 + 4*s + 2); d.push_back(to_fp32(s_amp[s]));
        a.push_back(32'h2000 + 4*s + 3); d.push_back(s_node[s]);
      end
      for (int b = 0; b < nbr; b++) begin
        a.push_back(32'h3000 + 4*b + 0); d.push_back((b_m[b] << 8) | b_k[b]);
        a.push_back(32'h3000 + 4*b + 1); d.push_back(to_fp32(b_gon[b]));
        a.push_back(32'h3000 + 4*b + 2); d.push_back(to_fp32(b_goff[b]));
        a.push_back(32'h3000 + 4*b + 3); d.push_back((b_tsw[b] << 8) | (b_init[b] << 1) | b_sw[b]);
      end
      for (int e = 0; e < nh; e++) begin
        a.push_back(32'h4000 + 4*e + 0); d.push_back((h_m[e] << 8) | h_k[e]);
        a.push_back(32'h4000 + 4*e + 1); d.push_back(to_fp32(h_alpha[e]));
        a.push_back(32'h4000 + 4*e + 2); d.push_back(to_fp32(h_beta[e]));
        a.push_back(32'h4000 + 4*e + 3); d.push_back(to_fp32(h_val[e]));
      end
      a.push_back(32'h0001); d.push_back(n);
      a.push_back(32'h0002); d.push_back(steps);
      a.push_back(32'h0003); d.push_back(nbr);
      a.push_back(32'h0004); d.push_back(nsrc);
      a.push_back(32'h0005); d.push_back(nh);
      a.push_back(32'h0006); d.push_back(period);
    endfunction

    function void step(int t);
      real G [MAXN+1][MAXN+2];
      for (int r = 0; r <= n; r++) for (int c = 0; c <= n + 1; c++) G[r][c] = 0.0;
      for (int s = 0; s < nsrc; s++) begin
        int  i0, i1;
        real f, val;
        i0 = int'(s_phase[s] >> 24);
        i1 = (i0 + 1) % 256;
        f  = real'(s_phase[s] & 32'h00ff_ffff) / 16777216.0;
        val = s_amp[s] * (tab[i0] + f * (tab[i1] - tab[i0]));
        G[s_node[s]][n + 1] += val;
        s_phase[s] += s_inc[s];
      end
      for (int b = 0; b < nbr; b++) begin
        real g;
        g = b_gon[b];
        if (b_sw[b] && !(b_init[b] ^ (t >= b_tsw[b]))) g = b_goff[b];
        G[b_k[b]][b_k[b]] += g; G[b_m[b]][b_m[b]] += g;
        G[b_k[b]][b_m[b]] -= g; G[b_m[b]][b_k[b]] -= g;
      end
      for (int e = 0; e < nh; e++) begin
        G[h_k[e]][n + 1] -= h_val[e];
        G[h_m[e]][n + 1] += h_val[e];
      end
      for (int i = 1; i <= n; i++) begin
        real p;
        p = G[i][i];
        for (int c = 1; c <= n + 1; c++) G[i][c] /= p;
        for (int k = 1; k <= n; k++) if (k != i) begin
          real f;
          f = G[k][i];
          for (int c = 1; c <= n + 1; c++) G[k][c] -= f * G[i][c];
        end
      end
      v[0] = 0.0;
      for (int i = 1; i <= n; i++) v[i] = G[i][n + 1];
      for (int e = 0; e < nh; e++)
        h_val[e] = h_alpha[e] * h_val[e] + h_beta[e] * (v[h_k[e]] - v[h_m[e]]);
    endfunction
  endclass
endpackage
