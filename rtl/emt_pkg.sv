// emt_pkg: types, constants and single-precision floating-point arithmetic shared by the
// electromagnetic-transient simulator.
//
// Number format: IEEE-754 binary32 words. The arithmetic functions below round to nearest
// even, flush subnormal inputs and results to zero and saturate overflow to infinity; NaN
// is not produced or propagated. The document states only that the row arithmetic is a
// floating-point unit; precision, rounding and special-value handling are this design's own
// choices.
//
// Also defined here: the LSS solution phases, the fixed pipeline latencies that the Early
// Start constant table is built from, and the SEMETS register map.
package emt_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;

  // ---------------------------------------------------------------- LSS phases
  // The Global Control drives one of these on solution_phase. INIT loads rows, ELIM runs
  // one Gauss-Jordan iteration per reference row, RETURN streams the solution out.
  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_INIT   = 2'd1,
    PH_ELIM   = 2'd2,
    PH_RETURN = 2'd3
  } lss_phase_e;

  // Vector arithmetic unit operations.
  typedef enum logic [0:0] {
    VAU_DIV  = 1'b0,   // y = a / s
    VAU_MSUB = 1'b1    // y = a - s * b
  } vau_op_e;

  // Latencies, in clock cycles.
  localparam int unsigned VAU_LAT = 4;  // vector arithmetic unit, input to output
  localparam int unsigned BUS_LAT = 1;  // interconnection register
  // Early Start constant table for an elimination iteration, counted from the cycle in which
  // Global Control pulses valid (count 0). A trigger seen in cycle c takes effect from c+1.
  //   count 0            : every core addresses column i (pivot / factor) on its read port;
  //                        the reference core starts reading its row (columns 0.. at 1..)
  //   ES_ELIM_CNT        : other cores start reading their rows (es_lu_elimination), timed
  //                        so that element j meets normalised element j from the bus
  //   ES_WB_CNT          : other cores start writing the eliminated row (es_lu_writeBackRE);
  //                        the iteration ends W cycles later with done
  localparam int unsigned ES_ELIM_CNT = 1 + VAU_LAT;
  localparam int unsigned ES_WB_CNT   = 1 + VAU_LAT + BUS_LAT + VAU_LAT;

  // ---------------------------------------------------------------- SEMETS register map
  // Word address inside one SEMETS: region in addr[15:12], offset in addr[11:0].
  localparam logic [3:0] RG_CTRL   = 4'h0;  // control and status registers
  localparam logic [3:0] RG_SGTAB  = 4'h1;  // source-generator waveform table
  localparam logic [3:0] RG_SGSRC  = 4'h2;  // source parameters: index*4 + field
  localparam logic [3:0] RG_BRANCH = 4'h3;  // conductance branches: index*4 + field
  localparam logic [3:0] RG_HIST   = 4'h4;  // history elements: index*4 + field
  localparam logic [3:0] RG_VOLT   = 4'h5;  // node voltages (read only), offset = node
  localparam logic [3:0] RG_LINK   = 4'h6;  // link ports: index*4 + field (0 node, 1 current)
  localparam logic [3:0] RG_VTH    = 4'h7;  // Thevenin (uncompensated) voltages, offset = node
  localparam logic [3:0] RG_ZTH    = 4'h8;  // Thevenin impedance columns: index*32 + node

  // Control registers (offset in RG_CTRL)
  localparam logic [11:0] CR_START  = 12'h000;  // write: bit0 start run
  localparam logic [11:0] CR_NODES  = 12'h001;  // active node count n
  localparam logic [11:0] CR_STEPS  = 12'h002;  // time steps per run
  localparam logic [11:0] CR_NBR    = 12'h003;  // active branch count
  localparam logic [11:0] CR_NSRC   = 12'h004;  // active source count
  localparam logic [11:0] CR_NHIST  = 12'h005;  // active history element count
  localparam logic [11:0] CR_PERIOD = 12'h006;  // real-time step period in cycles, 0 = offline
  localparam logic [11:0] CR_STATUS = 12'h007;  // read: {overruns[15:0], 13'b0, link wait, done, busy}
  localparam logic [11:0] CR_STEPNO = 12'h008;  // read: completed steps
  localparam logic [11:0] CR_WAIT   = 12'h009;  // read: cycles spent waiting for the period
  localparam logic [11:0] CR_CLOSED = 12'h00a;  // read: switches closed in the current step
  localparam logic [11:0] CR_NLINK  = 12'h00b;  // active link ports; 0 = no link exchange
  localparam logic [11:0] CR_LINKGO = 12'h00c;  // write: link currents written, continue

  // ---------------------------------------------------------------- float helpers
  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Round a normalised 23-bit fraction with guard and sticky bits and pack the result.
  // e is the biased exponent before rounding.
  function automatic fp32_t fp_pack(logic s, logic signed [11:0] e, logic [22:0] frac,
                                    logic g, logic st);
    logic [23:0] r;
    logic signed [11:0] ee;
    r  = {1'b0, frac};
    ee = e;
    if (g && (st || frac[0])) r = r + 24'd1;
    if (r[23]) ee = ee + 12'sd1;               // fraction rolled over: 1.111.. -> 10.000..
    if (ee <= 0)   return {s, 31'd0};
    if (ee >= 255) return {s, 8'hff, 23'd0};
    return {s, ee[7:0], r[22:0]};
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic        s;
    logic [47:0] p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 12'(signed'({4'd0, a[30:23]})) + 12'(signed'({4'd0, b[30:23]})) - 12'sd127;
    if (p[47]) return fp_pack(s, e + 12'sd1, p[46:24], p[23], |p[22:0]);
    else       return fp_pack(s, e,          p[45:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t       x, y;
    logic [49:0] mx, my, sum;
    logic [7:0]  d;
    logic        st;
    logic signed [11:0] e;
    int          lz;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? FP_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    // x is the operand of larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = x[30:23] - y[30:23];
    mx = {1'b0, 1'b1, x[22:0], 25'd0};
    my = {1'b0, 1'b1, y[22:0], 25'd0};
    st = 1'b0;
    if (d > 8'd48) begin
      my = 50'd0;
      st = 1'b1;
    end else begin
      for (int i = 0; i < 49; i++)
        if (i < int'(d) && my[i]) st = 1'b1;
      my = my >> d;
    end
    my[0] = my[0] | st;
    if (x[31] == y[31]) sum = mx + my;
    else                sum = mx - my;
    if (sum == 50'd0) return FP_ZERO;
    e = 12'(signed'({4'd0, x[30:23]}));
    if (sum[49]) begin
      sum = {1'b0, sum[49:2], sum[1] | sum[0]};
      e   = e + 12'sd1;
    end else begin
      lz = 0;
      for (int i = 48; i >= 0; i--)
        if (sum[i] && lz == 0) lz = 49 - i;
      // lz - 1 is the left shift that brings the leading one to bit 48
      sum = sum << (lz - 1);
      e   = e - 12'(lz - 1);
    end
    return fp_pack(x[31], e, sum[47:25], sum[24], |sum[23:0]);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic        s;
    logic [49:0] num, q, r;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {s, 8'hff, 23'd0};
    if (a[30:23] == 8'd0) return {s, 31'd0};
    num = {1'b1, a[22:0], 26'd0};
    q   = num / {26'd0, 1'b1, b[22:0]};
    r   = num % {26'd0, 1'b1, b[22:0]};
    e   = 12'(signed'({4'd0, a[30:23]})) - 12'(signed'({4'd0, b[30:23]})) + 12'sd127;
    if (q[26]) return fp_pack(s, e,          q[25:3], q[2], (|q[1:0]) | (r != 50'd0));
    else       return fp_pack(s, e - 12'sd1, q[24:2], q[1], q[0] | (r != 50'd0));
  endfunction

  // Unsigned fraction f / 2^24 (f < 2^24) to binary32.
  function automatic fp32_t fp_from_frac24(logic [23:0] f);
    int          lead;
    logic [23:0] m;
    if (f == 24'd0) return FP_ZERO;
    lead = 0;
    for (int i = 0; i < 24; i++)
      if (f[i]) lead = i;
    m = f << (23 - lead);
    // value = 1.m * 2^(lead - 24); exact, no rounding needed
    return {1'b0, 8'(127 + lead - 24), m[22:0]};
  endfunction

endpackage
