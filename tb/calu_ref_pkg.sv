// calu_ref_pkg: behavioural reference of the CALU arithmetic and of the whole
// array, written with plain integers for the testbenches to compare against.
//
// A hybrid word is (m, p): m is the 20-bit mantissa as an int, p the
// protection bit (value = m * 8**p). The rules modelled are those of the
// overflow scheme: align exponents, compute exactly, rescale by 2**-3 once on
// the first overflow, saturate on the second. array_model steps a
// ROWS x COLS array one clock at a time, evaluating horizontal links along
// each row in flow direction, and records which mechanisms occurred.
package calu_ref_pkg;

  localparam int MAXV = (1 << 19) - 1;
  localparam int MINV = -(1 << 19);

  typedef struct {
    int m;
    bit p;
  } rword_t;

  // floor division by 2**n, the rounding of an arithmetic right shift
  function automatic int fdiv(int v, int n);
    int d = 1 << n;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  function automatic rword_t norm(int v, bit p, output bit sat, output bit rescaled);
    rword_t r;
    sat = 0; rescaled = 0;
    if (v <= MAXV && v >= MINV) begin r.m = v; r.p = p; end
    else if (!p) begin r.m = fdiv(v, 3); r.p = 1; rescaled = 1; end
    else begin r.m = (v < 0) ? MINV : MAXV; r.p = 1; sat = 1; end
    return r;
  endfunction

  function automatic rword_t as_op(rword_t x, rword_t y, bit sub,
                                   output bit sat, output bit rescaled);
    bit p = x.p | y.p;
    int a = (p && !x.p) ? fdiv(x.m, 3) : x.m;
    int b = (p && !y.p) ? fdiv(y.m, 3) : y.m;
    return norm(sub ? a - b : a + b, p, sat, rescaled);
  endfunction

  function automatic rword_t sh_op(rword_t x, bit right, output bit sat, output bit rescaled);
    if (right) begin
      sat = 0; rescaled = 0;
      return '{m: fdiv(x.m, 1), p: x.p};
    end
    return norm(x.m * 2, x.p, sat, rescaled);
  endfunction

  function automatic int to_m(logic [19:0] d);
    return int'($signed(d));
  endfunction

  function automatic logic [20:0] to_bits(rword_t w);
    return {w.p, 20'(w.m)};
  endfunction

  // 0 = adder, 1 = shifter, 2 = switch box
  function automatic int kind_of(int r, int c, int cols);
    if (c > 0 && c < cols - 1 && c % 4 == 0) return 2;
    return ((r + c) % 2 == 0) ? 0 : 1;
  endfunction

  function automatic int cfg_bits_of(int k);
    return (k == 0) ? 5 : (k == 1) ? 4 : 2;
  endfunction

  class array_model;
    int rows, cols, n;
    rword_t reg_q[];
    bit     sat_q[];
    rword_t hor[];
    int     off[];
    int     kind[];
    bit     cfg[];      // cell part of the configuration string
    // mechanism counters
    int n_add, n_sub, n_left, n_right, n_rescale, n_sat, n_pass_chain;
    int n_sbox_h, n_sbox_v, n_gated;

    function new(int rows_i, int cols_i);
      int o = 0;
      rows = rows_i; cols = cols_i; n = rows * cols;
      reg_q = new[n]; sat_q = new[n]; hor = new[n]; off = new[n]; kind = new[n];
      foreach (reg_q[i]) begin
        reg_q[i] = '{m: 0, p: 0}; sat_q[i] = 0;
        kind[i] = kind_of(i / cols, i % cols, cols);
        off[i] = o; o += cfg_bits_of(kind[i]);
      end
      cfg = new[o];
      foreach (cfg[i]) cfg[i] = 0;
    endfunction

    function int cell_cfg_bits();
      return cfg.size();
    endfunction

    // bit j of cell i's field (0 = LSB)
    function bit cb(int i, int j);
      return cfg[off[i] + j];
    endfunction

    bit clr_pending;

    // Apply a configuration. The saturation flags are cleared at once, or,
    // with defer set, at the end of the next step (a clear that coincides
    // with a saturation wins).
    function void load(const ref bit c[], input bit defer = 0);
      foreach (cfg[i]) cfg[i] = c[i];
      if (defer) clr_pending = 1;
      else foreach (sat_q[i]) sat_q[i] = 0;
    endfunction

    function int upstream(int r, int c);  // -1 = edge
      if (r % 2 == 0) return (c == 0) ? -1 : r * cols + c - 1;
      return (c == cols - 1) ? -1 : r * cols + c + 1;
    endfunction

    function rword_t a_in(int r, int c, rword_t x);
      int u = upstream(r, c);
      if (u >= 0) return hor[u];
      if (r == 0 && c == 0) return x;
      return '{m: 0, p: 0};
    endfunction

    function rword_t b_in(int r, int c);
      if (r == 0) return '{m: 0, p: 0};
      return reg_q[(r - 1) * cols + c];
    endfunction

    // Fill hor[] from the current registers and input x.
    // AS field bits (LSB first): hor_reg, sub, sel_b, sel_a, en
    // LRS field: hor_reg, right, sel_in, en ; SBOX field: sel_in, en
    function void eval_hor(rword_t x);
      for (int r = 0; r < rows; r++)
        for (int k = 0; k < cols; k++) begin
          int c = (r % 2 == 0) ? k : cols - 1 - k;
          int i = r * cols + c;
          rword_t a = a_in(r, c, x), b = b_in(r, c);
          case (kind[i])
            0: hor[i] = cb(i, 0) ? reg_q[i] : (cb(i, 2) ? b : a);
            1: hor[i] = cb(i, 0) ? reg_q[i] : (cb(i, 2) ? b : a);
            default: hor[i] = reg_q[i];
          endcase
        end
    endfunction

    // One clock edge with input x (hor[] must be current).
    function void step(rword_t x);
      rword_t nxt[] = new[n];
      for (int i = 0; i < n; i++) begin
        int r = i / cols, c = i % cols;
        rword_t a = a_in(r, c, x), b = b_in(r, c);
        bit s, rs;
        int u = upstream(r, c);
        nxt[i] = reg_q[i];
        if (!cb(i, kind[i] == 2 ? 1 : (kind[i] == 0 ? 4 : 3))) begin
          n_gated++;
          continue;
        end
        // an enabled cell fed by a pass-through neighbour
        if (u >= 0 && kind[u] != 2 && !cb(u, 0)) n_pass_chain++;
        case (kind[i])
          0: begin
            rword_t o1 = cb(i, 3) ? b : a;
            rword_t o2 = cb(i, 2) ? b : a;
            nxt[i] = as_op(o1, o2, cb(i, 1), s, rs);
            if (cb(i, 1)) n_sub++; else n_add++;
            if (s) sat_q[i] = 1;
            n_sat += s; n_rescale += rs;
          end
          1: begin
            nxt[i] = sh_op(cb(i, 2) ? b : a, cb(i, 1), s, rs);
            if (cb(i, 1)) n_right++; else n_left++;
            if (s) sat_q[i] = 1;
            n_sat += s; n_rescale += rs;
          end
          default: begin
            nxt[i] = cb(i, 0) ? b : a;
            if (cb(i, 0)) n_sbox_v++; else n_sbox_h++;
          end
        endcase
      end
      reg_q = nxt;
      if (clr_pending) begin
        foreach (sat_q[i]) sat_q[i] = 0;
        clr_pending = 0;
      end
    endfunction
  endclass

endpackage
