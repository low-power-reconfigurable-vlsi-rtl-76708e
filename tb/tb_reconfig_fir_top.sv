// tb_reconfig_fir_top: end-to-end test of the reconfigurable FIR array at its
// full 13 x 13 size, with the top's default parameters.
//
// Part 1 programs a small multiplier-less filter by hand,
//   y[k] = ((x[k-6] + 2 x[k-5]) >>> 1) - 2 x[k-2],
// built from a delay line along the bottom row (with two combinational
// pass-throughs and a switch box), a switch box routing upwards, an adder, a
// right shift and a subtractor in the second row, with the output taken
// from row 1, column 1 and every other cell clock-gated off. The output is
// compared with the formula on a random input stream, which also checks the
// latency of each term.
// Part 2 loads random configurations through the one-cycle parallel load
// (including output selects beyond the last cell, which fall back to the
// top-row exit) and compares y_out, the saturation flags and their count
// with the cycle-level model in calu_ref_pkg every cycle, with full-scale
// inputs so that rescaling and saturation happen. Each mechanism is counted
// and one that never happened counts as a failure.
module tb_reconfig_fir_top;
  import calu_pkg::*;
  import calu_ref_pkg::*;

  localparam int unsigned ROWS = 13;
  localparam int unsigned COLS = 13;
  localparam int unsigned N = ROWS * COLS;
  localparam int unsigned CW = cfg_offset(N, COLS);
  localparam int unsigned OW = osel_width(ROWS, COLS);
  localparam int unsigned W = CW + OW;

  logic              clk = 0, rst_n = 0, cfg_load = 0;
  logic [W-1:0]      cfg_in;
  logic [DATA_W-1:0] x_in;
  hword_t            y_out;
  logic [N-1:0]      sat_flags;
  logic [$clog2(N+1)-1:0] sat_count;
  int checks = 0, failures = 0;
  int n_fir = 0, n_loads = 0, n_exit = 0, n_sel = 0, n_satcnt = 0;

  reconfig_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h @%0t", what, got, exp, $time);
    end
  endtask

  function automatic void put(ref bit cb[], input int base, input logic [4:0] v, input int w);
    for (int j = 0; j < w; j++) cb[base + j] = v[j];
  endfunction

  initial begin
    array_model m;
    bit cb[];
    int xs[$];
    int osel, exp_y;
    rword_t x;

    m = new(ROWS, COLS);
    checks++;
    if (m.cell_cfg_bits() != CW) begin
      failures++;
      $display("FAIL configuration width %0d, model %0d", CW, m.cell_cfg_bits());
    end
    cb = new[CW];
    cfg_in = '0; x_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- Part 1: hand-built filter --------------------------------------
    foreach (cb[j]) cb[j] = 0;
    // fields, MSB first: AS {en,sel_a,sel_b,sub,hor_reg} LRS {en,sel_in,right,hor_reg} F {en,sel_in}
    put(cb, m.off[0],  5'b10101, 5);  // A: x + 0, register to the right
    put(cb, m.off[1],  5'b01000, 4);  // S: 2*in, pass input on
    put(cb, m.off[2],  5'b10101, 5);  // A: in + 0, register to the right
    put(cb, m.off[3],  5'b01000, 4);  // S: 2*in, pass input on
    put(cb, m.off[4],  5'b00010, 2);  // F: horizontal in
    put(cb, m.off[17], 5'b00011, 2);  // F (row 1): vertical in
    put(cb, m.off[16], 5'b10101, 5);  // A (row 1): A + B
    put(cb, m.off[15], 5'b01011, 4);  // S (row 1): A >>> 1
    put(cb, m.off[14], 5'b10111, 5);  // A (row 1): A - B
    @(negedge clk);
    foreach (cb[j]) cfg_in[j] = cb[j];
    cfg_in[W-1 -: OW] = OW'(14);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    n_loads++;
    for (int k = 0; k < 300; k++) begin
      x_in = 20'($urandom % 2001) - 20'd1000;
      xs.push_front(int'($signed(x_in)));  // xs[d] = sample d edges ago
      @(posedge clk); #1;
      if (k >= 6) begin
        exp_y = fdiv(xs[6] + 2 * xs[5], 1) - 2 * xs[2];
        expect_eq("fir y", {y_out.prot, y_out.data}, to_bits('{m: exp_y, p: 0}));
        n_fir++;
      end
      @(negedge clk);
    end

    // ---- Part 2: random configurations against the array model ---------
    // the model starts from reset registers: reset the hardware to match
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    foreach (cb[j]) cb[j] = 0;
    m.load(cb);
    osel = 0;
    cfg_in = '0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      cfg_load = 0;
      if (t % 50 == 0) begin
        foreach (cb[j]) cb[j] = 1'($urandom);
        for (int i = 0; i < N; i++) begin
          automatic int enb = (m.kind[i] == 0) ? 4 : (m.kind[i] == 1) ? 3 : 1;
          if ($urandom % 8 != 0) cb[m.off[i] + enb] = 1;
        end
        foreach (cb[j]) cfg_in[j] = cb[j];
        cfg_in[W-1 -: OW] = OW'($urandom % (1 << OW));
        cfg_load = 1;
      end
      x_in = ($urandom % 2) ? 20'($urandom) : 20'($urandom % 64) - 20'd32;
      x = '{m: to_m(x_in), p: 0};
      #1;
      m.eval_hor(x);
      begin
        automatic int sel = (osel < N) ? osel : N - 1;  // top row of 13 rows flows right
        expect_eq("y", {y_out.prot, y_out.data}, to_bits(m.hor[sel]));
        if (osel < N) n_sel++; else n_exit++;
      end
      m.step(x);
      if (cfg_load) begin
        m.load(cb);
        osel = int'(cfg_in[W-1 -: OW]);
        n_loads++;
      end
      @(posedge clk); #1;
      begin
        automatic int cnt = 0;
        for (int i = 0; i < N; i++) begin
          expect_eq("sat flag", 32'(sat_flags[i]), 32'(m.sat_q[i]));
          cnt += m.sat_q[i];
        end
        expect_eq("sat count", 32'(sat_count), 32'(cnt));
        if (cnt > 0) n_satcnt++;
      end
      @(negedge clk);
    end

    $display("fir=%0d loads=%0d sel=%0d exit=%0d sat_cycles=%0d", n_fir, n_loads, n_sel, n_exit, n_satcnt);
    $display("add=%0d sub=%0d left=%0d right=%0d rescale=%0d sat=%0d pass=%0d sbox_h=%0d sbox_v=%0d gated=%0d",
             m.n_add, m.n_sub, m.n_left, m.n_right, m.n_rescale, m.n_sat, m.n_pass_chain,
             m.n_sbox_h, m.n_sbox_v, m.n_gated);
    if (n_fir == 0 || n_loads < 2 || n_sel == 0 || n_exit == 0 || n_satcnt == 0 ||
        m.n_add == 0 || m.n_sub == 0 || m.n_left == 0 || m.n_right == 0 || m.n_rescale == 0 ||
        m.n_sat == 0 || m.n_pass_chain == 0 || m.n_sbox_h == 0 || m.n_sbox_v == 0 || m.n_gated == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
