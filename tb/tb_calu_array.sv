// tb_calu_array: runs calu_array at 5 x 13 (the section of the floor plan
// with both switch-box columns) under random configurations and random input
// samples, and compares every cell's horizontal output before each clock
// edge, and every register and saturation flag after it, with the
// cycle-level array model of calu_ref_pkg. A new configuration (with
// saturation clear) is applied every 40 cycles. Counts the mechanisms
// (add, subtract, left/right shift, rescale, saturation, pass-through chains,
// switch-box routing, gated cells) and fails if one never occurred.
module tb_calu_array;
  import calu_pkg::*;
  import calu_ref_pkg::*;

  localparam int unsigned ROWS = 5;
  localparam int unsigned COLS = 13;
  localparam int unsigned N = ROWS * COLS;
  localparam int unsigned CW = cfg_offset(N, COLS);

  logic          clk = 0, rst_n = 0, clr_sat = 0;
  logic [CW-1:0] cfg;
  hword_t        x_in;
  hword_t        hor_out [N];
  hword_t        ver_out [N];
  logic [N-1:0]  sat_flags;
  int checks = 0, failures = 0;

  calu_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int i, logic [20:0] got, logic [20:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s cell %0d got %h exp %h @%0t", what, i, got, exp, $time);
    end
  endtask

  initial begin
    array_model m;
    bit cb[];
    rword_t x;
    m = new(ROWS, COLS);
    checks++;
    if (m.cell_cfg_bits() != CW) begin
      failures++;
      $display("FAIL configuration width %0d, model %0d", CW, m.cell_cfg_bits());
    end
    cb = new[CW];
    cfg = '0; x_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clr_sat = 0;
      if (t % 40 == 0) begin
        foreach (cb[j]) cb[j] = 1'($urandom);
        for (int i = 0; i < N; i++) begin
          automatic int enb = (m.kind[i] == 0) ? 4 : (m.kind[i] == 1) ? 3 : 1;
          if ($urandom % 8 != 0) cb[m.off[i] + enb] = 1;
        end
        foreach (cb[j]) cfg[j] = cb[j];
        m.load(cb, 1);
        clr_sat = 1;
      end
      x_in.prot = 0;
      x_in.data = ($urandom % 2) ? 20'($urandom) : 20'($urandom % 64) - 20'd32;
      x = '{m: to_m(x_in.data), p: 0};
      #1;
      m.eval_hor(x);
      for (int i = 0; i < N; i++)
        expect_eq("hor", i, {hor_out[i].prot, hor_out[i].data}, to_bits(m.hor[i]));
      m.step(x);
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        expect_eq("reg", i, {ver_out[i].prot, ver_out[i].data}, to_bits(m.reg_q[i]));
        expect_eq("sat", i, 21'(sat_flags[i]), 21'(m.sat_q[i]));
      end
    end
    $display("add=%0d sub=%0d left=%0d right=%0d rescale=%0d sat=%0d pass=%0d sbox_h=%0d sbox_v=%0d gated=%0d",
             m.n_add, m.n_sub, m.n_left, m.n_right, m.n_rescale, m.n_sat, m.n_pass_chain,
             m.n_sbox_h, m.n_sbox_v, m.n_gated);
    if (m.n_add == 0 || m.n_sub == 0 || m.n_left == 0 || m.n_right == 0 || m.n_rescale == 0 ||
        m.n_sat == 0 || m.n_pass_chain == 0 || m.n_sbox_h == 0 || m.n_sbox_v == 0 || m.n_gated == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
