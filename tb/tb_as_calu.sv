// tb_as_calu: random operands (small and near full scale, with and without
// protection bit) and random configurations on as_calu. Checks each cycle
// the registered result, the horizontal output (register or pass-through),
// the sticky saturation flag, its clearing, and that a disabled cell holds.
module tb_as_calu;
  import calu_pkg::*;
  import calu_ref_pkg::*;

  logic    clk = 0, rst_n = 0, clr_sat = 0;
  as_cfg_t cfg;
  hword_t  a_in, b_in, ver_out, hor_out;
  logic    sat_flag;
  int checks = 0, failures = 0, cycles = 0;
  int n_add = 0, n_sub = 0, n_resc = 0, n_sat = 0, n_hold = 0, n_clr = 0;

  as_calu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic hword_t rnd_word();
    hword_t w;
    w.prot = ($urandom % 4) == 0;
    case ($urandom % 3)
      0: w.data = 20'($urandom % 200) - 20'd100;
      1: w.data = 20'($urandom);
      default: w.data = ($urandom % 2) ? 20'h7FFF0 + 20'($urandom % 16) : 20'h80000 + 20'($urandom % 16);
    endcase
    return w;
  endfunction

  task automatic expect_eq(string what, logic [20:0] got, logic [20:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h (cfg=%b)", what, got, exp, cfg);
    end
  endtask

  initial begin
    rword_t exp_reg, o1, o2, res;
    bit exp_sat, s, rs;
    cfg = '0; a_in = '0; b_in = '0;
    exp_reg = '{m: 0, p: 0}; exp_sat = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      cfg = as_cfg_t'($urandom);
      if (($urandom % 8) != 0) cfg.en = 1;
      clr_sat = ($urandom % 50) == 0;
      a_in = rnd_word(); b_in = rnd_word();
      #1;
      o1 = '{m: to_m(cfg.sel_a ? b_in.data : a_in.data), p: cfg.sel_a ? b_in.prot : a_in.prot};
      o2 = '{m: to_m(cfg.sel_b ? b_in.data : a_in.data), p: cfg.sel_b ? b_in.prot : a_in.prot};
      // horizontal output before the edge
      expect_eq("hor", {hor_out.prot, hor_out.data}, cfg.hor_reg ? to_bits(exp_reg) : to_bits(o2));
      res = as_op(o1, o2, cfg.sub, s, rs);
      if (clr_sat) begin exp_sat = 0; n_clr++; end
      if (cfg.en) begin
        exp_reg = res;
        if (s && !clr_sat) exp_sat = 1;
        if (cfg.sub) n_sub++; else n_add++;
        n_resc += rs; n_sat += s;
      end else n_hold++;
      @(posedge clk); #1;
      expect_eq("ver", {ver_out.prot, ver_out.data}, to_bits(exp_reg));
      expect_eq("sat", 21'(sat_flag), 21'(exp_sat));
    end
    if (n_add == 0 || n_sub == 0 || n_resc == 0 || n_sat == 0 || n_hold == 0 || n_clr == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("add=%0d sub=%0d rescale=%0d sat=%0d hold=%0d clr=%0d", n_add, n_sub, n_resc, n_sat, n_hold, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
