// tb_sbox_calu: random horizontal/vertical inputs and selects on sbox_calu;
// checks that the selected input appears on both outputs one cycle later,
// that the outputs do not follow the inputs combinationally, and that a
// disabled box holds its register.
module tb_sbox_calu;
  import calu_pkg::*;

  logic      clk = 0, rst_n = 0;
  sbox_cfg_t cfg;
  hword_t    a_in, b_in, ver_out, hor_out;
  int checks = 0, failures = 0;
  int n_h = 0, n_v = 0, n_hold = 0;

  sbox_calu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [20:0] got, logic [20:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [20:0] exp_reg;
    cfg = '0; a_in = '0; b_in = '0; exp_reg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      cfg = sbox_cfg_t'($urandom);
      if (($urandom % 6) != 0) cfg.en = 1;
      a_in = hword_t'($urandom); b_in = hword_t'($urandom);
      #1;
      expect_eq("hor before edge", hor_out, exp_reg);
      expect_eq("ver before edge", ver_out, exp_reg);
      if (cfg.en) begin
        exp_reg = cfg.sel_in ? b_in : a_in;
        if (cfg.sel_in) n_v++; else n_h++;
      end else n_hold++;
      @(posedge clk); #1;
      expect_eq("hor", hor_out, exp_reg);
      expect_eq("ver", ver_out, exp_reg);
    end
    if (n_h == 0 || n_v == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
