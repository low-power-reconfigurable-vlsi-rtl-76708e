// tb_cfg_register: loads random configuration strings of the full default
// width into cfg_register and checks that each takes effect after exactly
// one clock edge, that the register holds while cfg_load is low, and that
// reset clears it.
module tb_cfg_register;
  localparam int unsigned W = calu_pkg::cfg_total(13, 13);

  logic         clk = 0, rst_n = 0, cfg_load = 0;
  logic [W-1:0] cfg_in, cfg_q, exp_q;
  int checks = 0, failures = 0, loads = 0;

  cfg_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_cfg();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    cfg_in = '0;
    @(posedge clk); #1;
    checks++;
    if (cfg_q !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1;
    exp_q = '0;
    repeat (500) begin
      @(negedge clk);
      cfg_in = rnd_cfg();
      cfg_load = ($urandom % 3) == 0;
      #1;
      checks++;
      if (cfg_q !== exp_q) begin failures++; $display("FAIL changed before edge"); end
      if (cfg_load) begin exp_q = cfg_in; loads++; end
      @(posedge clk); #1;
      checks++;
      if (cfg_q !== exp_q) begin failures++; $display("FAIL after edge"); end
    end
    if (loads == 0) failures++;
    $display("width=%0d loads=%0d", W, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
