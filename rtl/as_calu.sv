// as_calu: addition/subtraction configurable arithmetic/logic unit ("A").
//
// Two 1-bit multiplexers pick the operands from the horizontal input A and
// the vertical input B (A,A / A,B / B,A / B,B), a 20-bit unit adds or
// subtracts them (first - second when 'sub' is set) and the result goes into
// the cell's register, which drives the vertical output. The horizontal
// output carries either that register or, combinationally, the second
// operand; chaining such pass-throughs along a row is what lets
// non-adjacent cells talk within one clock cycle.
//
// Overflow protection: operands with different protection bits are aligned
// first (the one without the exponent is shifted right by 3, low bits
// truncated), then overflow_protect rescales or saturates the result. A
// sticky saturation flag is set whenever the cell saturates and is cleared by
// reset or by 'clr_sat' (pulsed when a new configuration is applied).
//
// 'cfg.en' is the cell's clock enable: with it low the register and the flag
// hold, standing in for the AND-gated clock of the original. The mux
// arrangement follows the published cell diagram; the alignment rule, the
// flag clearing and the reset to zero are this design's choices.
// Timing: one register stage, vertical output valid one cycle after the
// operands; horizontal pass-through is combinational.
module as_calu
  import calu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr_sat,
  input  as_cfg_t cfg,
  input  hword_t  a_in,     // horizontal input
  input  hword_t  b_in,     // vertical input
  output hword_t  ver_out,  // register
  output hword_t  hor_out,  // register or second operand
  output logic    sat_flag  // sticky saturation flag
);

  hword_t                   op1, op2;
  logic signed [DATA_W-1:0] m1, m2;
  logic                     pe;
  logic signed [WIDE_W-1:0] sum;
  hword_t                   res;
  logic                     sat_now;
  hword_t                   r_q;

  always_comb begin
    op1 = cfg.sel_a ? b_in : a_in;
    op2 = cfg.sel_b ? b_in : a_in;
    pe  = op1.prot | op2.prot;
    m1  = $signed(op1.data);
    m2  = $signed(op2.data);
    // align exponents: the operand without the protection bit loses 3 bits
    if (pe && !op1.prot) m1 = m1 >>> EXP_SHIFT;
    if (pe && !op2.prot) m2 = m2 >>> EXP_SHIFT;
    if (cfg.sub) sum = WIDE_W'(m1) - WIDE_W'(m2);
    else         sum = WIDE_W'(m1) + WIDE_W'(m2);
  end

  overflow_protect u_ovf (
    .wide    (sum),
    .prot_in (pe),
    .res     (res),
    .sat     (sat_now)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q      <= HWORD_ZERO;
      sat_flag <= 1'b0;
    end else begin
      if (cfg.en) r_q <= res;
      if (clr_sat)                sat_flag <= 1'b0;
      else if (cfg.en && sat_now) sat_flag <= 1'b1;
    end
  end

  assign ver_out = r_q;
  assign hor_out = cfg.hor_reg ? r_q : op2;

endmodule
