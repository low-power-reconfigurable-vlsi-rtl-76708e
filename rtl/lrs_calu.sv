// lrs_calu: left/right shifting configurable arithmetic/logic unit ("S").
//
// A 1-bit multiplexer picks the horizontal input A or the vertical input B;
// the shifter moves it one position left or right (one configuration bit)
// and the result is registered onto the vertical output. The horizontal
// output carries either the register or, combinationally and unshifted, the
// selected input (the pass-through used for fast interconnections).
//
// A right shift is arithmetic and cannot overflow. A left shift that
// overflows the 20-bit bus goes through overflow_protect: the first time the
// word is rescaled by 2**-3 and its protection bit set, after that it
// saturates and the sticky saturation flag is raised. The flag is cleared by
// reset or 'clr_sat'. 'cfg.en' is the cell's clock enable (stand-in for the
// AND-gated clock). Structure follows the published cell diagram; the flag
// handling and reset values are this design's choices.
// Timing: one register stage; horizontal pass-through is combinational.
module lrs_calu
  import calu_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clr_sat,
  input  lrs_cfg_t cfg,
  input  hword_t   a_in,     // horizontal input
  input  hword_t   b_in,     // vertical input
  output hword_t   ver_out,  // register
  output hword_t   hor_out,  // register or selected input
  output logic     sat_flag  // sticky saturation flag
);

  hword_t                   sel;
  logic signed [WIDE_W-1:0] shifted;
  hword_t                   res;
  logic                     sat_now;
  hword_t                   r_q;

  always_comb begin
    sel = cfg.sel_in ? b_in : a_in;
    if (cfg.right) shifted = WIDE_W'($signed(sel.data)) >>> 1;
    else           shifted = WIDE_W'($signed(sel.data)) <<< 1;
  end

  overflow_protect u_ovf (
    .wide    (shifted),
    .prot_in (sel.prot),
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
  assign hor_out = cfg.hor_reg ? r_q : sel;

endmodule
