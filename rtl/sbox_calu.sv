// sbox_calu: registered switch box ("F").
//
// Routes either its horizontal or its vertical input into its register,
// which drives both the horizontal and the vertical output. Because both
// outputs are registered, a switch box ends every combinational
// pass-through chain along a row: it bounds the critical path whatever the
// configuration. It has no arithmetic and no saturation flag.
// That the box routes horizontally/vertically and registers its output is
// the published description; the single shared register with a one-bit
// input select is this design's simplest reading of it. 'cfg.en' is the
// clock enable. Timing: one register stage, both outputs one cycle after the
// selected input.
module sbox_calu
  import calu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sbox_cfg_t cfg,
  input  hword_t    a_in,     // horizontal input
  input  hword_t    b_in,     // vertical input
  output hword_t    ver_out,
  output hword_t    hor_out
);

  hword_t r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      r_q <= HWORD_ZERO;
    else if (cfg.en) r_q <= cfg.sel_in ? b_in : a_in;
  end

  assign ver_out = r_q;
  assign hor_out = r_q;

endmodule
