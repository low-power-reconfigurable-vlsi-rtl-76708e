// cfg_register: parallel-load configuration register of the array.
//
// The whole configuration string is presented on 'cfg_in' and captured in a
// single clock cycle when 'cfg_load' is high, so a new configuration takes
// effect one cycle after it is offered and no bit-serial shifting (with its
// switching activity) happens during reconfiguration. 'cfg_q' holds the
// active configuration. Reset clears it, which disables every cell.
// Single-cycle parallel loading is the published scheme; the reset value
// and the load strobe are this design's choices. The default width is the
// string length of the 13 x 13 floor plan defined in calu_pkg.
module cfg_register #(
  parameter int unsigned CFG_W = calu_pkg::cfg_total(13, 13)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_load,
  input  logic [CFG_W-1:0] cfg_in,
  output logic [CFG_W-1:0] cfg_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_q <= '0;
    else if (cfg_load) cfg_q <= cfg_in;
  end

endmodule
