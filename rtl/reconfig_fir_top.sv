// reconfig_fir_top: the reconfigurable FIR architecture.
//
// A multiplier-less FIR filter is built by configuring a ROWS x COLS array of
// adders, one-bit shifters and registered switch boxes (calu_array): partial
// products are formed with shifts, re-used, delayed by the cells' pipeline
// registers along paths of different length, and summed, so that the
// coefficient terms of the filter come out of one chosen cell.
//
// The configuration string (cfg_in, see calu_pkg for its layout) is applied
// in one clock cycle by raising cfg_load (cfg_register). The same edge
// clears all saturation flags, so the flags that are set afterwards belong to
// the new configuration. The field above the cell fields selects the cell
// whose horizontal output drives y_out; a value of ROWS*COLS or more selects
// the far end of the top row, where the published floor plan takes the
// output. sat_flags has one sticky flag per cell and sat_count their number:
// that is what an external optimiser (a genetic algorithm in the original
// system) penalises, while it also measures the frequency response of y_out.
//
// Timing: x_in is sampled into the first cell on each clock edge; the
// latency to y_out depends on the configured path (one cycle per register
// crossed). The output select and saturation count are this design's own
// reading of "any CALU can serve as the output" and "the number of
// saturation events".
module reconfig_fir_top
  import calu_pkg::*;
#(
  parameter int unsigned ROWS = 13,
  parameter int unsigned COLS = 13,
  localparam int unsigned NCELL  = ROWS * COLS,
  localparam int unsigned CELL_W = cfg_offset(NCELL, COLS),
  localparam int unsigned OSEL_W = osel_width(ROWS, COLS),
  localparam int unsigned CFG_W  = CELL_W + OSEL_W,
  localparam int unsigned CNT_W  = $clog2(NCELL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,   // apply cfg_in at this edge
  input  logic [CFG_W-1:0]  cfg_in,     // configuration string
  input  logic [DATA_W-1:0] x_in,       // input sample, two's complement
  output hword_t            y_out,      // output sample {prot, data}
  output logic [NCELL-1:0]  sat_flags,  // per-cell sticky saturation flags
  output logic [CNT_W-1:0]  sat_count   // number of saturated cells
);

  logic [CFG_W-1:0]  cfg_q;
  logic [OSEL_W-1:0] osel;
  hword_t            hor_out [NCELL];
  hword_t            ver_out [NCELL];
  hword_t            x_word;

  cfg_register #(.CFG_W(CFG_W)) u_cfg (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_load (cfg_load),
    .cfg_in   (cfg_in),
    .cfg_q    (cfg_q)
  );

  assign x_word = '{prot: 1'b0, data: x_in};

  calu_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr_sat   (cfg_load),
    .cfg       (cfg_q[CELL_W-1:0]),
    .x_in      (x_word),
    .hor_out   (hor_out),
    .ver_out   (ver_out),
    .sat_flags (sat_flags)
  );

  assign osel = cfg_q[CFG_W-1 -: OSEL_W];

  always_comb begin
    if (osel < OSEL_W'(NCELL)) y_out = hor_out[osel];
    else                       y_out = hor_out[exit_cell(ROWS, COLS)];
  end

  always_comb begin
    sat_count = '0;
    for (int unsigned i = 0; i < NCELL; i++)
      sat_count += CNT_W'(sat_flags[i]);
  end

endmodule
