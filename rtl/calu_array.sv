// calu_array: the ROWS x COLS heterogeneous array of CALUs.
//
// Cells are placed by calu_pkg::cell_kind (adders and shifters in a
// checkerboard, registered switch boxes in columns 4 and 8 of a 13-wide
// array). Horizontal links run in a serpentine: even rows (counting from the
// bottom, row 0) flow left to right, odd rows right to left. Every cell also
// feeds the cell directly above it through its vertical output. The sample
// stream enters the horizontal input of the bottom-left cell; horizontal
// inputs at the other row ends and vertical inputs of the bottom row are tied
// to zero. Since every vertical output is registered and horizontal links in
// a row all point the same way, no configuration can close a combinational
// loop; horizontal pass-throughs let cells of one row that are not adjacent
// exchange data within a clock cycle, up to the next switch box.
//
// Interface: 'cfg' is the cell part of the configuration string (cell
// idx = row*COLS + col at bit calu_pkg::cfg_offset(idx)); 'clr_sat' clears all
// saturation flags. Every cell's outputs and flag are brought out so the
// output of the filter can be taken from any cell. The topology follows the
// published floor plan; the tie-offs and the field order are this design's.
module calu_array
  import calu_pkg::*;
#(
  parameter int unsigned ROWS = 13,
  parameter int unsigned COLS = 13,
  localparam int unsigned NCELL = ROWS * COLS,
  localparam int unsigned CELL_CFG_W = cfg_offset(NCELL, COLS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr_sat,
  input  logic [CELL_CFG_W-1:0] cfg,
  input  hword_t                x_in,
  output hword_t                hor_out [NCELL],
  output hword_t                ver_out [NCELL],
  output logic [NCELL-1:0]      sat_flags
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned IDX = r * COLS + c;
      localparam int unsigned OFF = cfg_offset(IDX, COLS);
      localparam cell_kind_e  KIND = cell_kind(r, c, COLS);
      localparam bit          RIGHTWARD = (r % 2) == 0;

      hword_t a_in, b_in;

      // horizontal input: from the upstream neighbour of a serpentine row
      if (RIGHTWARD && c == 0) begin : g_hin_edge_l
        if (r == 0) begin : g_src
          assign a_in = x_in;
        end else begin : g_tie
          assign a_in = HWORD_ZERO;
        end
      end else if (!RIGHTWARD && c == COLS - 1) begin : g_hin_edge_r
        assign a_in = HWORD_ZERO;
      end else if (RIGHTWARD) begin : g_hin_l
        assign a_in = hor_out[IDX - 1];
      end else begin : g_hin_r
        assign a_in = hor_out[IDX + 1];
      end

      // vertical input: from the cell below
      if (r == 0) begin : g_vin_edge
        assign b_in = HWORD_ZERO;
      end else begin : g_vin
        assign b_in = ver_out[IDX - COLS];
      end

      if (KIND == CELL_AS) begin : g_as
        as_calu u_cell (
          .clk      (clk),
          .rst_n    (rst_n),
          .clr_sat  (clr_sat),
          .cfg      (as_cfg_t'(cfg[OFF +: AS_CFG_W])),
          .a_in     (a_in),
          .b_in     (b_in),
          .ver_out  (ver_out[IDX]),
          .hor_out  (hor_out[IDX]),
          .sat_flag (sat_flags[IDX])
        );
      end else if (KIND == CELL_LRS) begin : g_lrs
        lrs_calu u_cell (
          .clk      (clk),
          .rst_n    (rst_n),
          .clr_sat  (clr_sat),
          .cfg      (lrs_cfg_t'(cfg[OFF +: LRS_CFG_W])),
          .a_in     (a_in),
          .b_in     (b_in),
          .ver_out  (ver_out[IDX]),
          .hor_out  (hor_out[IDX]),
          .sat_flag (sat_flags[IDX])
        );
      end else begin : g_sbox
        sbox_calu u_cell (
          .clk     (clk),
          .rst_n   (rst_n),
          .cfg     (sbox_cfg_t'(cfg[OFF +: SBOX_CFG_W])),
          .a_in    (a_in),
          .b_in    (b_in),
          .ver_out (ver_out[IDX]),
          .hor_out (hor_out[IDX])
        );
        assign sat_flags[IDX] = 1'b0;
      end
    end
  end

endmodule
