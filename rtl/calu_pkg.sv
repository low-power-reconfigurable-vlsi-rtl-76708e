// calu_pkg: types, constants and layout functions shared by the CALU array.
//
// Every word moving through the array is a 21-bit "hybrid" number: a 20-bit
// two's-complement mantissa plus one protection bit. When the protection bit
// is set the word stands for mantissa * 2**3 (the binary exponent of 3 that a
// first overflow introduces), otherwise for the mantissa itself.
//
// The package also fixes the floor plan of the array: which cell of a
// ROWS x COLS grid is an addition/subtraction CALU, a left/right shift CALU or
// a registered switch box, and where each cell's configuration field sits in
// the flat configuration string. The checkerboard of adders and shifters and
// the switch-box columns follow the published floor plan; the bit order of
// the configuration string is this design's own choice.
package calu_pkg;

  // 20-bit data bus and a 3-bit exponent step on overflow.
  localparam int unsigned DATA_W    = 20;
  localparam int unsigned EXP_SHIFT = 3;
  localparam int unsigned WIDE_W    = DATA_W + 1;  // one add/sub or one left shift

  // Hybrid number: {prot, data}. data is read as signed.
  typedef struct packed {
    logic              prot;
    logic [DATA_W-1:0] data;
  } hword_t;

  localparam hword_t HWORD_ZERO = '{prot: 1'b0, data: '0};

  typedef enum logic [1:0] {
    CELL_AS   = 2'd0,  // addition/subtraction CALU ("A")
    CELL_LRS  = 2'd1,  // left/right shift-by-one CALU ("S")
    CELL_SBOX = 2'd2   // registered switch box ("F")
  } cell_kind_e;

  // Per-cell configuration fields. 'en' gates the cell's clock (the cell
  // holds its register when it takes no part in a configuration).
  typedef struct packed {
    logic en;       // clock enable of the cell
    logic sel_a;    // first operand: 0 = input A (horizontal), 1 = input B (vertical)
    logic sel_b;    // second operand: 0 = input A, 1 = input B
    logic sub;      // 0 = first + second, 1 = first - second
    logic hor_reg;  // horizontal output: 1 = register, 0 = second operand (pass-through)
  } as_cfg_t;

  typedef struct packed {
    logic en;       // clock enable of the cell
    logic sel_in;   // shifter input: 0 = input A (horizontal), 1 = input B (vertical)
    logic right;    // 0 = shift left by one, 1 = shift right by one
    logic hor_reg;  // horizontal output: 1 = register, 0 = selected input (pass-through)
  } lrs_cfg_t;

  typedef struct packed {
    logic en;       // clock enable of the cell
    logic sel_in;   // registered input: 0 = horizontal, 1 = vertical
  } sbox_cfg_t;

  localparam int unsigned AS_CFG_W   = $bits(as_cfg_t);
  localparam int unsigned LRS_CFG_W  = $bits(lrs_cfg_t);
  localparam int unsigned SBOX_CFG_W = $bits(sbox_cfg_t);

  // Floor plan. Row 0 is the bottom row (the one the input enters) and
  // column 0 the left edge. Switch boxes occupy every fourth column away
  // from the edges (columns 4 and 8 of a 13-wide array); the other cells
  // alternate adder/shifter, with even rows starting on an adder and odd
  // rows on a shifter.
  function automatic cell_kind_e cell_kind(int unsigned row, int unsigned col,
                                           int unsigned cols);
    if (col != 0 && col != cols - 1 && (col % 4) == 0) return CELL_SBOX;
    if (((row + col) % 2) == 0) return CELL_AS;
    return CELL_LRS;
  endfunction

  function automatic int unsigned cfg_width_of(cell_kind_e k);
    case (k)
      CELL_AS:  return AS_CFG_W;
      CELL_LRS: return LRS_CFG_W;
      default:  return SBOX_CFG_W;
    endcase
  endfunction

  // Bit offset of cell 'idx' (idx = row*cols + col) in the configuration
  // string: cells are packed back to back from bit 0 upwards in index order.
  function automatic int unsigned cfg_offset(int unsigned idx, int unsigned cols);
    int unsigned off = 0;
    for (int unsigned i = 0; i < idx; i++)
      off += cfg_width_of(cell_kind(i / cols, i % cols, cols));
    return off;
  endfunction

  // Width of the output-select field that follows the cell fields.
  function automatic int unsigned osel_width(int unsigned rows, int unsigned cols);
    return $clog2(rows * cols + 1);
  endfunction

  // Total configuration string: all cell fields, then the output select.
  function automatic int unsigned cfg_total(int unsigned rows, int unsigned cols);
    return cfg_offset(rows * cols, cols) + osel_width(rows, cols);
  endfunction

  // Cell whose horizontal output leaves the array in the published floor
  // plan: the far end of the top row (rows alternate direction, so it is the
  // right end when the top row is even).
  function automatic int unsigned exit_cell(int unsigned rows, int unsigned cols);
    if (((rows - 1) % 2) == 0) return (rows - 1) * cols + cols - 1;
    return (rows - 1) * cols;
  endfunction

endpackage
