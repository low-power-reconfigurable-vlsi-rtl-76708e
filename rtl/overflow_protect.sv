// overflow_protect: hybrid fixed/floating normalisation of one CALU result.
//
// The arithmetic unit of a CALU produces its result one bit wider than the
// data bus ('wide'), together with the protection bit its operands carried
// ('prot_in'). This block maps it back onto the 20-bit bus:
//   * the result fits in 20 bits        -> passed on, protection bit unchanged;
//   * it overflows, protection bit clear -> shifted right by 3 with the sign
//     extended and the 3 low bits truncated, protection bit set (exponent 3);
//   * it overflows, protection bit set   -> clamped to the largest or smallest
//     20-bit value, 'sat' raised for the CALU's saturation flag.
// The exponent step is taken at most once per sample, as the overflow scheme
// prescribes; the bit-level arrangement is this design's own. Purely
// combinational.
module overflow_protect
  import calu_pkg::*;
(
  input  logic [WIDE_W-1:0] wide,     // signed full-precision result
  input  logic              prot_in,  // exponent of the operands (1 = x8)
  output hword_t            res,      // normalised result
  output logic              sat       // result saturated
);

  localparam logic signed [WIDE_W-1:0] MAX_W = WIDE_W'((1 << (DATA_W - 1)) - 1);
  localparam logic signed [WIDE_W-1:0] MIN_W = -WIDE_W'(1 << (DATA_W - 1));

  logic signed [WIDE_W-1:0] w;
  logic        [DATA_W-1:0] scaled;
  logic                     fits;

  always_comb begin
    w      = $signed(wide);
    scaled = DATA_W'(w >>> EXP_SHIFT);  // |w| < 2**20, so this fits
    fits   = (w <= MAX_W) && (w >= MIN_W);
    sat    = 1'b0;
    if (fits) begin
      res.prot = prot_in;
      res.data = w[DATA_W-1:0];
    end else if (!prot_in) begin
      res.prot = 1'b1;
      res.data = scaled;
    end else begin
      res.prot = 1'b1;
      res.data = w[WIDE_W-1] ? MIN_W[DATA_W-1:0] : MAX_W[DATA_W-1:0];
      sat      = 1'b1;
    end
  end

endmodule
