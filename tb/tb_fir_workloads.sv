// tb_fir_workloads: maps 8-, 16- and 32-tap symmetrical FIR filters onto the
// full 13 x 13 array and runs each of them.
//
// The filters are moving sums of length 8, 16 and 32, factored the
// multiplier-less way into stages that each add a signal to a delayed copy
// of itself, so that every partial result is re-used by the next stage:
//   H8(z)  = 2 (1 + z^-1)(1 + z^-2)(1 + z^-4) z^-7     y = 2 * sum x[k-7 .. k-14]
//   H16(z) = 2 (1 + z^-8) z^-2 H8(z)                   y = 4 * sum x[k-9 .. k-24]
//   H32(z) = 1/2 (1 + z^-16) z^-4 H16(z)               y = 2 * sum x[k-13 .. k-44]
// One configuration holds all five stages; the three filters differ only in
// the output select, so switching between them is a one-cycle
// reconfiguration.
//   stage 1, rows 0-1: registered delay line along the bottom row, adder (1,1)
//   stage 2, rows 2-3: right shift, two switch boxes in column 4, adder (3,3)
//   stage 3, rows 4-5: switch boxes of columns 4 and 8 joined by a
//            horizontal hop, two left shifts keeping both branches at the
//            same scale, adder (5,5)  -> 8-tap output
//   stage 4, rows 6-7: one branch goes straight up (1 register), the other
//            runs right along row 6 and back along row 7 (9 registers),
//            adder (7,5)  -> 16-tap output
//   stage 5, rows 8-11: short branch up column 5 (3 registers), long branch
//            over rows 8-11 (19 registers), adder (11,5)  -> 32-tap output
// Shifts alternate so that every right shift divides an even value (the
// filters stay exact); cells that are not configured stay clock-gated off
// and hold zero, which gives the adders their zero operands.
//
// For each filter: small random samples are compared with the formula
// exactly (this checks the latency too); then samples between 2**14 and
// 2**16 make the partial sums overflow the 20-bit bus, and the output value
// (mantissa * 8 when the protection bit is set) must stay within the
// truncation error of the exact sum, with no cell saturating.
module tb_fir_workloads;
  import calu_pkg::*;
  import calu_ref_pkg::*;

  localparam int unsigned ROWS = 13;
  localparam int unsigned COLS = 13;
  localparam int unsigned N = ROWS * COLS;
  localparam int unsigned CW = cfg_offset(N, COLS);
  localparam int unsigned OW = osel_width(ROWS, COLS);
  localparam int unsigned W = CW + OW;
  localparam int          TOL = 64;   // truncation error bound in the rescaled phase

  logic              clk = 0, rst_n = 0, cfg_load = 0;
  logic [W-1:0]      cfg_in;
  logic [DATA_W-1:0] x_in;
  hword_t            y_out;
  logic [N-1:0]      sat_flags;
  logic [$clog2(N+1)-1:0] sat_count;
  int checks = 0, failures = 0;
  int xs[$];  // xs[d] = sample applied d clock edges ago

  reconfig_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned idx(int r, int c);
    return r * COLS + c;
  endfunction
  task automatic set_as(int r, int c, bit sel_a, bit sel_b, bit sub, bit hor_reg, bit en = 1);
    as_cfg_t f = '{en: en, sel_a: sel_a, sel_b: sel_b, sub: sub, hor_reg: hor_reg};
    if (cell_kind(r, c, COLS) != CELL_AS) $fatal(1, "cell %0d,%0d is not an adder", r, c);
    cfg_in[cfg_offset(idx(r, c), COLS) +: AS_CFG_W] = f;
  endtask
  task automatic set_lrs(int r, int c, bit sel_in, bit right, bit hor_reg, bit en = 1);
    lrs_cfg_t f = '{en: en, sel_in: sel_in, right: right, hor_reg: hor_reg};
    if (cell_kind(r, c, COLS) != CELL_LRS) $fatal(1, "cell %0d,%0d is not a shifter", r, c);
    cfg_in[cfg_offset(idx(r, c), COLS) +: LRS_CFG_W] = f;
  endtask
  task automatic set_sbox(int r, int c, bit sel_in);
    sbox_cfg_t f = '{en: 1'b1, sel_in: sel_in};
    if (cell_kind(r, c, COLS) != CELL_SBOX) $fatal(1, "cell %0d,%0d is not a switch box", r, c);
    cfg_in[cfg_offset(idx(r, c), COLS) +: SBOX_CFG_W] = f;
  endtask

  localparam bit A = 1'b0, B = 1'b1;         // operand / input selects
  localparam bit LEFT = 1'b0, RIGHT = 1'b1;  // shift direction

  task automatic build_cascade();
    cfg_in = '0;
    // stage 1: (1,1) = 2 x[k-2] + 2 x[k-3]
    set_as (0, 0, A, B, 0, 1);            // x + 0
    set_lrs(0, 1, A, LEFT, 1);
    set_as (0, 2, A, B, 0, 1);            // delay
    set_lrs(1, 2, B, LEFT, 0, 0);         // pass, gated
    set_as (1, 1, A, B, 0, 1);
    // stage 2: (3,3) = s1/2 delayed by 3 + s1/2 delayed by 1
    set_lrs(2, 1, B, LEFT, 0, 0);         // pass, gated
    set_as (2, 2, A, A, 0, 0);            // pass (second operand A)
    set_lrs(2, 3, A, RIGHT, 1);
    set_sbox(2, 4, A);
    set_sbox(3, 4, B);
    set_as (3, 3, A, B, 0, 1);
    // stage 3: (5,5) = 2 s2 delayed by 5 + 2 s2 delayed by 1 (from (4,5))
    set_lrs(4, 3, B, LEFT, 0, 0);         // pass, gated
    set_sbox(4, 4, A);
    set_lrs(4, 5, A, LEFT, 0);            // *2 up, pass right
    set_as (4, 6, A, B, 0, 1);            // delay (B gated, zero)
    set_lrs(4, 7, A, LEFT, 0, 0);         // pass, gated
    set_sbox(4, 8, A);
    set_sbox(5, 8, B);
    set_as (5, 7, A, B, 0, 1);            // delay
    set_lrs(5, 6, A, LEFT, 1);
    set_as (5, 5, A, B, 0, 1);
    // stage 4: (7,5) = 2 s3 delayed by 9 + 2 s3 delayed by 1
    set_lrs(6, 5, B, LEFT, 0);            // *2 up (short branch), pass right
    set_as (6, 6, A, A, 0, 1);            // *2
    set_lrs(6, 7, A, RIGHT, 1);
    set_sbox(6, 8, A);
    set_lrs(6, 9, A, LEFT, 1);
    set_as (6, 10, A, B, 0, 1);           // delay
    set_lrs(6, 11, A, RIGHT, 1);
    set_as (6, 12, A, B, 0, 1);           // delay
    set_lrs(7, 12, B, LEFT, 1);
    set_as (7, 11, A, A, 0, 0, 0);        // pass, gated
    set_lrs(7, 10, A, LEFT, 0, 0);        // pass, gated
    set_as (7, 9, A, A, 0, 0, 0);         // pass, gated
    set_sbox(7, 8, A);
    set_as (7, 7, A, A, 0, 0, 0);         // pass, gated
    set_lrs(7, 6, A, LEFT, 0, 0);         // pass, gated
    set_as (7, 5, A, B, 0, 1);
    // stage 5: (11,5) = s4/2 delayed by 19 + s4/2 delayed by 3
    set_lrs(8, 5, B, RIGHT, 0);           // /2 up (short branch), pass right
    set_as (9, 5, B, B, 0, 0);            // *2
    set_lrs(10, 5, B, RIGHT, 0);          // /2
    set_as (8, 6, A, B, 0, 1);            // delay
    set_lrs(8, 7, A, RIGHT, 1);
    set_sbox(8, 8, A);
    set_lrs(8, 9, A, LEFT, 1);
    set_as (8, 10, A, B, 0, 1);           // delay
    set_lrs(8, 11, A, RIGHT, 1);
    set_as (8, 12, A, A, 0, 1);           // *2
    set_lrs(9, 12, B, RIGHT, 1);
    set_as (9, 11, A, A, 0, 0, 0);        // pass, gated
    set_lrs(9, 10, A, LEFT, 1);
    set_as (9, 9, A, A, 0, 0, 0);         // pass, gated
    set_sbox(9, 8, A);
    set_as (9, 7, A, A, 0, 0, 0);         // pass, gated
    set_lrs(9, 6, A, RIGHT, 1);
    set_as (10, 6, B, B, 0, 1);           // *2
    set_lrs(10, 7, A, RIGHT, 1);
    set_sbox(10, 8, A);
    set_lrs(10, 9, A, LEFT, 1);
    set_as (10, 10, A, A, 0, 0, 0);       // pass, gated
    set_lrs(10, 11, A, RIGHT, 1);
    set_as (10, 12, A, A, 0, 1);          // *2
    set_lrs(11, 12, B, RIGHT, 1);
    set_as (11, 11, A, A, 0, 0, 0);       // pass, gated
    set_lrs(11, 10, A, LEFT, 0, 0);       // pass, gated
    set_as (11, 9, A, A, 0, 0, 0);        // pass, gated
    set_sbox(11, 8, A);
    set_as (11, 7, A, A, 0, 0, 0);        // pass, gated
    set_lrs(11, 6, A, LEFT, 0, 0);        // pass, gated
    set_as (11, 5, A, B, 0, 1);
  endtask

  task automatic run_filter(string name, int out_cell, int lat, int taps, int gain);
    int n_exact = 0, n_scaled = 0, max_err = 0;
    cfg_in[W-1 -: OW] = OW'(out_cell);
    cfg_load = 1;
    for (int k = 0; k < 2 * (lat + taps) + 600; k++) begin
      automatic bit big = k >= lat + taps + 300;
      if (k > 0) cfg_load = 0;
      if (big) x_in = 20'((1 << 14) + $urandom % ((1 << 16) - (1 << 14)));
      else     x_in = 20'($urandom % 2001) - 20'd1000;
      xs.push_front(int'($signed(x_in)));
      @(posedge clk); #1;
      if (k >= lat + taps) begin
        automatic int exact = 0;
        automatic bit any_big = 0;
        automatic int got = to_m(y_out.data) * (y_out.prot ? 8 : 1);
        automatic int err;
        for (int d = lat; d < lat + taps; d++) begin
          exact += gain * xs[d];
          if (xs[d] >= (1 << 14)) any_big = 1;
        end
        err = (got > exact) ? got - exact : exact - got;
        checks++;
        if (!any_big) begin
          n_exact++;
          if (y_out.prot || got != exact) begin
            failures++;
            if (failures < 20)
              $display("FAIL %s k=%0d y=%0d prot=%0d expected %0d", name, k, got, y_out.prot, exact);
          end
        end else if (big) begin
          if (y_out.prot) n_scaled++;
          if (err > max_err) max_err = err;
          if (err > TOL) begin
            failures++;
            if (failures < 20)
              $display("FAIL %s k=%0d y=%0d prot=%0d expected about %0d", name, k, got, y_out.prot, exact);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_exact == 0 || n_scaled == 0 || sat_count != 0) begin
      failures++;
      $display("FAIL %s: exact=%0d rescaled=%0d saturated cells=%0d", name, n_exact, n_scaled, sat_count);
    end
    $display("%s: exact outputs=%0d rescaled outputs=%0d largest error when rescaled=%0d saturated cells=%0d",
             name, n_exact, n_scaled, max_err, sat_count);
  endtask

  initial begin
    cfg_in = '0; x_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    build_cascade();
    run_filter("8-tap",  idx(5, 5),  7,  8,  2);
    run_filter("16-tap", idx(7, 5),  9,  16, 4);
    run_filter("32-tap", idx(11, 5), 13, 32, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
