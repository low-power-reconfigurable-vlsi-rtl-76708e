// tb_overflow_protect: drives overflow_protect with random and corner-case
// 21-bit results and both protection-bit values, and compares the normalised
// word and the saturation output with the integer reference in calu_ref_pkg.
// Counts how often each of the three outcomes (pass, rescale, saturate)
// occurred and fails if one never did.
module tb_overflow_protect;
  import calu_pkg::*;
  import calu_ref_pkg::*;

  logic [20:0] wide;
  logic        prot_in;
  hword_t      res;
  logic        sat;
  int checks = 0, failures = 0;
  int n_pass = 0, n_resc = 0, n_sat = 0;

  overflow_protect dut (.wide(wide), .prot_in(prot_in), .res(res), .sat(sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int v, bit p);
    rword_t e;
    bit es, er;
    wide = 21'(v); prot_in = p;
    #1;
    e = norm(v, p, es, er);
    checks++;
    if ({res.prot, res.data} !== to_bits(e) || sat !== es) begin
      failures++;
      $display("FAIL v=%0d p=%0d got p=%0d m=%0d sat=%0d exp p=%0d m=%0d sat=%0d",
               v, p, res.prot, to_m(res.data), sat, e.p, e.m, es);
    end
    if (es) n_sat++; else if (er) n_resc++; else n_pass++;
  endtask

  initial begin
    int corners[$];
    corners = '{0, 1, -1, MAXV, MINV, MAXV + 1, MINV - 1, (1 << 20) - 1, -(1 << 20),
                       MAXV + 7, MINV - 9};
    foreach (corners[i]) begin
      check_one(corners[i], 0);
      check_one(corners[i], 1);
    end
    repeat (2000) begin
      int v;
      v = int'($signed(21'($urandom)));
      check_one(v, 1'($urandom));
    end
    if (n_pass == 0 || n_resc == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL mechanism not exercised pass=%0d rescale=%0d sat=%0d", n_pass, n_resc, n_sat);
    end
    $display("pass=%0d rescale=%0d saturate=%0d", n_pass, n_resc, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
