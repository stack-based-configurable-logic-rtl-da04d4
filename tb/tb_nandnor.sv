// tb_nandnor: end-to-end test of the locked c17 netlist at default parameters.
//
// Sweeps every combination of the five primary inputs, the two gate key bits
// and the five-bit restoration key (32 x 4 x 32 = 4096 vectors) and compares
// o1/o2 with an independent reference model of the locked netlist written
// here from the c17 gate list. It then checks the locking properties:
//   * with the correct key (k1 = k2 = NAND, rk = protected cube) the outputs
//     equal the original c17 for all 32 input patterns;
//   * every wrong key corrupts at least one output for some input.
// It counts how often each mechanism occurred and fails if one never did:
// key gate in NAND mode, key gate in NOR mode, shared-function input pair at
// a key gate, strip unit firing, restore unit firing, strip and restore
// cancelling, and wrong-key output corruption.
module tb_nandnor;
  import lock_pkg::*;

  localparam logic [4:0] CUBE = 5'b10110;   // default protected cube

  logic i1, i2, i3, i4, i5, o1, o2;
  gate_key_e k1, k2;
  logic [4:0] rk;
  int checks = 0, failures = 0;

  nandnor dut (.i1, .i2, .i3, .i4, .i5, .k1, .k2, .rk, .o1, .o2);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic nand2(logic p, logic q); return !(p && q); endfunction
  function automatic logic nor2 (logic p, logic q); return !(p || q); endfunction
  function automatic logic kgate(logic p, logic q, logic k); return k ? nor2(p, q) : nand2(p, q); endfunction

  // Original c17 (inputs 1,2,3,6,7 -> a..e); returns {22, 23}.
  function automatic logic [1:0] c17(logic [4:0] v);
    logic g1, g2, g3, g6, g7, g10, g11, g16, g19;
    {g1, g2, g3, g6, g7} = v;
    g10 = nand2(g1, g3);
    g11 = nand2(g3, g6);
    g16 = nand2(g2, g11);
    g19 = nand2(g11, g7);
    return {nand2(g10, g16), nand2(g16, g19)};
  endfunction

  int n_nand, n_nor, n_shared, n_strip, n_restore, n_cancel, n_corrupt;

  initial begin
    logic [4:0] v;
    logic [1:0] ref_out, orig;
    logic g1, g2, g3, g6, g7, g10, g11, g16, g19, g22, s_hit, r_hit;
    bit   key_detected [4][32];

    foreach (key_detected[a, b]) key_detected[a][b] = 1'b0;

    for (int kk = 0; kk < 4; kk++) begin
      for (int r = 0; r < 32; r++) begin
        for (int iv = 0; iv < 32; iv++) begin
          v  = iv[4:0];
          rk = r[4:0];
          k1 = gate_key_e'(kk[1]);
          k2 = gate_key_e'(kk[0]);
          {i1, i2, i3, i4, i5} = v;
          // Reference model of the locked netlist.
          {g1, g2, g3, g6, g7} = v;
          g10 = nand2(g1, g3);
          g11 = kgate(g3, g6, kk[0]);
          g16 = kgate(g2, g11, kk[1]);
          g19 = nand2(g11, g7);
          g22 = nand2(g10, g16);
          s_hit = (v == CUBE);
          r_hit = (v == rk);
          ref_out = {g22 ^ s_hit ^ r_hit, nand2(g16, g19)};
          orig    = c17(v);
          #1;
          checks++;
          if ({o1, o2} !== ref_out) begin
            failures++;
            $display("FAIL in=%b k1=%0d k2=%0d rk=%b out=%b%b expected=%b", v, kk[1], kk[0], rk, o1, o2, ref_out);
          end
          // Mechanism counts.
          n_nand   += int'(kk[0] == 0) + int'(kk[1] == 0);
          n_nor    += int'(kk[0] == 1) + int'(kk[1] == 1);
          n_shared += int'(g3 == g6) + int'(g2 == g11);
          n_strip  += int'(s_hit);
          n_restore += int'(r_hit);
          n_cancel += int'(s_hit && r_hit);
          if ({o1, o2} != orig) begin
            n_corrupt++;
            key_detected[kk][r] = 1'b1;
          end
          // Correct key must give the original function.
          if (kk == 0 && rk == CUBE) begin
            checks++;
            if ({o1, o2} !== orig) begin
              failures++;
              $display("FAIL correct key in=%b out=%b%b c17=%b", v, o1, o2, orig);
            end
          end
        end
      end
    end

    // Every wrong key must be observable at the outputs.
    for (int kk = 0; kk < 4; kk++)
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (key_detected[kk][r] != !(kk == 0 && r[4:0] == CUBE)) begin
          failures++;
          $display("FAIL key k1k2=%0d rk=%b detected=%b", kk, r[4:0], key_detected[kk][r]);
        end
      end

    $display("mechanisms: nand=%0d nor=%0d shared=%0d strip=%0d restore=%0d cancel=%0d corrupt=%0d",
             n_nand, n_nor, n_shared, n_strip, n_restore, n_cancel, n_corrupt);
    checks += 7;
    if (n_nand == 0)    begin failures++; $display("FAIL NAND mode never used"); end
    if (n_nor == 0)     begin failures++; $display("FAIL NOR mode never used"); end
    if (n_shared == 0)  begin failures++; $display("FAIL shared-function pair never applied"); end
    if (n_strip == 0)   begin failures++; $display("FAIL strip unit never fired"); end
    if (n_restore == 0) begin failures++; $display("FAIL restore unit never fired"); end
    if (n_cancel == 0)  begin failures++; $display("FAIL strip/restore never cancelled"); end
    if (n_corrupt == 0) begin failures++; $display("FAIL wrong key never corrupted an output"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
