// tb_func_restore: check of the functionality restoration unit.
//
// For every key value and every input pattern (32 x 32) and both values of
// f_in, f_out must be f_in inverted exactly when the input equals the key,
// and hit must flag that match. The expected value is formed bit by bit in
// this file.
module tb_func_restore;
  logic [4:0] x, key;
  logic       f_in, f_out, hit;
  int checks = 0, failures = 0;

  func_restore dut (.x(x), .key(key), .f_in(f_in), .f_out(f_out), .hit(hit));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      for (int v = 0; v < 64; v++) begin
        logic match;
        key  = k[4:0];
        x    = v[5:1];
        f_in = v[0];
        match = 1'b1;
        for (int j = 0; j < 5; j++) if (x[j] != key[j]) match = 1'b0;
        #1;
        checks += 2;
        if (f_out !== (f_in ^ match)) begin failures++; $display("FAIL key=%b x=%b f_in=%b f_out=%b", key, x, f_in, f_out); end
        if (hit !== match)            begin failures++; $display("FAIL hit key=%b x=%b", key, x); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
