// tb_cube_strip: exhaustive check of the functionality strip unit.
//
// Two instances are tested, one with the default protected cube and one with
// a cube set by parameter. For all 32 input patterns and both values of f_in
// the output must equal f_in except on the protected cube, where it is
// inverted; hit must be 1 on that cube only. Expected values are derived from
// the cube constants held in this file.
module tb_cube_strip;
  logic [4:0] x;
  logic       f_in;
  logic       f0, h0, f1, h1;
  int checks = 0, failures = 0;
  int fired = 0;

  localparam logic [4:0] CUBE_DEF = 5'b10110;   // package default
  localparam logic [4:0] CUBE_ALT = 5'b00011;

  cube_strip dut0 (.x(x), .f_in(f_in), .f_out(f0), .hit(h0));
  cube_strip #(.N(5), .CUBE(CUBE_ALT)) dut1 (.x(x), .f_in(f_in), .f_out(f1), .hit(h1));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      x    = v[5:1];
      f_in = v[0];
      #1;
      checks += 4;
      if (f0 !== (x == CUBE_DEF ? ~f_in : f_in)) begin failures++; $display("FAIL dut0 x=%b f_in=%b f_out=%b", x, f_in, f0); end
      if (h0 !== (x == CUBE_DEF))                 begin failures++; $display("FAIL dut0 hit x=%b", x); end
      if (f1 !== (x == CUBE_ALT ? ~f_in : f_in)) begin failures++; $display("FAIL dut1 x=%b f_in=%b f_out=%b", x, f_in, f1); end
      if (h1 !== (x == CUBE_ALT))                 begin failures++; $display("FAIL dut1 hit x=%b", x); end
      if (h0) fired++;
    end
    checks++;
    if (fired != 2) begin failures++; $display("FAIL strip fired %0d times, expected 2", fired); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
