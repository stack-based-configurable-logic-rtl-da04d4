// cube_strip: functionality strip unit.
//
// Inverts the output of the protected circuit for exactly one input pattern,
// the protected cube CUBE, which is fixed in the hardware:
//   f_out = f_in ^ (x == CUBE)
// The netlist thereby stops computing the original function on that cube, so
// that a reverse-engineered copy without the matching key is wrong there.
// hit is 1 while the current input equals the cube.
//
// Interface: x (the protected circuit's primary inputs), f_in (its original
// output) in; f_out (the stripped output) and hit out. Combinational.
// The strip-then-restore structure follows the source's description; the
// single-cube comparison (Hamming distance 0) and the widths are choices of
// this design.
module cube_strip #(
  parameter int unsigned           N    = lock_pkg::C17_INPUTS,
  parameter logic [N-1:0]          CUBE = lock_pkg::DEFAULT_CUBE
) (
  input  logic [N-1:0] x,
  input  logic         f_in,
  output logic         f_out,
  output logic         hit
);

  always_comb begin
    hit   = (x == CUBE);
    f_out = f_in ^ hit;
  end

endmodule
