// func_restore: programmable functionality restoration unit.
//
// Inverts the stripped output back when the input pattern equals the key:
//   f_out = f_in ^ (x == key)
// With key equal to the protected cube of the strip unit, the two inversions
// cancel on that cube and the original function is restored for every input.
// With any other key, the output is wrong on two input patterns: the
// protected cube (strip fires, restore does not) and the key value itself
// (restore fires, strip does not).
// hit is 1 while the current input equals the key.
//
// Interface: x (primary inputs), key (restoration key, same width), f_in (the
// stripped output) in; f_out (restored output) and hit out. Combinational.
// The function follows the source's description; the exact-match comparator
// is this design's choice.
module func_restore #(
  parameter int unsigned N = lock_pkg::C17_INPUTS
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] key,
  input  logic         f_in,
  output logic         f_out,
  output logic         hit
);

  always_comb begin
    hit   = (x == key);
    f_out = f_in ^ hit;
  end

endmodule
