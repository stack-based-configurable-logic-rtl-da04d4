// nandnor: ISCAS-85 c17 benchmark locked with stack-based NAND/NOR key gates.
//
// c17 is a six-gate all-NAND circuit with five inputs and two outputs. Here
// two of its gates are replaced by stack-based configurable gates whose
// function is set by the key bits k1 and k2 (0 = NAND, 1 = NOR). In addition,
// output o1 passes through a functionality strip unit, which inverts it on
// one hard-wired input cube, and a restoration unit, which inverts it back
// when the inputs equal the restoration key rk.
//
// Netlist (c17 node numbers in brackets, inputs i1..i5 = c17 inputs 1,2,3,6,7):
//   n10 = NAND(i1, i3)                  [10]
//   n11 = KEYGATE(i3, i4; k2)           [11]  stack_nand_nor
//   n16 = KEYGATE(i2, n11; k1)          [16]  stack_nand_nor
//   n19 = NAND(n11, i5)                 [19]
//   o1  = restore(strip(NAND(n10, n16)))[22]
//   o2  = NAND(n16, n19)                [23]
// The correct key is k1 = k2 = 0 and rk = CUBE; the circuit then computes c17
// exactly. Any other key makes at least one output wrong for some input.
//
// Interface: i1..i5, k1, k2, rk in; o1, o2 out. Purely combinational.
// The top's name, the key names k1/k2 and the outputs o1/o2 follow the
// source's RTL schematic, which also shows an input i6; c17 has only five
// inputs, so this netlist has no i6. The benchmark netlist (c17) is the
// standard one; which two gates carry key gates, and the strip/restore pair
// on o1, are choices of this design.
module nandnor
  import lock_pkg::*;
#(
  parameter logic [C17_INPUTS-1:0] CUBE = DEFAULT_CUBE
) (
  input  logic                  i1,
  input  logic                  i2,
  input  logic                  i3,
  input  logic                  i4,
  input  logic                  i5,
  input  gate_key_e             k1,
  input  gate_key_e             k2,
  input  logic [C17_INPUTS-1:0] rk,
  output logic                  o1,
  output logic                  o2
);

  logic [C17_INPUTS-1:0] x;
  logic n10, n11, n16, n19, n22;
  logic o1_stripped;

  assign x = {i1, i2, i3, i4, i5};

  assign n10 = ~(i1 & i3);

  stack_nand_nor u_kg11 (.a(i3), .b(i4),  .key(k2), .y(n11));
  stack_nand_nor u_kg16 (.a(i2), .b(n11), .key(k1), .y(n16));

  assign n19 = ~(n11 & i5);
  assign n22 = ~(n10 & n16);
  assign o2  = ~(n16 & n19);

  cube_strip #(.N(C17_INPUTS), .CUBE(CUBE)) u_strip (
    .x    (x),
    .f_in (n22),
    .f_out(o1_stripped),
    .hit  ()
  );

  func_restore #(.N(C17_INPUTS)) u_restore (
    .x    (x),
    .key  (rk),
    .f_in (o1_stripped),
    .f_out(o1),
    .hit  ()
  );

endmodule
