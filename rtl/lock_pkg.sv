// lock_pkg: types and constants shared by the logic-locking blocks.
//
// gate_key_e names the two settings of the key input of a stack-based
// configurable gate. The encoding (0 = NAND, 1 = NOR) is the one of the
// gate's truth table. C17_INPUTS is the primary-input count of the ISCAS-85
// c17 benchmark circuit that the top level locks; the protected cube and the
// restoration key of the strip/restore pair are that wide. The default
// protected cube value is a choice of this design, not of the source.
package lock_pkg;

  typedef enum logic {
    KEY_NAND = 1'b0,   // PMOS stack enabled: gate behaves as NAND
    KEY_NOR  = 1'b1    // NMOS stack enabled: gate behaves as NOR
  } gate_key_e;

  localparam int unsigned C17_INPUTS = 5;

  // Protected input cube whose output value is stripped (inverted) in the
  // locked netlist. Any value works; the matching restoration key unlocks it.
  localparam logic [C17_INPUTS-1:0] DEFAULT_CUBE = 5'b10110;

endpackage
