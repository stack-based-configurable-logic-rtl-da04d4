// stack_nand_nor: stack-based configurable NAND/NOR key gate.
//
// One two-input gate whose logic function is selected by a key bit:
//   key = 0 -> y = ~(a & b)   (NAND)
//   key = 1 -> y = ~(a | b)   (NOR)
//
// The module mirrors the transistor topology of the cell instead of just
// muxing two gates. The cell has three conduction paths:
//   * a PMOS stack: PMOS A || PMOS B, in series with a PMOS gated by the key.
//     It can pull OUT high only when key = 0.
//   * an NMOS stack: an NMOS gated by the key, in series with NMOS A || NMOS B.
//     It can pull OUT low only when key = 1.
//   * a shared-function section, always on: PMOS B in series with PMOS A to
//     VDD, NMOS A in series with NMOS B to ground. It produces the outputs
//     that NAND and NOR have in common (a = b = 0 -> 1, a = b = 1 -> 0), so
//     neither key stack needs to be duplicated for those input pairs.
// No input is used in negated form, so the cell needs no input inverters.
// The output is the value driven by whichever network conducts; an assertion
// checks that exactly one network conducts for every input and key (no
// floating output, no supply short).
//
// Interface: a, b, key in; y out. Purely combinational, no clock.
// The topology and truth table follow the source; expressing the networks as
// Boolean conduction terms is this model's own choice.
module stack_nand_nor
  import lock_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  gate_key_e key,
  output logic      y
);

  logic key_on_pmos;   // PMOS key transistor conducts (gate low)
  logic key_on_nmos;   // NMOS key transistor conducts (gate high)
  logic pu_stack;      // PMOS stack conducts VDD -> OUT
  logic pd_stack;      // NMOS stack conducts OUT -> GND
  logic pu_shared;     // shared-function series PMOS pair conducts
  logic pd_shared;     // shared-function series NMOS pair conducts
  logic pull_up;
  logic pull_down;

  always_comb begin
    key_on_pmos = (key == KEY_NAND);
    key_on_nmos = (key == KEY_NOR);
    // PMOS conducts on a low gate, NMOS on a high gate.
    pu_stack    = (!a || !b) && key_on_pmos;
    pd_stack    = key_on_nmos && (a || b);
    pu_shared   = !b && !a;
    pd_shared   = a && b;
    pull_up     = pu_stack || pu_shared;
    pull_down   = pd_stack || pd_shared;
    y           = pull_up;
  end

  // Complementary networks: the output is always driven, never shorted.
  always_comb begin
    assert (pull_up != pull_down)
      else $error("stack_nand_nor: pull-up=%b pull-down=%b (a=%b b=%b key=%b)",
                  pull_up, pull_down, a, b, key);
  end

endmodule
