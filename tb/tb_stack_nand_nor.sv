// tb_stack_nand_nor: exhaustive check of the stack-based NAND/NOR key gate.
//
// Applies all eight (key, a, b) combinations and compares y with the gate's
// truth table, held here as a literal constant (key 0 rows are NAND, key 1
// rows are NOR). The run also counts how often the shared-function input
// pairs (a == b), where both settings give the same output, were applied.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_stack_nand_nor;
  import lock_pkg::*;

  logic      a, b, y;
  gate_key_e key;
  int checks = 0, failures = 0;
  int shared = 0;

  // Truth table rows indexed by {key, a, b}.
  localparam logic [7:0] TRUTH = 8'b0001_0111;  // bit i = OUT for {key,a,b} = i

  stack_nand_nor dut (.a(a), .b(b), .key(key), .y(y));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 8; i++) begin
        key = gate_key_e'(i[2]);
        a   = i[1];
        b   = i[0];
        #1;
        checks++;
        if (y !== TRUTH[i]) begin
          failures++;
          $display("FAIL key=%0d a=%b b=%b y=%b expected=%b", key, a, b, y, TRUTH[i]);
        end
        if (a == b) shared++;
      end
    end
    checks++;
    if (shared != 8) begin
      failures++;
      $display("FAIL shared-function pairs applied %0d times", shared);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
