// tb_gate2: exhaustive check of the AND and OR variants of the gate cell.
module tb_gate2;
  import spm_pkg::*;
  logic a, b, y_and, y_or;
  int checks = 0, failures = 0;

  gate2 #(.OP(GATE_AND)) dut_and (.a(a), .b(b), .y(y_and));
  gate2 #(.OP(GATE_OR))  dut_or  (.a(a), .b(b), .y(y_or));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (y_and != (v == 3)) begin
        failures++;
        $display("FAIL AND a=%0b b=%0b y=%0b", a, b, y_and);
      end
      if (y_or != (v != 0)) begin
        failures++;
        $display("FAIL OR a=%0b b=%0b y=%0b", a, b, y_or);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
