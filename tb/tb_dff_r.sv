// tb_dff_r: drives random data, synchronous clears and asynchronous resets
// into the flip-flop and compares q with a one-cycle-delayed model.
module tb_dff_r;
  logic clk = 0, rst_n = 0, clr = 0, d = 0, q;
  logic model_q;
  int checks = 0, failures = 0;

  dff_r dut (.clk(clk), .rst_n(rst_n), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_q = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      d   = 1'($urandom);
      clr = ($urandom % 8) == 0;
      @(posedge clk);
      model_q = clr ? 1'b0 : d;
      #1;
      checks++;
      if (q !== model_q) begin
        failures++;
        $display("FAIL cycle %0d d=%0b clr=%0b q=%0b expected %0b", n, d, clr, q, model_q);
      end
      if (n % 97 == 50 && q) begin
        // asynchronous reset between edges
        #2 rst_n = 0;
        #1;
        checks++;
        if (q !== 1'b0) begin
          failures++;
          $display("FAIL asynchronous reset did not clear q");
        end
        rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
