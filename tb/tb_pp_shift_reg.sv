// tb_pp_shift_reg: shifts random 20-bit words in LSB first, with idle
// cycles mixed in, and checks that the word lands in q unchanged and is
// held while shift_en is low.
module tb_pp_shift_reg;
  localparam int W = 20;
  logic clk = 0, rst_n = 0, shift_en = 0, d = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  pp_shift_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word;
    #12 rst_n = 1;
    @(negedge clk);
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL reset value %h", q);
    end
    for (int n = 0; n < 100; n++) begin
      word = W'($urandom);
      for (int t = 0; t < W; t++) begin
        shift_en = 1;
        d        = word[t];
        @(negedge clk);
        if ($urandom % 4 == 0) begin
          shift_en = 0;
          d        = 1'($urandom);
          @(negedge clk);
        end
      end
      shift_en = 0;
      checks++;
      if (q !== word) begin
        failures++;
        $display("FAIL word %h collected as %h", word, q);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (q !== word) begin
        failures++;
        $display("FAIL word %h not held: %h", word, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
