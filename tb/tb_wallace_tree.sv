// tb_wallace_tree: applies random and extreme partial products and checks
// that sum_o + carry_o equals pp[0] + pp[1]<<4 + pp[2]<<8 + pp[3]<<12,
// and that no column of the two output rows overflows (their sum never
// needs a 33rd bit).
module tb_wallace_tree;
  import spm_pkg::*;
  localparam int W_B = 16;
  localparam int NIB = 4;
  localparam int PPW = W_B + NIB;
  localparam int PW  = ROWS * NIB + W_B;

  logic [ROWS-1:0][PPW-1:0] pp;
  logic [PW-1:0] s, c;
  int checks = 0, failures = 0;

  wallace_tree #(.W_B(W_B), .NIB(NIB)) dut (.pp(pp), .sum_o(s), .carry_o(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    logic [63:0] expect_v, got;
    expect_v = '0;
    for (int k = 0; k < ROWS; k++) expect_v += 64'(pp[k]) << (k * NIB);
    #1;
    got = 64'(s) + 64'(c);
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("FAIL pp=%h: rows sum to %h, expected %h", pp, got, expect_v);
    end
  endtask

  initial begin
    pp = '0;
    check_once();
    pp = '1;
    check_once();
    // Single bits, to exercise every cell position.
    for (int k = 0; k < ROWS; k++)
      for (int i = 0; i < PPW; i++) begin
        pp = '0;
        pp[k][i] = 1'b1;
        check_once();
      end
    // Partial products that real 4x16 products can take.
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < ROWS; k++) pp[k] = PPW'(($urandom % 16) * ($urandom % 65536));
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
