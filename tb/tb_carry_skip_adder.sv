// tb_carry_skip_adder: random and structured operands for the 32-bit
// carry-skip adder, compared with a + b + cin. Operand pairs that make
// whole blocks propagate are generated on purpose, and the testbench
// counts how often a carry actually took a skip path.
module tb_carry_skip_adder;
  localparam int W   = 32;
  localparam int BLK = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0, skips = 0;

  carry_skip_adder #(.W(W), .BLK(BLK)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    logic [W:0] expect_v;
    expect_v = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
    #1;
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h, expected %h", a, b, cin, {cout, sum}, expect_v);
    end
    // Carry into bit i of a + b + cin is bit i of a ^ b ^ (a + b + cin).
    begin
      logic [W:0] carries;
      logic [W-1:0] prop;
      bit used;
      carries = expect_v ^ (W+1)'(a) ^ (W+1)'(b);
      prop    = a ^ b;
      used    = 0;
      for (int k = 0; k < W / BLK; k++)
        if ((&prop[k*BLK +: BLK]) && carries[k*BLK]) used = 1;
      if (used) skips++;
    end
  endtask

  initial begin
    a = '0; b = '0; cin = 0;
    check_once();
    a = '1; b = '0; cin = 1;   // carry runs through every block
    check_once();
    a = '1; b = '1; cin = 1;
    check_once();
    for (int n = 0; n < 3000; n++) begin
      a   = W'($urandom);
      cin = 1'($urandom);
      if (n % 2 == 0) b = ~a ^ W'($urandom & $urandom & $urandom);  // mostly propagate
      else            b = W'($urandom);
      check_once();
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL the skip path was never used");
    end
    $display("skip path used in %0d additions", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
