// tb_spm16x16: end-to-end test of the 16 x 16 serial-parallel multiplier
// at its default sizes.
//
// Each operation splits the serial operand into four 4-bit sections and
// drives section k on a_ser[k], LSB first, in the start cycle and the
// three cycles after it; afterwards a_ser carries random junk that the
// multiplier must ignore. The product is compared with a * b, and valid
// must rise after exactly 20 rising edges (n + 4 cycles). The first
// operation is the worked example 17 x 3 = 51. The test also counts the
// mechanisms of the design and fails if one never occurred:
//   back-to-back operations (rows reset in the cycle after the 20th),
//   start pulses ignored while busy, junk ignored on the serial inputs
//   after the fourth bit, Wallace tree carries reaching the final adder,
//   and carries taking a skip path of the carry-skip adder.
module tb_spm16x16;
  localparam int CYCLES = 20;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [3:0]  a_ser = '0;
  logic [15:0] b = '0;
  logic        busy, valid;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_ignored_start = 0, n_junk = 0, n_wt_carry = 0, n_skip = 0;

  spm16x16 dut (.clk(clk), .rst_n(rst_n), .start(start), .a_ser(a_ser), .b(b),
                .busy(busy), .valid(valid), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Did a carry enter some all-propagate 4-bit block of the final adder?
  function automatic bit skip_used(logic [31:0] x, logic [31:0] y);
    logic [32:0] carries;
    logic [31:0] prop;
    carries = (33'(x) + 33'(y)) ^ 33'(x) ^ 33'(y);
    prop    = x ^ y;
    for (int k = 0; k < 8; k++)
      if ((&prop[4*k +: 4]) && carries[4*k]) return 1;
    return 0;
  endfunction

  // Run one multiplication, beginning at a negedge with the unit idle.
  // Returns at the negedge after valid rose.
  task automatic multiply(input logic [15:0] av, input logic [15:0] bv, input bit junk,
                          input bit poke_start);
    logic [31:0] expect_p;
    expect_p = 32'(av) * 32'(bv);
    b     = bv;
    start = 1;
    for (int t = 0; t < CYCLES; t++) begin
      for (int k = 0; k < 4; k++)
        a_ser[k] = (t < 4) ? av[4*k + t] : (junk ? 1'($urandom) : 1'b0);
      if (t > 0) start = poke_start ? 1'($urandom) : 1'b0;
      if (t > 0 && start) n_ignored_start++;
      if (t >= 4 && junk && a_ser != 0) n_junk++;
      @(posedge clk);
      #1;
      if (t < CYCLES - 1) begin
        checks++;
        if (valid) begin
          failures++;
          $display("FAIL %0d * %0d: valid after %0d edges", av, bv, t + 1);
        end
      end
      @(negedge clk);
    end
    start = 0;
    a_ser = '0;
    checks += 2;
    if (!valid) begin
      failures++;
      $display("FAIL %0d * %0d: valid not high after %0d edges", av, bv, CYCLES);
    end
    if (p !== expect_p) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", av, bv, p, expect_p);
    end
    if (dut.wt_carry != '0) n_wt_carry++;
    if (skip_used(dut.wt_sum, dut.wt_carry)) n_skip++;
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);

    // Worked example: 17 x 3.
    multiply(16'd17, 16'd3, 0, 0);
    checks++;
    if (p !== 32'd51) begin
      failures++;
      $display("FAIL example 17 x 3 gave %0d", p);
    end

    // The result must stay while idle.
    repeat (5) @(negedge clk);
    checks++;
    if (!valid || p !== 32'd51) begin
      failures++;
      $display("FAIL result not held while idle");
    end

    multiply(16'hFFFF, 16'hFFFF, 0, 0);
    multiply(16'h0000, 16'hFFFF, 1, 0);
    multiply(16'hFFFF, 16'h0000, 1, 0);
    multiply(16'h8000, 16'h8000, 1, 1);

    // Back-to-back random operations, with junk and stray starts.
    for (int n = 0; n < 400; n++) begin
      if (n % 3 != 0) n_back_to_back++;
      multiply(16'($urandom), 16'($urandom), n % 2 == 0, n % 5 == 0);
      if (n % 3 == 0) repeat (1 + $urandom % 3) @(negedge clk);
    end

    $display("back-to-back=%0d ignored-starts=%0d junk-cycles=%0d wallace-carries=%0d skips=%0d",
             n_back_to_back, n_ignored_start, n_junk, n_wt_carry, n_skip);
    checks += 5;
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back operation"); end
    if (n_ignored_start == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_junk == 0) begin failures++; $display("FAIL no junk on serial inputs"); end
    if (n_wt_carry == 0) begin failures++; $display("FAIL no Wallace carry"); end
    if (n_skip == 0) begin failures++; $display("FAIL carry-skip path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
