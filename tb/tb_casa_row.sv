// tb_casa_row: multiplies random 4-bit serial sections by random 16-bit
// parallel operands in a retimed and a pipelined CASA row side by side.
// The serial bits are fed LSB first in cycles 0..3, zeros after. The
// retimed row's p_out is sampled in cycles 0..19, the pipelined row's in
// cycles 1..20, and each 20-bit result is compared with a*b. Later cycles
// must give 0 (the product has exactly 20 bits, n + 4 cycles). clr is
// pulsed between operations, as the sequencer does.
module tb_casa_row;
  localparam int W_B = 16;
  localparam int NIB = 4;
  localparam int PPW = W_B + NIB;

  logic clk = 0, rst_n = 0, clr = 1, a_in = 0;
  logic [W_B-1:0] b = '0;
  logic p_out, p_out_p;
  int checks = 0, failures = 0;

  casa_row #(.W_B(W_B)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .a_in(a_in),
                             .b(b), .p_out(p_out));
  casa_row #(.W_B(W_B), .RETIMED(1'b0)) dut_p (.clk(clk), .rst_n(rst_n), .clr(clr),
                             .a_in(a_in), .b(b), .p_out(p_out_p));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [NIB-1:0] a, input logic [W_B-1:0] bv);
    logic [PPW-1:0] got, got_p;
    logic           tail_p;
    logic [PPW-1:0] expect_p;
    logic           tail;
    expect_p = PPW'(a) * PPW'(bv);
    got    = '0;
    tail   = 1'b0;
    got_p  = '0;
    tail_p = 1'b0;
    @(negedge clk);
    clr = 0;
    b   = bv;
    for (int t = 0; t < PPW + 4; t++) begin
      a_in = (t < NIB) ? a[t] : 1'b0;
      #1;
      if (t < PPW) got[t] = p_out;
      else         tail |= p_out;
      if (t >= 1 && t <= PPW) got_p[t-1] = p_out_p;
      else if (t > PPW)       tail_p |= p_out_p;
      @(negedge clk);
    end
    checks += 4;
    if (got_p !== expect_p || tail_p) begin
      failures++;
      $display("FAIL %0d * %0d: pipelined row gave %0d, expected %0d", a, bv, got_p, expect_p);
    end
    if (got !== expect_p) begin
      failures++;
      $display("FAIL %0d * %0d: row gave %0d, expected %0d", a, bv, got, expect_p);
    end
    if (tail) begin
      failures++;
      $display("FAIL %0d * %0d: nonzero bit after cycle %0d", a, bv, PPW - 1);
    end
    clr = 1;
    @(negedge clk);
  endtask

  initial begin
    #12 rst_n = 1;
    run(4'h1, 16'd3);
    run(4'hF, 16'hFFFF);
    run(4'h0, 16'hFFFF);
    run(4'hF, 16'h0000);
    run(4'h8, 16'h8000);
    for (int n = 0; n < 200; n++) run(4'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
