// tb_casa_cell: random stimulus on both forms of one CASA slice, compared
// with a model of their function. The full adder adds (a_in & b_i), s_in
// and the stored carry. Retimed slice: s_out is that sum at once, a_out is
// a_in one cycle late. Pipelined slice: s_out is that sum one cycle late,
// a_out is a_in at once.
module tb_casa_cell;
  logic clk = 0, rst_n = 0, clr = 0;
  logic a_in = 0, b_i = 0, s_in = 0;
  logic a_out, s_out;
  logic a_out_p, s_out_p;
  logic m_carry, m_a, m_carry_p, m_sum_p;
  int checks = 0, failures = 0;

  casa_cell dut (.clk(clk), .rst_n(rst_n), .clr(clr), .a_in(a_in), .a_out(a_out),
                 .b_i(b_i), .s_in(s_in), .s_out(s_out));
  casa_cell #(.RETIMED(1'b0)) dut_p (.clk(clk), .rst_n(rst_n), .clr(clr), .a_in(a_in),
                 .a_out(a_out_p), .b_i(b_i), .s_in(s_in), .s_out(s_out_p));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, total_p;
    m_carry   = 0;
    m_a       = 0;
    m_carry_p = 0;
    m_sum_p   = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a_in = 1'($urandom);
      b_i  = 1'($urandom);
      s_in = 1'($urandom);
      clr  = ($urandom % 10) == 0;
      #1;
      total   = int'(a_in & b_i) + int'(s_in) + int'(m_carry);
      total_p = int'(a_in & b_i) + int'(s_in) + int'(m_carry_p);
      checks += 4;
      if (s_out_p !== m_sum_p || a_out_p !== a_in) begin
        failures++;
        $display("FAIL cycle %0d pipelined slice s_out=%0b a_out=%0b", n, s_out_p, a_out_p);
      end
      if (s_out !== total[0]) begin
        failures++;
        $display("FAIL cycle %0d s_out=%0b expected %0b", n, s_out, total[0]);
      end
      if (a_out !== m_a) begin
        failures++;
        $display("FAIL cycle %0d a_out=%0b expected %0b", n, a_out, m_a);
      end
      @(posedge clk);
      m_carry = clr ? 1'b0 : total[1];
      m_a     = clr ? 1'b0 : a_in;
      m_carry_p = clr ? 1'b0 : total_p[1];
      m_sum_p   = clr ? 1'b0 : total_p[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
