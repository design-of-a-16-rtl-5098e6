// tb_spm_control: checks the sequencer cycle by cycle. After a start seen
// while idle, shift_en must be high for exactly 20 cycles, accept for the
// first 4 of them, clr in the last one and in idle cycles without start,
// busy from cycle 1 to 19, and valid must rise after the 20th edge and
// stay until the next start. A start while busy must be ignored. A second
// sequencer with LAT = 1 (pipelined rows) must run 21 cycles and shift in
// cycles 1..20 only.
module tb_spm_control;
  localparam int CYCLES = 20;
  localparam int NIB    = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic accept, shift_en, clr, busy, valid;
  int checks = 0, failures = 0;

  spm_control #(.CYCLES(CYCLES), .NIB(NIB)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .accept(accept), .shift_en(shift_en),
    .clr(clr), .busy(busy), .valid(valid));

  logic accept_p, shift_en_p, clr_p, busy_p, valid_p;
  spm_control #(.CYCLES(CYCLES), .NIB(NIB), .LAT(1)) dut_p (
    .clk(clk), .rst_n(rst_n), .start(start), .accept(accept_p), .shift_en(shift_en_p),
    .clr(clr_p), .busy(busy_p), .valid(valid_p));

  // Pipelined sequencer, checked on its own clock-by-clock schedule.
  int p_cycle = -1;
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (p_cycle < 0 && start && !busy_p) p_cycle = 0;
      if (p_cycle >= 0) begin
        checks++;
        if (shift_en_p !== (p_cycle >= 1) || accept_p !== (p_cycle < NIB) ||
            clr_p !== (p_cycle == CYCLES)) begin
          failures++;
          $display("FAIL LAT=1 cycle %0d: shift_en=%0b accept=%0b clr=%0b",
                   p_cycle, shift_en_p, accept_p, clr_p);
        end
        p_cycle = (p_cycle == CYCLES) ? -1 : p_cycle + 1;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_outputs(input string what, input logic e_acc, e_sh, e_clr, e_busy, e_val);
    checks++;
    if ({accept, shift_en, clr, busy, valid} !== {e_acc, e_sh, e_clr, e_busy, e_val}) begin
      failures++;
      $display("FAIL %s: acc=%0b sh=%0b clr=%0b busy=%0b valid=%0b, expected %0b%0b%0b%0b%0b",
               what, accept, shift_en, clr, busy, valid, e_acc, e_sh, e_clr, e_busy, e_val);
    end
  endtask

  // One operation, starting at a negedge in the idle state.
  task automatic operation(input logic prev_valid, input bit poke_start);
    start = 1;
    #1 expect_outputs("cycle 0", 1, 1, 0, 0, prev_valid);
    for (int t = 1; t < CYCLES; t++) begin
      @(negedge clk);
      start = poke_start ? 1'($urandom) : 1'b0;
      #1 expect_outputs($sformatf("cycle %0d", t), t < NIB, 1, t == CYCLES - 1, 1, 0);
    end
    @(negedge clk);
    start = 0;
    #1 expect_outputs("after", 0, 0, 1, 0, 1);
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    #1 expect_outputs("idle after reset", 0, 0, 1, 0, 0);
    operation(0, 0);
    repeat (3) @(negedge clk);
    #1 expect_outputs("idle holds valid", 0, 0, 1, 0, 1);
    @(negedge clk);
    operation(1, 1);   // start toggled while busy: ignored
    operation(1, 0);   // back-to-back start in the cycle valid rose
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
