// spm_control: sequencer of one multiplication.
//
// An operation lasts CYCLES + LAT clock cycles, counted from the cycle in
// which start is seen while idle (cycle 0). In cycles 0 .. NIB-1 accept is
// high and the serial operand bits are let into the CASA rows; later
// cycles feed zeros so that the rows flush their carries. shift_en is high
// in cycles LAT .. LAT+CYCLES-1, the CYCLES cycles in which the rows put
// out a product bit, so that each bit is shifted into its partial-product
// register. LAT is the rows' output delay: 0 for retimed rows, 1 for
// pipelined rows. clr is high in the last cycle (the rows are
// reset in the cycle after the n + NIB working cycles) and whenever the
// unit is idle without a start, so an operation always begins from clear
// rows. valid rises after the last edge of an operation and stays high
// until the next start; start is ignored while busy.
//
// The document states only the cycle count (n + 4 = 20 for the retimed
// rows); the counter,
// the handshake and the clear policy are this design's choices.
module spm_control
  import spm_pkg::*;
#(
  parameter int unsigned CYCLES = SPM_CYCLES,
  parameter int unsigned NIB    = SPM_NIB,
  parameter int unsigned LAT    = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic accept,
  output logic shift_en,
  output logic clr,
  output logic busy,
  output logic valid
);

  localparam int unsigned TOTAL = CYCLES + LAT;          // cycles per operation
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  spm_state_e    state;
  logic [CW-1:0] cnt;    // index of the current cycle while running
  logic          go;     // cycle 0 of an operation
  logic          last;   // last cycle of an operation

  assign go   = (state == ST_IDLE) && start;
  assign last = (state == ST_RUN) && (cnt == CW'(TOTAL - 1));

  always_comb begin
    busy     = (state == ST_RUN);
    if (LAT == 0) shift_en = go || busy;
    else          shift_en = busy && (int'(cnt) >= int'(LAT));
    accept   = go || (busy && (cnt < CW'(NIB)));
    clr      = last || ((state == ST_IDLE) && !start);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      valid <= 1'b0;
    end else if (go) begin
      state <= ST_RUN;
      cnt   <= CW'(1);
      valid <= 1'b0;
    end else if (last) begin
      state <= ST_IDLE;
      cnt   <= '0;
      valid <= 1'b1;
    end else if (busy) begin
      cnt   <= cnt + CW'(1);
    end
  end

endmodule
