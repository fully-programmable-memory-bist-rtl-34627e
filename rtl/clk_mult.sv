// clk_mult: behavioural model of the on-chip clock multiplier (not synthesizable).
//
// The BIST runs on an internal clock four or eight times faster than the
// external clock from the ATE; on silicon this comes from the DRAM's DLL,
// modified to multiply. This model measures the external clock period from
// two rising edges, then after every external rising edge emits MULT
// internal clock pulses (MULT = 8 when sel8 = 1, else 4) of period
// Text/MULT, rounded down to whole picoseconds. The first internal rising
// edge follows the external one after SKEW_PS, a small insertion delay; it is
// kept below half an internal period so that the last pulse of each burst
// ends before the next external edge.
// locked rises once the period is known and internal pulses run. The x4/x8
// choice is published; the lock behaviour and the skew are this model's own.
`timescale 1ps / 1ps
module clk_mult #(
  parameter int unsigned SKEW_PS = 50   // insertion delay in ps
) (
  input  logic ext_clk,
  input  logic sel8,
  output logic int_clk,
  output logic locked
);

  longint  last_edge;   // all times in ps
  longint  period;
  longint  half;
  int      mult;
  bit      seen;

  initial begin
    int_clk   = 1'b0;
    locked    = 1'b0;
    seen      = 1'b0;
    last_edge = 0;
    period    = 0;
    forever begin
      @(posedge ext_clk);
      if (seen) begin
        period = longint'($time) - last_edge;
        locked = 1'b1;
      end
      seen      = 1'b1;
      last_edge = longint'($time);
      if (locked) begin
        mult = sel8 ? 8 : 4;
        half = period / longint'(2 * mult);
        #(SKEW_PS);
        repeat (mult - 1) begin
          int_clk = 1'b1;
          #(half);
          int_clk = 1'b0;
          #(half);
        end
        int_clk = 1'b1;
        #(half);
        int_clk = 1'b0;
      end
    end
  end

endmodule
