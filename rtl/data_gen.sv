// data_gen: data generator (DATA_gen) of the instruction decoder.
//
// Holds the data background register dreg and the two output registers
// dataE (data for the rising clock edge) and dataO (falling edge). When an
// instruction is issued (en) its data function either drives the outputs
// from dreg (LL: dreg/dreg, LH: dreg/~dreg, HL: ~dreg/dreg, HH: ~dreg/~dreg)
// or changes dreg (INC, DEC, SETREG from the external data register, HOLD).
// The outputs keep their value under the functions that do not drive them,
// so a write burst is formed by one LL..HH instruction per internal clock.
// The function table follows the published one; the 8-bit width (one x8 DDR3
// beat per edge), holding the outputs, and reset to zero are this design's
// choices. Outputs change at the clock edge that ends the issue cycle.
`timescale 1ns / 1ps
module data_gen
  import mbist_pkg::*;
#(
  parameter int unsigned DW    = 8,
  parameter int unsigned EXT_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  data_fn_e         fn,
  input  logic [EXT_W-1:0] ext_data,
  output logic [DW-1:0]    dreg,
  output logic [DW-1:0]    dataE,
  output logic [DW-1:0]    dataO
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dreg  <= '0;
      dataE <= '0;
      dataO <= '0;
    end else if (en) begin
      unique case (fn)
        DF_LL:     begin dataE <=  dreg; dataO <=  dreg; end
        DF_LH:     begin dataE <=  dreg; dataO <= ~dreg; end
        DF_HL:     begin dataE <= ~dreg; dataO <=  dreg; end
        DF_HH:     begin dataE <= ~dreg; dataO <= ~dreg; end
        DF_INC:    dreg <= dreg + 1'b1;
        DF_DEC:    dreg <= dreg - 1'b1;
        DF_SETREG: dreg <= ext_data[DW-1:0];
        DF_HOLD:   ;
      endcase
    end
  end

endmodule
