// instr_buffer: the 31-entry instruction buffer of the BIST (#0..#30).
//
// Each 14-bit entry is one unique instruction of the test algorithm: a DDR3
// command, a bank, the Side bit, an address function and a data function
// (see mbist_pkg::instr_t). Pointer value 31 is reserved as the end marker
// of a sequence buffer, so there is no entry #31: reading it returns an idle
// instruction (NOP, hold address, hold data) and writing it is ignored.
// Written by the ATE on the external clock through a simple write port while
// the BIST is idle (the port is this design's own choice); read
// combinationally in the internal clock domain. No reset on the contents.
`timescale 1ns / 1ps
module instr_buffer
  import mbist_pkg::*;
#(
  parameter int unsigned DEPTH = NINSTR
) (
  input  logic             wr_clk,   // external (ATE) clock
  input  logic             wr_en,
  input  logic [PTR_W-1:0] wr_addr,
  input  instr_t           wr_data,
  input  logic [PTR_W-1:0] rd_addr,
  output instr_t           rd_data
);

  instr_t mem [DEPTH];

  always_ff @(posedge wr_clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    if (32'(rd_addr) < DEPTH) rd_data = mem[rd_addr];
    else                      rd_data = INSTR_IDLE;
  end

endmodule
