// seq_buffer: the 32-entry sequence buffer of the BIST.
//
// Each 26-bit entry holds a link bit, a 5-bit pointer to another sequence
// buffer and four 5-bit instruction-buffer pointers (see mbist_pkg::seq_t).
// The ATE writes entries one per external clock through a simple write port
// (wr_en, wr_addr, wr_data) while the BIST is idle; the sequence controller
// reads one entry combinationally in the internal clock domain. The table is
// a plain register array without reset: its contents are only defined after
// the ATE has loaded them. The entry count is the published one; the load
// port is this design's own choice, since the way the tables are filled is
// not specified beyond "received from the ATE".
`timescale 1ns / 1ps
module seq_buffer
  import mbist_pkg::*;
#(
  parameter int unsigned DEPTH = NSEQ
) (
  input  logic                     wr_clk,   // external (ATE) clock
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  seq_t                     wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output seq_t                     rd_data
);

  seq_t mem [DEPTH];

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
