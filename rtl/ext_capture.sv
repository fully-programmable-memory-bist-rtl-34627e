// ext_capture: the registers that sample the ATE on the external clock.
//
// On every rising edge of the slow external clock the sequence number driven
// by the ATE is stored in the sequence register and the external data word in
// the external data register; the internal logic reads both during the whole
// external period that follows. The sequence register is only consulted by
// the sequence controller when an unlinked sequence buffer ends, otherwise
// its value is ignored. The test-start level is captured in the same way so
// that it is aligned with the first sequence number (this alignment register
// is this design's own addition). Asynchronous active-low reset to zero.
`timescale 1ns / 1ps
module ext_capture
  import mbist_pkg::*;
#(
  parameter int unsigned EXT_W = 14   // width of the external data bus
) (
  input  logic             ext_clk,
  input  logic             rst_n,
  input  logic             test_start,
  input  logic [PTR_W-1:0] seq_no,
  input  logic [EXT_W-1:0] ext_data,
  output logic             start_q,
  output logic [PTR_W-1:0] seq_reg,
  output logic [EXT_W-1:0] data_reg
);

  always_ff @(posedge ext_clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q  <= 1'b0;
      seq_reg  <= '0;
      data_reg <= '0;
    end else begin
      start_q  <= test_start;
      seq_reg  <= seq_no;
      data_reg <= ext_data;
    end
  end

endmodule
