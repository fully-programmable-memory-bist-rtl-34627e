// addr_gen: address generator (ADDR_gen) of the instruction decoder.
//
// Holds the current row address xaddr and column address yaddr, and the two
// step registers xreg and yreg. When an instruction is issued (en), its Side
// bit picks the x pair (0) or the y pair (1) and its address function acts on
// that pair: INC/DEC step the address by one, INCR/DECR add or subtract the
// step register, SETZ clears the address, SETM sets it to all ones, SETREG
// loads the step register from the external data register, HOLD keeps all.
// Arithmetic wraps modulo the address width. The function table follows the
// published one; register widths (14-bit row, 10-bit column, a 1 Gb x8 DDR3
// organisation) and the reset to zero are this design's choices. Updates take
// effect at the clock edge that ends the issue cycle.
`timescale 1ns / 1ps
module addr_gen
  import mbist_pkg::*;
#(
  parameter int unsigned XW    = 14,
  parameter int unsigned YW    = 10,
  parameter int unsigned EXT_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             side,
  input  addr_fn_e         fn,
  input  logic [EXT_W-1:0] ext_data,
  output logic [XW-1:0]    xaddr,
  output logic [YW-1:0]    yaddr,
  output logic [XW-1:0]    xreg,
  output logic [YW-1:0]    yreg
);

  // One address function applied to an address/step pair of width W is
  // written out twice below (x and y) because the widths differ.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xaddr <= '0;
      yaddr <= '0;
      xreg  <= '0;
      yreg  <= '0;
    end else if (en) begin
      if (!side) begin
        unique case (fn)
          AF_INC:    xaddr <= xaddr + 1'b1;
          AF_DEC:    xaddr <= xaddr - 1'b1;
          AF_INCR:   xaddr <= xaddr + xreg;
          AF_DECR:   xaddr <= xaddr - xreg;
          AF_SETZ:   xaddr <= '0;
          AF_SETM:   xaddr <= '1;
          AF_SETREG: xreg  <= ext_data[XW-1:0];
          AF_HOLD:   ;
        endcase
      end else begin
        unique case (fn)
          AF_INC:    yaddr <= yaddr + 1'b1;
          AF_DEC:    yaddr <= yaddr - 1'b1;
          AF_INCR:   yaddr <= yaddr + yreg;
          AF_DECR:   yaddr <= yaddr - yreg;
          AF_SETZ:   yaddr <= '0;
          AF_SETM:   yaddr <= '1;
          AF_SETREG: yreg  <= ext_data[YW-1:0];
          AF_HOLD:   ;
        endcase
      end
    end
  end

endmodule
