// instr_decoder: instruction decoder of the BIST.
//
// Decodes one 14-bit instruction per internal clock into the signals for the
// DRAM core. CMD_gen registers the command and bank (a cycle with no issued
// instruction sends NOP). ADDR_gen and DATA_gen (addr_gen, data_gen) update
// their registers from the address and data fields, with SETREG functions
// taking the external data register. The address sent with a command is the
// row address xaddr for ACT and the column address yaddr for every other
// command, sampled before the same instruction's address function takes
// effect. Everything reaches the core one clock after the issue cycle, all
// outputs aligned. The split into CMD_gen/ADDR_gen/DATA_gen follows the
// published decoder; the x/y output selection by command, the pre-update
// sampling and the single output register stage are this design's choices.
`timescale 1ns / 1ps
module instr_decoder
  import mbist_pkg::*;
#(
  parameter int unsigned XW    = 14,
  parameter int unsigned YW    = 10,
  parameter int unsigned DW    = 8,
  parameter int unsigned EXT_W = 14,
  localparam int unsigned AW   = (XW > YW) ? XW : YW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             issue,
  input  instr_t           instr,
  input  logic [EXT_W-1:0] ext_data,
  output cmd_e             mem_cmd,
  output logic [2:0]       mem_bank,
  output logic [AW-1:0]    mem_addr,
  output logic [DW-1:0]    mem_dataE,
  output logic [DW-1:0]    mem_dataO
);

  logic [XW-1:0] xaddr, xreg;
  logic [YW-1:0] yaddr, yreg;
  logic [DW-1:0] dreg;

  addr_gen #(.XW(XW), .YW(YW), .EXT_W(EXT_W)) u_addr (
    .clk, .rst_n, .en(issue), .side(instr.side), .fn(instr.addr_fn),
    .ext_data, .xaddr, .yaddr, .xreg, .yreg
  );

  data_gen #(.DW(DW), .EXT_W(EXT_W)) u_data (
    .clk, .rst_n, .en(issue), .fn(instr.data_fn), .ext_data,
    .dreg, .dataE(mem_dataE), .dataO(mem_dataO)
  );

  // CMD_gen and the address output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_cmd  <= CMD_NOP;
      mem_bank <= '0;
      mem_addr <= '0;
    end else if (issue) begin
      mem_cmd  <= instr.cmd;
      mem_bank <= instr.bank;
      mem_addr <= (instr.cmd == CMD_ACT) ? AW'(xaddr) : AW'(yaddr);
    end else begin
      mem_cmd  <= CMD_NOP;
    end
  end

endmodule
