// mbist_top: instruction-based programmable memory BIST for a DDR3 DRAM.
//
// A slow ATE drives the BIST through a few pins. Before a test it loads the
// unique instructions of the algorithm into the instruction buffer and the
// instruction sequences into the sequence buffer (prog_* port, one word per
// external clock, prog_sel = 1 for the sequence buffer). During the test it
// presents one sequence number and one data word per external clock; they
// are captured on the external rising edge (ext_capture). The on-chip clock
// multiplier (clk_mult) makes an internal clock 8x (clk_sel8 = 1) or 4x
// faster, on which the sequence controller executes up to four instructions
// per sequence buffer and follows links between buffers on its own. Only at
// the end of an unlinked buffer does it take the ATE's sequence number, which
// is how the ATE closes loops and inserts refresh without any loop counters
// or timers on chip. The instruction decoder turns each instruction into a
// DDR3 command, bank, address and rising/falling-edge data for the DRAM core,
// and fault_detect compares read bursts with the expected data and reports
// failing addresses for redundancy analysis.
//
// Clocking: ext_capture and both buffers' write ports run on ext_clk, the
// rest on int_clk, whose edges follow ext_clk's by a small fixed skew. The
// test starts when test_start is captured high: the first internal edge
// after that external edge loads the sequence register, the first
// instruction issues in the internal cycle that edge begins, and its command
// reaches the core one clock later. The run ends (test_end) at the first
// unlinked buffer end at which test_start is captured low. The DRAM core
// and redundancy analysis are outside this module; their signals are ports.
`timescale 1ns / 1ps
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned XW        = 14,  // row address bits
  parameter int unsigned YW        = 10,  // column address bits
  parameter int unsigned DW        = 8,   // data bits per clock edge
  parameter int unsigned BURST_CYC = 4,   // internal clocks per read burst
  localparam int unsigned AW       = (XW > YW) ? XW : YW,
  localparam int unsigned EXT_W    = (AW > DW) ? AW : DW
) (
  // ATE side
  input  logic             ext_clk,
  input  logic             rst_n,
  input  logic             clk_sel8,
  input  logic             test_start,
  input  logic [PTR_W-1:0] seq_no,
  input  logic [EXT_W-1:0] ext_data,
  input  logic             prog_we,
  input  logic             prog_sel,     // 0: instruction buffer, 1: sequence buffer
  input  logic [PTR_W-1:0] prog_addr,
  input  logic [SEQ_W-1:0] prog_wdata,   // instruction words use the low 14 bits
  input  logic             fail_clear,
  output logic             test_end,
  output logic             busy,
  output logic             fail,
  output logic             ev_link,      // strobes: buffer end followed its link,
  output logic             ev_fetch,     //   took the sequence register,
  output logic             ev_endptr,    //   ended early on the end marker
  // internal clock
  output logic             int_clk,
  output logic             clk_locked,
  // DRAM core
  output logic [3:0]       mem_cmd,      // {CKE, /RAS, /CAS, /WE}
  output logic [2:0]       mem_bank,
  output logic [AW-1:0]    mem_addr,
  output logic [DW-1:0]    mem_dataE,
  output logic [DW-1:0]    mem_dataO,
  input  logic             mem_rd_valid,
  input  logic [DW-1:0]    mem_rdataE,
  input  logic [DW-1:0]    mem_rdataO,
  // fault collection for redundancy analysis
  output logic             fault_valid,
  output logic [2:0]       fault_bank,
  output logic [XW-1:0]    fault_row,
  output logic [YW-1:0]    fault_col,
  output logic [2*DW-1:0]  fault_mask,
  output logic [15:0]      fault_count
);

  logic             start_q;
  logic [PTR_W-1:0] seq_reg;
  logic [EXT_W-1:0] data_reg;
  logic [PTR_W-1:0] seq_addr, instr_ptr;
  seq_t             seq_entry;
  instr_t           instr;
  logic             issue;
  cmd_e             cmd;

  clk_mult u_clk (
    .ext_clk, .sel8(clk_sel8), .int_clk, .locked(clk_locked)
  );

  ext_capture #(.EXT_W(EXT_W)) u_ext (
    .ext_clk, .rst_n, .test_start, .seq_no, .ext_data,
    .start_q, .seq_reg, .data_reg
  );

  seq_buffer u_sbuf (
    .wr_clk(ext_clk), .wr_en(prog_we && prog_sel), .wr_addr(prog_addr),
    .wr_data(seq_t'(prog_wdata)), .rd_addr(seq_addr), .rd_data(seq_entry)
  );

  instr_buffer u_ibuf (
    .wr_clk(ext_clk), .wr_en(prog_we && !prog_sel), .wr_addr(prog_addr),
    .wr_data(instr_t'(prog_wdata[INSTR_W-1:0])), .rd_addr(instr_ptr), .rd_data(instr)
  );

  seq_ctrl u_ctrl (
    .clk(int_clk), .rst_n, .start(start_q), .seq_reg, .seq_entry,
    .seq_addr, .instr_ptr, .issue, .busy, .test_end,
    .ev_link, .ev_fetch, .ev_endptr
  );

  instr_decoder #(.XW(XW), .YW(YW), .DW(DW), .EXT_W(EXT_W)) u_dec (
    .clk(int_clk), .rst_n, .issue, .instr, .ext_data(data_reg),
    .mem_cmd(cmd), .mem_bank, .mem_addr, .mem_dataE, .mem_dataO
  );

  assign mem_cmd = cmd;

  fault_detect #(.XW(XW), .YW(YW), .DW(DW), .BURST_CYC(BURST_CYC)) u_fault (
    .clk(int_clk), .rst_n, .clear(fail_clear),
    .mem_cmd(cmd), .mem_bank, .mem_addr, .exp_dataE(mem_dataE), .exp_dataO(mem_dataO),
    .rd_valid(mem_rd_valid), .rd_dataE(mem_rdataE), .rd_dataO(mem_rdataO),
    .fault_valid, .fault_bank, .fault_row, .fault_col, .fault_mask, .fail, .fault_count
  );

endmodule
