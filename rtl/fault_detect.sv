// fault_detect: read-data comparison and fault reporting of the BIST.
//
// The test program generates the expected read data itself: it places its
// LL..HH data instructions so that dataE/dataO hold the expected beats in
// the cycles when the DRAM core returns the read burst. This block watches
// the command stream leaving the instruction decoder. It remembers the open
// row of each bank (from ACT) and queues the {bank, row, column} of every
// READ. Whenever the core flags read data valid it compares the rising- and
// falling-edge beats with dataE/dataO; after BURST_CYC valid cycles the
// oldest READ leaves the queue. A mismatch produces a one-cycle fault record
// for fault collection by a redundancy-analysis block: bank, row, the column
// of the failing rising-edge beat (the falling-edge beat is the next column)
// and the failing bit mask. It also keeps a sticky fail flag and a
// saturating fault count. The comparison and the record format are this
// design's own: only a fault-collection path from the BIST to redundancy
// analysis is given.
`timescale 1ns / 1ps
module fault_detect
  import mbist_pkg::*;
#(
  parameter int unsigned XW        = 14,
  parameter int unsigned YW        = 10,
  parameter int unsigned DW        = 8,
  parameter int unsigned BURST_CYC = 4,   // BL8, two beats per clock
  parameter int unsigned QDEPTH    = 4,   // outstanding READs
  localparam int unsigned AW       = (XW > YW) ? XW : YW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,        // clears fail flag and count
  // command stream to the DRAM core
  input  cmd_e            mem_cmd,
  input  logic [2:0]      mem_bank,
  input  logic [AW-1:0]   mem_addr,
  input  logic [DW-1:0]   exp_dataE,
  input  logic [DW-1:0]   exp_dataO,
  // read data from the DRAM core
  input  logic            rd_valid,
  input  logic [DW-1:0]   rd_dataE,
  input  logic [DW-1:0]   rd_dataO,
  // fault collection
  output logic            fault_valid,
  output logic [2:0]      fault_bank,
  output logic [XW-1:0]   fault_row,
  output logic [YW-1:0]   fault_col,    // column of the rising-edge beat
  output logic [2*DW-1:0] fault_mask,   // {rising-edge bits, falling-edge bits}
  output logic            fail,
  output logic [15:0]     fault_count
);

  typedef struct packed {
    logic [2:0]    bank;
    logic [XW-1:0] row;
    logic [YW-1:0] col;
  } rd_addr_t;

  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned BW = (BURST_CYC > 1) ? $clog2(BURST_CYC) : 1;

  logic [XW-1:0] open_row [8];
  rd_addr_t      q [QDEPTH];
  logic [QW-1:0] wp, rp;
  logic [QW:0]   cnt;
  logic [BW-1:0] beat;

  logic          push, pop;
  logic [2*DW-1:0] mism;

  assign push = (mem_cmd == CMD_RD);
  assign pop  = rd_valid && (32'(beat) == BURST_CYC - 1) && (cnt != 0);
  assign mism = {rd_dataE ^ exp_dataE, rd_dataO ^ exp_dataO};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 8; b++) open_row[b] <= '0;
      for (int i = 0; i < int'(QDEPTH); i++) q[i] <= '0;
      wp          <= '0;
      rp          <= '0;
      cnt         <= '0;
      beat        <= '0;
      fault_valid <= 1'b0;
      fault_bank  <= '0;
      fault_row   <= '0;
      fault_col   <= '0;
      fault_mask  <= '0;
      fail        <= 1'b0;
      fault_count <= '0;
    end else begin
      if (mem_cmd == CMD_ACT) open_row[mem_bank] <= mem_addr[XW-1:0];

      if (push) begin
        q[wp] <= '{bank: mem_bank, row: open_row[mem_bank], col: mem_addr[YW-1:0]};
        wp    <= (32'(wp) == QDEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == QDEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (QW+1)'(push) - (QW+1)'(pop);

      if (rd_valid) beat <= (32'(beat) == BURST_CYC - 1) ? '0 : beat + 1'b1;

      fault_valid <= rd_valid && (mism != '0);
      if (rd_valid && (mism != '0)) begin
        fault_bank <= q[rp].bank;
        fault_row  <= q[rp].row;
        fault_col  <= q[rp].col + YW'({beat, 1'b0});
        fault_mask <= mism;
        if (fault_count != '1) fault_count <= fault_count + 1'b1;
      end

      if (clear)                         fail <= 1'b0;
      else if (rd_valid && (mism != '0)) fail <= 1'b1;
      if (clear) fault_count <= '0;
    end
  end

  // The queue must never overflow: the program may not have more than
  // QDEPTH READ bursts in flight.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && cnt == (QW+1)'(QDEPTH)))
    else $error("fault_detect: READ queue overflow");

endmodule
