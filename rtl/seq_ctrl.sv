// seq_ctrl: sequence controller of the BIST (internal clock domain).
//
// It holds the number of the sequence buffer being executed and the slot
// (0..3) within it. Each internal clock it presents the slot's instruction
// pointer to the instruction buffer and flags it for issue. A sequence buffer
// ends after its fourth slot, or early when the next slot holds the end
// marker 31 (the marker costs no cycle). At the end the controller either
// follows the link to the sequence buffer named in the entry (link = 1) or,
// for an unlinked entry, takes the next sequence number from the sequence
// register loaded by the ATE. Loops and refresh timing are thus left to the
// ATE, which chooses the sequence number the BIST will pick up.
//
// Start and stop are this design's choice: while idle the controller waits
// for the captured test-start level, then loads the sequence register and
// issues the first instruction in the next cycle. If test-start is low when
// an unlinked entry ends, the run stops and test_end is raised until the next
// start. An entry whose first slot is already the end marker issues nothing
// for one cycle. The ev_* outputs are one-cycle strobes for observation.
`timescale 1ns / 1ps
module seq_ctrl
  import mbist_pkg::*;
(
  input  logic             clk,        // internal clock
  input  logic             rst_n,
  input  logic             start,      // captured test-start level
  input  logic [PTR_W-1:0] seq_reg,    // sequence register (from the ATE)
  input  seq_t             seq_entry,  // sequence buffer entry at seq_addr
  output logic [PTR_W-1:0] seq_addr,   // sequence buffer being executed
  output logic [PTR_W-1:0] instr_ptr,  // instruction buffer pointer this cycle
  output logic             issue,      // instr_ptr is a valid instruction
  output logic             busy,
  output logic             test_end,
  output logic             ev_link,    // entry ended and its link was followed
  output logic             ev_fetch,   // entry ended and the sequence register was used
  output logic             ev_endptr   // entry ended early on the end marker
);

  logic [1:0] slot;
  logic       running;
  logic       last;
  logic [PTR_W-1:0] next_ptr;

  assign instr_ptr = slot_ptr(seq_entry, slot);
  assign next_ptr  = slot_ptr(seq_entry, slot + 2'd1);
  assign issue     = running && (instr_ptr != PTR_END);
  assign busy      = running;
  assign last      = (slot == 2'd3) || (instr_ptr == PTR_END) || (next_ptr == PTR_END);

  assign ev_link   = running && last && seq_entry.link;
  assign ev_fetch  = running && last && !seq_entry.link;
  assign ev_endptr = running && last && (slot != 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      slot     <= '0;
      seq_addr <= '0;
      test_end <= 1'b0;
    end else if (!running) begin
      if (start) begin
        running  <= 1'b1;
        slot     <= '0;
        seq_addr <= seq_reg;
        test_end <= 1'b0;
      end
    end else if (last) begin
      slot <= '0;
      if (seq_entry.link) begin
        seq_addr <= seq_entry.seq_ptr;
      end else if (start) begin
        seq_addr <= seq_reg;
      end else begin
        running  <= 1'b0;
        test_end <= 1'b1;
      end
    end else begin
      slot <= slot + 2'd1;
    end
  end

endmodule
