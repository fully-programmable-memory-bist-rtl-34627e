// dram_core_model: behavioural model of a DDR3 DRAM core for simulation only.
//
// Samples {CKE,/RAS,/CAS,/WE}, bank, address and the two data beats on every
// rising edge of the internal clock. ACT opens a row in a bank, PRE closes
// it, REF is counted. A WRITE stores BURST_CYC clocks of rising/falling-edge
// beats, starting CWL clocks after the command, at columns col, col+1, ...
// A READ returns the stored beats CL clocks after the command with rd_valid
// high, aligned with the cycle in which the BIST holds the expected data.
// Cells never written read as zero. One cell can be made faulty: with inj_en
// set, reading bank inj_bank, row inj_row, column inj_col returns the stored
// byte with the bits in inj_mask inverted. A WRITE or READ to a bank with no
// open row, and an ACT to a bank with an open row, count as protocol errors.
`timescale 1ns / 1ps
module dram_core_model #(
  parameter int unsigned XW        = 14,
  parameter int unsigned YW        = 10,
  parameter int unsigned DW        = 8,
  parameter int unsigned CWL       = 5,
  parameter int unsigned CL        = 5,
  parameter int unsigned BURST_CYC = 4,
  localparam int unsigned AW       = (XW > YW) ? XW : YW
) (
  input  logic          clk,
  input  logic [3:0]    cmd,
  input  logic [2:0]    bank,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dataE,
  input  logic [DW-1:0] dataO,
  output logic          rd_valid,
  output logic [DW-1:0] rdataE,
  output logic [DW-1:0] rdataO,
  input  logic          inj_en,
  input  logic [2:0]    inj_bank,
  input  logic [XW-1:0] inj_row,
  input  logic [YW-1:0] inj_col,
  input  logic [DW-1:0] inj_mask
);

  localparam int unsigned KW = 3 + XW + YW;
  localparam int unsigned QN = 64;

  typedef struct {
    bit             v;
    logic [KW-1:0]  key;   // {bank, row, column of the rising-edge beat}
  } slot_t;

  logic [DW-1:0] mem [logic [KW-1:0]];
  bit            open_v [8];
  logic [XW-1:0] open_r [8];
  slot_t         wq [QN];
  slot_t         rq [QN];
  longint unsigned cyc = 0;

  int n_act = 0, n_wr = 0, n_rd = 0, n_pre = 0, n_ref = 0, n_proto_err = 0;
  int n_beats_written = 0;

  function automatic logic [DW-1:0] peek(logic [KW-1:0] k);
    logic [DW-1:0] d;
    d = mem.exists(k) ? mem[k] : '0;
    if (inj_en && k == {inj_bank, inj_row, inj_col}) d = d ^ inj_mask;
    return d;
  endfunction

  function automatic logic [KW-1:0] key_of(logic [2:0] b, logic [XW-1:0] r, logic [YW-1:0] c);
    return {b, r, c};
  endfunction

  initial begin
    rd_valid = 1'b0;
    rdataE   = '0;
    rdataO   = '0;
    for (int i = 0; i < 8; i++) begin open_v[i] = 0; open_r[i] = '0; end
    for (int i = 0; i < int'(QN); i++) begin wq[i].v = 0; rq[i].v = 0; end
  end

  always @(posedge clk) begin
    int i;
    // write beats due in the cycle that just ended
    i = int'(cyc % QN);
    if (wq[i].v) begin
      mem[wq[i].key]      = dataE;
      mem[wq[i].key + 1]  = dataO;
      n_beats_written    += 2;
      wq[i].v = 0;
    end
    // command of the cycle that just ended
    case (cmd)
      4'b1011: begin
        n_act++;
        if (open_v[bank]) n_proto_err++;
        open_v[bank] = 1; open_r[bank] = addr[XW-1:0];
      end
      4'b1010: begin n_pre++; open_v[bank] = 0; end
      4'b1001: n_ref++;
      4'b1100, 4'b1101: begin
        if (!open_v[bank]) n_proto_err++;
        for (int b = 0; b < int'(BURST_CYC); b++) begin
          logic [YW-1:0] c;
          c = addr[YW-1:0] + YW'(2 * b);
          if (cmd == 4'b1100) begin
            wq[(cyc + CWL + b) % QN].v   = 1;
            wq[(cyc + CWL + b) % QN].key = key_of(bank, open_r[bank], c);
          end else begin
            rq[(cyc + CL + b) % QN].v    = 1;
            rq[(cyc + CL + b) % QN].key  = key_of(bank, open_r[bank], c);
          end
        end
        if (cmd == 4'b1100) n_wr++; else n_rd++;
      end
      default: ;
    endcase
    // read data for the cycle that starts now
    i = int'((cyc + 1) % QN);
    if (rq[i].v) begin
      rd_valid <= 1'b1;
      rdataE   <= peek(rq[i].key);
      rdataO   <= peek(rq[i].key + 1);
      rq[i].v = 0;
    end else begin
      rd_valid <= 1'b0;
    end
    cyc++;
  end

endmodule
