// tb_instr_decoder: self-checking test of the instruction decoder.
// Runs a short directed program (set yreg, clear X and Y, ACT, WRIT, step the
// column by yreg, step the row, data patterns), then random instructions
// with random issue gaps. After every clock it compares command, bank,
// address (row for ACT, column otherwise, taken before the instruction's own
// address update) and dataE/dataO with a reference model written here. Idle
// cycles must send NOP. Outputs are checked one clock after issue.
`timescale 1ns / 1ps
module tb_instr_decoder;
  import mbist_pkg::*;

  logic        clk = 0, rst_n = 0, issue = 0;
  instr_t      instr = INSTR_IDLE;
  logic [13:0] ext_data = '0;
  cmd_e        mem_cmd;
  logic [2:0]  mem_bank;
  logic [13:0] mem_addr;
  logic [7:0]  mem_dataE, mem_dataO;
  int checks = 0, failures = 0;

  // reference state
  logic [13:0] x = 0, xr = 0;
  logic [9:0]  y = 0, yr = 0;
  logic [7:0]  d = 0, e = 0, o = 0;
  cmd_e        c = CMD_NOP;
  logic [2:0]  b = 0;
  logic [13:0] a = 0;

  instr_decoder #(.XW(14), .YW(10), .DW(8), .EXT_W(14)) dut (.*);

  always #5 clk = ~clk;

  function automatic instr_t mk(cmd_e cm, logic [2:0] bk, logic sd, addr_fn_e af, data_fn_e df);
    return '{cmd: cm, bank: bk, side: sd, addr_fn: af, data_fn: df};
  endfunction

  task automatic step(bit iss, instr_t in, logic [13:0] ed);
    @(negedge clk);
    issue = iss; instr = in; ext_data = ed;
    if (iss) begin
      c = in.cmd; b = in.bank;
      a = (in.cmd == CMD_ACT) ? x : 14'(y);
      if (!in.side) case (in.addr_fn)
        AF_INC: x = x + 1;  AF_DEC: x = x - 1;  AF_INCR: x = x + xr;  AF_DECR: x = x - xr;
        AF_SETZ: x = 0;     AF_SETM: x = '1;    AF_SETREG: xr = ed;   default: ;
      endcase
      else case (in.addr_fn)
        AF_INC: y = y + 1;  AF_DEC: y = y - 1;  AF_INCR: y = y + yr;  AF_DECR: y = y - yr;
        AF_SETZ: y = 0;     AF_SETM: y = '1;    AF_SETREG: yr = ed[9:0]; default: ;
      endcase
      case (in.data_fn)
        DF_LL: begin e = d; o = d; end   DF_LH: begin e = d; o = ~d; end
        DF_HL: begin e = ~d; o = d; end  DF_HH: begin e = ~d; o = ~d; end
        DF_INC: d = d + 1; DF_DEC: d = d - 1; DF_SETREG: d = ed[7:0]; default: ;
      endcase
    end else begin
      c = CMD_NOP;
    end
    @(posedge clk);
    #1;
    checks++;
    if (mem_cmd != c || mem_bank != b || mem_addr != a || mem_dataE != e || mem_dataO != o) begin
      failures++;
      $display("FAIL: cmd %b/%b bank %0d/%0d addr %0d/%0d E %h/%h O %h/%h", mem_cmd, c,
               mem_bank, b, mem_addr, a, mem_dataE, e, mem_dataO, o);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    step(1, mk(CMD_NOP, 0, 1, AF_SETREG, DF_HOLD), 14'd8);     // yreg = 8
    step(1, mk(CMD_NOP, 0, 0, AF_HOLD, DF_SETREG), 14'h0A5);   // dreg = A5
    step(1, mk(CMD_NOP, 0, 0, AF_SETZ, DF_HOLD), 0);
    step(1, mk(CMD_NOP, 0, 1, AF_SETZ, DF_HOLD), 0);
    step(1, mk(CMD_ACT, 2, 0, AF_HOLD, DF_HOLD), 0);           // ACT row 0
    step(0, INSTR_IDLE, 0);
    step(1, mk(CMD_WR, 2, 0, AF_HOLD, DF_HOLD), 0);            // WRIT col 0
    step(1, mk(CMD_NOP, 0, 0, AF_HOLD, DF_LL), 0);
    step(1, mk(CMD_NOP, 0, 0, AF_HOLD, DF_HH), 0);
    step(1, mk(CMD_PRE, 2, 0, AF_INC, DF_LH), 0);              // PRE with col, then X+1
    step(1, mk(CMD_ACT, 2, 1, AF_INCR, DF_HL), 0);             // ACT row 1, then Y+=8
    step(1, mk(CMD_RD, 2, 0, AF_HOLD, DF_HOLD), 0);            // READ col 8
    for (int i = 0; i < 4000; i++)
      step(($urandom % 4) != 0, instr_t'($urandom), 14'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
