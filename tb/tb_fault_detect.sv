// tb_fault_detect: self-checking test of the read-data comparison.
// Builds a cycle schedule of ACT/READ commands to random banks, rows and
// columns, READs as close as every 4 clocks (so several are in flight), read
// bursts returned 5 clocks after each READ for 4 clocks, and random bit
// errors in some beats. Every clock the fault record is compared with the
// one expected from the schedule (address of the failing rising-edge beat,
// mask); the fault count, sticky fail flag and clear are checked at the end.
`timescale 1ns / 1ps
module tb_fault_detect;
  import mbist_pkg::*;

  localparam int T = 6000, CL = 5;
  logic        clk = 0, rst_n = 0, clear = 0;
  cmd_e        mem_cmd = CMD_NOP;
  logic [2:0]  mem_bank = 0;
  logic [13:0] mem_addr = 0;
  logic [7:0]  exp_dataE = 0, exp_dataO = 0, rd_dataE = 0, rd_dataO = 0;
  logic        rd_valid = 0;
  logic        fault_valid, fail;
  logic [2:0]  fault_bank;
  logic [13:0] fault_row;
  logic [9:0]  fault_col;
  logic [15:0] fault_mask, fault_count;
  int checks = 0, failures = 0;

  fault_detect #(.XW(14), .YW(10), .DW(8), .BURST_CYC(4), .QDEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  cmd_e        s_cmd [T];
  logic [2:0]  s_bank [T];
  logic [13:0] s_addr [T];
  logic        s_rv [T];
  logic [7:0]  s_eE [T], s_eO [T], s_xE [T], s_xO [T];
  // expected record produced from data cycle t
  logic        x_v [T];
  logic [2:0]  x_bank [T];
  logic [13:0] x_row [T];
  logic [9:0]  x_col [T];
  int          n_exp = 0;

  initial begin
    int t0;
    for (int t = 0; t < T; t++) begin
      s_cmd[t] = CMD_NOP; s_bank[t] = 3'($urandom); s_addr[t] = 14'($urandom);
      s_rv[t] = 0; s_eE[t] = 8'($urandom); s_eO[t] = 8'($urandom); s_xE[t] = 0; s_xO[t] = 0;
      x_v[t] = 0; x_bank[t] = 0; x_row[t] = 0; x_col[t] = 0;
    end
    t0 = 10;
    while (t0 + CL + 4 < T - 10) begin
      logic [2:0]  b;
      logic [13:0] r;
      logic [9:0]  c;
      b = 3'($urandom); r = 14'($urandom); c = 10'($urandom);
      s_cmd[t0 - 1] = CMD_ACT; s_bank[t0 - 1] = b; s_addr[t0 - 1] = r;
      s_cmd[t0] = CMD_RD;      s_bank[t0] = b;     s_addr[t0] = {4'($urandom), c};
      for (int k = 0; k < 4; k++) begin
        int t;
        t = t0 + CL + k;
        s_rv[t] = 1;
        if ($urandom % 10 == 0) begin
          s_xE[t] = 8'($urandom); s_xO[t] = 8'(1 << ($urandom % 8));
          x_v[t] = 1; x_bank[t] = b; x_row[t] = r; x_col[t] = c + 10'(2 * k);
          n_exp++;
        end
      end
      t0 += 4 + int'($urandom % 5);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      // outputs now reflect data cycle t-1
      if (t > 0) begin
        checks++;
        if (fault_valid != x_v[t - 1] ||
            (x_v[t - 1] && (fault_bank != x_bank[t - 1] || fault_row != x_row[t - 1] ||
                            fault_col != x_col[t - 1] ||
                            fault_mask != {s_xE[t - 1], s_xO[t - 1]}))) begin
          failures++;
          $display("FAIL cycle %0d: valid %0d/%0d bank %0d/%0d row %0d/%0d col %0d/%0d mask %h/%h",
                   t - 1, fault_valid, x_v[t - 1], fault_bank, x_bank[t - 1], fault_row,
                   x_row[t - 1], fault_col, x_col[t - 1], fault_mask, {s_xE[t - 1], s_xO[t - 1]});
        end
      end
      mem_cmd = s_cmd[t]; mem_bank = s_bank[t]; mem_addr = s_addr[t];
      exp_dataE = s_eE[t]; exp_dataO = s_eO[t]; rd_valid = s_rv[t];
      rd_dataE = s_eE[t] ^ s_xE[t]; rd_dataO = s_eO[t] ^ s_xO[t];
      if (!s_rv[t]) begin rd_dataE = ~rd_dataE; rd_dataO = ~rd_dataO; end  // ignored
      @(negedge clk);
    end
    checks++;
    if (int'(fault_count) != n_exp || fail != (n_exp > 0)) begin
      failures++;
      $display("FAIL: count %0d expected %0d, fail %0d", fault_count, n_exp, fail);
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (fault_count != 0 || fail) begin failures++; $display("FAIL: clear"); end
    $display("%0d faults injected", n_exp);
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
