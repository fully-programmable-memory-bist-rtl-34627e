// tb_instr_buffer: self-checking test of the 31-entry instruction buffer.
// Fills entries #0..#30 with random 14-bit words, checks them all, checks
// that pointer 31 (the end marker) reads as the idle instruction even after
// an attempted write to it, and that a disabled write changes nothing.
`timescale 1ns / 1ps
module tb_instr_buffer;
  import mbist_pkg::*;

  logic       clk = 0;
  logic       wr_en = 0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  instr_t     wr_data = '0, rd_data;
  instr_t     ref_mem [31];
  int checks = 0, failures = 0;

  instr_buffer dut (.wr_clk(clk), .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  task automatic write(int a, instr_t d, bit en = 1);
    @(negedge clk);
    wr_en = en; wr_addr = 5'(a); wr_data = d;
    if (en && a < 31) ref_mem[a] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic expect_rd(int a, instr_t v);
    rd_addr = 5'(a);
    #1;
    checks++;
    if (rd_data !== v) begin
      failures++;
      $display("FAIL: entry %0d reads %h, expected %h", a, rd_data, v);
    end
  endtask

  initial begin
    for (int i = 0; i < 31; i++) write(i, instr_t'($urandom));
    for (int i = 30; i >= 0; i--) expect_rd(i, ref_mem[i]);
    expect_rd(31, INSTR_IDLE);
    write(31, instr_t'(14'h0000));
    expect_rd(31, INSTR_IDLE);
    for (int i = 0; i < 31; i++) expect_rd(i, ref_mem[i]);
    write(9, instr_t'(~ref_mem[9]), 0);
    expect_rd(9, ref_mem[9]);
    write(9, instr_t'(~ref_mem[9]));
    expect_rd(9, ref_mem[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
