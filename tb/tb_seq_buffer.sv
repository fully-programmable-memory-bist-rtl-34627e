// tb_seq_buffer: self-checking test of the 32-entry sequence buffer.
// Writes a random 26-bit word into every entry through the write port, reads
// all entries back in a shuffled order, overwrites a few entries and checks
// that only those changed and that a write with wr_en low changes nothing.
`timescale 1ns / 1ps
module tb_seq_buffer;
  import mbist_pkg::*;

  logic       clk = 0;
  logic       wr_en = 0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  seq_t       wr_data = '0, rd_data;
  seq_t       ref_mem [32];
  int checks = 0, failures = 0;

  seq_buffer dut (.wr_clk(clk), .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  task automatic write(int a, seq_t d, bit en = 1);
    @(negedge clk);
    wr_en = en; wr_addr = 5'(a); wr_data = d;
    if (en) ref_mem[a] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read_all();
    int order [32];
    for (int i = 0; i < 32; i++) order[i] = (i * 13 + 7) % 32;
    for (int i = 0; i < 32; i++) begin
      rd_addr = 5'(order[i]);
      #1;
      checks++;
      if (rd_data !== ref_mem[order[i]]) begin
        failures++;
        $display("FAIL: entry %0d reads %h, expected %h", order[i], rd_data, ref_mem[order[i]]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) write(i, seq_t'($urandom));
    read_all();
    write(0, seq_t'(26'h3ffffff));
    write(31, seq_t'(26'h0000000));
    write(17, seq_t'(26'h2aaaaaa));
    read_all();
    write(5, seq_t'(~ref_mem[5]), 0);   // disabled write
    read_all();
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
