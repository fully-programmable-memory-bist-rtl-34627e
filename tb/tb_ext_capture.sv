// tb_ext_capture: self-checking test of the ATE capture registers.
// Checks the reset values, then drives random sequence numbers, data words
// and start levels between external clock edges and checks that each is
// held from the following rising edge for the whole external period.
`timescale 1ns / 1ps
module tb_ext_capture;
  import mbist_pkg::*;

  logic        clk = 0, rst_n = 0, test_start = 0;
  logic [4:0]  seq_no = '0, seq_reg;
  logic [13:0] ext_data = '0, data_reg;
  logic        start_q;
  int checks = 0, failures = 0;

  ext_capture #(.EXT_W(14)) dut (.ext_clk(clk), .rst_n, .test_start, .seq_no, .ext_data,
                                 .start_q, .seq_reg, .data_reg);

  always #40 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [4:0]  s;
    logic [13:0] d;
    logic        st;
    seq_no = 5'd7; ext_data = 14'h1234; test_start = 1;
    repeat (2) @(posedge clk);
    #1 check(seq_reg == 0 && data_reg == 0 && start_q == 0, "reset values");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      s = 5'($urandom); d = 14'($urandom); st = 1'($urandom);
      seq_no = s; ext_data = d; test_start = st;
      @(posedge clk);
      #1 check(seq_reg == s && data_reg == d && start_q == st, "captured on rising edge");
      seq_no = ~s; ext_data = ~d; test_start = ~st;   // changes mid-period are not seen
      #30 check(seq_reg == s && data_reg == d && start_q == st, "held through the period");
    end
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
