// tb_data_gen: self-checking test of the data generator.
// Applies each data function, then a random mix, and compares dreg, dataE
// and dataO after every clock with a reference model written here (LL, LH,
// HL, HH drive the rising/falling-edge outputs from dreg or its complement,
// INC/DEC/SETREG change dreg, the outputs hold otherwise).
`timescale 1ns / 1ps
module tb_data_gen;
  import mbist_pkg::*;

  logic        clk = 0, rst_n = 0, en = 0;
  data_fn_e    fn = DF_HOLD;
  logic [13:0] ext_data = '0;
  logic [7:0]  dreg, dataE, dataO;
  logic [7:0]  rd = 0, re = 0, ro = 0;
  int checks = 0, failures = 0;
  int hits [8];

  data_gen #(.DW(8), .EXT_W(14)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(bit e, data_fn_e f, logic [13:0] d);
    @(negedge clk);
    en = e; fn = f; ext_data = d;
    if (e) begin
      hits[f]++;
      case (f)
        DF_LL:     begin re = rd;  ro = rd;  end
        DF_LH:     begin re = rd;  ro = ~rd; end
        DF_HL:     begin re = ~rd; ro = rd;  end
        DF_HH:     begin re = ~rd; ro = ~rd; end
        DF_INC:    rd = rd + 8'd1;
        DF_DEC:    rd = rd - 8'd1;
        DF_SETREG: rd = d[7:0];
        default: ;
      endcase
    end
    @(posedge clk);
    #1;
    checks++;
    if (dreg != rd || dataE != re || dataO != ro) begin
      failures++;
      $display("FAIL: fn %s en %0d: dreg %h/%h E %h/%h O %h/%h", f.name(), e,
               dreg, rd, dataE, re, dataO, ro);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    step(1, DF_SETREG, 14'h15A); step(1, DF_LL, 0); step(1, DF_LH, 0);
    step(1, DF_HL, 0); step(1, DF_HH, 0); step(1, DF_INC, 0); step(1, DF_LL, 0);
    step(1, DF_DEC, 0); step(1, DF_DEC, 0); step(1, DF_HL, 0); step(1, DF_HOLD, 14'h3fff);
    step(0, DF_SETREG, 14'h3fff); step(0, DF_HH, 0);
    for (int i = 0; i < 3000; i++)
      step(($urandom % 8) != 0, data_fn_e'($urandom % 8), 14'($urandom));
    for (int f = 0; f < 8; f++) begin
      checks++;
      if (hits[f] == 0) begin failures++; $display("FAIL: function %0d never applied", f); end
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
