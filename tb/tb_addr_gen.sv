// tb_addr_gen: self-checking test of the address generator.
// Applies every address function on both sides, then a long random mix of
// functions, Side values, enables and external data, and compares xaddr,
// yaddr, xreg and yreg after each clock with a reference model computed
// here with integer arithmetic modulo 2^14 and 2^10.
`timescale 1ns / 1ps
module tb_addr_gen;
  import mbist_pkg::*;

  localparam int XW = 14, YW = 10;
  logic          clk = 0, rst_n = 0, en = 0, side = 0;
  addr_fn_e      fn = AF_HOLD;
  logic [13:0]   ext_data = '0;
  logic [XW-1:0] xaddr, xreg;
  logic [YW-1:0] yaddr, yreg;
  int unsigned   rx = 0, ry = 0, rxr = 0, ryr = 0;
  int checks = 0, failures = 0;
  int hits [8];

  addr_gen #(.XW(XW), .YW(YW), .EXT_W(14)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(bit e, bit s, addr_fn_e f, logic [13:0] d);
    int unsigned mx, my;
    mx = 1 << XW; my = 1 << YW;
    @(negedge clk);
    en = e; side = s; fn = f; ext_data = d;
    if (e) begin
      hits[f]++;
      if (!s) case (f)
        AF_INC:    rx = (rx + 1) % mx;
        AF_DEC:    rx = (rx + mx - 1) % mx;
        AF_INCR:   rx = (rx + rxr) % mx;
        AF_DECR:   rx = (rx + mx - rxr) % mx;
        AF_SETZ:   rx = 0;
        AF_SETM:   rx = mx - 1;
        AF_SETREG: rxr = int'(d) % mx;
        default: ;
      endcase
      else case (f)
        AF_INC:    ry = (ry + 1) % my;
        AF_DEC:    ry = (ry + my - 1) % my;
        AF_INCR:   ry = (ry + ryr) % my;
        AF_DECR:   ry = (ry + my - ryr) % my;
        AF_SETZ:   ry = 0;
        AF_SETM:   ry = my - 1;
        AF_SETREG: ryr = int'(d) % my;
        default: ;
      endcase
    end
    @(posedge clk);
    #1;
    checks++;
    if (int'(xaddr) != rx || int'(yaddr) != ry || int'(xreg) != rxr || int'(yreg) != ryr) begin
      failures++;
      $display("FAIL: fn %s side %0d en %0d: x=%0d/%0d y=%0d/%0d xreg=%0d/%0d yreg=%0d/%0d",
               f.name(), s, e, xaddr, rx, yaddr, ry, xreg, rxr, yreg, ryr);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // directed: each function on each side
    step(1, 0, AF_SETREG, 14'd3);  step(1, 1, AF_SETREG, 14'd8);
    step(1, 0, AF_DEC, 0);         step(1, 1, AF_DEC, 0);        // wrap below zero
    step(1, 0, AF_INC, 0);         step(1, 1, AF_INC, 0);
    step(1, 0, AF_INCR, 0);        step(1, 1, AF_INCR, 0);
    step(1, 0, AF_DECR, 0);        step(1, 1, AF_DECR, 0);
    step(1, 0, AF_SETM, 0);        step(1, 1, AF_SETM, 0);
    step(1, 0, AF_INC, 0);         step(1, 1, AF_INC, 0);        // wrap above max
    step(1, 0, AF_SETM, 0);        step(1, 1, AF_SETZ, 0);
    step(1, 0, AF_HOLD, 14'h3fff); step(0, 1, AF_SETM, 14'h3fff); // disabled
    for (int i = 0; i < 3000; i++)
      step(($urandom % 8) != 0, 1'($urandom), addr_fn_e'($urandom % 8), 14'($urandom));
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
