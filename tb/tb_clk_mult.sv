// tb_clk_mult: self-checking test of the clock multiplier model.
// Drives a 100 MHz external clock, checks that locked rises after the period
// is known, then counts internal rising edges per external period and the
// internal period, for x8 and then x4, and checks that every external rising
// edge is followed by an internal one within the skew.
`timescale 1ns / 1ps
module tb_clk_mult;

  logic ext_clk = 0, sel8 = 1, int_clk, locked;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime last_int = 0, last_ext = 0, per = 0, lag = 0;

  clk_mult dut (.ext_clk, .sel8, .int_clk, .locked);

  always #5ns ext_clk = ~ext_clk;
  always @(posedge int_clk) begin
    edges++;
    per = $realtime - last_int;
    last_int = $realtime;
  end
  always @(posedge ext_clk) last_ext = $realtime;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(int m);
    for (int i = 0; i < 20; i++) begin
      @(posedge ext_clk);
      edges = 0;
      #(1ns);
      lag = last_int - last_ext;
      check(lag >= 0 && lag < 0.2ns, $sformatf("internal edge %0t after external edge", lag));
      @(posedge ext_clk);
      #(1ps);
      // the edge at the external edge itself belongs to the next period
      check(edges == m, $sformatf("x%0d: %0d internal edges in one external period", m, edges));
      check(per > (10.0ns / m) - 0.01ns && per < (10.0ns / m) + 0.01ns,
            $sformatf("x%0d: internal period %0t", m, per));
    end
  endtask

  initial begin
    #1ps check(!locked, "locked before any edge");
    repeat (3) @(posedge ext_clk);
    #1ps check(locked, "not locked after three edges");
    measure(8);
    sel8 = 0;
    @(posedge ext_clk);
    measure(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
