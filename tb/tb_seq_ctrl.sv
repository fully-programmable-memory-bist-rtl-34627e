// tb_seq_ctrl: self-checking test of the sequence controller.
// The sequence buffer is modelled by an array in the testbench. First the
// start of the published write example is run (S0 -> S1 -> ... -> S15, then
// S3 picked up from the sequence register) and the pointer stream is
// compared with the printed one. Then random tables (random links, end
// markers anywhere, empty entries) and random sequence numbers and start
// levels are run for many cycles against a reference model written here,
// checking issue, pointer, busy and test_end every cycle and counting links,
// pick-ups, early ends and stops.
`timescale 1ns / 1ps
module tb_seq_ctrl;
  import mbist_pkg::*;

  localparam int E = 31;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [4:0] seq_reg = '0, seq_addr, instr_ptr;
  seq_t       tbl [32];
  seq_t       seq_entry;
  logic       issue, busy, test_end, ev_link, ev_fetch, ev_endptr;
  int checks = 0, failures = 0;
  int n_link = 0, n_fetch = 0, n_end = 0, n_stop = 0;

  seq_ctrl dut (.*);
  assign seq_entry = tbl[seq_addr];

  always #5 clk = ~clk;

  function automatic seq_t ms(bit l, int sp, int a, int b, int c, int d);
    seq_t s;
    s.link = l; s.seq_ptr = 5'(sp);
    s.ibp[3] = 5'(a); s.ibp[2] = 5'(b); s.ibp[1] = 5'(c); s.ibp[0] = 5'(d);
    return s;
  endfunction

  // reference model
  bit r_run = 0, r_end = 0;
  int r_seq = 0, r_slot = 0;
  function automatic int rp(int s, int k);
    return int'(tbl[s].ibp[3 - k]);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      r_run = 0; r_end = 0; r_seq = 0; r_slot = 0;
    end else if (!r_run) begin
      if (start) begin r_run = 1; r_seq = int'(seq_reg); r_slot = 0; r_end = 0; end
    end else begin
      int cur, nxt;
      cur = rp(r_seq, r_slot);
      nxt = (r_slot < 3) ? rp(r_seq, r_slot + 1) : E;
      if (r_slot == 3 || cur == E || nxt == E) begin
        if (r_slot != 3) n_end++;
        r_slot = 0;
        if (tbl[r_seq].link) begin n_link++; r_seq = int'(tbl[r_seq].seq_ptr); end
        else if (start) begin n_fetch++; r_seq = int'(seq_reg); end
        else begin n_stop++; r_run = 0; r_end = 1; end
      end else r_slot++;
    end
  end

  task automatic cmp();
    int ep;
    bit ei;
    ep = rp(r_seq, r_slot);
    ei = r_run && ep != E;
    checks++;
    if (issue != ei || busy != r_run || test_end != r_end || (ei && int'(instr_ptr) != ep)) begin
      failures++;
      $display("FAIL @%0t: issue %0d/%0d ptr %0d/%0d busy %0d/%0d end %0d/%0d", $time,
               issue, ei, instr_ptr, ep, busy, r_run, test_end, r_end);
    end
  endtask

  // pointer stream printed for the write example: S0..S4, then S15 and the jump to S3
  int fig_stream [] = '{1,6,6,6, 3,4,6,6, 2,6,6,6, 5,6,6,6, 6,7,6,6};
  int fig_tail   [] = '{6,6, 5,6,6,6};

  initial begin
    int got [$];
    for (int i = 0; i < 32; i++) tbl[i] = ms(0, 0, E, E, E, E);
    tbl[0]  = ms(1, 1, 1, 6, 6, 6);    tbl[1]  = ms(1, 2, 3, 4, 6, 6);
    tbl[2]  = ms(1, 3, 2, 6, 6, 6);    tbl[3]  = ms(1, 4, 5, 6, 6, 6);
    tbl[4]  = ms(1, 5, 6, 7, 6, 6);    tbl[5]  = ms(1, 6, 6, 6, 9, 9);
    tbl[6]  = ms(1, 7, 9, 9, 6, 6);    tbl[7]  = ms(1, 8, 6, 6, 6, 6);
    tbl[8]  = ms(1, 9, 11, 12, 6, 6);  tbl[9]  = ms(1, 10, 6, 5, 6, 6);
    tbl[10] = ms(1, 11, 6, 6, 7, 6);   tbl[11] = ms(1, 12, 6, 6, 6, 10);
    tbl[12] = ms(1, 13, 10, 10, 10, 6); tbl[13] = ms(1, 14, 6, 6, 6, 6);
    tbl[14] = ms(1, 15, 6, 11, 12, 6); tbl[15] = ms(0, 0, 6, 6, E, E);
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmp();
    start = 1; seq_reg = 5'd0;
    @(negedge clk);
    seq_reg = 5'd3;                    // the ATE moves on to SEQ3 at once
    for (int i = 0; i < 62 + 6; i++) begin
      cmp();
      if (issue) got.push_back(int'(instr_ptr));
      @(negedge clk);
    end
    checks++;
    if (got.size() != 68) begin failures++; $display("FAIL: %0d issues, expected 68", got.size()); end
    for (int i = 0; i < fig_stream.size(); i++) begin
      checks++;
      if (got[i] != fig_stream[i]) begin failures++; $display("FAIL: pointer %0d is %0d, expected %0d", i, got[i], fig_stream[i]); end
    end
    for (int i = 0; i < fig_tail.size(); i++) begin
      checks++;
      if (got[60 + i] != fig_tail[i]) begin failures++; $display("FAIL: pointer %0d is %0d, expected %0d", 60 + i, got[60 + i], fig_tail[i]); end
    end
    // stop at the next unlinked end
    start = 0;
    repeat (60) begin cmp(); @(negedge clk); end
    checks++;
    if (busy || !test_end) begin failures++; $display("FAIL: did not stop"); end

    // random tables and ATE behaviour
    for (int run = 0; run < 20; run++) begin
      for (int i = 0; i < 32; i++) begin
        int p [4];
        for (int k = 0; k < 4; k++) p[k] = ($urandom % 6 == 0) ? E : int'($urandom % 31);
        tbl[i] = ms(($urandom % 4) != 0, int'($urandom % 32), p[0], p[1], p[2], p[3]);
      end
      for (int c = 0; c < 400; c++) begin
        cmp();
        if ($urandom % 3 == 0) seq_reg = 5'($urandom);
        start = (c < 350) ? (($urandom % 20) != 0) : 1'b0;
        @(negedge clk);
      end
      repeat (200) begin cmp(); @(negedge clk); end   // table may loop forever: no stop check
      if (busy) begin  // reset to start each run from idle
        rst_n = 0; @(negedge clk); rst_n = 1;
      end
    end
    checks++;
    if (n_link == 0 || n_fetch == 0 || n_end == 0 || n_stop == 0) begin
      failures++;
      $display("FAIL: mechanism not seen: link %0d fetch %0d end %0d stop %0d", n_link, n_fetch, n_end, n_stop);
    end
    $display("links %0d pick-ups %0d early ends %0d stops %0d", n_link, n_fetch, n_end, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
