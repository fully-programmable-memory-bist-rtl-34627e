// tb_mbist_top: end-to-end test of the BIST with a DDR3 core model and an ATE
// model, all parameters at their defaults.
//
// The ATE loads the 16 instructions and 28 sequence buffers of a scan test
// with a checkerboard background (even rows written and read with the data
// background DB, odd rows with ~DB; the whole write/read is done twice, the
// second time with DB inverted). The ATE closes the row loop (SEQ3 / SEQ18),
// the column loop (SEQ16 / SEQ25), the move to the read pass (SEQ17), the
// outer loop (SEQ1) and one refresh interrupt (SEQ26, a REF sequence), all
// by choosing the sequence number that the BIST picks up at the end of an
// unlinked sequence buffer. The ATE works out in advance at which internal
// clock each pick-up happens (chain lengths summed) and so at which external
// edge it has to present each number, as a real tester program would.
//
// Checked: the command timing of the first instructions, the internal clock
// count at test end (one instruction per internal clock), memory contents,
// command counts, protocol errors of the core model, the fault record of an
// injected cell fault, and the same flow again with the x4 clock. Every
// mechanism (link, pick-up, early end on the end marker, full four-slot
// buffer, ignored sequence number, refresh, fault, x8 and x4 runs, test end)
// is counted and must occur.
`timescale 1ns / 1ps
module tb_mbist_top;
  import mbist_pkg::*;

  localparam int unsigned XW = 14, YW = 10, DW = 8, AW = 14, EXT_W = 14;
  localparam realtime TEXT = 10ns;     // 100 MHz ATE clock
  localparam int E = 31;

  logic             ext_clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             clk_sel8 = 1'b1;
  logic             test_start = 1'b0;
  logic [PTR_W-1:0] seq_no = '0;
  logic [EXT_W-1:0] ext_data = '0;
  logic             prog_we = 1'b0, prog_sel = 1'b0;
  logic [PTR_W-1:0] prog_addr = '0;
  logic [SEQ_W-1:0] prog_wdata = '0;
  logic             fail_clear = 1'b0;
  logic             test_end, busy, fail, int_clk, clk_locked;
  logic             ev_link, ev_fetch, ev_endptr;
  logic [3:0]       mem_cmd;
  logic [2:0]       mem_bank;
  logic [AW-1:0]    mem_addr;
  logic [DW-1:0]    mem_dataE, mem_dataO, mem_rdataE, mem_rdataO;
  logic             mem_rd_valid;
  logic             fault_valid;
  logic [2:0]       fault_bank;
  logic [XW-1:0]    fault_row;
  logic [YW-1:0]    fault_col;
  logic [2*DW-1:0]  fault_mask;
  logic [15:0]      fault_count;
  logic             inj_en = 1'b0;
  logic [XW-1:0]    inj_row = '0;
  logic [YW-1:0]    inj_col = '0;
  logic [DW-1:0]    inj_mask = '0;

  mbist_top dut (.*);

  dram_core_model #(.XW(XW), .YW(YW), .DW(DW)) core (
    .clk(int_clk), .cmd(mem_cmd), .bank(mem_bank), .addr(mem_addr),
    .dataE(mem_dataE), .dataO(mem_dataO), .rd_valid(mem_rd_valid),
    .rdataE(mem_rdataE), .rdataO(mem_rdataO),
    .inj_en, .inj_bank(3'd0), .inj_row, .inj_col, .inj_mask
  );

  always #(TEXT / 2) ext_clk = ~ext_clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  instr_t IB [32];
  seq_t   SB [32];

  function automatic instr_t mk(cmd_e c, logic side, addr_fn_e a, data_fn_e d);
    return '{cmd: c, bank: 3'd0, side: side, addr_fn: a, data_fn: d};
  endfunction

  function automatic seq_t ms(bit l, int sp, int a, int b, int c, int d);
    seq_t s;
    s.link = l; s.seq_ptr = 5'(sp);
    s.ibp[3] = 5'(a); s.ibp[2] = 5'(b); s.ibp[1] = 5'(c); s.ibp[0] = 5'(d);
    return s;
  endfunction

  function automatic int slot_of(seq_t s, int k);
    return int'(s.ibp[3 - k]);
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) begin IB[i] = INSTR_IDLE; SB[i] = ms(0, 0, E, E, E, E); end
    IB[1]  = mk(CMD_NOP, 1, AF_SETREG, DF_HOLD);   // yreg = ext data
    IB[2]  = mk(CMD_NOP, 0, AF_HOLD,   DF_SETREG); // dreg = ext data
    IB[3]  = mk(CMD_NOP, 0, AF_SETZ,   DF_HOLD);   // AX = 0
    IB[4]  = mk(CMD_NOP, 1, AF_SETZ,   DF_HOLD);   // AY = 0
    IB[5]  = mk(CMD_ACT, 0, AF_HOLD,   DF_HOLD);
    IB[6]  = mk(CMD_NOP, 0, AF_HOLD,   DF_HOLD);
    IB[7]  = mk(CMD_WR,  0, AF_HOLD,   DF_HOLD);
    IB[8]  = mk(CMD_RD,  0, AF_HOLD,   DF_HOLD);
    IB[9]  = mk(CMD_NOP, 0, AF_HOLD,   DF_LL);
    IB[10] = mk(CMD_NOP, 0, AF_HOLD,   DF_HH);
    IB[11] = mk(CMD_PRE, 0, AF_HOLD,   DF_HOLD);
    IB[12] = mk(CMD_NOP, 0, AF_INC,    DF_HOLD);   // AX = AX + 1
    IB[13] = mk(CMD_NOP, 0, AF_INC,    DF_LL);
    IB[14] = mk(CMD_NOP, 0, AF_INC,    DF_HH);
    IB[15] = mk(CMD_NOP, 1, AF_INCR,   DF_HOLD);   // AY = AY + yreg
    IB[16] = mk(CMD_REF, 0, AF_HOLD,   DF_HOLD);   // refresh interrupt
    // write pass
    SB[0]  = ms(1, 1,  1, 6, 6, 6);
    SB[1]  = ms(1, 2,  3, 4, 6, 6);
    SB[2]  = ms(1, 3,  2, 6, 6, 6);
    SB[3]  = ms(1, 4,  5, 6, 6, 6);
    SB[4]  = ms(1, 5,  6, 7, 6, 6);
    SB[5]  = ms(1, 6,  6, 6, 9, 9);
    SB[6]  = ms(1, 7,  9, 9, 6, 6);
    SB[7]  = ms(1, 8,  6, 6, 6, 6);
    SB[8]  = ms(1, 9,  11, 12, 6, 6);
    SB[9]  = ms(1, 10, 6, 5, 6, 6);
    SB[10] = ms(1, 11, 6, 6, 7, 6);
    SB[11] = ms(1, 12, 6, 6, 6, 10);
    SB[12] = ms(1, 13, 10, 10, 10, 6);
    SB[13] = ms(1, 14, 6, 6, 6, 6);
    SB[14] = ms(1, 15, 6, 11, 12, 6);
    SB[15] = ms(0, 0,  6, 6, E, E);
    SB[16] = ms(1, 3,  3, 15, E, E);
    // read pass
    SB[17] = ms(1, 18, 3, 4, E, E);
    SB[18] = ms(1, 19, 5, 6, 6, 6);
    SB[19] = ms(1, 20, 6, 8, 6, 6);
    SB[20] = ms(1, 21, 6, 11, 13, 9);
    SB[21] = ms(1, 22, 9, 9, 5, 6);
    SB[22] = ms(1, 23, 6, 6, 6, 8);
    SB[23] = ms(1, 24, 6, 6, 6, 11);
    SB[24] = ms(0, 0,  14, 10, 10, 10);
    SB[25] = ms(1, 18, 3, 15, E, E);
    // refresh interrupt
    SB[26] = ms(1, 27, 16, 6, 6, 6);
    SB[27] = ms(0, 0,  6, 6, 6, 6);
  end

  // Reference: length in internal clocks of the chain that starts at s,
  // with the number of linked and early-ended buffers in it.
  task automatic chain(input int s, output int len, output int nlink, output int nend);
    len = 0; nlink = 0; nend = 0;
    forever begin
      int k = 0;
      while (k < 4 && slot_of(SB[s], k) != E) begin len++; k++; end
      if (k == 0) len++;
      if (k < 4) nend++;
      if (SB[s].link) begin nlink++; s = int'(SB[s].seq_ptr); end
      else break;
    end
  endtask

  // ---------------------------------------------------------------- monitors
  longint icyc = 0;
  longint base = 0;
  bit     in_test = 0;
  int     n_link = 0, n_fetch = 0, n_endptr = 0, n_full = 0, n_ignored = 0;
  int     fetch_in_period = 0;
  int     n_fault = 0;
  longint t_end_obs = -1;
  logic [2:0]      f_bank [$];
  logic [XW-1:0]   f_row  [$];
  logic [YW-1:0]   f_col  [$];
  logic [2*DW-1:0] f_mask [$];
  // (cycle, command, address) expected at the core in the first test
  int     exp_cyc [$];
  logic [3:0] exp_cmd [$];
  logic [AW-1:0] exp_addr [$];

  always @(posedge int_clk) begin
    longint ended;
    ended = icyc - base - 1;
    icyc++;
    if (in_test) begin
      if (test_end && t_end_obs < 0) t_end_obs = ended;
      if (ev_link) n_link++;
      if (ev_fetch) begin n_fetch++; fetch_in_period++; end
      if (ev_endptr) n_endptr++;
      if ((ev_link || ev_fetch) && !ev_endptr) n_full++;
      for (int i = 0; i < exp_cyc.size(); i++)
        if (longint'(exp_cyc[i]) == ended)
          check(mem_cmd == exp_cmd[i] && mem_addr == exp_addr[i],
                $sformatf("cycle %0d: core sees cmd %b addr %0d, expected %b %0d",
                          ended, mem_cmd, mem_addr, exp_cmd[i], exp_addr[i]));
    end
    if (fault_valid) begin
      n_fault++;
      f_bank.push_back(fault_bank); f_row.push_back(fault_row);
      f_col.push_back(fault_col);   f_mask.push_back(fault_mask);
    end
  end

  always @(posedge ext_clk) begin
    if (in_test && busy && fetch_in_period == 0) n_ignored++;
    fetch_in_period = 0;
  end

  // ---------------------------------------------------------------- ATE
  task automatic load_program();
    for (int i = 0; i <= 16; i++) begin
      @(negedge ext_clk);
      prog_we = 1; prog_sel = 0; prog_addr = 5'(i); prog_wdata = SEQ_W'(IB[i]);
    end
    for (int i = 0; i <= 27; i++) begin
      @(negedge ext_clk);
      prog_we = 1; prog_sel = 1; prog_addr = 5'(i); prog_wdata = SB[i];
    end
    @(negedge ext_clk);
    prog_we = 0;
  endtask

  // Runs one test of R rows by C bursts of 8 columns, ITER times, with the
  // internal clock M times the external one. Returns the expected clock
  // count at test end and checks it.
  task automatic run_test(int M, int R, int C, int ITER, bit with_ref, logic [DW-1:0] db);
    int f [$];
    longint F [$];
    longint e [$];
    longint e_end, e_inv, rel;
    int len, nl, ne, exp_link, exp_end;
    longint t_end;
    f.push_back(0);
    for (int it = 0; it < ITER; it++) begin
      if (it > 0) f.push_back(1);
      for (int c = 0; c < C; c++) begin
        if (c > 0) f.push_back(16);
        for (int p = 1; p < R / 2; p++) begin
          if (with_ref && it == 0 && c == 0 && p == 1) f.push_back(26);
          f.push_back(3);
        end
      end
      f.push_back(17);
      for (int c = 0; c < C; c++) begin
        if (c > 0) f.push_back(25);
        for (int p = 1; p < R / 2; p++) f.push_back(18);
      end
    end
    // pick-up clocks and the external edge of each
    F.push_back(0);
    exp_link = 0; exp_end = 0;
    e_inv = 64'h7fffffff;
    for (int k = 0; k < f.size(); k++) begin
      chain(f[k], len, nl, ne);
      exp_link += nl; exp_end += ne;
      F.push_back(F[k] + len);
    end
    for (int k = 0; k <= f.size(); k++) begin
      e.push_back(F[k] / M);
      if (k > 0) check(e[k] != e[k-1], "two pick-ups in one external period");
      if (k < f.size() && f[k] == 1 && e_inv == 64'h7fffffff) e_inv = e[k];
    end
    e_end = e[f.size()];

    n_link = 0; n_fetch = 0; n_endptr = 0; n_full = 0; n_ignored = 0;
    t_end_obs = -1;
    clk_sel8 = (M == 8);
    repeat (3) @(negedge ext_clk);
    test_start = 1; seq_no = 5'(f[0]); ext_data = EXT_W'(8);
    @(posedge ext_clk);
    base = icyc;
    in_test = 1;
    rel = 0;
    while (rel <= e_end + 2) begin
      @(negedge ext_clk);
      rel++;
      for (int k = 0; k < f.size(); k++) if (e[k] == rel) seq_no = 5'(f[k]);
      test_start = (rel < e_end);
      ext_data = EXT_W'((rel >= e_inv) ? ~db : db);
      @(posedge ext_clk);
    end
    // test_end rises at internal edge F_end
    t_end = t_end_obs;
    check(t_end == F[f.size()], $sformatf("test end at internal clock %0d, expected %0d",
                                          t_end, F[f.size()]));
    check(!busy, "BIST still busy after test end");
    check(n_fetch == f.size(), $sformatf("%0d pick-ups of the sequence register, expected %0d",
                                          n_fetch, f.size()));
    check(n_link == exp_link, $sformatf("%0d links followed, expected %0d", n_link, exp_link));
    check(n_endptr == exp_end, $sformatf("%0d early ends, expected %0d", n_endptr, exp_end));
    in_test = 0;
    test_start = 0;
    $display("run M=%0d R=%0d C=%0d ITER=%0d: %0d internal clocks, %0d pick-ups, %0d links",
             M, R, C, ITER, F[f.size()], n_fetch, n_link);
  endtask

  function automatic bit cell_ok(int r, int c, logic [DW-1:0] v);
    logic [3+XW+YW-1:0] k;
    k = {3'd0, XW'(r), YW'(c)};
    return core.mem.exists(k) && core.mem[k] == v;
  endfunction

  task automatic check_cells(int R, int C, logic [DW-1:0] even_val);
    int bad = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < 8 * C; c++)
        if (!cell_ok(r, c, (r % 2 == 0) ? even_val : ~even_val)) bad++;
    check(bad == 0, $sformatf("%0d cells hold the wrong checkerboard value", bad));
    // nothing written beyond the region
    check(core.mem.num() == R * 8 * C, $sformatf("%0d cells written, expected %0d",
                                                   core.mem.num(), R * 8 * C));
  endtask

  // ---------------------------------------------------------------- test
  localparam logic [DW-1:0] DB  = 8'h5A;
  localparam logic [DW-1:0] DB2 = 8'hC3;
  localparam int R1 = 64, C1 = 16;
  localparam int R2 = 4,  C2 = 2;
  int n_ref_a, n_act_a, n_wr_a, n_rd_a, n_pre_a;
  int m_x8 = 0, m_x4 = 0, m_end = 0, m_fault = 0, m_ref = 0;

  initial begin
    repeat (3) @(negedge ext_clk);
    rst_n = 1;
    load_program();
    wait (clk_locked);
    check(!busy && !test_end, "BIST not idle after reset");

    // Fig.-5 style start: yreg=8, X=0/Y=0, dreg=DB, then ACT X=0 and WRIT Y=0
    exp_cyc = {13, 18, 33, 38, 43};
    exp_cmd = {CMD_ACT, CMD_WR, CMD_PRE, CMD_ACT, CMD_WR};
    exp_addr = {14'd0, 14'd0, 14'd0, 14'd1, 14'd0};

    // test A: x8 clock, two passes, one refresh, one faulty cell
    inj_en = 1; inj_row = 14'd5; inj_col = 10'd11; inj_mask = 8'h10;
    run_test(8, R1, C1, 2, 1'b1, DB);
    m_x8++;
    if (test_end) m_end++;
    check_cells(R1, C1, ~DB);
    check(core.n_act == 4 * R1 * C1, $sformatf("ACT count %0d", core.n_act));
    check(core.n_wr  == 2 * R1 * C1, $sformatf("WRITE count %0d", core.n_wr));
    check(core.n_rd  == 2 * R1 * C1, $sformatf("READ count %0d", core.n_rd));
    check(core.n_pre == 4 * R1 * C1, $sformatf("PRE count %0d", core.n_pre));
    check(core.n_ref == 1, $sformatf("REF count %0d", core.n_ref));
    check(core.n_proto_err == 0, $sformatf("%0d DRAM protocol errors", core.n_proto_err));
    check(core.n_beats_written == 16 * R1 * C1, "beats written");
    m_ref += core.n_ref;
    // the faulty cell is the falling-edge beat of column 10 in row 5: one
    // fault record per pass (the flip is wrong whatever was written)
    check(n_fault == 2, $sformatf("%0d fault records, expected 2", n_fault));
    for (int i = 0; i < n_fault; i++)
      check(f_bank[i] == 0 && f_row[i] == 5 && f_col[i] == 10 && f_mask[i] == 16'h0010,
            $sformatf("fault record bank %0d row %0d col %0d mask %h", f_bank[i], f_row[i],
                      f_col[i], f_mask[i]));
    check(fail && fault_count == 2, "fail flag and fault count");
    m_fault += n_fault;
    n_act_a = core.n_act; n_wr_a = core.n_wr; n_rd_a = core.n_rd; n_pre_a = core.n_pre;
    n_ref_a = core.n_ref;

    // test B: x4 clock, one pass, no fault; the old contents are rewritten
    exp_cyc.delete(); exp_cmd.delete(); exp_addr.delete();
    inj_en = 0;
    @(negedge ext_clk); fail_clear = 1;
    @(negedge ext_clk); fail_clear = 0;
    check(!fail && fault_count == 0, "fail flag cleared");
    core.mem.delete();
    n_fault = 0; f_bank.delete(); f_row.delete(); f_col.delete(); f_mask.delete();
    run_test(4, R2, C2, 1, 1'b0, DB2);
    m_x4++;
    if (test_end) m_end++;
    check_cells(R2, C2, DB2);
    check(core.n_act - n_act_a == 2 * R2 * C2, "ACT count, x4 run");
    check(core.n_wr - n_wr_a == R2 * C2 && core.n_rd - n_rd_a == R2 * C2, "WRITE/READ count, x4 run");
    check(core.n_proto_err == 0, "DRAM protocol errors, x4 run");
    check(n_fault == 0 && !fail, "no fault in a fault-free run");

    // every mechanism must have happened
    check(n_link > 0,   "no link followed");
    check(n_fetch > 0,  "no sequence-register pick-up");
    check(n_endptr > 0, "no early end on the end marker");
    check(n_full > 0,   "no buffer ran all four slots");
    check(n_ignored > 0, "sequence register was never ignored");
    check(m_ref > 0 && m_fault > 0 && m_x8 > 0 && m_x4 > 0 && m_end == 2,
          "refresh, fault, x8, x4 or test end missing");
    $display("mechanisms: link=%0d pickup=%0d early_end=%0d full=%0d ignored_periods=%0d refresh=%0d faults=%0d x8=%0d x4=%0d test_end=%0d",
             n_link, n_fetch, n_endptr, n_full, n_ignored, m_ref, m_fault, m_x8, m_x4, m_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2ms);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
