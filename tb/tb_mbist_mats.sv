// tb_mbist_mats: runs a MATS+ march test through the BIST, parameters at
// their defaults.
//
// MATS+ is { any(w0); up(r0, w1); down(r1, w0) } over the rows of one 8-column
// burst in bank 1, with "0" the data background DB (LL) and "1" its inverse
// (HH). The tested rows are the R highest row addresses: the start of each
// ascending element is made with SETM followed by DECR by xreg = R-1, the
// descending element starts with SETM and steps with DEC. This exercises the
// address functions the scan test does not use (SETREG on x, SETM, DECR,
// DEC), a non-zero bank, and read-then-write in one row activation, where the
// expected read data and the write data are both made by holding dataE/dataO.
//
// The ATE model closes each element's row loop by presenting the element's
// start entry again, and moves to the next element, with the pick-up schedule
// computed from the chain lengths. One cell is faulty (flips on read), so
// both read elements must report it. Checked: test-end clock count, final
// memory contents (all DB), command counts, no DRAM protocol errors, and the
// exact fault records.
`timescale 1ns / 1ps
module tb_mbist_mats;
  import mbist_pkg::*;

  localparam int unsigned XW = 14, YW = 10, DW = 8, AW = 14, EXT_W = 14;
  localparam realtime TEXT = 10ns;
  localparam int E = 31;
  localparam int M = 8;
  localparam int R = 32;                        // rows under test
  localparam logic [DW-1:0] DB = 8'h96;
  localparam logic [XW-1:0] TOP = '1;           // highest row address

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
  localparam logic [XW-1:0] BAD_ROW = TOP - 14'd9;

  mbist_top dut (.*);

  dram_core_model #(.XW(XW), .YW(YW), .DW(DW)) core (
    .clk(int_clk), .cmd(mem_cmd), .bank(mem_bank), .addr(mem_addr),
    .dataE(mem_dataE), .dataO(mem_dataO), .rd_valid(mem_rd_valid),
    .rdataE(mem_rdataE), .rdataO(mem_rdataO),
    .inj_en(1'b1), .inj_bank(3'd1), .inj_row(BAD_ROW), .inj_col(10'd4), .inj_mask(8'h81)
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

  instr_t IB [32];
  seq_t   SB [32];

  function automatic instr_t mk(cmd_e c, logic side, addr_fn_e a, data_fn_e d);
    return '{cmd: c, bank: 3'd1, side: side, addr_fn: a, data_fn: d};
  endfunction

  function automatic seq_t ms(bit l, int sp, int a, int b, int c, int d);
    seq_t s;
    s.link = l; s.seq_ptr = 5'(sp);
    s.ibp[3] = 5'(a); s.ibp[2] = 5'(b); s.ibp[1] = 5'(c); s.ibp[0] = 5'(d);
    return s;
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) begin IB[i] = INSTR_IDLE; SB[i] = ms(0, 0, E, E, E, E); end
    IB[1]  = mk(CMD_NOP, 0, AF_SETREG, DF_HOLD);   // xreg = ext data (R-1)
    IB[2]  = mk(CMD_NOP, 0, AF_HOLD,   DF_SETREG); // dreg = ext data (DB)
    IB[3]  = mk(CMD_NOP, 0, AF_SETM,   DF_HOLD);   // X = max
    IB[4]  = mk(CMD_NOP, 0, AF_DECR,   DF_HOLD);   // X = X - xreg
    IB[5]  = mk(CMD_NOP, 1, AF_SETZ,   DF_HOLD);   // Y = 0
    IB[6]  = mk(CMD_ACT, 0, AF_HOLD,   DF_HOLD);
    IB[7]  = mk(CMD_NOP, 0, AF_HOLD,   DF_HOLD);
    IB[8]  = mk(CMD_WR,  0, AF_HOLD,   DF_HOLD);
    IB[9]  = mk(CMD_RD,  0, AF_HOLD,   DF_HOLD);
    IB[10] = mk(CMD_NOP, 0, AF_HOLD,   DF_LL);
    IB[11] = mk(CMD_NOP, 0, AF_HOLD,   DF_HH);
    IB[12] = mk(CMD_PRE, 0, AF_HOLD,   DF_HOLD);
    IB[13] = mk(CMD_NOP, 0, AF_INC,    DF_HOLD);   // X = X + 1
    IB[14] = mk(CMD_NOP, 0, AF_DEC,    DF_HOLD);   // X = X - 1
    // set-up: xreg, wait for the next external period, dreg, bottom row, Y = 0
    SB[0]  = ms(1, 1,  1, 7, 7, 7);
    SB[1]  = ms(1, 2,  7, 7, 7, 7);
    SB[2]  = ms(1, 3,  2, 3, 4, 5);
    // M0: w0, one row per chain (ACT@0, WR@4, LL@9, PRE@13, X+1)
    SB[3]  = ms(1, 4,  6, 7, 7, 7);
    SB[4]  = ms(1, 5,  8, 7, 7, 7);
    SB[5]  = ms(1, 6,  7, 10, 7, 7);
    SB[6]  = ms(0, 0,  7, 12, 13, E);
    // M1 start: bottom row again
    SB[7]  = ms(1, 8,  3, 4, E, E);
    // M1: r0, w1 (ACT@0, RD@2, expect LL from @7, WR@8, write HH from @13, PRE@18, X+1)
    SB[8]  = ms(1, 9,  6, 7, 9, 7);
    SB[9]  = ms(1, 10, 7, 7, 7, 10);
    SB[10] = ms(1, 11, 8, 7, 7, 7);
    SB[11] = ms(1, 12, 7, 11, 7, 7);
    SB[12] = ms(0, 0,  7, 7, 12, 13);
    // M2 start: top row
    SB[13] = ms(1, 14, 3, E, E, E);
    // M2: r1, w0, descending
    SB[14] = ms(1, 15, 6, 7, 9, 7);
    SB[15] = ms(1, 16, 7, 7, 7, 11);
    SB[16] = ms(1, 17, 8, 7, 7, 7);
    SB[17] = ms(1, 18, 7, 10, 7, 7);
    SB[18] = ms(0, 0,  7, 7, 12, 14);
  end

  task automatic chain(input int s, output int len);
    len = 0;
    forever begin
      int k = 0;
      while (k < 4 && int'(SB[s].ibp[3 - k]) != E) begin len++; k++; end
      if (k == 0) len++;
      if (SB[s].link) s = int'(SB[s].seq_ptr);
      else break;
    end
  endtask

  longint icyc = 0, base = 0, t_end_obs = -1;
  bit     in_test = 0;
  int     n_fault = 0;
  logic [2:0]      f_bank [$];
  logic [XW-1:0]   f_row  [$];
  logic [YW-1:0]   f_col  [$];
  logic [2*DW-1:0] f_mask [$];

  always @(posedge int_clk) begin
    longint ended;
    ended = icyc - base - 1;
    icyc++;
    if (in_test && test_end && t_end_obs < 0) t_end_obs = ended;
    if (fault_valid) begin
      n_fault++;
      f_bank.push_back(fault_bank); f_row.push_back(fault_row);
      f_col.push_back(fault_col);   f_mask.push_back(fault_mask);
    end
  end

  initial begin
    int f [$];
    longint F [$];
    longint e [$];
    longint rel, e_end;
    int len, bad;
    repeat (3) @(negedge ext_clk);
    rst_n = 1;
    for (int i = 0; i <= 14; i++) begin
      @(negedge ext_clk);
      prog_we = 1; prog_sel = 0; prog_addr = 5'(i); prog_wdata = SEQ_W'(IB[i]);
    end
    for (int i = 0; i <= 18; i++) begin
      @(negedge ext_clk);
      prog_we = 1; prog_sel = 1; prog_addr = 5'(i); prog_wdata = SB[i];
    end
    @(negedge ext_clk);
    prog_we = 0;
    wait (clk_locked);

    // ATE program: the pick-up list and its schedule
    f.push_back(0);
    for (int r = 1; r < R; r++) f.push_back(3);
    f.push_back(7);
    for (int r = 1; r < R; r++) f.push_back(8);
    f.push_back(13);
    for (int r = 1; r < R; r++) f.push_back(14);
    F.push_back(0);
    for (int k = 0; k < f.size(); k++) begin
      chain(f[k], len);
      F.push_back(F[k] + len);
    end
    for (int k = 0; k <= f.size(); k++) begin
      e.push_back(F[k] / M);
      if (k > 0) check(e[k] != e[k-1], "two pick-ups in one external period");
    end
    e_end = e[f.size()];

    @(negedge ext_clk);
    test_start = 1; seq_no = 5'(f[0]); ext_data = EXT_W'(R - 1);
    @(posedge ext_clk);
    base = icyc;
    in_test = 1;
    rel = 0;
    while (rel <= e_end + 2) begin
      @(negedge ext_clk);
      rel++;
      for (int k = 0; k < f.size(); k++) if (e[k] == rel) seq_no = 5'(f[k]);
      test_start = (rel < e_end);
      ext_data = EXT_W'(DB);
      @(posedge ext_clk);
    end
    in_test = 0;

    check(t_end_obs == F[f.size()], $sformatf("test end at clock %0d, expected %0d",
                                              t_end_obs, F[f.size()]));
    bad = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < 8; c++) begin
        logic [3+XW+YW-1:0] k;
        k = {3'd1, TOP - XW'(r), YW'(c)};
        if (!core.mem.exists(k) || core.mem[k] != DB) bad++;
      end
    check(bad == 0, $sformatf("%0d cells do not hold DB after MATS+", bad));
    check(core.mem.num() == R * 8, $sformatf("%0d cells written, expected %0d", core.mem.num(), R * 8));
    check(core.n_act == 3 * R && core.n_wr == 3 * R && core.n_rd == 2 * R && core.n_pre == 3 * R,
          $sformatf("command counts ACT %0d WR %0d RD %0d PRE %0d", core.n_act, core.n_wr,
                    core.n_rd, core.n_pre));
    check(core.n_proto_err == 0, $sformatf("%0d DRAM protocol errors", core.n_proto_err));
    // faulty cell: bank 1, BAD_ROW, column 4 (rising-edge beat of pair 4/5)
    check(n_fault == 2, $sformatf("%0d fault records, expected 2", n_fault));
    for (int i = 0; i < n_fault; i++)
      check(f_bank[i] == 1 && f_row[i] == BAD_ROW && f_col[i] == 4 && f_mask[i] == 16'h8100,
            $sformatf("fault record bank %0d row %0d col %0d mask %h", f_bank[i], f_row[i],
                      f_col[i], f_mask[i]));
    $display("MATS+ over %0d rows: %0d internal clocks, %0d pick-ups", R, F[f.size()], f.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
