// tb_rebisr_top -- end-to-end test of the ReBISR scheme at full size (top at
// its defaults: RAMs of 16x32, 32x64, 128x64 and 256x64).
//
// Run 1 uses the stuck-at defects of the reference fault table:
//   RAM 0: (6,18) and (7,18) stuck at 0, (14,28) and (14,29) stuck at 1;
//   RAM 1: (15,43) and (16,43) stuck at 1, (28,61) stuck at 0;
//   RAM 2: none;  RAM 3: (243,31) stuck at 0 (RAM 3 has no spares).
// Expected: RAMs 0..2 repaired, RAM 3 irreparable (map 4'b1000); RAM 0 uses
// spare row for row 14 and a spare column for column 18.
// Run 2 (after reset) loads heavier defects so that the local bitmap fills and
// the BIST is paused: RAM 0 gets five defects in five different rows and
// columns (more than its four spares: irreparable), RAM 1 five defect rows of
// which three share a column (repairable), RAM 2 two defects, RAM 3 none.
// Expected map 4'b0001.
// After each run every RAM marked repairable is written with random words at
// every address through the system port and read back; all words must match.
// For an irreparable RAM the defect must still be visible.
// The bench counts how often each mechanism happened (BIST paused by a full
// bitmap, spare row allocated, spare column allocated, fault dropped because
// its row or column was already replaced, RAM found irreparable, verification
// pass, system access) and counts a failure for any that never happened.
module tb_rebisr_top;
  import rebisr_pkg::*;

  logic clk = 1'b0, rst;
  logic start, program_ram_details;
  ram_cfg_t ram_details;
  logic [1:0] ram_no, sys_sel;
  logic irrepairable, done, test_mode;
  logic [3:0] irrepairable_map;
  mem_req_t sys_req;
  logic [MAX_WIDTH-1:0] sys_rdata;
  fault_list_t inj_faults [N_RAMS];

  rebisr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_pause = 0, n_row = 0, n_col = 0, n_drop = 0, n_irrep = 0, n_verify = 0, n_sys = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_rebira.pause_bist && dut.fault_present && !dut.u_rebira.final_q) n_pause++;
    if (dut.rep_reg_wr && !dut.rep_reg_addr.is_col) n_row++;
    if (dut.rep_reg_wr &&  dut.rep_reg_addr.is_col) n_col++;
    if (dut.u_rebira.accept_fault && dut.u_rebira.covered) n_drop++;
    if (dut.u_fsm.state_q == dut.u_fsm.VKICK) n_verify++;
    if (!test_mode && sys_req.en) n_sys++;
  end

  function automatic fault_t flt(input int r, input int c, input bit v);
    return '{valid: 1'b1, row: ADDR_W'(r), col: COL_W'(c), value: v};
  endfunction

  task automatic run_bisr(input logic [3:0] want_map, input string name);
    longint t0;
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < N_RAMS; i++) begin
      program_ram_details = 1; ram_details = make_cfg(i);
      @(negedge clk);
    end
    program_ram_details = 0;
    start = 1; @(negedge clk); start = 0;
    t0 = cycle;
    while (!done) @(negedge clk);
    $display("%s: repair of all RAMs took %0d cycles, map %b", name, cycle - t0, irrepairable_map);
    check(irrepairable_map == want_map, $sformatf("%s: map %b want %b", name, irrepairable_map, want_map));
    check(irrepairable == (want_map != 0), $sformatf("%s: irrepairable", name));
    for (int i = 0; i < N_RAMS; i++) if (want_map[i]) n_irrep++;
    repeat (3) @(negedge clk);
    check(done && !test_mode, $sformatf("%s: done holds", name));
  endtask

  // Write random words to every row of RAM n through the system port and
  // read them back; return the number of mismatching words.
  task automatic sys_test(input int n, output int bad);
    logic [MAX_WIDTH-1:0] model [256];
    logic [MAX_WIDTH-1:0] mask = (RAM_WIDTH[n] >= 64) ? '1 : ((64'd1 << RAM_WIDTH[n]) - 1);
    bad = 0;
    sys_sel = 2'(n);
    for (int a = 0; a < RAM_ROWS[n]; a++) begin
      model[a] = {$urandom(), $urandom()} & mask;
      sys_req.en = 1; sys_req.we = 1; sys_req.addr = ADDR_W'(a); sys_req.wdata = model[a];
      @(negedge clk);
    end
    sys_req.we = 0;
    for (int a = 0; a < RAM_ROWS[n]; a++) begin
      sys_req.addr = ADDR_W'(a);
      #1;
      if (sys_rdata != model[a]) bad++;
      @(negedge clk);
    end
    // all ones and all zeros as well, so that every stuck-at cell is exercised
    for (int p = 0; p < 2; p++) begin
      for (int a = 0; a < RAM_ROWS[n]; a++) begin
        sys_req.we = 1; sys_req.addr = ADDR_W'(a); sys_req.wdata = p ? mask : '0;
        @(negedge clk);
      end
      sys_req.we = 0;
      for (int a = 0; a < RAM_ROWS[n]; a++) begin
        sys_req.addr = ADDR_W'(a);
        #1;
        if (sys_rdata != (p ? mask : '0)) bad++;
        @(negedge clk);
      end
    end
    sys_req.en = 0;
  endtask

  initial begin
    int bad;
    start = 0; program_ram_details = 0; ram_details = '0;
    sys_sel = 0; sys_req = '0;
    for (int i = 0; i < N_RAMS; i++) inj_faults[i] = '0;

    // ---------------- run 1: reference defects ----------------
    inj_faults[0][0] = flt(6, 18, 0);  inj_faults[0][1] = flt(7, 18, 0);
    inj_faults[0][2] = flt(14, 28, 1); inj_faults[0][3] = flt(14, 29, 1);
    inj_faults[1][0] = flt(15, 43, 1); inj_faults[1][1] = flt(16, 43, 1);
    inj_faults[1][2] = flt(28, 61, 0);
    inj_faults[3][0] = flt(243, 31, 0);
    run_bisr(4'b1000, "run 1");
    check(dut.g_ram[0].u_ram.rae_q == 2'b01 && dut.g_ram[0].u_ram.rra_q[0] == 4'd14,
          "run 1: RAM 0 row 14 on spare row 0");
    check(dut.g_ram[0].u_ram.cae_q == 2'b01 && dut.g_ram[0].u_ram.cra_q[0] == 5'd18,
          "run 1: RAM 0 column 18 on spare column 0");
    check(dut.g_ram[1].u_ram.cae_q[0] && dut.g_ram[1].u_ram.cra_q[0] == 6'd43,
          "run 1: RAM 1 column 43 on a spare column");
    for (int n = 0; n < 3; n++) begin
      sys_test(n, bad);
      check(bad == 0, $sformatf("run 1: RAM %0d reads back after repair (%0d bad words)", n, bad));
    end
    sys_test(3, bad);
    check(bad >= 1 && bad <= 2, $sformatf("run 1: RAM 3 still shows its defect (%0d bad words)", bad));

    // ---------------- run 2: bitmap overflow ----------------
    for (int i = 0; i < N_RAMS; i++) inj_faults[i] = '0;
    for (int k = 0; k < 5; k++) inj_faults[0][k] = flt(1 + 3 * k, 2 + 5 * k, 1);
    inj_faults[1][0] = flt(1, 40, 1);  inj_faults[1][1] = flt(5, 40, 1);
    inj_faults[1][2] = flt(9, 40, 1);  inj_faults[1][3] = flt(13, 3, 1);
    inj_faults[1][4] = flt(17, 7, 1);
    inj_faults[2][0] = flt(100, 0, 0); inj_faults[2][1] = flt(20, 63, 1);
    run_bisr(4'b0001, "run 2");
    for (int n = 1; n < 4; n++) begin
      sys_test(n, bad);
      check(bad == 0, $sformatf("run 2: RAM %0d reads back after repair (%0d bad words)", n, bad));
    end
    sys_test(0, bad);
    check(bad > 0, "run 2: RAM 0 still shows defects");

    $display("mechanisms: pause=%0d row=%0d col=%0d dropped=%0d irreparable=%0d verify=%0d sys=%0d",
             n_pause, n_row, n_col, n_drop, n_irrep, n_verify, n_sys);
    check(n_pause > 0,  "BIST paused by a full bitmap");
    check(n_row > 0,    "spare row allocated");
    check(n_col > 0,    "spare column allocated");
    check(n_drop > 0,   "fault in an already repaired row/column dropped");
    check(n_irrep > 0,  "irreparable RAM found");
    check(n_verify > 0, "verification pass run");
    check(n_sys > 0,    "system access after repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
