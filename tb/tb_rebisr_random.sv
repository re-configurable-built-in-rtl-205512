// tb_rebisr_random -- randomized end-to-end test of the ReBISR scheme at full
// size. Each of 40 trials resets the design, gives every RAM between zero and
// eight stuck-at cells at random distinct positions, programs the table,
// runs the repair and then judges the result independently of the analyser:
//   * a RAM with no more defects than spares in total must be reported
//     repairable (every allocation covers at least one defect);
//   * RAM 3, which has no spares, must be reported irreparable exactly when
//     it has a defect;
//   * a RAM reported repairable must read back random, all-zero and all-one
//     words at every address through the system port;
//   * a RAM reported irreparable must still show at least one defect.
// The bench also counts trials in which the local bitmap filled and paused
// the BIST, and fails if that never happened.
module tb_rebisr_random;
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
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_pause = 0, n_irrep = 0, n_rep_with_faults = 0;
  always @(posedge clk)
    if (!rst && dut.u_rebira.pause_bist && dut.fault_present && !dut.u_rebira.final_q) n_pause++;

  task automatic sys_test(input int n, output int bad);
    logic [MAX_WIDTH-1:0] model [256];
    logic [MAX_WIDTH-1:0] mask = (RAM_WIDTH[n] >= 64) ? '1 : ((64'd1 << RAM_WIDTH[n]) - 1);
    bad = 0;
    sys_sel = 2'(n);
    for (int p = 0; p < 3; p++) begin
      for (int a = 0; a < RAM_ROWS[n]; a++) begin
        model[a] = (p == 0) ? ({$urandom(), $urandom()} & mask) : (p == 1) ? '0 : mask;
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
    end
    sys_req.en = 0;
  endtask

  initial begin
    int nf [N_RAMS];
    int bad;
    start = 0; program_ram_details = 0; ram_details = '0;
    sys_sel = 0; sys_req = '0;
    for (int trial = 0; trial < 40; trial++) begin
      for (int n = 0; n < N_RAMS; n++) begin
        inj_faults[n] = '0;
        nf[n] = (n == 3) ? $urandom_range(0, 1) : $urandom_range(0, MAX_FAULTS);
        for (int k = 0; k < nf[n]; k++) begin
          bit dup;
          int r, c;
          do begin
            r = $urandom_range(0, RAM_ROWS[n] - 1);
            c = $urandom_range(0, RAM_WIDTH[n] - 1);
            // cluster some defects on shared rows and columns
            if (k > 0 && $urandom_range(0, 2) == 0) r = int'(inj_faults[n][k-1].row);
            else if (k > 0 && $urandom_range(0, 2) == 0) c = int'(inj_faults[n][k-1].col);
            dup = 0;
            for (int j = 0; j < k; j++)
              if (int'(inj_faults[n][j].row) == r && int'(inj_faults[n][j].col) == c) dup = 1;
          end while (dup);
          inj_faults[n][k] = '{valid: 1'b1, row: ADDR_W'(r), col: COL_W'(c), value: 1'($urandom())};
        end
      end
      rst = 1; repeat (2) @(negedge clk); rst = 0;
      for (int i = 0; i < N_RAMS; i++) begin
        program_ram_details = 1; ram_details = make_cfg(i);
        @(negedge clk);
      end
      program_ram_details = 0;
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int n = 0; n < N_RAMS; n++) begin
        if (nf[n] <= int'(RAM_SROWS[n] + RAM_SCOLS[n]))
          check(!irrepairable_map[n], $sformatf("trial %0d RAM %0d: %0d defects fit the spares", trial, n, nf[n]));
        if (n == 3)
          check(irrepairable_map[n] == (nf[n] > 0), $sformatf("trial %0d RAM 3 verdict", trial));
        sys_test(n, bad);
        if (irrepairable_map[n]) begin
          n_irrep++;
          check(bad > 0, $sformatf("trial %0d RAM %0d irreparable but shows no defect", trial, n));
        end else begin
          if (nf[n] > 0) n_rep_with_faults++;
          check(bad == 0, $sformatf("trial %0d RAM %0d repaired but %0d bad words", trial, n, bad));
        end
      end
    end
    $display("pauses=%0d irreparable=%0d repaired-with-defects=%0d", n_pause, n_irrep, n_rep_with_faults);
    check(n_pause > 0, "bitmap filled at least once");
    check(n_irrep > 0, "an irreparable RAM occurred");
    check(n_rep_with_faults > 0, "a RAM with defects was repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
