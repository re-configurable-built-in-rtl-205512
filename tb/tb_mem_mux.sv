// tb_mem_mux -- self-checking test of mem_mux. Random requests, selects and
// modes are applied; the bench checks that exactly the selected RAM sees the
// enable and write, that the address and data reach it unchanged, that
// repair-register writes pass only in test mode and only to the selected RAM,
// and that rdata is the selected RAM's word.
module tb_mem_mux;
  import rebisr_pkg::*;

  logic test_mode, rep_reg_wr;
  logic [1:0] test_sel, sys_sel;
  mem_req_t bist_req, sys_req;
  mem_req_t ram_req [N_RAMS];
  logic [N_RAMS-1:0] ram_rep_wr;
  logic [MAX_WIDTH-1:0] ram_rdata [N_RAMS];
  logic [MAX_WIDTH-1:0] rdata;

  mem_mux dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sel;
    mem_req_t req;
    for (int it = 0; it < 500; it++) begin
      test_mode = 1'($urandom()); rep_reg_wr = 1'($urandom());
      test_sel = 2'($urandom()); sys_sel = 2'($urandom());
      bist_req = mem_req_t'({$urandom(), $urandom(), $urandom()});
      sys_req  = mem_req_t'({$urandom(), $urandom(), $urandom()});
      for (int i = 0; i < N_RAMS; i++) ram_rdata[i] = {$urandom(), $urandom()};
      #1;
      sel = test_mode ? int'(test_sel) : int'(sys_sel);
      req = test_mode ? bist_req : sys_req;
      for (int i = 0; i < N_RAMS; i++) begin
        check(ram_req[i].en == (req.en && i == sel), $sformatf("en of RAM %0d", i));
        check(ram_req[i].we == (req.we && i == sel), $sformatf("we of RAM %0d", i));
        check(ram_req[i].addr == req.addr && ram_req[i].wdata == req.wdata, "address and data");
        check(ram_rep_wr[i] == (test_mode && rep_reg_wr && i == sel), $sformatf("repair write of RAM %0d", i));
      end
      check(rdata == ram_rdata[sel], "read data of the selected RAM");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
