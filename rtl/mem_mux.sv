// mem_mux -- the MUX / DEMUX between the shared test logic and the RAMs.
//
// In test mode (test_mode high) the BIST request and the ReBIRA repair
// register write go to RAM test_sel only; every other RAM sees en = 0 and
// no repair write. In normal mode the system request goes to RAM sys_sel and
// repair writes are blocked. Read data of the selected RAM comes back on
// rdata (the RAMs' words are zero-extended to MAX_WIDTH bits by the caller).
// Purely combinational. Having a system port next to the test port, and the
// mode input that chooses between them, are this design's choices.
module mem_mux
  import rebisr_pkg::*;
(
  input  logic                  test_mode,
  input  logic [RAM_NO_W-1:0]   test_sel,
  input  mem_req_t              bist_req,
  input  logic                  rep_reg_wr,
  input  logic [RAM_NO_W-1:0]   sys_sel,
  input  mem_req_t              sys_req,
  output mem_req_t              ram_req    [N_RAMS],
  output logic [N_RAMS-1:0]     ram_rep_wr,
  input  logic [MAX_WIDTH-1:0]  ram_rdata  [N_RAMS],
  output logic [MAX_WIDTH-1:0]  rdata
);

  logic [RAM_NO_W-1:0] sel;
  mem_req_t            req;
  assign sel = test_mode ? test_sel : sys_sel;
  assign req = test_mode ? bist_req : sys_req;

  always_comb begin
    for (int i = 0; i < N_RAMS; i++) begin
      ram_req[i]    = req;
      ram_req[i].en = req.en && (sel == RAM_NO_W'(i));
      ram_req[i].we = req.we && (sel == RAM_NO_W'(i));
      ram_rep_wr[i] = test_mode && rep_reg_wr && (sel == RAM_NO_W'(i));
    end
    rdata = ram_rdata[sel];
  end

endmodule
