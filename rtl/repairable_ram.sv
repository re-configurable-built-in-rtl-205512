// repairable_ram -- word-oriented RAM with spare rows, spare columns and the
// repair registers that remap defective rows and columns onto the spares.
//
// A row is one word (ROWS words of WIDTH bits). Each spare row k has a row
// repair register {RAE[k], RRA[k]}: when RAE[k] is set and the access address
// equals RRA[k], the whole word is written to and read from spare row k
// instead of the main array. Each spare column j has a column repair register
// {CAE[j], CRA[j]}: when CAE[j] is set, bit CRA[j] of every main-array word is
// held in spare column j instead. This is the address-mapping scheme of the
// repairable RAM: the decoders turn RRA/RAE and CRA/CAE into multiplexer
// selects, one spare per repair register. The lowest-numbered matching
// register wins if two hold the same address; spare rows carry no column
// remap, so a word held in a spare row is read from it as a whole (the spares
// are taken to be fault free).
//
// Repair registers are written through rep_reg_wr / rep_reg_addr /
// rep_reg_data: rep_reg_addr.is_col picks the row or column register file,
// rep_reg_addr.idx the entry, rep_reg_data the defective row or column
// address; a write also sets the entry's enable bit. rst clears all enables
// (soft repair: the repair is rebuilt by the BISR after every reset). Writes
// to entries beyond the spares the RAM has are ignored.
//
// Timing: writes take effect at the rising clock edge when en and we are
// high; reads are asynchronous (rdata follows addr in the same cycle).
//
// `faults` models manufacturing defects for simulation: each valid entry
// forces one main-array cell to read as a constant. It does not affect the
// spare rows or spare columns. The fault model is this design's choice.
module repairable_ram
  import rebisr_pkg::*;
#(
  parameter int unsigned ROWS    = 16,
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned N_SROWS = 2,
  parameter int unsigned N_SCOLS = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  // memory port
  input  logic                    en,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] addr,
  input  logic [WIDTH-1:0]        wdata,
  output logic [WIDTH-1:0]        rdata,
  // repair register write port
  input  logic                    rep_reg_wr,
  input  rep_addr_t               rep_reg_addr,
  input  logic [REP_DATA_W-1:0]   rep_reg_data,
  // defect model
  input  fault_list_t             faults
);

  localparam int unsigned AW = $clog2(ROWS);
  localparam int unsigned CW = $clog2(WIDTH);
  localparam int unsigned SR = (N_SROWS > 0) ? N_SROWS : 1;
  localparam int unsigned SC = (N_SCOLS > 0) ? N_SCOLS : 1;
  localparam int unsigned IW = (SR > 1) ? $clog2(SR) : 1;

  logic [WIDTH-1:0] main_q [ROWS];
  logic [WIDTH-1:0] srow_q [SR];
  logic [ROWS-1:0]  scol_q [SC];

  logic [SR-1:0]    rae_q;
  logic [AW-1:0]    rra_q [SR];
  logic [SC-1:0]    cae_q;
  logic [CW-1:0]    cra_q [SC];

  // Row decoder: does the address hit a row repair register?
  logic                     row_hit;
  logic [IW-1:0]            row_idx;
  always_comb begin
    row_hit = 1'b0;
    row_idx = '0;
    for (int k = SR - 1; k >= 0; k--) begin
      if (rae_q[k] && rra_q[k] == addr) begin
        row_hit = 1'b1;
        row_idx = IW'(k);
      end
    end
  end

  // Main array and spares.
  always_ff @(posedge clk) begin
    if (en && we) begin
      if (row_hit) begin
        srow_q[row_idx] <= wdata;
      end else begin
        main_q[addr] <= wdata;
        for (int j = 0; j < SC; j++) begin
          if (cae_q[j]) scol_q[j][addr] <= wdata[cra_q[j]];
        end
      end
    end
  end

  // Repair registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      rae_q <= '0;
      cae_q <= '0;
      for (int k = 0; k < SR; k++) rra_q[k] <= '0;
      for (int j = 0; j < SC; j++) cra_q[j] <= '0;
    end else if (rep_reg_wr) begin
      for (int j = 0; j < N_SCOLS; j++) begin
        if (rep_reg_addr.is_col && 32'(rep_reg_addr.idx) == j) begin
          cae_q[j] <= 1'b1;
          cra_q[j] <= rep_reg_data[CW-1:0];
        end
      end
      for (int k = 0; k < N_SROWS; k++) begin
        if (!rep_reg_addr.is_col && 32'(rep_reg_addr.idx) == k) begin
          rae_q[k] <= 1'b1;
          rra_q[k] <= rep_reg_data[AW-1:0];
        end
      end
    end
  end

  // Read path: main word with defects, column multiplexers, row multiplexer.
  logic [WIDTH-1:0] main_word;
  always_comb begin
    main_word = main_q[addr];
    for (int f = 0; f < MAX_FAULTS; f++) begin
      if (faults[f].valid && faults[f].row == ADDR_W'(addr) &&
          32'(faults[f].col) < WIDTH)
        main_word[faults[f].col[CW-1:0]] = faults[f].value;
    end
    for (int j = 0; j < SC; j++) begin
      if (cae_q[j]) main_word[cra_q[j]] = scol_q[j][addr];
    end
    rdata = row_hit ? srow_q[row_idx] : main_word;
  end

endmodule
