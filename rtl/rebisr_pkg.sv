// rebisr_pkg -- shared types and constants of the reconfigurable BISR (ReBISR)
// scheme for four word-oriented repairable RAMs.
//
// The four RAM geometries and their spare counts are those of the scheme's
// configuration table (rows x bits: 16x32, 32x64, 128x64, 256x64; spares 2/2,
// 2/3, 3/2, 0/0). The shared bus is sized for the largest RAM: 8 row-address
// bits and 64 data bits. A configuration word is 16 bits, four 4-bit fields,
// in the order the scheme lists them (data width, depth, spare rows, spare
// columns); storing width and depth as log2 values is this design's choice,
// made so that the table stays 4 x 16 bits.
package rebisr_pkg;

  localparam int unsigned N_RAMS      = 4;
  localparam int unsigned RAM_NO_W    = 2;
  localparam int unsigned ADDR_W      = 8;    // row address bits (256 rows max)
  localparam int unsigned MAX_WIDTH   = 64;   // widest word
  localparam int unsigned COL_W       = 6;    // bit (column) index width
  localparam int unsigned MAX_SPARE   = 3;    // most spares of one kind per RAM
  localparam int unsigned SPARE_W     = 2;    // index of one spare
  localparam int unsigned BM_ENTRIES  = 4;    // local bitmap entries
  localparam int unsigned MAX_FAULTS  = 8;    // fault-injection slots per RAM
  localparam int unsigned REP_DATA_W  = 8;    // repair register data (row or column address)

  // One RAM-details entry.
  typedef struct packed {
    logic [3:0] log2_width;   // bits per word = 2**log2_width
    logic [3:0] log2_depth;   // rows (words)  = 2**log2_depth
    logic [3:0] spare_rows;
    logic [3:0] spare_cols;
  } ram_cfg_t;

  // A stuck-at defect in a main-array cell, used to model manufacturing faults.
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] row;
    logic [COL_W-1:0]  col;
    logic              value;  // the value the cell is stuck at
  } fault_t;

  typedef fault_t [MAX_FAULTS-1:0] fault_list_t;

  // Repair-register address: which register file, and which entry.
  typedef struct packed {
    logic               is_col;
    logic [SPARE_W-1:0] idx;
  } rep_addr_t;

  // Memory port shared by the BIST and the system side.
  typedef struct packed {
    logic                 en;
    logic                 we;
    logic [ADDR_W-1:0]    addr;
    logic [MAX_WIDTH-1:0] wdata;
  } mem_req_t;

  // Geometry of the four RAMs.
  localparam int unsigned RAM_ROWS   [N_RAMS] = '{16, 32, 128, 256};
  localparam int unsigned RAM_WIDTH  [N_RAMS] = '{32, 64, 64, 64};
  localparam int unsigned RAM_SROWS  [N_RAMS] = '{2, 2, 3, 0};
  localparam int unsigned RAM_SCOLS  [N_RAMS] = '{2, 3, 2, 0};

  function automatic ram_cfg_t make_cfg(int unsigned n);
    ram_cfg_t c;
    c.log2_width = 4'($clog2(RAM_WIDTH[n]));
    c.log2_depth = 4'($clog2(RAM_ROWS[n]));
    c.spare_rows = 4'(RAM_SROWS[n]);
    c.spare_cols = 4'(RAM_SCOLS[n]);
    return c;
  endfunction

endpackage
