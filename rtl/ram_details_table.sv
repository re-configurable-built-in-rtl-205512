// ram_details_table -- ENTRIES x 16-bit table holding the configuration of each
// repairable RAM (data width, depth, spare rows, spare columns).
//
// While rst is high every entry is cleared to zero and the write pointer goes
// to entry 0. Otherwise, in each cycle where program_ram_details is high, the
// word on ram_details is written to the entry the write pointer names and the
// pointer advances by one. When all entries have been written, `full` rises,
// the pointer holds its value and further writes are ignored. This follows
// the scheme's description; the separate read port (rd_idx / rd_cfg, an
// asynchronous read) is this design's way for the controller to fetch one
// RAM's entry.
module ram_details_table
  import rebisr_pkg::*;
#(
  parameter int unsigned ENTRIES = N_RAMS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       program_ram_details,
  input  ram_cfg_t                   ram_details,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output ram_cfg_t                   rd_cfg,
  output logic                       full
);

  localparam int unsigned PW = $clog2(ENTRIES + 1);

  ram_cfg_t        table_q [ENTRIES];
  logic [PW-1:0]   wr_ptr_q;

  assign full   = (32'(wr_ptr_q) == ENTRIES);
  assign rd_cfg = table_q[rd_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr_q <= '0;
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else if (program_ram_details && !full) begin
      for (int i = 0; i < ENTRIES; i++)
        if (32'(wr_ptr_q) == i) table_q[i] <= ram_details;
      wr_ptr_q <= wr_ptr_q + 1'b1;
    end
  end

endmodule
