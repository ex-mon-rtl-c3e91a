// exmon_top: Ex-Mon monitoring hardware of a multicore processor.
//
// Every core of the chip carries its own extraction logic, so that any core
// can run the monitored application while another runs the monitor program
// (the evaluated system has two cores).  Each extraction logic takes its
// core's commit stream and writes the events of interest, as packets, into
// a communication queue in shared memory with ordinary stores.  The cores,
// their caches and the on-chip interconnect are existing parts and stay
// outside this module: per core, the commit stream, the monitor's
// configuration writes, the store port to shared memory and the status
// (update request, suspension, queue head, tail and full) are brought out
// as arrays indexed by core.  Timing per core is that of extraction_logic.
module exmon_top
  import exmon_pkg::*;
#(
  parameter int unsigned NUM_CORES      = 2,
  parameter int unsigned TABLE_ENTRIES  = 1024,
  parameter int unsigned FILTER_ENTRIES = 32,
  localparam int unsigned TIW           = $clog2(TABLE_ENTRIES)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic         [NUM_CORES-1:0]   cm_valid,
  output logic         [NUM_CORES-1:0]   cm_ready,
  input  commit_t      [NUM_CORES-1:0]   cm,
  input  logic         [NUM_CORES-1:0]   tbl_we,
  input  logic         [NUM_CORES-1:0][TIW-1:0] tbl_idx,
  input  table_entry_t [NUM_CORES-1:0]   tbl_entry,
  input  logic         [NUM_CORES-1:0]   reg_we,
  input  reg_sel_e     [NUM_CORES-1:0]   reg_sel,
  input  logic         [NUM_CORES-1:0][AW-1:0] reg_wdata,
  output logic         [NUM_CORES-1:0]   mem_req,
  output logic         [NUM_CORES-1:0][AW-1:0] mem_addr,
  output packet_t      [NUM_CORES-1:0]   mem_wdata,
  input  logic         [NUM_CORES-1:0]   mem_gnt,
  output logic         [NUM_CORES-1:0]   upd_req,
  output logic         [NUM_CORES-1:0]   susp,
  output logic         [NUM_CORES-1:0][AW-1:0] q_head,
  output logic         [NUM_CORES-1:0][AW-1:0] q_tail,
  output logic         [NUM_CORES-1:0]   q_full
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    extraction_logic #(
      .TABLE_ENTRIES (TABLE_ENTRIES),
      .FILTER_ENTRIES(FILTER_ENTRIES)
    ) u_xl (
      .clk, .rst_n,
      .cm_valid (cm_valid[c]),
      .cm_ready (cm_ready[c]),
      .cm       (cm[c]),
      .tbl_we   (tbl_we[c]),
      .tbl_idx  (tbl_idx[c]),
      .tbl_entry(tbl_entry[c]),
      .reg_we   (reg_we[c]),
      .reg_sel  (reg_sel[c]),
      .reg_wdata(reg_wdata[c]),
      .mem_req  (mem_req[c]),
      .mem_addr (mem_addr[c]),
      .mem_wdata(mem_wdata[c]),
      .mem_gnt  (mem_gnt[c]),
      .upd_req  (upd_req[c]),
      .susp     (susp[c]),
      .q_head   (q_head[c]),
      .q_tail   (q_tail[c]),
      .q_full   (q_full[c])
    );
  end

endmodule
