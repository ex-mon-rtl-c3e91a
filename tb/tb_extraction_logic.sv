// tb_extraction_logic: end-to-end test of one core's extraction logic.
//
// One xl_agent plays the core, the shared memory and the monitor program
// around the extraction logic (reduced table and filter sizes keep the
// filter's LRU evictions frequent) and checks every forwarded packet, the
// commit timing, the suspension register and the update requests.
module tb_extraction_logic;
  import exmon_pkg::*;

  localparam int unsigned TE = 16, FE = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin repeat (4) @(posedge clk); rst_n = 1; end

  logic cm_valid, cm_ready; commit_t cm;
  logic tbl_we; logic [$clog2(TE)-1:0] tbl_idx; table_entry_t tbl_entry;
  logic reg_we; reg_sel_e reg_sel; logic [AW-1:0] reg_wdata;
  logic mem_req; logic [AW-1:0] mem_addr; packet_t mem_wdata; logic mem_gnt;
  logic upd_req, susp, q_full; logic [AW-1:0] q_head, q_tail;
  logic done; int checks, failures;

  extraction_logic #(.TABLE_ENTRIES(TE), .FILTER_ENTRIES(FE)) dut (.*);

  xl_agent #(.CORE(0), .TABLE_ENTRIES(TE), .FILTER_ENTRIES(FE), .N_INSTR(6000), .QSLOTS(16)) agent (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
