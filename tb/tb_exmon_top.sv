// tb_exmon_top: end-to-end test of the two-core Ex-Mon hardware at its
// default sizes (1K-entry extraction tables, 32-entry local filters).
//
// Each core gets its own xl_agent, which runs the memory-bug detection
// workload through that core's extraction logic with its own communication
// queue in shared memory: 64 slots for core 0, which switches between a
// fast and a slow monitor every 400 instructions, and 4K slots (the
// smallest queue size evaluated for the design) for core 1, whose monitor
// keeps up for 25,000 instructions and then falls behind until the queue
// fills and the core stalls.  The test checks every packet, the
// commit timing, suspension and update requests per core, and counts how
// often each mechanism happened; on each core each must happen at least
// once.
module tb_exmon_top;
  import exmon_pkg::*;

  localparam int unsigned NC = 2, TE = 1024, FE = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin repeat (4) @(posedge clk); rst_n = 1; end

  logic         [NC-1:0]   cm_valid, cm_ready;
  commit_t      [NC-1:0]   cm;
  logic         [NC-1:0]   tbl_we;
  logic         [NC-1:0][$clog2(TE)-1:0] tbl_idx;
  table_entry_t [NC-1:0]   tbl_entry;
  logic         [NC-1:0]   reg_we;
  reg_sel_e     [NC-1:0]   reg_sel;
  logic         [NC-1:0][AW-1:0] reg_wdata;
  logic         [NC-1:0]   mem_req, mem_gnt;
  logic         [NC-1:0][AW-1:0] mem_addr;
  packet_t      [NC-1:0]   mem_wdata;
  logic         [NC-1:0]   upd_req, susp, q_full;
  logic         [NC-1:0][AW-1:0] q_head, q_tail;

  exmon_top dut (.*);

  logic [NC-1:0] done;
  int checks [NC], failures [NC];

  for (genvar c = 0; c < NC; c++) begin : g_agent
    xl_agent #(.CORE(c), .TABLE_ENTRIES(TE), .FILTER_ENTRIES(FE), .N_INSTR(c == 0 ? 8000 : 50000),
               .QSLOTS(c == 0 ? 64 : 4096), .PHASE_LEN(c == 0 ? 400 : 25000), .SLOW_RATE(c == 0 ? 10 : 20)) agent (
      .clk, .rst_n,
      .cm_valid(cm_valid[c]), .cm_ready(cm_ready[c]), .cm(cm[c]),
      .tbl_we(tbl_we[c]), .tbl_idx(tbl_idx[c]), .tbl_entry(tbl_entry[c]),
      .reg_we(reg_we[c]), .reg_sel(reg_sel[c]), .reg_wdata(reg_wdata[c]),
      .mem_req(mem_req[c]), .mem_addr(mem_addr[c]), .mem_wdata(mem_wdata[c]), .mem_gnt(mem_gnt[c]),
      .upd_req(upd_req[c]), .susp(susp[c]), .q_head(q_head[c]), .q_tail(q_tail[c]), .q_full(q_full[c]),
      .done(done[c]), .checks(checks[c]), .failures(failures[c])
    );
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
endmodule
