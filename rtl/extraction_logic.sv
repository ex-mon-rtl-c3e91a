// extraction_logic: the Ex-Mon extraction logic attached to one core.
//
// It watches instructions as they commit, decides which of them are events
// the monitor asked for, and forwards those to the communication queue in
// shared memory, from which a monitor program on another core reads them.
//
// Every committing instruction is looked up in the extraction table with
// its PC and the I/D flag set to I; a load or store is then looked up a
// second time with its data address and the flag set to D.  For each
// lookup:
//   * suspension register set: the table and the local filter are bypassed
//     and the event is forwarded;
//   * otherwise the event is forwarded if the table reports a valid match
//     and the local filter does not hold the (address, I/D) pair.  A match
//     with ONCE enters the pair into the filter, a match with FLUSH empties
//     the filter, and a match with the suspension bit sets the suspension
//     register (from the next event on) and raises upd_req, the request to
//     the monitor to update the table.
// A forwarded event becomes a packet (address, I/D flag, value): the value
// is the instruction's result for an I event and the loaded or stored value
// for a D event.
//
// Timing: the I and D lookups of one instruction share the single lookup
// port of the table and the filter, so an instruction commits through
// cm_valid/cm_ready in one cycle, or in two if it is a memory instruction
// (serialising the two lookups, and the single port, are this design's
// choice).  When the communication queue is full the event cannot be taken
// and cm_ready stays low: the monitored core stalls.  Table entries and the
// queue/suspension registers are written by monitor software through the
// tbl_* and reg_* ports.  The table's match index and the queue's BASE and
// END outputs are left unconnected here: nothing in this module needs them.
module extraction_logic
  import exmon_pkg::*;
#(
  parameter int unsigned TABLE_ENTRIES  = 1024,
  parameter int unsigned FILTER_ENTRIES = 32
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // commit stream from the core (ROB and load/store queue)
  input  logic                             cm_valid,
  output logic                             cm_ready,
  input  commit_t                          cm,
  // monitor software: extraction table writes
  input  logic                             tbl_we,
  input  logic [$clog2(TABLE_ENTRIES)-1:0] tbl_idx,
  input  table_entry_t                     tbl_entry,
  // monitor software: register writes
  input  logic                             reg_we,
  input  reg_sel_e                         reg_sel,
  input  logic [AW-1:0]                    reg_wdata,
  // store port to shared memory (communication queue)
  output logic                             mem_req,
  output logic [AW-1:0]                    mem_addr,
  output packet_t                          mem_wdata,
  input  logic                             mem_gnt,
  // status towards the monitor
  output logic                             upd_req,
  output logic                             susp,
  output logic [AW-1:0]                    q_head,
  output logic [AW-1:0]                    q_tail,
  output logic                             q_full
);

  // ---- event sequencing: I lookup, then D lookup for memory instructions
  logic    phase_d_q;          // 1: the D lookup of the current instruction
  packet_t ev;

  always_comb begin
    if (phase_d_q) ev = '{addr: cm.mem_addr, id: ID_D, value: cm.mem_value};
    else           ev = '{addr: cm.pc,       id: ID_I, value: cm.result};
  end

  // ---- table, filter and suspension register
  logic                             tbl_hit;
  direction_t                       tbl_dir;
  logic                             flt_hit;

  ext_table #(.ENTRIES(TABLE_ENTRIES)) u_table (
    .clk, .rst_n,
    .lk_addr (ev.addr),
    .lk_id   (ev.id),
    .lk_hit  (tbl_hit),
    .lk_dir  (tbl_dir),
    .lk_idx  (),
    .wr_en   (tbl_we),
    .wr_idx  (tbl_idx),
    .wr_entry(tbl_entry)
  );

  logic matched;     // a table match that counts (table not bypassed)
  logic fwd;         // this event is forwarded
  logic take;        // this event is done this cycle
  logic pkt_ready;

  assign matched = !susp && tbl_hit;
  assign fwd     = susp || (tbl_hit && !flt_hit);
  assign take    = cm_valid && (!fwd || pkt_ready);

  local_filter #(.ENTRIES(FILTER_ENTRIES)) u_filter (
    .clk, .rst_n,
    .lk_addr(ev.addr),
    .lk_id  (ev.id),
    .lk_hit (flt_hit),
    .upd_en (take && matched),
    .ins    (tbl_dir.once),
    .flush  (tbl_dir.flush)
  );

  suspension_reg u_susp (
    .clk, .rst_n,
    .hw_set (take && matched && tbl_dir.susp),
    .sw_we  (reg_we && (reg_sel == REG_SUSP)),
    .sw_data(reg_wdata[0]),
    .susp,
    .notify (upd_req)
  );

  // ---- communication queue
  comm_queue u_queue (
    .clk, .rst_n,
    .in_valid (cm_valid && fwd),
    .in_ready (pkt_ready),
    .in_pkt   (ev),
    .reg_we   (reg_we && (reg_sel != REG_SUSP)),
    .reg_sel,
    .reg_wdata,
    .mem_req,
    .mem_addr,
    .mem_wdata,
    .mem_gnt,
    .base     (),
    .qend     (),
    .head     (q_head),
    .tail     (q_tail),
    .full     (q_full)
  );

  // ---- commit handshake
  assign cm_ready = take && (phase_d_q || !cm.is_mem);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       phase_d_q <= 1'b0;
    else if (take && !phase_d_q && cm.is_mem) phase_d_q <= 1'b1;
    else if (cm_ready)                phase_d_q <= 1'b0;
  end

  // the commit stream holds an instruction until it is accepted
  a_commit_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (cm_valid && !cm_ready) |=> cm_valid && $stable(cm));

endmodule
