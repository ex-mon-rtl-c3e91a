// ext_table: the Ex-Mon extraction table.
//
// Two parts, as in the published design.  The TAG part is a ternary CAM:
// every entry holds an address key, a care mask (a cleared mask bit is a
// "don't care" cell, so one entry can cover an address range such as
// 0x8000aXXX) and an I/D flag.  The DIRECTION part is a small memory whose
// word lines are driven by the CAM match lines; the selected word gives the
// valid bit, the suspension bit and the two type bits ONCE and FLUSH.
//
// Lookup is combinational: present lk_addr/lk_id and read lk_hit and
// lk_dir in the same cycle.  lk_hit is the "valid" output: some entry whose
// DIRECTION valid bit is set matches.  When several entries match, the one
// with the lowest index wins (the priority rule is this design's choice).
// Entries are written by monitor software through the wr_* port; a write
// takes effect at the next clock edge.  Reset clears every valid bit, so an
// empty table matches nothing.  Bypassing the table while the suspension
// register is set is done by the caller.
module ext_table
  import exmon_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup port
  input  logic [AW-1:0]              lk_addr,
  input  id_flag_e                   lk_id,
  output logic                       lk_hit,
  output direction_t                 lk_dir,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  // software write port
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  table_entry_t               wr_entry
);

  localparam int unsigned IW = $clog2(ENTRIES);

  tag_t       tag_q [ENTRIES];
  direction_t dir_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  // TAG and DIRECTION storage; only the valid bits need a reset value.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_idx] <= wr_entry.tag;
      dir_q[wr_idx] <= wr_entry.dir;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_entry.dir.valid;
  end

  // Match lines of the ternary CAM.
  logic [ENTRIES-1:0] match;
  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      match[i] = valid_q[i]
               && (tag_q[i].id == lk_id)
               && (((lk_addr ^ tag_q[i].key) & tag_q[i].care) == '0);
    end
  end

  // Lowest matching index drives the DIRECTION word line: isolate the
  // lowest set match bit, then read index and word out with an AND-OR.
  logic [ENTRIES-1:0] first;
  assign first  = match & (~match + 1'b1);
  assign lk_hit = |match;

  always_comb begin
    lk_idx = '0;
    lk_dir = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      lk_idx |= {IW{first[i]}} & IW'(i);
      lk_dir |= {$bits(direction_t){first[i]}} & dir_q[i];
    end
  end

endmodule
