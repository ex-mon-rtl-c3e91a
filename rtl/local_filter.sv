// local_filter: the Ex-Mon local filter ("Filter Table").
//
// A small fully associative cache of events that were recently forwarded
// with the ONCE type bit set.  An event whose (address, I/D flag) pair is in
// the filter is not forwarded again; a FLUSH event empties the filter.  The
// published design asks for 32 entries with least-recently-used
// replacement; how the LRU order is kept is this design's choice: every
// entry carries an age, the ages always form a permutation of
// 0..ENTRIES-1, a used entry gets age 0 and every younger entry ages by one.
// The victim of an insertion is the lowest-numbered empty entry, otherwise
// the entry of age ENTRIES-1.
//
// Lookup (lk_addr, lk_id -> lk_hit) is combinational.  When upd_en is high
// the event on the lookup port is taken, and at the next clock edge:
//   flush           : every entry is emptied; with ins also set the event is
//                     then entered into entry 0;
//   hit             : the hit entry becomes most recently used;
//   miss and ins    : the event is entered into the victim entry.
// Reset empties the filter.
module local_filter
  import exmon_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] lk_addr,
  input  id_flag_e      lk_id,
  output logic          lk_hit,
  input  logic          upd_en,
  input  logic          ins,
  input  logic          flush
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [AW-1:0] addr_q  [ENTRIES];
  id_flag_e      id_q    [ENTRIES];
  logic [IW-1:0] age_q   [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  logic [ENTRIES-1:0] match;
  logic [IW-1:0]      hit_idx;
  logic [IW-1:0]      victim;

  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      match[i] = valid_q[i] && (addr_q[i] == lk_addr) && (id_q[i] == lk_id);
    end
  end

  always_comb begin
    lk_hit    = 1'b0;
    hit_idx   = '0;
    victim    = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        lk_hit  = 1'b1;
        hit_idx = IW'(i);
      end
    end
    // oldest entry first, an empty entry takes precedence
    for (int i = 0; i < ENTRIES; i++) begin
      if (age_q[i] == IW'(ENTRIES - 1)) victim = IW'(i);
    end
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        victim    = IW'(i);
      end
    end
  end

  // entry that becomes most recently used this cycle
  logic [IW-1:0] use_idx;
  assign use_idx = lk_hit ? hit_idx : victim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) age_q[i] <= IW'(i);
    end else if (upd_en) begin
      if (flush) begin
        valid_q <= '0;
        for (int i = 0; i < ENTRIES; i++) age_q[i] <= IW'(i);
        if (ins) valid_q[0] <= 1'b1;
      end else if (lk_hit || ins) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (age_q[i] < age_q[use_idx]) age_q[i] <= age_q[i] + 1'b1;
        end
        age_q[use_idx] <= '0;
        if (!lk_hit) valid_q[use_idx] <= 1'b1;
      end
    end
  end

  // address storage needs no reset: an entry is read only while valid
  always_ff @(posedge clk) begin
    if (upd_en && ins && (flush || !lk_hit)) begin
      addr_q[flush ? '0 : use_idx] <= lk_addr;
      id_q  [flush ? '0 : use_idx] <= lk_id;
    end
  end

endmodule
