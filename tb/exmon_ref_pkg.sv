// exmon_ref_pkg: reference model of one Ex-Mon extraction logic, for the
// testbenches.  It is written independently of the RTL, as a plain
// sequential description of the rules: events are processed one at a time
// in commit order (PC lookup, then data-address lookup), the table is an
// array searched lowest index first, and the local filter is a list kept in
// most- to least-recently-used order.  process() returns whether the event
// is forwarded and keeps counts of every mechanism that fired.
package exmon_ref_pkg;
  import exmon_pkg::*;

  class xl_model;
    int unsigned   n_entries, n_filter;
    table_entry_t  tbl [];
    logic [AW:0]   lru [$];      // {id, addr}, front = most recently used
    bit            susp;
    // how often each mechanism happened
    int unsigned   n_match_i, n_match_d, n_range, n_filtered, n_flush,
                   n_evict, n_once_ins, n_susp_set, n_bypassed, n_sw_clear, n_fwd;

    function new(int unsigned entries, int unsigned filter);
      n_entries = entries; n_filter = filter;
      tbl = new[entries];
      foreach (tbl[i]) tbl[i] = '0;
      susp = 0;
    endfunction

    function void write_entry(int idx, table_entry_t e);
      tbl[idx] = e;
    endfunction

    function void write_susp(bit v);
      if (susp && !v) n_sw_clear++;
      susp = v;
    endfunction

    function automatic bit process(packet_t ev);
      int hit; logic [AW:0] k; int pos;
      if (susp) begin
        n_bypassed++; n_fwd++;
        return 1;
      end
      hit = -1;
      for (int i = 0; i < n_entries; i++)
        if (tbl[i].dir.valid && tbl[i].tag.id == ev.id &&
            ((ev.addr ^ tbl[i].tag.key) & tbl[i].tag.care) == 0) begin
          hit = i; break;
        end
      if (hit < 0) return 0;
      if (ev.id == ID_I) n_match_i++; else n_match_d++;
      if (tbl[hit].tag.care != '1) n_range++;
      k = {ev.id, ev.addr};
      pos = -1;
      foreach (lru[i]) if (lru[i] == k) begin pos = i; break; end
      if (tbl[hit].dir.susp) n_susp_set++;
      if (tbl[hit].dir.susp) susp = 1;
      if (tbl[hit].dir.flush) begin
        n_flush++;
        lru.delete();
        if (tbl[hit].dir.once) lru.push_front(k);
      end else if (pos >= 0) begin
        lru.delete(pos); lru.push_front(k);
      end else if (tbl[hit].dir.once) begin
        n_once_ins++;
        if (lru.size() == n_filter) begin void'(lru.pop_back()); n_evict++; end
        lru.push_front(k);
      end
      if (pos >= 0) begin n_filtered++; return 0; end
      n_fwd++;
      return 1;
    endfunction
  endclass
endpackage
