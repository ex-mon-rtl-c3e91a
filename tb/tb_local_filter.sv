// tb_local_filter: self-checking test of the local filter.
//
// A reference model keeps the filter's contents as a list in most- to
// least-recently-used order: a hit moves the pair to the front, an insert
// on a miss pushes it to the front and drops the last one when the list is
// full, a flush empties it.  Each cycle the testbench presents an event,
// compares lk_hit with membership in the model and applies a random
// update.  Addresses come from a small pool so that hits, evictions of the
// least recently used entry and flushes all happen often.
module tb_local_filter;
  import exmon_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] lk_addr = 0;
  id_flag_e      lk_id = ID_I;
  logic          lk_hit;
  logic          upd_en = 0, ins = 0, flush = 0;

  local_filter #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_evict = 0, n_flush = 0;
  logic [AW:0] lru [$];   // {id, addr}, front = most recently used

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(logic [AW:0] k);
    foreach (lru[i]) if (lru[i] == k) return i;
    return -1;
  endfunction

  task automatic step(logic [AW-1:0] a, id_flag_e id, bit u, bit i, bit f);
    int pos; logic [AW:0] k;
    k = {id, a};
    @(negedge clk);
    lk_addr = a; lk_id = id; upd_en = u; ins = i; flush = f;
    #1;
    pos = find(k);
    checks++;
    if (lk_hit !== (pos >= 0)) begin
      failures++;
      $display("FAIL %h/%0d hit=%0b expected %0b", a, id, lk_hit, pos >= 0);
    end
    if (u) begin
      if (f) begin
        lru.delete(); n_flush++;
        if (i) lru.push_front(k);
      end else if (pos >= 0) begin
        n_hit++;
        lru.delete(pos); lru.push_front(k);
      end else if (i) begin
        if (lru.size() == N) begin void'(lru.pop_back()); n_evict++; end
        lru.push_front(k);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill, then check that the least recently used pair is evicted
    for (int k = 0; k < N; k++) step(32'h1000 + 4*k, ID_D, 1, 1, 0);
    step(32'h1000, ID_D, 1, 1, 0);            // touch the oldest: now MRU
    step(32'h2000, ID_D, 1, 1, 0);            // evicts 0x1004
    step(32'h1004, ID_D, 0, 0, 0);            // must miss
    step(32'h1000, ID_D, 0, 0, 0);            // must hit
    step(32'h1000, ID_I, 0, 0, 0);            // I/D flag is part of the key
    step(32'h0, ID_I, 1, 0, 1);               // flush
    step(32'h1000, ID_D, 0, 0, 0);            // gone
    for (int k = 0; k < 20000; k++)
      step(32'h4000 + 4*$urandom_range(0, 2*N), id_flag_e'($urandom_range(0, 1) & $urandom_range(0, 1)),
           $urandom_range(0, 3) != 0, $urandom_range(0, 3) != 0, $urandom_range(0, 60) == 0);
    if (n_hit == 0 || n_evict == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d evict=%0d flush=%0d", n_hit, n_evict, n_flush);
    end
    $display("hits=%0d evictions=%0d flushes=%0d", n_hit, n_evict, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
