// tb_ext_table: self-checking test of the extraction table.
//
// Writes entries through the software port (exact PC keys, a ternary range
// entry 0x8000aXXX, overlapping entries, entries with the valid bit clear)
// and compares every lookup with a reference model kept in the testbench:
// the lowest-indexed valid entry whose cared-for bits and I/D flag match
// wins.  Then random entries and random lookups, biased towards hits.
module tb_ext_table;
  import exmon_pkg::*;

  localparam int unsigned N = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] lk_addr;
  id_flag_e      lk_id;
  logic          lk_hit;
  direction_t    lk_dir;
  logic [$clog2(N)-1:0] lk_idx;
  logic          wr_en = 0;
  logic [$clog2(N)-1:0] wr_idx;
  table_entry_t  wr_entry;

  ext_table #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  table_entry_t model [N];
  bit           mvalid [N];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int idx, logic [AW-1:0] key, logic [AW-1:0] care, id_flag_e id, direction_t d);
    @(negedge clk);
    wr_en = 1; wr_idx = idx[$clog2(N)-1:0];
    wr_entry.tag.key = key; wr_entry.tag.care = care; wr_entry.tag.id = id; wr_entry.dir = d;
    @(negedge clk);
    wr_en = 0;
    model[idx] = wr_entry; mvalid[idx] = d.valid;
  endtask

  task automatic lookup(logic [AW-1:0] a, id_flag_e id);
    bit eh; int ei; direction_t ed;
    eh = 0; ei = 0; ed = '0;
    for (int i = N-1; i >= 0; i--)
      if (mvalid[i] && model[i].tag.id == id && ((a ^ model[i].tag.key) & model[i].tag.care) == 0) begin
        eh = 1; ei = i; ed = model[i].dir;
      end
    @(negedge clk);
    lk_addr = a; lk_id = id;
    #1;
    checks++;
    if (lk_hit !== eh || (eh && (lk_idx != ei[$clog2(N)-1:0] || lk_dir !== ed))) begin
      failures++;
      $display("FAIL lookup %h/%0d: hit=%0b idx=%0d dir=%b, expected hit=%0b idx=%0d dir=%b",
               a, id, lk_hit, lk_idx, lk_dir, eh, ei, ed);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) mvalid[i] = 0;
    lk_addr = 0; lk_id = ID_I; wr_idx = 0; wr_entry = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // empty table matches nothing
    lookup(32'h0, ID_I);
    lookup(32'h8000_a010, ID_D);
    // PC entry with FLUSH + suspension, data range entry with ONCE
    write(3, 32'h0040_1000, '1, ID_I, '{valid:1, susp:1, once:0, flush:1});
    write(7, 32'h8000_a000, 32'hffff_f000, ID_D, '{valid:1, susp:0, once:1, flush:0});
    lookup(32'h0040_1000, ID_I);
    lookup(32'h0040_1000, ID_D);       // wrong I/D flag
    lookup(32'h0040_1004, ID_I);
    lookup(32'h8000_a000, ID_D);
    lookup(32'h8000_afff, ID_D);
    lookup(32'h8000_b000, ID_D);
    lookup(32'h8000_9fff, ID_D);
    lookup(32'h8000_a123, ID_I);
    // overlapping entry of lower index wins
    write(1, 32'h8000_a100, 32'hffff_ff00, ID_D, '{valid:1, susp:1, once:0, flush:0});
    lookup(32'h8000_a1ab, ID_D);
    lookup(32'h8000_a2ab, ID_D);
    // clearing valid removes the entry
    write(1, 32'h8000_a100, 32'hffff_ff00, ID_D, '{valid:0, susp:0, once:0, flush:0});
    lookup(32'h8000_a1ab, ID_D);
    // random fill and random lookups
    for (int k = 0; k < 200; k++) begin
      logic [AW-1:0] care;
      care = ($urandom_range(0, 3) == 0) ? ~((32'h1 << $urandom_range(0, 16)) - 1) : '1;
      write($urandom_range(0, N-1), {$urandom_range(0, 3), 28'h0, 2'b00} | ($urandom & 32'h0000_fffc), care,
            id_flag_e'($urandom_range(0, 1)),
            '{valid:($urandom_range(0, 7) != 0), susp:$urandom_range(0, 1), once:$urandom_range(0, 1), flush:$urandom_range(0, 1)});
    end
    for (int k = 0; k < 2000; k++) begin
      int j; logic [AW-1:0] a;
      j = $urandom_range(0, N-1);
      a = ($urandom_range(0, 1) == 1) ? (model[j].tag.key ^ ($urandom & ~model[j].tag.care)) : $urandom;
      lookup(a, ($urandom_range(0, 4) == 0) ? id_flag_e'(~model[j].tag.id) : model[j].tag.id);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
