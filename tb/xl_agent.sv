// xl_agent: drives and checks one core's extraction logic in a testbench.
//
// It plays the three parties around the extraction hardware:
//   * the monitored core: a commit stream shaped like the memory-bug
//     detection workload (argument set-up and calls of malloc and free,
//     heap loads and stores with locality, stack accesses that are not
//     monitored, jumps into a code region whose entries are not in the
//     table, and a final exit epilogue);
//   * shared memory: stores to the communication queue are captured, with
//     random grant delays in the slow phases;
//   * the monitor program: it reads packets between TAIL and HEAD and writes
//     TAIL back, fast in some phases and slower than the producer in others
//     so that the queue fills; it initialises the table for the workload
//     and, after every update request, rewrites a table entry and clears
//     the suspension register.
// Every packet read back is compared with exmon_ref_pkg's model.  When the
// queue is not full and memory grants at once, an instruction must commit
// in one cycle, a load or store in two.  Configuration writes are issued
// only between instructions, so the model can apply them in order.  At the
// end every mechanism must have happened at least once.
module xl_agent
  import exmon_pkg::*;
  import exmon_ref_pkg::*;
#(
  parameter int unsigned CORE           = 0,
  parameter int unsigned TABLE_ENTRIES  = 1024,
  parameter int unsigned FILTER_ENTRIES = 32,
  parameter int unsigned N_INSTR        = 4000,
  parameter int unsigned QSLOTS         = 64,
  parameter int unsigned PHASE_LEN      = 400,
  parameter bit          STRESS_QUEUE   = 1,    // queue must fill and wrap
  parameter int unsigned SLOW_RATE      = 10    // slow monitor: one packet per SLOW_RATE cycles on average
) (
  input  logic                             clk,
  input  logic                             rst_n,
  output logic                             cm_valid,
  input  logic                             cm_ready,
  output commit_t                          cm,
  output logic                             tbl_we,
  output logic [$clog2(TABLE_ENTRIES)-1:0] tbl_idx,
  output table_entry_t                     tbl_entry,
  output logic                             reg_we,
  output reg_sel_e                         reg_sel,
  output logic [AW-1:0]                    reg_wdata,
  input  logic                             mem_req,
  input  logic [AW-1:0]                    mem_addr,
  input  packet_t                          mem_wdata,
  output logic                             mem_gnt,
  input  logic                             upd_req,
  input  logic                             susp,
  input  logic [AW-1:0]                    q_head,
  input  logic [AW-1:0]                    q_tail,
  input  logic                             q_full,
  output logic                             done,
  output int                               checks,
  output int                               failures
);

  localparam logic [AW-1:0] QBASE = 32'h1000_0000 + CORE * 32'h0010_0000;
  localparam logic [AW-1:0] QEND  = QBASE + QSLOTS * PKT_BYTES;
  // program layout of the workload
  localparam logic [AW-1:0] CODE      = 32'h0040_0000;
  localparam logic [AW-1:0] ARG_MALLOC = 32'h0040_00fc;
  localparam logic [AW-1:0] PC_MALLOC  = 32'h0040_0100;
  localparam logic [AW-1:0] ARG_FREE   = 32'h0040_01fc;
  localparam logic [AW-1:0] PC_FREE    = 32'h0040_0200;
  localparam logic [AW-1:0] PC_EXIT    = 32'h0040_0ff0;
  localparam logic [AW-1:0] LIB        = 32'h0060_0000;   // library code, not in the table
  localparam logic [AW-1:0] FAR        = 32'h0050_0000;   // code whose entries are not loaded
  localparam logic [AW-1:0] HEAP       = 32'h8000_0000;
  localparam logic [AW-1:0] STACK      = 32'h7fff_f000;
  // calls (which flush the filter) per 1000 instructions, rarer for larger
  // filters so that the filter still fills up between calls
  localparam int unsigned P_MALLOC = 200 / FILTER_ENTRIES;
  localparam int unsigned P_FREE   = P_MALLOC + 160 / FILTER_ENTRIES;

  typedef struct packed {
    logic          tbl;     // 1: table write, 0: register write
    logic [15:0]   idx;
    table_entry_t  e;
    reg_sel_e      sel;
    logic [AW-1:0] data;
  } cfg_t;

  exmon_ref_pkg::xl_model model;
  cfg_t          cfg_q [$];
  packet_t       exp_q [$];
  packet_t       got_q [$];
  packet_t       mem [logic [AW-1:0]];
  logic [AW-1:0] m_tail;

  int unsigned n_stall, n_full, n_bp, n_wrap, n_notify, n_timed, n_upd, n_done;

  function automatic table_entry_t ent(logic [AW-1:0] key, logic [AW-1:0] care, id_flag_e id,
                                       bit s, bit o, bit f);
    table_entry_t e;
    e.tag.key = key; e.tag.care = care; e.tag.id = id;
    e.dir = '{valid: 1'b1, susp: s, once: o, flush: f};
    return e;
  endfunction

  function automatic void push_tbl(int idx, table_entry_t e);
    cfg_t c;
    c = '0; c.tbl = 1; c.idx = idx[15:0]; c.e = e;
    cfg_q.push_back(c);
  endfunction

  function automatic void push_reg(reg_sel_e s, logic [AW-1:0] d);
    cfg_t c;
    c = '0; c.tbl = 0; c.sel = s; c.data = d;
    cfg_q.push_back(c);
  endfunction

  // next committed instruction of the workload
  logic [AW-1:0] pc;
  int unsigned   lib_left;
  function automatic commit_t next_instr(bit last);
    commit_t c;
    int unsigned r;
    c = '0;
    r = $urandom_range(0, 999);
    if (last)                   pc = PC_EXIT;
    else if (lib_left > 0)      begin lib_left--; if (lib_left == 0) pc = CODE + 32'h400; end
    else if (pc == PC_MALLOC || pc == PC_FREE) begin pc = LIB; lib_left = $urandom_range(2, 8); end
    else if (r < P_MALLOC)      pc = ARG_MALLOC;
    else if (r < P_FREE)        pc = ARG_FREE;
    else if (r < P_FREE + 7)            pc = FAR + 32'($urandom_range(0, 255)) * 4;
    else if (pc == ARG_MALLOC || pc == ARG_FREE) pc = pc + 4;
    else                        pc = CODE + 32'h400 + ((pc + 4) & 32'h3ff);
    if (lib_left > 0 && pc != LIB) pc = pc + 4;
    c.pc = pc;
    c.result = $urandom;
    if (!last && $urandom_range(0, 9) < 4) begin
      c.is_mem = 1;
      c.mem_addr = ($urandom_range(0, 9) < 6) ? HEAP + 32'($urandom_range(0, 3 * FILTER_ENTRIES)) * 4
                                              : STACK + 32'($urandom_range(0, 255)) * 4;
      c.mem_value = $urandom;
    end
    return c;
  endfunction

  initial begin
    repeat (N_INSTR * 60 + 20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  commit_t cur;

  initial begin : main
    int unsigned issued, cycles, susp_wait, upd_cnt, phase_i;
    bit          in_flight, fast, clean, fire_mem, fire_cm, drv_cfg, drv_tail, was_susp;
    cfg_t        c;

    model = new(TABLE_ENTRIES, FILTER_ENTRIES);
    checks = 0; failures = 0; done = 0;
    cm_valid = 0; cm = '0; tbl_we = 0; tbl_idx = '0; tbl_entry = '0;
    reg_we = 0; reg_sel = REG_BASE; reg_wdata = '0; mem_gnt = 0;
    pc = CODE + 32'h400; lib_left = 0;
    issued = 0; susp_wait = 0; upd_cnt = 0; in_flight = 0; cycles = 0; clean = 1;
    m_tail = QBASE;

    // monitor initialisation: queue registers, then the event list
    push_reg(REG_BASE, QBASE); push_reg(REG_END, QEND);
    push_reg(REG_HEAD, QBASE); push_reg(REG_TAIL, QBASE);
    push_tbl(0, ent(PC_MALLOC, '1, ID_I, 1, 0, 1));          // malloc call: suspend, flush
    push_tbl(1, ent(PC_FREE,   '1, ID_I, 0, 0, 1));          // free call: flush
    push_tbl(2, ent(ARG_MALLOC, '1, ID_I, 0, 0, 0));         // argument set-up
    push_tbl(3, ent(ARG_FREE,   '1, ID_I, 0, 0, 0));
    push_tbl(4, ent(PC_EXIT,    '1, ID_I, 0, 0, 0));         // epilogue
    push_tbl(5, ent(HEAP, 32'hfff0_0000, ID_D, 0, 1, 0));    // whole heap, forward once
    push_tbl(6, ent(FAR,  32'hffff_0000, ID_I, 1, 0, 0));    // reserved: entries not loaded

    wait (rst_n);
    forever begin
      @(negedge clk);
      phase_i = issued / PHASE_LEN;
      fast = (phase_i % 2) == 0;
      mem_gnt = fast || ($urandom_range(0, 3) != 0);
      tbl_we = 0; reg_we = 0; drv_cfg = 0; drv_tail = 0;
      // the instruction in flight keeps the stream; otherwise configuration
      // writes go first, then the next instruction
      if (!in_flight) begin
        cm_valid = 0;
        if (cfg_q.size() > 0) begin
          c = cfg_q.pop_front();
          drv_cfg = 1;
          if (c.tbl) begin
            tbl_we = 1; tbl_idx = c.idx[$clog2(TABLE_ENTRIES)-1:0]; tbl_entry = c.e;
          end else begin
            reg_we = 1; reg_sel = c.sel; reg_wdata = c.data;
          end
        end else if (issued < N_INSTR) begin
          cur = next_instr(issued == N_INSTR - 1);
          cm = cur; cm_valid = 1; in_flight = 1; cycles = 0; clean = 1;
          issued++;
        end
      end
      // the monitor consumes when the register port is free
      if (!drv_cfg && m_tail != q_head && ($urandom_range(0, fast ? 0 : SLOW_RATE - 1) == 0)) begin
        got_q.push_back(mem.exists(m_tail) ? mem[m_tail] : '0);
        mem.delete(m_tail);
        m_tail = (m_tail + PKT_BYTES >= QEND) ? QBASE : m_tail + PKT_BYTES;
        reg_we = 1; reg_sel = REG_TAIL; reg_wdata = m_tail; drv_tail = 1;
      end
      #1;
      fire_mem = mem_req && mem_gnt;
      fire_cm  = cm_valid && cm_ready;
      if (cm_valid) cycles++;
      if (q_full || !mem_gnt) clean = 0;
      if (q_full && cm_valid && !cm_ready) n_full++;
      if (mem_req && !mem_gnt) n_bp++;
      @(posedge clk);
      if (fire_mem) begin
        mem[mem_addr] = mem_wdata;
        if (mem_addr + PKT_BYTES >= QEND) n_wrap++;
      end
      if (fire_cm) begin
        packet_t ev;
        in_flight = 0;
        was_susp = model.susp;
        ev = '{addr: cur.pc, id: ID_I, value: cur.result};
        if (model.process(ev)) exp_q.push_back(ev);
        if (cur.is_mem) begin
          ev = '{addr: cur.mem_addr, id: ID_D, value: cur.mem_value};
          if (model.process(ev)) exp_q.push_back(ev);
        end
        if (clean) begin
          checks++; n_timed++;
          if (cycles != 1 + cur.is_mem) begin
            failures++;
            $display("FAIL core %0d: instruction took %0d cycles, expected %0d", CORE, cycles, 1 + cur.is_mem);
          end
        end else if (cycles > 1 + cur.is_mem) n_stall++;
        // monitor software: after an update request, let a few instructions
        // through, then update the table and clear the suspension register
        if (model.susp && !was_susp) susp_wait = $urandom_range(1, 6);
        else if (model.susp && susp_wait > 0) begin
          susp_wait--;
          if (susp_wait == 0) begin
            push_tbl(8 + (upd_cnt % 8), ent(FAR + 32'($urandom_range(0, 255)) * 4, '1, ID_I, 0, 0, 0));
            push_reg(REG_SUSP, 0);
            upd_cnt++;
          end
        end
      end
      if (drv_cfg) begin
        if (c.tbl) begin model.write_entry(c.idx, c.e); n_upd++; end
        else if (c.sel == REG_SUSP) model.write_susp(c.data[0]);
      end
      #1;
      if (upd_req) n_notify++;
      if (!in_flight) begin
        checks++;
        if (susp !== model.susp) begin
          failures++;
          $display("FAIL core %0d: suspension register %0b, expected %0b", CORE, susp, model.susp);
        end
      end
      while (got_q.size() > 0 && exp_q.size() > 0) begin
        packet_t g, e;
        g = got_q.pop_front(); e = exp_q.pop_front();
        checks++;
        if (g !== e) begin
          failures++;
          $display("FAIL core %0d: packet %h/%0d/%h, expected %h/%0d/%h",
                   CORE, g.addr, g.id, g.value, e.addr, e.id, e.value);
        end
      end
      if (got_q.size() > 0) begin
        failures++;
        $display("FAIL core %0d: packet in the queue that should not be there", CORE);
        got_q.delete();
      end
      if (issued == N_INSTR && !in_flight && cfg_q.size() == 0 && exp_q.size() == 0
          && m_tail == q_head && !done) begin
        n_done++;
        if (n_done > 4) break;
      end
    end
    // end of run: counts of each mechanism
    checks++;
    if (n_notify != model.n_susp_set) begin
      failures++;
      $display("FAIL core %0d: %0d update requests, expected %0d", CORE, n_notify, model.n_susp_set);
    end
    $display("core %0d: fwd=%0d I-match=%0d D-match=%0d range=%0d filtered=%0d once-insert=%0d evict=%0d flush=%0d",
             CORE, model.n_fwd, model.n_match_i, model.n_match_d, model.n_range, model.n_filtered,
             model.n_once_ins, model.n_evict, model.n_flush);
    $display("core %0d: suspend=%0d bypassed=%0d sw-clear=%0d table-updates=%0d stalls=%0d full-cycles=%0d mem-backpressure=%0d wraps=%0d timed=%0d",
             CORE, model.n_susp_set, model.n_bypassed, model.n_sw_clear, n_upd, n_stall, n_full, n_bp, n_wrap, n_timed);
    checks++;
    if (model.n_fwd == 0 || model.n_match_i == 0 || model.n_match_d == 0 || model.n_range == 0 ||
        model.n_filtered == 0 || model.n_once_ins == 0 || model.n_evict == 0 || model.n_flush == 0 ||
        model.n_susp_set == 0 || model.n_bypassed == 0 || model.n_sw_clear == 0 || n_upd == 0 ||
        (STRESS_QUEUE && (n_stall == 0 || n_full == 0 || n_bp == 0 || n_wrap == 0)) || n_timed == 0) begin
      failures++;
      $display("FAIL core %0d: a mechanism never happened", CORE);
    end
    done = 1;
  end

endmodule
