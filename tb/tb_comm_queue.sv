// tb_comm_queue: self-checking test of the communication-queue writer.
//
// A producer offers random packets, a memory model grants stores after a
// random delay, and a monitor model consumes slots at a random rate by
// advancing TAIL.  The testbench checks that every packet is stored, in
// order, at the slot the circular-buffer rule gives (wrapping from END to
// BASE), that nothing is stored while the queue is full, that the full flag
// matches the model, and that a packet offered to an empty buffer with a
// granting memory is stored in the next cycle.  It counts wraps, full
// stalls and memory back-pressure and fails if any never happened.
module tb_comm_queue;
  import exmon_pkg::*;

  localparam logic [AW-1:0] BASE = 32'h1000_0000;
  localparam int unsigned SLOTS = 8;
  localparam logic [AW-1:0] QEND = BASE + SLOTS * PKT_BYTES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0, in_ready;
  packet_t       in_pkt = '0;
  logic          reg_we = 0;
  reg_sel_e      reg_sel = REG_BASE;
  logic [AW-1:0] reg_wdata = 0;
  logic          mem_req;
  logic [AW-1:0] mem_addr;
  packet_t       mem_wdata;
  logic          mem_gnt = 0;
  logic [AW-1:0] base, qend, head, tail;
  logic          full;

  comm_queue dut (.*);

  int checks = 0, failures = 0;
  int n_wrap = 0, n_full = 0, n_bp = 0, n_lat = 0;
  packet_t sent [$];
  logic [AW-1:0] m_head, m_tail;
  int unsigned n_stored = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p + PKT_BYTES >= QEND) ? BASE : p + PKT_BYTES;
  endfunction

  task automatic wr(reg_sel_e s, logic [AW-1:0] d);
    @(negedge clk); reg_we = 1; reg_sel = s; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  bit rate_hi;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(REG_BASE, BASE); wr(REG_END, QEND); wr(REG_HEAD, BASE); wr(REG_TAIL, BASE);
    m_head = BASE; m_tail = BASE;
    // random traffic; a packet offered to an empty buffer must be stored
    // in the next cycle when the queue has room and the memory grants
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit fire_in, fire_mem, lat_case;
      rate_hi = (cyc / 2000) % 2 == 1;
      @(negedge clk);
      mem_gnt = $urandom_range(0, 3) != 0;
      if (!in_valid && $urandom_range(0, 1) == 1) begin
        in_valid = 1;
        in_pkt = '{addr: $urandom, id: id_flag_e'($urandom_range(0, 1)), value: $urandom};
        sent.push_back(in_pkt);
      end
      // monitor consumes one slot now and then, faster in alternate phases
      reg_we = 0;
      if (m_tail != m_head && $urandom_range(0, rate_hi ? 1 : 6) == 0) begin
        m_tail = nxt(m_tail);
        reg_we = 1; reg_sel = REG_TAIL; reg_wdata = m_tail;
      end
      #1;
      checks++;
      if (full !== (nxt(m_head) == tail)) begin
        failures++; $display("FAIL full flag");
      end
      if (full && mem_req === 0 && in_valid && !in_ready) n_full++;
      if (mem_req && !mem_gnt) n_bp++;
      if (full && mem_req) begin failures++; $display("FAIL store while full"); end
      fire_in  = in_valid && in_ready;
      fire_mem = mem_req && mem_gnt;
      lat_case = fire_in && !dut.buf_valid;
      if (fire_mem) begin
        packet_t e;
        checks++;
        e = sent.pop_front();
        if (mem_addr !== m_head || mem_wdata !== e) begin
          failures++;
          $display("FAIL store at %h (expected %h) data %h (expected %h)", mem_addr, m_head, mem_wdata, e);
        end
        if (nxt(m_head) == BASE) n_wrap++;
        m_head = nxt(m_head);
        n_stored++;
      end
      @(posedge clk);
      #1;
      if (fire_in) in_valid = 0;
      if (lat_case && !dut.full) begin
        // room for it: the store must be requested in this cycle
        checks++;
        if (!mem_req) begin failures++; $display("FAIL latency"); end
        else n_lat++;
      end
    end
    checks++;
    if (head !== m_head) begin failures++; $display("FAIL head %h vs %h", head, m_head); end
    if (n_wrap == 0 || n_full == 0 || n_bp == 0 || n_lat == 0) begin
      failures++;
      $display("FAIL coverage wrap=%0d full=%0d backpressure=%0d", n_wrap, n_full, n_bp);
    end
    $display("stored=%0d wraps=%0d full-stall cycles=%0d backpressure=%0d", n_stored, n_wrap, n_full, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
