// comm_queue: writer side of the Ex-Mon communication queue.
//
// The communication queue is a circular buffer in shared memory, reached by
// ordinary stores.  Four registers describe it: BASE and END bound the
// buffer, HEAD is the next free slot (advanced by this hardware) and TAIL
// the next slot the monitor will consume (written by the monitor as it
// reads).  Each forwarded event is packed into one slot of PKT_BYTES bytes
// holding the packet fields Address, I/D flag and Value.
//
// The queue is full when advancing HEAD would make it equal to TAIL (one
// slot stays unused so that HEAD == TAIL means empty; END is the first
// address past the buffer).  While it is full a packet cannot be written and
// the monitored core is stalled through the in_ready handshake: this is the
// stall the published design names as the main source of overhead.
//
// Interface: in_valid/in_ready accept one packet per cycle into a one-entry
// buffer; the buffer drives a store request mem_req/mem_addr/mem_wdata that
// completes on mem_gnt, after which HEAD advances, wrapping from END to
// BASE.  The monitor-side register writes (reg_we/reg_sel/reg_wdata) take
// effect at the next edge and override the hardware update of HEAD.  The
// buffer, the slot size, the full rule and the register map are this
// design's choices.
module comm_queue
  import exmon_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // packets from the extraction logic
  input  logic          in_valid,
  output logic          in_ready,
  input  packet_t       in_pkt,
  // register writes from monitor software
  input  logic          reg_we,
  input  reg_sel_e      reg_sel,
  input  logic [AW-1:0] reg_wdata,
  // store port to shared memory
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  output packet_t       mem_wdata,
  input  logic          mem_gnt,
  // status
  output logic [AW-1:0] base,
  output logic [AW-1:0] qend,
  output logic [AW-1:0] head,
  output logic [AW-1:0] tail,
  output logic          full
);

  logic          buf_valid;
  packet_t       buf_pkt;
  logic [AW-1:0] head_next;
  logic [AW:0]   head_inc;
  logic          mem_fire;

  assign head_inc  = {1'b0, head} + (AW+1)'(PKT_BYTES);
  assign head_next = (head_inc >= {1'b0, qend}) ? base : head_inc[AW-1:0];
  assign full      = (head_next == tail);

  assign mem_req   = buf_valid && !full;
  assign mem_addr  = head;
  assign mem_wdata = buf_pkt;
  assign mem_fire  = mem_req && mem_gnt;
  assign in_ready  = !buf_valid || mem_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0;
    end else if (in_ready) begin
      buf_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) buf_pkt <= in_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base <= '0;
      qend <= '0;
      head <= '0;
      tail <= '0;
    end else begin
      if (mem_fire) head <= head_next;
      if (reg_we) begin
        unique case (reg_sel)
          REG_BASE: base <= reg_wdata;
          REG_END:  qend <= reg_wdata;
          REG_HEAD: head <= reg_wdata;
          REG_TAIL: tail <= reg_wdata;
          default:  ;
        endcase
      end
    end
  end

  // a store is held stable until the memory grants it
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (mem_req && !mem_gnt && !reg_we) |=> mem_req && $stable(mem_addr) && $stable(mem_wdata);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
