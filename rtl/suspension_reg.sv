// suspension_reg: the one-bit Ex-Mon suspension register.
//
// While the register is set the extraction table is bypassed and every
// event is forwarded to the monitor.  Hardware sets it when an event
// matches a table entry whose suspension bit is 1 (the entry's bit is
// copied in; a copy of 0 into a cleared register changes nothing, so only
// the setting case needs logic).  Monitor software clears it, or sets it,
// through its register write port when an update of the table is done.
//
// Timing: hw_set and the software write act at the next clock edge, so the
// table is bypassed from the event after the matching one.  notify is a
// one-cycle pulse in the cycle after hardware has set the register: the
// request to the monitor core to update the table.  If hardware sets and
// software writes in the same cycle, the hardware set wins so that no
// request is lost (this priority is this design's choice).  Reset clears
// the register, as the table starts unsuspended.
module suspension_reg (
  input  logic clk,
  input  logic rst_n,
  input  logic hw_set,    // a matched entry carries suspension bit 1
  input  logic sw_we,     // monitor software writes the register
  input  logic sw_data,
  output logic susp,      // table bypassed
  output logic notify     // update request to the monitor, one cycle
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      susp   <= 1'b0;
      notify <= 1'b0;
    end else begin
      notify <= hw_set && !susp;
      if (hw_set)     susp <= 1'b1;
      else if (sw_we) susp <= sw_data;
    end
  end

endmodule
