// tb_suspension_reg: self-checking test of the suspension register.
//
// Drives random hardware sets and software writes and compares the register
// and the one-cycle update request with a model: a hardware set wins over a
// software write in the same cycle, and notify follows a 0-to-1 set by
// hardware by exactly one cycle.
module tb_suspension_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hw_set = 0, sw_we = 0, sw_data = 0;
  logic susp, notify;

  suspension_reg dut (.*);

  int checks = 0, failures = 0;
  int n_set = 0, n_clr = 0;
  bit m_susp = 0, m_notify = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit h, bit w, bit d);
    @(negedge clk);
    hw_set = h; sw_we = w; sw_data = d;
    @(posedge clk);
    m_notify = h && !m_susp;
    if (h && !m_susp) n_set++;
    if (!h && w && !d && m_susp) n_clr++;
    if (h) m_susp = 1; else if (w) m_susp = d;
    #1;
    checks++;
    if (susp !== m_susp || notify !== m_notify) begin
      failures++;
      $display("FAIL susp=%0b notify=%0b expected %0b %0b", susp, notify, m_susp, m_notify);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (susp !== 0) failures++;
    rst_n = 1;
    step(0, 0, 0);
    step(1, 0, 0);   // set by a matched entry
    step(0, 0, 0);   // notify only once
    step(1, 1, 0);   // hardware wins
    step(0, 1, 0);   // software clears
    step(0, 1, 1);   // software sets
    step(0, 1, 0);
    for (int k = 0; k < 3000; k++)
      step($urandom_range(0, 5) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 2) == 0);
    if (n_set == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
