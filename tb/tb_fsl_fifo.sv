// tb_fsl_fifo: fills the MAC/PLCP FSL FIFO until m_full, checks that it took
// exactly DEPTH words and ignored the extra write, then reads them back with
// s_exists/s_read and checks data, control bit and order; finally runs a
// random mix of writes and reads against a queue model.
module tb_fsl_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] m_data = '0, s_data; logic m_control = 0, m_write = 0, m_full, s_control, s_exists, s_read = 0;
  logic [$clog2(DEPTH):0] level;
  logic [32:0] q [$];
  fsl_fifo #(.W(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .m_data, .m_control, .m_write, .m_full,
    .s_data, .s_control, .s_exists, .s_read, .level);
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    int accepted = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // fill
    for (int n = 0; n < DEPTH + 2; n++) begin
      @(negedge clk);
      m_write = 1; m_data = 32'($urandom); m_control = 1'($urandom);
      if (!m_full) begin q.push_back({m_control, m_data}); accepted++; end
    end
    @(negedge clk); m_write = 0;
    chk(accepted == DEPTH && m_full && level == DEPTH, "fill count");
    // drain
    while (s_exists) begin
      chk({s_control, s_data} == q[0], "drain data");
      void'(q.pop_front());
      s_read = 1; @(negedge clk); s_read = 0;
    end
    chk(q.size() == 0, "drain count");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (s_read) void'(q.pop_front());
      m_write = ($urandom_range(0, 1) == 1); m_data = 32'($urandom); m_control = 1'($urandom);
      s_read = s_exists && ($urandom_range(0, 1) == 1);
      if (s_exists) chk(q.size() > 0 && {s_control, s_data} == q[0], "random data");
      else chk(q.size() == 0, "empty flag");
      if (m_write && !m_full) q.push_back({m_control, m_data});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
