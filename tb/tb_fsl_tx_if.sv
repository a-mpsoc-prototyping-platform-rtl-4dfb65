// tb_fsl_tx_if: the PLCP side writes 32-bit words (byte in bits 7:0, ID in
// bits 11:8, random upper bits) while the chain side takes bytes at random;
// every byte and ID must come out in order. Also checks the DEPTH capacity,
// m_full, the ignored write when full, and that init empties the FIFO.
module tb_fsl_tx_if;
  import radio_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] m_data = '0; logic m_control = 0, m_write = 0, m_full;
  logic out_valid, out_ready = 0; logic [7:0] out_data; id_t out_id;
  logic [11:0] q [$];
  fsl_tx_if #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .init, .m_data, .m_control, .m_write, .m_full,
    .out_valid, .out_ready, .out_data, .out_id);
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    int taken = 0;
    bit hs = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < DEPTH + 3; n++) begin
      @(negedge clk); m_write = 1; m_data = 32'($urandom);
      if (!m_full) taken++;
    end
    @(negedge clk); m_write = 0;
    chk(taken == DEPTH && m_full, "capacity");
    init = 1; @(negedge clk); init = 0;
    chk(!out_valid && !m_full, "init empties");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (hs) void'(q.pop_front());
      m_write = ($urandom_range(0, 1) == 1); m_data = 32'($urandom); m_control = 1'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      if (out_valid) chk(q.size() > 0 && {out_id, out_data} == q[0], "byte");
      else chk(q.size() == 0, "empty");
      if (m_write && !m_full) q.push_back(m_data[11:0]);
      hs = out_valid && out_ready;
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
