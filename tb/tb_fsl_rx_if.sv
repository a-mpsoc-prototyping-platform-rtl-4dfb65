// tb_fsl_rx_if: pushes bytes with IDs into the RX FSL interface FIFO while
// the PLCP side reads at random, and checks each 32-bit word (byte in bits
// 7:0, ID in bits 11:8, zero above, control bit 0). Also checks that the
// FIFO holds DEPTH bytes and then back-pressures, and that init empties it.
module tb_fsl_rx_if;
  import radio_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready; logic [7:0] in_data = '0; id_t in_id = '0;
  logic [31:0] s_data; logic s_control, s_exists, s_read = 0;
  logic [31:0] q [$];
  fsl_rx_if #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .init, .in_valid, .in_ready, .in_data, .in_id,
    .s_data, .s_control, .s_exists, .s_read);
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    int taken = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < DEPTH + 3; n++) begin
      @(negedge clk); in_valid = 1; in_data = 8'($urandom); in_id = id_t'($urandom);
      if (in_ready) taken++;
    end
    @(negedge clk); in_valid = 0;
    chk(taken == DEPTH && !in_ready, "capacity");
    init = 1; @(negedge clk); init = 0;
    chk(!s_exists && in_ready, "init empties");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (s_read) void'(q.pop_front());
      if (in_valid && in_ready) ; // accepted at the previous edge, queued below
      in_valid = ($urandom_range(0, 1) == 1); in_data = 8'($urandom); in_id = id_t'($urandom);
      s_read = s_exists && ($urandom_range(0, 2) != 0);
      if (s_exists) chk(q.size() > 0 && s_data == q[0] && !s_control, "word");
      else chk(q.size() == 0, "empty");
      if (in_valid && in_ready) q.push_back({20'b0, in_id, in_data});
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
