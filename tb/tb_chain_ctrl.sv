// tb_chain_ctrl: issues init commands for the TX chain, the RX chain and
// both, and checks that each gives exactly one one-cycle pulse on the
// processor-clock init output and exactly one one-cycle pulse on the RF
// clock init output, and that the read-back counts match. clk is 100 MHz,
// clk_rf 44 MHz, unrelated in phase.
module tb_chain_ctrl;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, clk_rf = 0, rst_rf_n = 0;
  always #5 clk = ~clk;
  always #11.36 clk_rf = ~clk_rf;
  int checks = 0, failures = 0;
  bus_req_t req = '0; logic [31:0] rdata;
  logic init_tx, init_rx, init_tx_rf, init_rx_rf;
  chain_ctrl dut (.*);
  `include "bus_tasks.svh"
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  int p_tx = 0, p_rx = 0, r_tx = 0, r_rx = 0, long_pulse = 0;
  logic ptx = 0, prx = 0, prtx = 0, prrx = 0;
  always @(posedge clk) begin
    if (init_tx) p_tx++;
    if (init_rx) p_rx++;
    if (init_tx && ptx || init_rx && prx) long_pulse++;
    ptx = init_tx; prx = init_rx;
  end
  always @(posedge clk_rf) begin
    if (init_tx_rf) r_tx++;
    if (init_rx_rf) r_rx++;
    if (init_tx_rf && prtx || init_rx_rf && prrx) long_pulse++;
    prtx = init_tx_rf; prrx = init_rx_rf;
  end
  initial begin
    logic [31:0] d; int etx = 0, erx = 0;
    repeat (3) @(negedge clk); rst_n = 1; rst_rf_n = 1;
    p_tx = 0; p_rx = 0; r_tx = 0; r_rx = 0; long_pulse = 0;
    for (int n = 0; n < 30; n++) begin
      automatic logic [1:0] c = 2'($urandom_range(1, 3));
      bus_wr(32'h0, 32'(c));
      etx += c[0]; erx += c[1];
      repeat ($urandom_range(8, 20)) @(negedge clk);
      chk(p_tx == etx && p_rx == erx, $sformatf("clk pulses %0d/%0d expected %0d/%0d", p_tx, p_rx, etx, erx));
      chk(r_tx == etx && r_rx == erx, $sformatf("clk_rf pulses %0d/%0d expected %0d/%0d", r_tx, r_rx, etx, erx));
    end
    bus_wr(32'h0, 32'h0);
    repeat (10) @(negedge clk);
    chk(p_tx == etx && r_rx == erx, "write of 0 gives no init");
    bus_rd(32'h0, d);
    chk(d == {16'(erx), 16'(etx)}, "init counts");
    chk(long_pulse == 0, "pulses last one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
