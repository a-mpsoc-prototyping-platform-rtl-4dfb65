// tb_timer: programs the MAC timer for one SIFS (1000 cycles at 100 MHz)
// and checks that it expires exactly 1000 cycles after being enabled, stops
// in one-shot mode, and in auto-reload mode expires every LOAD cycles; the
// expired flag is cleared by writing 1 to STATUS.
module tb_timer;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bus_req_t req = '0; logic [31:0] rdata; logic irq;
  timer dut (.clk, .rst_n, .req, .rdata, .irq);
  `include "bus_tasks.svh"
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    int t0, t1;
    logic [31:0] d;
    repeat (3) @(negedge clk); rst_n = 1;
    bus_wr(32'h4, 32'd1000);
    bus_wr(32'h0, 32'h1);
    t0 = cyc;                          // edge that took the enable write
    while (!irq) @(negedge clk);
    chk(cyc - t0 == 1000, $sformatf("SIFS expiry after %0d cycles", cyc - t0));
    bus_rd(32'h0, d); chk(d[0] == 1'b0, "one-shot stops");
    bus_wr(32'hC, 32'h1);
    @(negedge clk); chk(!irq, "status cleared");
    // auto reload, period 200
    bus_wr(32'h4, 32'd200);
    bus_wr(32'h0, 32'h3);
    t0 = cyc;
    for (int k = 1; k <= 3; k++) begin
      while (!irq) @(negedge clk);
      t1 = cyc;
      chk(t1 - t0 == 200*k, $sformatf("reload expiry %0d at %0d", k, t1 - t0));
      bus_wr(32'hC, 32'h1);
    end
    bus_rd(32'h8, d); chk(d <= 200 && d > 0, "count running");
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
