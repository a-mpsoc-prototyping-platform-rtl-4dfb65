// tb_intc: checks the interrupt controller: a one-cycle pulse is latched in
// ISR, masked by IER and MER, acknowledged through IAR; a level source that
// stays high comes back after acknowledge; acknowledging one of two pending
// sources leaves the other; IPR reads ISR & IER.
module tb_intc;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bus_req_t req = '0; logic [31:0] rdata; logic [7:0] src = '0; logic irq;
  intc #(.N(8)) dut (.clk, .rst_n, .req, .rdata, .src, .irq);
  `include "bus_tasks.svh"
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); src = 8'h04; @(negedge clk); src = 8'h00;
    bus_rd(32'h0, d); chk(d == 32'h04, "pulse latched");
    chk(!irq, "no irq while disabled");
    bus_wr(32'h8, 32'h04);              // IER
    chk(!irq, "no irq without MER");
    bus_wr(32'h10, 32'h1);              // MER
    @(negedge clk); chk(irq, "irq raised");
    bus_rd(32'h4, d); chk(d == 32'h04, "IPR");
    bus_wr(32'hC, 32'h04);              // IAR
    @(negedge clk); chk(!irq, "ack clears");
    bus_rd(32'h0, d); chk(d == 32'h0, "ISR clear");
    // masked source
    @(negedge clk); src = 8'h10; @(negedge clk); src = 8'h00;
    @(negedge clk); chk(!irq, "masked source gives no irq");
    bus_rd(32'h4, d); chk(d == 32'h0, "IPR masked");
    bus_wr(32'hC, 32'h10);
    // level source
    bus_wr(32'h8, 32'h81);
    @(negedge clk); src = 8'h80;
    @(negedge clk); chk(irq, "level irq");
    bus_wr(32'hC, 32'h80);
    @(negedge clk); chk(irq, "level source returns after ack");
    src = 8'h00;
    bus_wr(32'hC, 32'h80);
    @(negedge clk); chk(!irq, "level source gone");
    // two pending sources: acknowledging one leaves the other
    @(negedge clk); src = 8'h81; @(negedge clk); src = 8'h00;
    bus_rd(32'h0, d); chk(d == 32'h81, "two pending");
    bus_wr(32'hC, 32'h01);
    bus_rd(32'h0, d); chk(d == 32'h80, "ack of one bit keeps the other");
    @(negedge clk); chk(irq, "irq stays for the remaining source");
    bus_wr(32'hC, 32'h80);
    @(negedge clk); chk(!irq, "all acknowledged");
    bus_rd(32'h8, d); chk(d == 32'h81, "IER readback");
    bus_rd(32'h10, d); chk(d == 32'h1, "MER readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
