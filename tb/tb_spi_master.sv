// tb_spi_master: a mode-0 SPI slave model collects MOSI on rising SCLK
// edges while cs_n is low and compares each received word with the word the
// bus wrote. Also checks the busy flag, that a write while busy is ignored,
// the done interrupt and the word duration of 2*BITS*D clk cycles for
// several dividers.
module tb_spi_master;
  import radio_pkg::*;
  localparam int BITS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bus_req_t req = '0; logic [31:0] rdata; logic sclk, cs_n, mosi, irq_done;
  spi_master #(.BITS(BITS)) dut (.clk, .rst_n, .req, .rdata, .sclk, .cs_n, .mosi, .irq_done);
  `include "bus_tasks.svh"
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  logic [BITS-1:0] sent [$];
  logic [BITS-1:0] rx; int nbits = 0, words = 0;
  always @(posedge sclk) if (!cs_n) begin rx = {rx[BITS-2:0], mosi}; nbits++; end
  always @(posedge cs_n) begin
    words++;
    chk(nbits == BITS, $sformatf("bit count %0d", nbits));
    chk(sent.size() > 0 && rx == sent.pop_front(), "word received");
    nbits = 0;
  end
  int cyc = 0, dones = 0;
  always @(posedge clk) begin cyc++; if (irq_done && rst_n) dones++; end
  initial begin
    logic [31:0] d; int t0;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(cs_n && !sclk, "idle levels");
    for (int k = 0; k < 8; k++) begin
      automatic int div = (k % 4) + 1;
      automatic logic [BITS-1:0] w = BITS'($urandom);
      bus_wr(32'h8, div);
      sent.push_back(w);
      bus_wr(32'h0, 32'(w));
      t0 = cyc;
      bus_rd(32'h4, d); chk(d[0], "busy");
      bus_wr(32'h0, 32'hFFFF);           // ignored while busy
      while (cs_n == 1'b0) @(negedge clk);
      chk(cyc - t0 == 2*BITS*div, $sformatf("duration %0d for D=%0d", cyc - t0, div));
      @(negedge clk);
      bus_rd(32'h4, d); chk(!d[0], "idle");
    end
    chk(words == 8 && dones == 8, $sformatf("words %0d done irqs %0d", words, dones));
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
