// tb_mailbox: the OS port sends messages to the MAC port and back. Checks
// the receive interrupt of each side, message order, the status word
// (count, full, empty), reading an empty mailbox, and that a write beyond
// DEPTH is dropped.
module tb_mailbox;
  import radio_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bus_req_t a_req = '0, b_req = '0; logic [31:0] a_rdata, b_rdata; logic irq_a, irq_b;
  mailbox #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .a_req, .a_rdata, .irq_a, .b_req, .b_rdata, .irq_b);
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(bit side, logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    if (side) b_req = '{cs: 1, we: 1, be: 4'hF, addr: a, wdata: d};
    else      a_req = '{cs: 1, we: 1, be: 4'hF, addr: a, wdata: d};
    @(negedge clk); a_req = '0; b_req = '0;
  endtask
  task automatic rd(bit side, logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    if (side) b_req = '{cs: 1, we: 0, be: 4'hF, addr: a, wdata: '0};
    else      a_req = '{cs: 1, we: 0, be: 4'hF, addr: a, wdata: '0};
    @(negedge clk); a_req = '0; b_req = '0;
    d = side ? b_rdata : a_rdata;
  endtask
  initial begin
    logic [31:0] d, msgs [$];
    repeat (3) @(negedge clk); rst_n = 1;
    chk(!irq_a && !irq_b, "idle");
    rd(1, 32'h8, d); chk(d == 32'h1, "B status empty");
    for (int n = 0; n < 5; n++) begin d = $urandom; msgs.push_back(d); wr(0, 32'h0, d); end
    chk(irq_b && !irq_a, "B interrupt");
    rd(1, 32'h8, d); chk(d == {16'd5, 16'd0}, "B status count 5");
    for (int n = 0; n < 5; n++) begin rd(1, 32'h4, d); chk(d == msgs[n], "A->B order"); end
    @(negedge clk); chk(!irq_b, "B interrupt cleared");
    rd(1, 32'h4, d); chk(d == 0, "empty read gives 0");
    // B -> A, fill past DEPTH
    msgs.delete();
    for (int n = 0; n < DEPTH + 2; n++) begin d = $urandom; if (n < DEPTH) msgs.push_back(d); wr(1, 32'h0, d); end
    chk(irq_a, "A interrupt");
    rd(1, 32'h8, d); chk(d[1] == 1'b1, "B sees send FIFO full");
    for (int n = 0; n < DEPTH; n++) begin rd(0, 32'h4, d); chk(d == msgs[n], "B->A order"); end
    rd(0, 32'h8, d); chk(d == 32'h1, "A empty after drain");
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
