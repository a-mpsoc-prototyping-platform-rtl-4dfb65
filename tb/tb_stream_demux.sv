// tb_stream_demux: sends item sequences through the demux with random
// back-pressure on both paths. Items before the first one carrying the
// switch ID must leave on the path selected at init, that item and all later
// ones on the switch target path; irq_switch must pulse once per change.
// Runs cover switching 0 -> 1, switching 1 -> 0, and switching disabled.
module tb_stream_demux;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, irqs = 0;
  switch_cfg_t cfg;
  logic in_valid = 0, in_ready; logic [7:0] in_data; id_t in_id;
  logic [1:0] out_valid, out_ready; logic [7:0] out_data; id_t out_id;
  logic irq_switch;
  logic [7:0] exp0 [$], exp1 [$];
  stream_demux #(.W(8)) dut (.clk, .rst_n, .init, .cfg, .in_valid, .in_ready, .in_data, .in_id,
    .out_valid, .out_ready, .out_data, .out_id, .irq_switch);
  always @(posedge clk) begin #1; out_ready = 2'($urandom); end
  always @(posedge clk) if (irq_switch) irqs++;
  always @(posedge clk) if (rst_n) for (int p = 0; p < 2; p++) if (out_valid[p] && out_ready[p]) begin
    checks++;
    if (p == 0) begin
      if (exp0.size() == 0 || exp0[0] != out_data) begin failures++; $display("FAIL path 0 got %0h", out_data); end
      else void'(exp0.pop_front());
    end else begin
      if (exp1.size() == 0 || exp1[0] != out_data) begin failures++; $display("FAIL path 1 got %0h", out_data); end
      else void'(exp1.pop_front());
    end
  end
  task automatic push(logic [7:0] d, id_t i);
    in_valid = 1; in_data = d; in_id = i;
    forever begin @(negedge clk); if (in_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  task automatic run(bit init_sel, bit sw_en, bit sw_sel);
    bit path = init_sel; automatic int changes = 0;
    cfg = '{init_sel: init_sel, sw_en: sw_en, sw_sel: sw_sel, sw_id: 4'd5};
    #1 init = 1; @(posedge clk); #1 init = 0; irqs = 0;
    for (int n = 0; n < 100; n++) begin
      automatic logic [7:0] d = 8'($urandom);
      automatic id_t i = (n == 40 || n == 70) ? 4'd5 : id_t'($urandom_range(6, 15));
      if (sw_en && i == 5) begin if (path != sw_sel) changes++; path = sw_sel; end
      if (path) exp1.push_back(d); else exp0.push_back(d);
      push(d, i);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp0.size() || exp1.size() || irqs != changes) begin
      failures++; $display("FAIL left %0d/%0d, irqs %0d want %0d", exp0.size(), exp1.size(), irqs, changes);
    end
  endtask
  initial begin
    cfg = '0; in_data = '0; in_id = '0; out_ready = '1;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(0, 1, 1); run(1, 1, 0); run(0, 0, 1); run(1, 1, 1);
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
