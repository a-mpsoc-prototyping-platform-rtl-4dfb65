// tb_pattern_filter: sends random bit streams that contain the 802.11 SFD
// (0xF3A0, first bit in bit 0) at a random place, and a second run with an
// 8-bit pattern. The testbench finds the first occurrence of the pattern in
// the stream itself and checks that the filter outputs nothing before it,
// then every later bit unchanged with its ID, and that irq_detect pulses
// exactly once. Output stalls are random.
module tb_pattern_filter;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, in_data, out_valid, out_ready = 1, out_data, locked, irq_detect;
  id_t in_id, out_id;
  logic [31:0] pat; logic [5:0] len;
  logic exp_d [$]; id_t exp_i [$];
  int irqs = 0;
  pattern_filter #(.MAX_LEN(32)) dut (.clk, .rst_n, .init, .cfg_pattern(pat), .cfg_len(len),
    .in_valid, .in_ready, .in_data, .in_id, .out_valid, .out_ready, .out_data, .out_id, .locked, .irq_detect);
  always @(posedge clk) begin #1; out_ready = ($urandom_range(0, 3) != 0); end
  always @(posedge clk) if (irq_detect) irqs++;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_d.size() == 0) begin failures++; $display("FAIL output before/after expected"); end
    else begin
      if (out_data != exp_d[0] || out_id != exp_i[0]) begin failures++; $display("FAIL bit mismatch"); end
      void'(exp_d.pop_front()); void'(exp_i.pop_front());
    end
  end
  task automatic push(logic d, id_t i);
    in_valid = 1; in_data = d; in_id = i;
    forever begin @(negedge clk); if (in_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  task automatic run(logic [31:0] p, int l);
    logic bits [$]; id_t ids [$];
    int first = -1, pre = $urandom_range(0, 60);
    pat = p; len = 6'(l);
    for (int k = 0; k < pre; k++) bits.push_back(1'($urandom));
    for (int k = 0; k < l; k++) bits.push_back(p[k]);
    for (int k = 0; k < 80; k++) bits.push_back(1'($urandom));
    foreach (bits[k]) ids.push_back(id_t'($urandom));
    // first position where the pattern ends
    for (int e = l - 1; e < bits.size() && first < 0; e++) begin
      automatic bit ok = 1;
      for (int k = 0; k < l; k++) if (bits[e - l + 1 + k] != p[k]) ok = 0;
      if (ok) first = e;
    end
    for (int k = first + 1; k < bits.size(); k++) begin exp_d.push_back(bits[k]); exp_i.push_back(ids[k]); end
    irqs = 0;
    #1 init = 1; @(posedge clk); #1 init = 0;
    foreach (bits[k]) push(bits[k], ids[k]);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_d.size() != 0 || irqs != 1) begin
      failures++; $display("FAIL %0d bits missing, %0d detections", exp_d.size(), irqs);
    end
    exp_d.delete(); exp_i.delete();
  endtask
  initial begin
    pat = SFD_8021; len = 6'(SFD_LEN); in_data = 0; in_id = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 20; r++) run(SFD_8021, SFD_LEN);
    for (int r = 0; r < 10; r++) run(32'h0000_00B5, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
