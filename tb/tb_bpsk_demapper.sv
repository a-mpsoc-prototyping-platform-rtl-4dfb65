// tb_bpsk_demapper: drives random items into bpsk_demapper through its valid/ready
// input, with the output stalled at random for part of the run, and
// compares every output item (data and ID) with a model kept in queues in
// the testbench. Model: a phase becomes bit 1 when it is nearer to pi than to 0
// (802.11 DBPSK: a half turn of differential phase means 1).
// Clocking: clk 10 ns; inputs are driven one delay after the rising edge,
// outputs are taken on rising edges where valid and ready are both high.
// The mapping follows the 802.11 DSSS rules the document builds on; the
// stall pattern and item counts are this testbench's own choice.
module tb_bpsk_demapper;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  phase_t in_data; id_t in_id;
  logic out_data; id_t out_id;
  logic exp_d [$]; id_t exp_i [$];
  bit stall = 0;
  bpsk_demapper dut (.clk, .rst_n, .init, .in_valid, .in_ready, .in_data, .in_id,
          .out_valid, .out_ready, .out_data, .out_id);
  always @(posedge clk) begin #1; out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1; end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_d.size() == 0) begin failures++; $display("FAIL unexpected output %0h", out_data); end
    else begin
      if (out_data != exp_d[0] || out_id != exp_i[0]) begin
        failures++; $display("FAIL got %0h id %0h want %0h id %0h", out_data, out_id, exp_d[0], exp_i[0]);
      end
      void'(exp_d.pop_front()); void'(exp_i.pop_front());
    end
  end
  task automatic push(phase_t d, id_t i);
    in_valid = 1; in_data = d; in_id = i;
    forever begin @(negedge clk); if (in_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  function automatic void model_reset(); endfunction
  // bit 1 when the phase is nearer to pi than to 0 (ties: pi/2 -> 1, 3pi/2 -> 0)
  function automatic logic model(phase_t p);
    int d0, d1;
    d0 = (int'(p) < 128) ? int'(p) : 256 - int'(p);
    d1 = (int'(p) > 128) ? int'(p) - 128 : 128 - int'(p);
    if (d0 == d1) return (p == 8'd64);
    return d1 < d0;
  endfunction
  initial begin
    in_data = '0; in_id = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall = (pass == 1);
      for (int n = 0; n < 300; n++) begin
        automatic phase_t p = phase_t'($urandom); automatic id_t i = id_t'($urandom); exp_d.push_back(model(p)); exp_i.push_back(i); push(p, i);
      end
      repeat (20) @(posedge clk);
      checks++;
      if (exp_d.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_d.size()); end
      #1 init = 1; @(posedge clk); #1 init = 0;
      model_reset();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
