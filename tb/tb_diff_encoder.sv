// tb_diff_encoder: drives random items into diff_encoder through its valid/ready
// input, with the output stalled at random for part of the run, and
// compares every output item (data and ID) with a model kept in queues in
// the testbench. Model: the output is the running sum of the input phases (modulo one
// turn); init clears the sum.
// Clocking: clk 10 ns; inputs are driven one delay after the rising edge,
// outputs are taken on rising edges where valid and ready are both high.
// The mapping follows the 802.11 DSSS rules the document builds on; the
// stall pattern and item counts are this testbench's own choice.
module tb_diff_encoder;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  phase_t in_data; id_t in_id;
  phase_t out_data; id_t out_id;
  phase_t exp_d [$]; id_t exp_i [$];
  bit stall = 0;
  diff_encoder dut (.clk, .rst_n, .init, .in_valid, .in_ready, .in_data, .in_id,
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
  phase_t acc = 0; function automatic void model_reset(); acc = 0; endfunction
  initial begin
    in_data = '0; in_id = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall = (pass == 1);
      for (int n = 0; n < 300; n++) begin
        automatic phase_t p = phase_t'($urandom); automatic id_t i = id_t'($urandom); acc = acc + p; exp_d.push_back(acc); exp_i.push_back(i); push(p, i);
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
