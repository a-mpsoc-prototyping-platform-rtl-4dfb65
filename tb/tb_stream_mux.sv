// tb_stream_mux: two sources feed the mux. Source 0 sends a gap-free burst
// of items with ordinary IDs; source 1 offers, from the start, a burst whose
// first item carries the switch ID. The output, under random back-pressure,
// must be the whole burst of source 0 followed by the whole burst of source 1
// (no overtaking), with one switch pulse. A second run with switching
// disabled checks that source 1 is never taken.
module tb_stream_mux;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, irqs = 0;
  switch_cfg_t cfg;
  logic [1:0] in_valid, in_ready; logic [7:0] in_data [2]; id_t in_id [2];
  logic out_valid, out_ready; logic [7:0] out_data; id_t out_id; logic irq_switch;
  logic [7:0] src [2][$];
  logic [7:0] expq [$];
  stream_mux #(.W(8)) dut (.clk, .rst_n, .init, .cfg, .in_valid, .in_ready, .in_data, .in_id,
    .out_valid, .out_ready, .out_data, .out_id, .irq_switch);
  always @(posedge clk) begin #1; out_ready = ($urandom_range(0, 2) != 0); end
  always @(posedge clk) if (irq_switch) irqs++;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0 || expq[0] != out_data) begin failures++; $display("FAIL got %0h", out_data); end
    else void'(expq.pop_front());
  end
  // sources: present the head of their queue, pop on handshake
  int sent [2];
  always_comb for (int p = 0; p < 2; p++) begin
    in_valid[p] = src[p].size() > 0;
    in_data[p]  = in_valid[p] ? src[p][0] : '0;
    in_id[p]    = (p == 1 && sent[1] == 0) ? 4'd9 : 4'd2;
  end
  always @(posedge clk) for (int p = 0; p < 2; p++) if (in_valid[p] && in_ready[p]) begin
    void'(src[p].pop_front()); sent[p]++;
  end
  task automatic run(bit sw_en);
    cfg = '{init_sel: 1'b0, sw_en: sw_en, sw_sel: 1'b1, sw_id: 4'd9};
    #1 init = 1; @(posedge clk); #1 init = 0; irqs = 0; sent[0] = 0; sent[1] = 0;
    for (int n = 0; n < 50; n++) begin automatic logic [7:0] d = 8'($urandom); src[0].push_back(d); expq.push_back(d); end
    for (int n = 0; n < 30; n++) begin automatic logic [7:0] d = 8'($urandom); src[1].push_back(d); if (sw_en) expq.push_back(d); end
    repeat (300) @(posedge clk);
    checks++;
    if (expq.size() != 0 || irqs != (sw_en ? 1 : 0)) begin
      failures++; $display("FAIL %0d items missing, %0d switches", expq.size(), irqs);
    end
    src[1].delete(); expq.delete();
  endtask
  initial begin
    cfg = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(1); run(0); run(1);
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
