// tb_data_sync: writes a random sequence into the clock-domain crossing FIFO
// on one clock and reads it on an unrelated clock, both sides with random
// valid/ready; first with a slow writer (44 MHz-like) and fast reader, then
// with a fast writer and slow reader so that the FIFO fills. Every word must
// arrive once, unchanged and in order. Drivers use nonblocking assignments
// on their own clock edge.
module tb_data_sync;
  logic wclk = 0, rclk = 0, rst_n = 0;
  int wper = 11, rper = 5;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = '0, out_data;
  logic [15:0] expq [$];
  int to_send = 0, nread = 0;
  data_sync #(.W(16), .DEPTH(16)) dut (.wclk, .wrst_n(rst_n), .in_valid, .in_ready, .in_data,
    .rclk, .rrst_n(rst_n), .out_valid, .out_ready, .out_data);
  always @(posedge wclk) if (rst_n) begin
    if (in_valid && in_ready) expq.push_back(in_data);
    if (!in_valid || in_ready) begin
      if (to_send > 0 && $urandom_range(0, 3) != 0) begin
        in_valid <= 1'b1; in_data <= 16'($urandom); to_send <= to_send - 1;
      end else in_valid <= 1'b0;
    end
  end
  always @(posedge rclk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++; nread++;
      if (expq.size() == 0 || expq[0] != out_data) begin failures++; $display("FAIL got %0h", out_data); end
      if (expq.size()) void'(expq.pop_front());
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  initial begin
    #50 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin wper = 3; rper = 13; end
      nread = 0;
      @(posedge wclk); to_send <= 500;
      #30000;
      checks++;
      if (nread != 500 || expq.size() != 0) begin failures++; $display("FAIL read %0d of 500", nread); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
