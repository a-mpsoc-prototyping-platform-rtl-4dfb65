// tb_qpsk_demapper: drives random phase differences into the DQPSK demapper
// with random output stalls and checks that each one yields two bits, d0
// then d1, of the dibit of the nearest quarter turn (802.11 DQPSK:
// 0 -> 00, pi/2 -> 01, pi -> 11, 3pi/2 -> 10; a phase exactly between two
// quarters goes to the one counter-clockwise of it), both with its ID.
module tb_qpsk_demapper;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  phase_t in_data; id_t in_id;
  logic out_data; id_t out_id;
  logic exp_d [$]; id_t exp_i [$];
  bit stall = 0;
  qpsk_demapper dut (.clk, .rst_n, .init, .in_valid, .in_ready, .in_data, .in_id,
                     .out_valid, .out_ready, .out_data, .out_id);
  always @(posedge clk) begin #1; out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1; end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_d.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      if (out_data != exp_d[0] || out_id != exp_i[0]) begin
        failures++; $display("FAIL got %0d id %0d want %0d id %0d", out_data, out_id, exp_d[0], exp_i[0]);
      end
      void'(exp_d.pop_front()); void'(exp_i.pop_front());
    end
  end
  task automatic push(phase_t d, id_t i);
    in_valid = 1; in_data = d; in_id = i;
    forever begin @(negedge clk); if (in_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  function automatic int cdist(int a, int b);
    int d = (a - b + 512) % 256;
    return d > 128 ? 256 - d : d;
  endfunction
  function automatic int nearest(phase_t p);
    int best = 0;
    for (int k = 1; k < 4; k++) begin
      automatic int dk = cdist(int'(p), 64*k), db = cdist(int'(p), 64*best);
      if (dk < db || (dk == db && (64*k - int'(p) + 256) % 256 == 32)) best = k;
    end
    if (cdist(int'(p), 0) == cdist(int'(p), 64*best) && (256 - int'(p)) == 32) best = 0;
    return best;
  endfunction
  initial begin
    logic [1:0] dib [4];
    dib[0] = 2'b00; dib[1] = 2'b01; dib[2] = 2'b11; dib[3] = 2'b10;
    in_data = '0; in_id = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall = (pass == 1);
      for (int n = 0; n < 300; n++) begin
        automatic phase_t p = (n < 256) ? phase_t'(n) : phase_t'($urandom);
        automatic id_t i = id_t'($urandom);
        automatic int k = nearest(p);
        exp_d.push_back(dib[k][1]); exp_i.push_back(i);
        exp_d.push_back(dib[k][0]); exp_i.push_back(i);
        push(p, i);
      end
      repeat (20) @(posedge clk);
      checks++;
      if (exp_d.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_d.size()); end
      #1 init = 1; @(posedge clk); #1 init = 0;
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
