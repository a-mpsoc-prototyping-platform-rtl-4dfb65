// tb_barker_spreader: sends random symbol phases (quarter turns, some with a
// small offset to exercise the rounding) and checks the 44 samples of each:
// sample n of a symbol is chip floor(n/4) of the Barker sequence (+1/-1)
// times the amplitude times (cos, sin) of the nearest quarter turn. With the
// output always ready it also checks that symbols follow each other without
// a gap: 44 output cycles per symbol.
module tb_barker_spreader;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  phase_t in_data; id_t in_id; sample_t out_data; id_t out_id;
  logic [8:0] amp = 9'd200;
  sample_t expq [$];
  bit stall = 0;
  int nout = 0;
  barker_spreader dut (.clk, .rst_n, .init, .cfg_seq(BARKER11), .cfg_amp(amp),
    .in_valid, .in_ready, .in_data, .in_id, .out_valid, .out_ready, .out_data, .out_id);
  always @(posedge clk) begin #1; out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1; end
  // input monitor: each accepted symbol adds its 44 expected samples
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    phase_t r;
    r = in_data + 8'd32;
    expect_symbol(int'(r[7:6]));
  end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++; nout++;
    if (expq.size() == 0 || expq[0] != out_data) begin
      failures++; $display("FAIL got (%0d,%0d) at %0t", out_data.i, out_data.q, $time);
    end
    if (expq.size()) void'(expq.pop_front());
  end
  task automatic push(phase_t d);
    in_valid = 1; in_data = d; in_id = '0;
    forever begin @(negedge clk); if (in_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  task automatic expect_symbol(int quarter);
    for (int n = 0; n < SPS*CHIPS; n++) begin
      automatic int c = BARKER11[CHIPS-1 - n/SPS] ? int'(amp) : -int'(amp);
      automatic int ci = (quarter == 0) ? c : (quarter == 2) ? -c : 0;
      automatic int cq = (quarter == 1) ? c : (quarter == 3) ? -c : 0;
      expq.push_back('{i: SAMPLE_W'(ci), q: SAMPLE_W'(cq)});
    end
  endtask
  initial begin
    int t0;
    in_data = '0; in_id = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall = (pass == 1);
      t0 = $time; nout = 0;
      for (int s = 0; s < 30; s++) begin
        automatic int qt = $urandom_range(0, 3);
        automatic int off = $urandom_range(0, 40) - 20;
        push(phase_t'(64*qt + off));
      end
      repeat (2) @(posedge clk);
      while (expq.size() && ($time - t0) < 200000) @(posedge clk);
      if (!stall) begin
        checks++;
        // 30 symbols of 44 samples, plus a few cycles of start-up
        if (($time - t0) / 10 > 30*44 + 4) begin failures++; $display("FAIL rate: %0d cycles", ($time - t0)/10); end
      end
      checks++;
      if (expq.size() != 0) begin failures++; $display("FAIL %0d samples missing", expq.size()); end
      repeat (3) @(posedge clk);
    end
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
