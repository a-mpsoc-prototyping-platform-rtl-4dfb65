// tb_phase_computer: drives random complex values (and the four axis
// directions) into the CORDIC phase computer and compares each phase with
// atan2 computed in the testbench, rounded to 8 bits (256 = one turn),
// allowing one step of error. It also checks the latency: the result must be
// valid ITER cycles after the input was taken.
module tb_phase_computer;
  import radio_pkg::*;
  localparam int ITER = 12;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  corr_t in_data; id_t in_id; phase_t out_data; id_t out_id;
  phase_computer #(.ITER(ITER)) dut (.clk, .rst_n, .init, .in_valid, .in_ready, .in_data, .in_id,
                                     .out_valid, .out_ready, .out_data, .out_id);
  function automatic int ref_phase(int i, int q);
    real a = $atan2(real'(q), real'(i)) / (2.0 * 3.14159265358979) * 256.0;
    int r = int'(a);
    return (r % 256 + 256) % 256;
  endfunction
  task automatic one(int i, int q, id_t id);
    int t0, e, d;
    in_valid = 1; in_data = '{i: CORR_W'(i), q: CORR_W'(q)}; in_id = id;
    forever begin @(negedge clk); if (in_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0; t0 = 0;
    while (!out_valid) begin @(posedge clk); #1; t0++; end
    checks++;
    if (t0 != ITER) begin failures++; $display("FAIL latency %0d want %0d", t0, ITER); end
    e = ref_phase(i, q);
    d = (int'(out_data) - e + 256) % 256;
    checks++;
    if (!(d == 0 || d == 1 || d == 255) || out_id != id) begin
      failures++; $display("FAIL (%0d,%0d): got %0d id %0d want %0d id %0d", i, q, out_data, out_id, e, id);
    end
    @(posedge clk); #1;
  endtask
  initial begin
    in_data = '0; in_id = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    one(1000, 0, 1); one(0, 1000, 2); one(-1000, 0, 3); one(0, -1000, 4);
    one(-1100, -1, 5); one(-1100, 1, 6);
    for (int n = 0; n < 500; n++) begin
      int i, q;
      do begin
        i = $urandom_range(0, 12000) - 6000; q = $urandom_range(0, 12000) - 6000;
      end while (i*i + q*q < 200*200);
      one(i, q, id_t'(n));
    end
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
