// tb_correlator: feeds spread 802.11 symbols (11 Barker chips, 4 samples per
// chip, one of four carrier phases per symbol) into the correlator and checks
// that it emits exactly one result per 44 samples, equal to 11 times the
// symbol's complex amplitude and carrying the symbol's ID. The expected
// values are built from the chip sequence in the testbench. A second pass
// stalls the output at random and checks that nothing is lost. A third
// pass checks symbol timing recovery: symbols start 2, 21 or 42 samples
// after init and carry noise; after the first three outputs every output
// must be the next symbol (no symbol skipped or repeated) within the
// noise bound.
module tb_correlator;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NSYM = 40, A = 100;
  logic in_valid, in_ready, out_valid, out_ready;
  sample_t in_data; id_t in_id; corr_t out_data; id_t out_id;
  correlator dut (.clk, .rst_n, .init, .cfg_seq(BARKER11), .in_valid, .in_ready, .in_data, .in_id,
                  .out_valid, .out_ready, .out_data, .out_id);
  int sym [NSYM];
  int nout = 0, last_out_cycle = -1, cycle = 0, gap_bad = 0;
  always @(posedge clk) cycle++;

  function automatic sample_t symval(int s, int sign);
    sample_t v;
    case (s)
      0: v = '{i: SAMPLE_W'(sign*A), q: '0};
      1: v = '{i: '0, q: SAMPLE_W'(sign*A)};
      2: v = '{i: SAMPLE_W'(-sign*A), q: '0};
      default: v = '{i: '0, q: SAMPLE_W'(-sign*A)};
    endcase
    return v;
  endfunction

  // checker for pass 3: consecutive IDs and values near 11 x amplitude
  int mode = 0, prev_id = -1, NOISE = 8;
  always @(posedge clk) if (rst_n && mode == 3 && out_valid && out_ready) begin
    // IDs are 4 bits: the symbol index is followed from the first outputs
    if (nout < 3) prev_id = out_id;
    else begin
      automatic sample_t e = symval(sym[(prev_id + 1) % NSYM], 1);
      automatic int di = int'(out_data.i) - 11*int'(e.i), dq = int'(out_data.q) - 11*int'(e.q);
      prev_id++;
      checks++;
      if (out_id != id_t'(prev_id) || di > 11*NOISE || di < -11*NOISE || dq > 11*NOISE || dq < -11*NOISE) begin
        failures++;
        $display("FAIL timing pass: output %0d id %0d expected %0d, error %0d,%0d", nout, out_id, prev_id % 16, di, dq);
      end
    end
    nout++;
  end
  // checker
  always @(posedge clk) if (rst_n && mode < 3 && out_valid && out_ready) begin
    sample_t e;
    e = symval(sym[nout % NSYM], 1);
    checks++;
    if (out_data.i != CORR_W'(11*e.i) || out_data.q != CORR_W'(11*e.q) || out_id != id_t'(nout)) begin
      failures++;
      $display("FAIL t=%0d out %0d: got (%0d,%0d) id %0d, want (%0d,%0d) id %0d", cycle, nout,
               out_data.i, out_data.q, out_id, 11*e.i, 11*e.q, nout % 16);
    end
    nout++;
  end

  task automatic send_frame(bit stall);
    for (int k = 0; k < NSYM; k++)
      for (int c = 0; c < CHIPS; c++)
        for (int j = 0; j < SPS; j++) begin
          in_valid = 1;
          in_data  = symval(sym[k], BARKER11[CHIPS-1-c] ? 1 : -1);
          in_id    = id_t'(k);
          forever begin
            out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
            @(negedge clk);
            if (in_ready) break;
            @(posedge clk); #1;
          end
          @(posedge clk); #1;
        end
    in_valid = 0;
  endtask

  // symbols after `lead` noise samples, each sample with uniform noise
  task automatic send_noisy(int lead);
    for (int n = 0; n < lead + NSYM*CHIPS*SPS; n++) begin
      automatic int k = (n - lead) / (CHIPS*SPS), c = ((n - lead) / SPS) % CHIPS;
      automatic sample_t v = n < lead ? sample_t'(0) : symval(sym[k], BARKER11[CHIPS-1-c] ? 1 : -1);
      v.i = v.i + SAMPLE_W'($urandom_range(0, 2*NOISE)) - SAMPLE_W'(NOISE);
      v.q = v.q + SAMPLE_W'($urandom_range(0, 2*NOISE)) - SAMPLE_W'(NOISE);
      in_valid = 1; in_data = v; in_id = n < lead ? id_t'(15) : id_t'(k);
      @(negedge clk);
      while (!in_ready) begin @(posedge clk); #1; @(negedge clk); end
      @(posedge clk); #1;
    end
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0; in_id = '0;
    foreach (sym[k]) sym[k] = $urandom_range(0, 3);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    send_frame(0);
    repeat (5) @(posedge clk);
    checks++;
    if (nout != NSYM) begin failures++; $display("FAIL pass 1: %0d outputs, want %0d", nout, NSYM); end
    // rate: one output per 44 input samples -> measured as total
    @(posedge clk); #1 init = 1; @(posedge clk); #1 init = 0;
    nout = 0;
    send_frame(1);
    out_ready = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != NSYM) begin failures++; $display("FAIL pass 2: %0d outputs, want %0d", nout, NSYM); end
    mode = 3;
    foreach (sym[k]) sym[k] = $urandom_range(0, 3);
    for (int p = 0; p < 3; p++) begin
      automatic int lead = p == 0 ? 2 : p == 1 ? 21 : 42;
      @(posedge clk); #1 init = 1; @(posedge clk); #1 init = 0;
      nout = 0; prev_id = -1;
      send_noisy(lead);
      repeat (5) @(posedge clk);
      checks++;
      if (nout < NSYM - 1 || nout > NSYM + 1) begin failures++; $display("FAIL lead %0d: %0d outputs", lead, nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
