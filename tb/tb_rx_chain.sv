// tb_rx_chain: builds 802.11-style DSSS frames in the test bench and feeds
// their samples to the receive chain at one sample per clk_rf cycle, as the
// converter would (a refused sample is lost). A frame is a random number
// of noise samples (so symbol timing is unknown), sync symbols of all ones,
// the SFD, a header at ID 1 and a payload at ID 2. Samples are chip *
// amplitude * (cos, sin) of the symbol phase plus an unknown carrier phase
// offset and uniform noise. Frame 1 runs the header in DBPSK and switches
// to DQPSK when ID 2 arrives (demux and mux); frame 2, after init, is
// DQPSK throughout. The PLCP side reads the FSL port at random; the bytes
// and IDs after the SFD must match the frame.
module tb_rx_chain;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, clk_rf = 0, rst_rf_n = 0;
  always #5 clk = ~clk;
  always #11.36 clk_rf = ~clk_rf;
  int checks = 0, failures = 0;
  logic init = 0, init_rf = 0;
  logic [CHIPS-1:0] cfg_corr_seq = BARKER11;
  switch_cfg_t cfg_demux = '0, cfg_mux = '0;
  logic [31:0] cfg_pf_pattern = SFD_8021; logic [5:0] cfg_pf_len = 6'd16;
  logic in_valid = 0, in_ready; sample_t in_data = '0; id_t in_id = '0;
  logic [31:0] fsl_s_data; logic fsl_s_control, fsl_s_exists, fsl_s_read = 0;
  logic irq_sfd, irq_demux, irq_mux;
  rx_chain #(.FIFO_DEPTH(16)) dut (.*);
  int n_sfd = 0, n_demux = 0, n_mux = 0;
  always @(posedge clk) if (rst_n) begin if (irq_sfd) n_sfd++; if (irq_demux) n_demux++; if (irq_mux) n_mux++; end

  // sample stream to send, with its IDs
  sample_t smp_q [$]; id_t sid_q [$];
  logic [11:0] exp_q [$];        // expected {ID, byte} words after the SFD
  localparam real PI = 3.14159265358979;

  function automatic logic signed [SAMPLE_W-1:0] sat(real v);
    if (v > 511.0) return 511;
    if (v < -512.0) return -512;
    return SAMPLE_W'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
  endfunction

  task automatic add_symbol(phase_t ph, id_t id, real rot, int amp, int noise);
    real ang = 2.0 * PI * real'(ph) / 256.0 + rot;
    for (int c = 0; c < CHIPS; c++)
      for (int k = 0; k < SPS; k++) begin
        automatic real a = cfg_corr_seq[CHIPS-1-c] ? amp : -amp;
        automatic sample_t s;
        s.i = sat(a * $cos(ang) + real'($urandom_range(0, 2*noise)) - noise);
        s.q = sat(a * $sin(ang) + real'($urandom_range(0, 2*noise)) - noise);
        smp_q.push_back(s); sid_q.push_back(id);
      end
  endtask

  // frame of bits (with IDs) through the transmit rule: path per bit from
  // the demux rule, DBPSK or DQPSK increments, running phase
  task automatic add_frame(logic bits [$], id_t ids [$], int amp, int noise);
    real rot = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    logic path = cfg_demux.init_sel, have = 0, d0 = 0;
    phase_t acc = 8'($urandom);
    int lead = $urandom_range(0, 90);
    for (int n = 0; n < lead; n++) begin
      automatic sample_t s;
      s.i = SAMPLE_W'($urandom_range(0, 2*noise)) - SAMPLE_W'(noise);
      s.q = SAMPLE_W'($urandom_range(0, 2*noise)) - SAMPLE_W'(noise);
      smp_q.push_back(s); sid_q.push_back(ids[0]);
    end
    add_symbol(acc, ids[0], rot, amp, noise);      // phase reference
    foreach (bits[n]) begin
      if (cfg_demux.sw_en && ids[n] == cfg_demux.sw_id) path = cfg_demux.sw_sel;
      if (!path) begin acc += bits[n] ? 8'd128 : 8'd0; add_symbol(acc, ids[n], rot, amp, noise); end
      else if (!have) begin have = 1; d0 = bits[n]; end
      else begin
        have = 0; acc += 8'(64 * {d0, d0 ^ bits[n]});
        add_symbol(acc, ids[n], rot, amp, noise);
      end
    end
    // trailing symbols so the last data symbol leaves the correlator
    repeat (3) add_symbol(acc, ids[$], rot, amp, noise);
  endtask

  task automatic build(int n_sync, int n_hdr, int n_pay, int amp, int noise);
    logic bits [$]; id_t ids [$];
    for (int n = 0; n < n_sync; n++) begin bits.push_back(1); ids.push_back(1); end
    for (int n = 0; n < 16; n++) begin bits.push_back(SFD_8021[n]); ids.push_back(1); end
    for (int k = 0; k < n_hdr + n_pay; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic id_t id = k < n_hdr ? 4'd1 : 4'd2;
      exp_q.push_back({id, b});
      for (int n = 0; n < 8; n++) begin bits.push_back(b[n]); ids.push_back(id); end
    end
    add_frame(bits, ids, amp, noise);
  endtask

  // converter model: one sample per clk_rf cycle, lost if refused
  int lost = 0;
  always @(posedge clk_rf) begin
    if (in_valid && !in_ready) lost++;
    #1;
    if (smp_q.size() > 0) begin
      in_valid = 1; in_data = smp_q.pop_front(); in_id = sid_q.pop_front();
    end else in_valid = 0;
  end

  // PLCP side: random reads, compare words with the expected queue
  int got = 0, extra = 0;
  logic hs = 0;
  always @(negedge clk) begin
    if (fsl_s_exists && fsl_s_read) begin
      if (exp_q.size() > 0) begin
        automatic logic [11:0] e = exp_q.pop_front();
        got++; checks++;
        if (fsl_s_data != {20'b0, e}) begin
          failures++; $display("FAIL word %0d: %h expected %h", got, fsl_s_data, e);
        end
      end else extra++;
    end
  end
  always @(posedge clk) begin #1 fsl_s_read = $urandom_range(0, 3) == 0; end

  task automatic run_frame();
    int t = 0;
    while ((smp_q.size() > 0 || exp_q.size() > 0) && t < 100000) begin @(negedge clk_rf); t++; end
    checks++;
    if (exp_q.size() > 0) begin failures++; $display("FAIL %0d bytes not received", exp_q.size()); exp_q.delete(); end
    repeat (200) @(negedge clk_rf);
  endtask

  task automatic do_init();
    @(negedge clk_rf); init_rf = 1; @(negedge clk_rf); init_rf = 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; rst_rf_n = 1;
    // frame 1: header DBPSK, payload DQPSK
    cfg_demux = '{init_sel: 0, sw_en: 1, sw_sel: 1, sw_id: 4'd2};
    cfg_mux   = '{init_sel: 0, sw_en: 1, sw_sel: 1, sw_id: 4'd2};
    do_init();
    build(40, 6, 12, 200, 40);
    run_frame();
    checks++; if (n_sfd != 1 || n_demux != 1 || n_mux != 1) begin
      failures++; $display("FAIL interrupt counts sfd %0d demux %0d mux %0d", n_sfd, n_demux, n_mux); end
    // frame 2: DQPSK throughout, weaker signal
    cfg_demux = '{init_sel: 1, sw_en: 0, sw_sel: 0, sw_id: 4'd0};
    cfg_mux   = '{init_sel: 1, sw_en: 0, sw_sel: 0, sw_id: 4'd0};
    do_init();
    build(20, 4, 10, 120, 40);
    run_frame();
    checks++; if (n_sfd != 2) begin failures++; $display("FAIL sfd count %0d", n_sfd); end
    checks++; if (lost != 0) begin failures++; $display("FAIL %0d samples lost", lost); end
    $display("bytes %0d, extra words after frames %0d", got, extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
