// tb_tx_chain: sends frames of bytes with IDs through the transmit chain and
// compares every output sample with a reference model of the whole chain:
// bits LSB first, path chosen per bit by the demux rule, DBPSK increments of
// 0 / pi and DQPSK increments per bit pair, a running phase, and 44 samples
// per symbol of chip * amplitude on the phase's axis. Frame 1 starts in
// DBPSK and switches to DQPSK when the payload ID appears (demux and mux
// both switch); frame 2, after init, is all DQPSK with another amplitude and
// chip sequence. The RF side takes samples at random (back-pressure), and
// the PLCP side writes whenever the FSL FIFO is not full.
module tb_tx_chain;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, clk_rf = 0, rst_rf_n = 0;
  always #5 clk = ~clk;
  always #11.36 clk_rf = ~clk_rf;
  int checks = 0, failures = 0;
  logic init = 0;
  switch_cfg_t cfg_demux = '0, cfg_mux = '0;
  logic [CHIPS-1:0] cfg_seq = BARKER11; logic [SAMPLE_W-2:0] cfg_amp = 9'd256;
  logic [31:0] fsl_m_data = '0; logic fsl_m_control = 0, fsl_m_write = 0, fsl_m_full;
  logic out_valid, out_ready = 0; sample_t out_data; logic irq_demux, irq_mux;
  tx_chain #(.FIFO_DEPTH(16)) dut (.*);
  int n_demux = 0, n_mux = 0;
  always @(posedge clk) if (rst_n) begin if (irq_demux) n_demux++; if (irq_mux) n_mux++; end

  sample_t exp_q [$];
  // reference model: appends the samples of one frame to exp_q
  task automatic model(input logic [7:0] bytes [$], input id_t ids [$]);
    logic path = cfg_demux.init_sel;
    phase_t acc = 0;
    logic have = 0, d0 = 0;
    foreach (bytes[k])
      for (int b = 0; b < 8; b++) begin
        automatic logic bit_v = bytes[k][b];
        automatic logic sym = 0; automatic phase_t inc = 0;
        if (cfg_demux.sw_en && ids[k] == cfg_demux.sw_id) path = cfg_demux.sw_sel;
        if (!path) begin sym = 1; inc = bit_v ? 8'd128 : 8'd0; end
        else if (!have) begin have = 1; d0 = bit_v; end
        else begin have = 0; sym = 1; inc = 8'(64 * {d0, d0 ^ bit_v}); end
        if (sym) begin
          acc += inc;
          for (int c = 0; c < CHIPS; c++) begin
            automatic logic signed [SAMPLE_W-1:0] a =
              cfg_seq[CHIPS-1-c] ? SAMPLE_W'(cfg_amp) : -SAMPLE_W'(cfg_amp);
            automatic sample_t s;
            case (acc[7:6])
              0: s = '{i: a, q: 0};  1: s = '{i: 0, q: a};
              2: s = '{i: -a, q: 0}; default: s = '{i: 0, q: -a};
            endcase
            repeat (SPS) exp_q.push_back(s);
          end
        end
      end
  endtask

  task automatic send(input logic [7:0] bytes [$], input id_t ids [$]);
    foreach (bytes[k]) begin
      @(negedge clk);
      while (fsl_m_full) @(negedge clk);
      fsl_m_data = {20'b0, ids[k], bytes[k]}; fsl_m_write = 1;
      @(negedge clk); fsl_m_write = 0;
    end
  endtask

  // RF side: random ready, compare each accepted sample
  int got = 0, stalls = 0;
  always @(negedge clk_rf) out_ready <= rst_rf_n && ($urandom_range(0, 9) != 0);
  always @(posedge clk_rf) if (out_valid && out_ready) begin
    got++; checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected sample"); end
    else begin
      automatic sample_t e = exp_q.pop_front();
      if (out_data != e) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: %0d,%0d expected %0d,%0d", got, out_data.i, out_data.q, e.i, e.q);
      end
    end
  end else if (out_valid) stalls++;

  task automatic wait_drain();
    int t = 0;
    while (exp_q.size() != 0 && t < 200000) begin @(negedge clk); t++; end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d samples missing", exp_q.size()); end
    repeat (50) @(negedge clk);
  endtask

  initial begin
    logic [7:0] bytes [$]; id_t ids [$];
    repeat (3) @(negedge clk); rst_n = 1; rst_rf_n = 1;
    // frame 1: 6 header bytes at ID 1 (DBPSK), 10 payload bytes at ID 2 (DQPSK)
    cfg_demux = '{init_sel: 0, sw_en: 1, sw_sel: 1, sw_id: 4'd2};
    cfg_mux   = '{init_sel: 0, sw_en: 1, sw_sel: 1, sw_id: 4'd2};
    for (int k = 0; k < 16; k++) begin bytes.push_back(8'($urandom)); ids.push_back(k < 6 ? 4'd1 : 4'd2); end
    model(bytes, ids);
    send(bytes, ids);
    wait_drain();
    checks++; if (n_demux != 1 || n_mux != 1) begin failures++; $display("FAIL switch counts %0d %0d", n_demux, n_mux); end
    // frame 2: after init, all DQPSK, other amplitude and sequence
    // (the path after init is taken from the configuration at init time)
    cfg_demux = '{init_sel: 1, sw_en: 0, sw_sel: 0, sw_id: 4'd0};
    cfg_mux   = '{init_sel: 1, sw_en: 0, sw_sel: 0, sw_id: 4'd0};
    cfg_amp = 9'd100; cfg_seq = 11'b101_1011_1000;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    bytes.delete(); ids.delete();
    for (int k = 0; k < 12; k++) begin bytes.push_back(8'($urandom)); ids.push_back(4'd3); end
    model(bytes, ids);
    send(bytes, ids);
    wait_drain();
    checks++; if (stalls == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("samples %0d, stalled cycles %0d", got, stalls);
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
