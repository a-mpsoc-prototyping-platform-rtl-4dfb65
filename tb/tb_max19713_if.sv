// tb_max19713_if: models the MAX19713 converter bus around the interface.
// Receive: the ADC model puts I on the bus before each rising clk_rf edge
// and Q before each falling edge; every sample the chain accepts must equal
// the pair driven around the rising edge one cycle before the one that produced it, tagged with the configured ID. With
// ready held low the overflow interrupt must rise, and init must clear it.
// Transmit: random samples with random valid are offered; after each
// rising edge the DAC bus must show I of the sample taken on that edge
// while clk_rf is high and its Q while clk_rf is low (zero when none).
module tb_max19713_if;
  import radio_pkg::*;
  logic clk_rf = 0, rst_n = 0;
  always #11.36 clk_rf = ~clk_rf;
  int checks = 0, failures = 0;
  logic init = 0, cfg_rx_en = 0, cfg_tx_en = 0; id_t cfg_rx_id = 4'd5;
  logic [SAMPLE_W-1:0] adc_data = '0, dac_data;
  logic rx_valid, rx_ready = 0, tx_valid = 0, tx_ready, irq_overflow; sample_t rx_data, tx_data = '0; id_t rx_id;
  max19713_if dut (.*);
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  // ADC model: sample n is driven as I (before rising edge n) and Q (before
  // the falling edge that follows).
  sample_t drv [$];
  int rx_got = 0;
  always @(negedge clk_rf) begin
    automatic sample_t s;
    s.i = SAMPLE_W'($urandom); s.q = SAMPLE_W'($urandom);
    #2 adc_data = s.i;
    drv.push_back(s);
    @(posedge clk_rf); #2 adc_data = s.q;
  end
  // receive monitor: values seen just before a rising edge
  int rx_cyc = 0;
  always @(posedge clk_rf) if (rst_n) begin
    rx_cyc++;
    if (rx_valid && rx_ready) begin
      // pair driven around the rising edge two cycles back (capture, then output register)
      automatic sample_t e = drv[drv.size() - 3];
      rx_got++;
      if (rx_data != e || rx_id != cfg_rx_id) begin
        failures++; $display("FAIL rx sample %h/%h expected %h/%h", rx_data.i, rx_data.q, e.i, e.q);
      end
      checks++;
    end
  end
  // transmit monitor
  int tx_got = 0;
  always @(posedge clk_rf) if (rst_n) begin
    automatic sample_t e = (tx_valid && tx_ready) ? tx_data : '0;
    if (tx_valid && tx_ready) tx_got++;
    #3 checks++;
    if (dac_data != e.i) begin failures++; $display("FAIL dac I %h expected %h", dac_data, e.i); end
    @(negedge clk_rf); #3 checks++;
    if (dac_data != e.q) begin failures++; $display("FAIL dac Q %h expected %h", dac_data, e.q); end
  end
  always @(negedge clk_rf) if (rst_n) begin
    #1 tx_valid = $urandom_range(0, 3) != 0;
    tx_data.i = SAMPLE_W'($urandom); tx_data.q = SAMPLE_W'($urandom);
  end
  initial begin
    repeat (3) @(negedge clk_rf); rst_n = 1;
    @(negedge clk_rf); cfg_rx_en = 1; cfg_tx_en = 1; rx_ready = 1;
    repeat (500) @(negedge clk_rf);
    chk(!irq_overflow, "no overflow while ready");
    chk(rx_got > 490, $sformatf("rx samples %0d", rx_got));
    chk(tx_got > 300, $sformatf("tx samples %0d", tx_got));
    rx_ready = 0; cfg_rx_id = 4'd9;
    repeat (3) @(negedge clk_rf);
    chk(irq_overflow, "overflow when chain refuses samples");
    rx_ready = 1;
    repeat (3) @(negedge clk_rf);
    chk(irq_overflow, "overflow is sticky");
    init = 1; @(negedge clk_rf); init = 0;
    @(negedge clk_rf);
    chk(!irq_overflow, "init clears overflow");
    repeat (200) @(negedge clk_rf);
    cfg_rx_en = 0; cfg_tx_en = 0;
    repeat (3) @(negedge clk_rf);
    chk(!rx_valid && !tx_ready, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk_rf);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
