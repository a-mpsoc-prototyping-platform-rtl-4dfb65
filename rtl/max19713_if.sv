// max19713_if: interface between the PHY chains and the MAX19713 analog
// front end. The converter bus is 10 bits wide and carries I and Q on the
// two halves of each sample clock period: I is taken on the rising edge and
// Q on the falling edge, in both directions (this split is this design's
// choice; the document gives a 10-bit parallel bus at up to 45 MHz).
//
// Receive: each clk_rf cycle yields one complex sample (I from the previous
// rising edge, Q from the falling edge after it) on rx_* tagged with the
// configured ID. The source cannot wait: a sample the chain refuses is lost
// and sets the overflow interrupt until init.
// Transmit: with tx_en high one complex sample is taken from tx_* per cycle
// and placed on dac_data (I while clk_rf is high, Q while it is low); with
// no sample waiting the DAC is driven with zero.
module max19713_if
  import radio_pkg::*;
(
  input  logic    clk_rf,
  input  logic    rst_n,
  input  logic    init,
  input  logic    cfg_rx_en,
  input  logic    cfg_tx_en,
  input  id_t     cfg_rx_id,
  // converter buses
  input  logic [SAMPLE_W-1:0] adc_data,
  output logic [SAMPLE_W-1:0] dac_data,
  // receive stream
  output logic    rx_valid,
  input  logic    rx_ready,
  output sample_t rx_data,
  output id_t     rx_id,
  // transmit stream
  input  logic    tx_valid,
  output logic    tx_ready,
  input  sample_t tx_data,
  output logic    irq_overflow
);
  logic [SAMPLE_W-1:0] adc_i, adc_q;
  logic [SAMPLE_W-1:0] dac_i, dac_q, dac_q_neg;

  // receive capture
  always_ff @(negedge clk_rf or negedge rst_n)
    if (!rst_n) adc_q <= '0;
    else        adc_q <= adc_data;

  always_ff @(posedge clk_rf or negedge rst_n)
    if (!rst_n) begin
      adc_i <= '0; rx_valid <= 1'b0; rx_data <= '0; rx_id <= '0; irq_overflow <= 1'b0;
    end else if (init) begin
      adc_i <= adc_data; rx_valid <= 1'b0; irq_overflow <= 1'b0;
    end else begin
      adc_i <= adc_data;
      if (cfg_rx_en) begin
        rx_valid <= 1'b1;
        rx_data  <= '{i: adc_i, q: adc_q};
        rx_id    <= cfg_rx_id;
      end else begin
        rx_valid <= 1'b0;
      end
      if (rx_valid && !rx_ready) irq_overflow <= 1'b1;
    end

  // transmit drive
  assign tx_ready = cfg_tx_en && !init;
  always_ff @(posedge clk_rf or negedge rst_n)
    if (!rst_n) begin
      dac_i <= '0; dac_q <= '0;
    end else if (tx_valid && tx_ready) begin
      dac_i <= tx_data.i; dac_q <= tx_data.q;
    end else begin
      dac_i <= '0; dac_q <= '0;
    end
  // Q is moved to a falling-edge register so the bus changes on each edge.
  always_ff @(negedge clk_rf or negedge rst_n)
    if (!rst_n) dac_q_neg <= '0;
    else        dac_q_neg <= dac_q;
  assign dac_data = clk_rf ? dac_i : dac_q_neg;
endmodule
