// rx_chain: the receiving processing chain of the 802.11 DSSS PHY
// (1 and 2 Mb/s). Blocks in stream order:
//   [clk_rf]  Correlator (Barker despreading, one peak per symbol)
//   Data Synchronizer (clk_rf -> clk)
//   [clk]     Phase Computer -> Differential Decoder -> Demux
//             -> BPSK Demapper | QPSK Demapper -> Mux
//             -> Pattern Filter (SFD) -> Deserializer -> FSL interface FIFO
// The input is the complex sample stream of the MAX19713 interface, in the
// clk_rf domain; the output is the FSL slave port read by the PLCP
// processor. Every item carries an ID; the demux and mux change path when
// their configured ID is seen, which switches the chain between DBPSK and
// DQPSK. init (clk domain) and init_rf (clk_rf domain) clear the blocks of
// each domain and keep the configuration. The block order and the data types
// between blocks follow the document; the blocks' insides are this design's.
module rx_chain
  import radio_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_rf,
  input  logic        rst_rf_n,
  input  logic        init,
  input  logic        init_rf,
  input  logic [CHIPS-1:0] cfg_corr_seq,   // clk_rf domain
  input  switch_cfg_t cfg_demux,
  input  switch_cfg_t cfg_mux,
  input  logic [31:0] cfg_pf_pattern,
  input  logic [5:0]  cfg_pf_len,
  // sample input (clk_rf)
  input  logic        in_valid,
  output logic        in_ready,
  input  sample_t     in_data,
  input  id_t         in_id,
  // FSL slave port to the PLCP processor (clk)
  output logic [31:0] fsl_s_data,
  output logic        fsl_s_control,
  output logic        fsl_s_exists,
  input  logic        fsl_s_read,
  output logic        irq_sfd,
  output logic        irq_demux,
  output logic        irq_mux
);
  // correlator (clk_rf)
  logic c_v, c_r; corr_t c_d; id_t c_id;
  correlator u_corr (.clk(clk_rf), .rst_n(rst_rf_n), .init(init_rf), .cfg_seq(cfg_corr_seq),
    .in_valid, .in_ready, .in_data, .in_id,
    .out_valid(c_v), .out_ready(c_r), .out_data(c_d), .out_id(c_id));

  // clock domain crossing
  logic s_v, s_r; corr_t s_d; id_t s_id;
  data_sync #(.W($bits(corr_t)+ID_W), .DEPTH(16)) u_sync (
    .wclk(clk_rf), .wrst_n(rst_rf_n), .in_valid(c_v), .in_ready(c_r), .in_data({c_id, c_d}),
    .rclk(clk), .rrst_n(rst_n), .out_valid(s_v), .out_ready(s_r), .out_data({s_id, s_d}));

  logic p_v, p_r; phase_t p_d; id_t p_id;
  phase_computer u_phase (.clk, .rst_n, .init, .in_valid(s_v), .in_ready(s_r), .in_data(s_d), .in_id(s_id),
    .out_valid(p_v), .out_ready(p_r), .out_data(p_d), .out_id(p_id));

  logic d_v, d_r; phase_t d_d; id_t d_id;
  diff_decoder u_ddec (.clk, .rst_n, .init, .in_valid(p_v), .in_ready(p_r), .in_data(p_d), .in_id(p_id),
    .out_valid(d_v), .out_ready(d_r), .out_data(d_d), .out_id(d_id));

  logic [1:0] x_v, x_r; phase_t x_d; id_t x_id;
  stream_demux #(.W(PHASE_W)) u_demux (.clk, .rst_n, .init, .cfg(cfg_demux),
    .in_valid(d_v), .in_ready(d_r), .in_data(d_d), .in_id(d_id),
    .out_valid(x_v), .out_ready(x_r), .out_data(x_d), .out_id(x_id), .irq_switch(irq_demux));

  logic [1:0] m_v, m_r; logic m_d [2]; id_t m_id [2];
  bpsk_demapper u_bpsk (.clk, .rst_n, .init, .in_valid(x_v[0]), .in_ready(x_r[0]), .in_data(x_d), .in_id(x_id),
    .out_valid(m_v[0]), .out_ready(m_r[0]), .out_data(m_d[0]), .out_id(m_id[0]));
  qpsk_demapper u_qpsk (.clk, .rst_n, .init, .in_valid(x_v[1]), .in_ready(x_r[1]), .in_data(x_d), .in_id(x_id),
    .out_valid(m_v[1]), .out_ready(m_r[1]), .out_data(m_d[1]), .out_id(m_id[1]));

  logic b_v, b_r, b_d; id_t b_id;
  logic b_dv [2];
  assign b_dv[0] = m_d[0];
  assign b_dv[1] = m_d[1];
  stream_mux #(.W(1)) u_mux (.clk, .rst_n, .init, .cfg(cfg_mux),
    .in_valid(m_v), .in_ready(m_r), .in_data(b_dv), .in_id(m_id),
    .out_valid(b_v), .out_ready(b_r), .out_data(b_d), .out_id(b_id), .irq_switch(irq_mux));

  logic f_v, f_r, f_d, f_locked; id_t f_id;
  pattern_filter #(.MAX_LEN(32)) u_pf (.clk, .rst_n, .init, .cfg_pattern(cfg_pf_pattern), .cfg_len(cfg_pf_len),
    .in_valid(b_v), .in_ready(b_r), .in_data(b_d), .in_id(b_id),
    .out_valid(f_v), .out_ready(f_r), .out_data(f_d), .out_id(f_id), .locked(f_locked), .irq_detect(irq_sfd));

  logic y_v, y_r; logic [7:0] y_d; id_t y_id;
  deserializer u_deser (.clk, .rst_n, .init, .in_valid(f_v), .in_ready(f_r), .in_data(f_d), .in_id(f_id),
    .out_valid(y_v), .out_ready(y_r), .out_data(y_d), .out_id(y_id));

  fsl_rx_if #(.DEPTH(FIFO_DEPTH)) u_fsl (.clk, .rst_n, .init, .in_valid(y_v), .in_ready(y_r), .in_data(y_d), .in_id(y_id),
    .s_data(fsl_s_data), .s_control(fsl_s_control), .s_exists(fsl_s_exists), .s_read(fsl_s_read));
endmodule
