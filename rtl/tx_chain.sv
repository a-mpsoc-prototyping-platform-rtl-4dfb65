// tx_chain: the transmitting processing chain of the 802.11 DSSS PHY
// (1 and 2 Mb/s). Blocks in stream order:
//   [clk]     PLCP interface (FSL FIFO) -> Serializer -> Demux
//             -> DBPSK Mapper | DQPSK Mapper -> Mux -> Differential Encoder
//             -> Barker Spreader (11 chips x 4 samples per symbol)
//   Data Synchronizer (clk -> clk_rf)
// The PLCP processor writes bytes with their IDs into the FSL master port;
// the output is the complex sample stream for the MAX19713 interface in the
// clk_rf domain. The demux and mux switch between DBPSK and DQPSK on the
// configured IDs, so a frame can send its header at 1 Mb/s and its payload at
// 2 Mb/s. The mappers give phase increments that one differential encoder
// accumulates, so the phase carries on across a change of path. The overall
// transmit processing (differential PSK then Barker spreading) follows the
// document; the split into blocks is this design's.
module tx_chain
  import radio_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_rf,
  input  logic        rst_rf_n,
  input  logic        init,
  input  switch_cfg_t cfg_demux,
  input  switch_cfg_t cfg_mux,
  input  logic [CHIPS-1:0]    cfg_seq,
  input  logic [SAMPLE_W-2:0] cfg_amp,
  // FSL master port from the PLCP processor (clk)
  input  logic [31:0] fsl_m_data,
  input  logic        fsl_m_control,
  input  logic        fsl_m_write,
  output logic        fsl_m_full,
  // sample output (clk_rf)
  output logic        out_valid,
  input  logic        out_ready,
  output sample_t     out_data,
  output logic        irq_demux,
  output logic        irq_mux
);
  logic a_v, a_r; logic [7:0] a_d; id_t a_id;
  fsl_tx_if #(.DEPTH(FIFO_DEPTH)) u_fsl (.clk, .rst_n, .init,
    .m_data(fsl_m_data), .m_control(fsl_m_control), .m_write(fsl_m_write), .m_full(fsl_m_full),
    .out_valid(a_v), .out_ready(a_r), .out_data(a_d), .out_id(a_id));

  logic s_v, s_r, s_d; id_t s_id;
  serializer u_ser (.clk, .rst_n, .init, .in_valid(a_v), .in_ready(a_r), .in_data(a_d), .in_id(a_id),
    .out_valid(s_v), .out_ready(s_r), .out_data(s_d), .out_id(s_id));

  logic [1:0] x_v, x_r; logic x_d; id_t x_id;
  stream_demux #(.W(1)) u_demux (.clk, .rst_n, .init, .cfg(cfg_demux),
    .in_valid(s_v), .in_ready(s_r), .in_data(s_d), .in_id(s_id),
    .out_valid(x_v), .out_ready(x_r), .out_data(x_d), .out_id(x_id), .irq_switch(irq_demux));

  logic [1:0] m_v, m_r; phase_t m_d [2]; id_t m_id [2];
  bpsk_mapper u_bpsk (.clk, .rst_n, .init, .in_valid(x_v[0]), .in_ready(x_r[0]), .in_data(x_d), .in_id(x_id),
    .out_valid(m_v[0]), .out_ready(m_r[0]), .out_data(m_d[0]), .out_id(m_id[0]));
  qpsk_mapper u_qpsk (.clk, .rst_n, .init, .in_valid(x_v[1]), .in_ready(x_r[1]), .in_data(x_d), .in_id(x_id),
    .out_valid(m_v[1]), .out_ready(m_r[1]), .out_data(m_d[1]), .out_id(m_id[1]));

  logic u_v, u_r; phase_t u_d; id_t u_id;
  stream_mux #(.W(PHASE_W)) u_mux (.clk, .rst_n, .init, .cfg(cfg_mux),
    .in_valid(m_v), .in_ready(m_r), .in_data(m_d), .in_id(m_id),
    .out_valid(u_v), .out_ready(u_r), .out_data(u_d), .out_id(u_id), .irq_switch(irq_mux));

  logic e_v, e_r; phase_t e_d; id_t e_id;
  diff_encoder u_denc (.clk, .rst_n, .init, .in_valid(u_v), .in_ready(u_r), .in_data(u_d), .in_id(u_id),
    .out_valid(e_v), .out_ready(e_r), .out_data(e_d), .out_id(e_id));

  logic p_v, p_r; sample_t p_d; id_t p_id;
  barker_spreader u_spread (.clk, .rst_n, .init, .cfg_seq, .cfg_amp,
    .in_valid(e_v), .in_ready(e_r), .in_data(e_d), .in_id(e_id),
    .out_valid(p_v), .out_ready(p_r), .out_data(p_d), .out_id(p_id));

  // the ID is not needed past the spreader
  data_sync #(.W($bits(sample_t)), .DEPTH(16)) u_sync (
    .wclk(clk), .wrst_n(rst_n), .in_valid(p_v), .in_ready(p_r), .in_data(p_d),
    .rclk(clk_rf), .rrst_n(rst_rf_n), .out_valid, .out_ready, .out_data);
  id_t unused_id;
  assign unused_id = p_id;
endmodule
