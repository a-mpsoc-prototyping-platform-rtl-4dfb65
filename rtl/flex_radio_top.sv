// flex_radio_top: logic of the flexible-radio MPSoC platform. It holds
// everything between the three processors except the processors themselves:
//
//   OS processor bus   : shared BRAM (port A), mailbox (port A), OS intc
//   MAC processor bus  : MAC local BRAM, shared BRAM (port B), mailbox
//                        (port B), MAC intc, timer
//   MAC <-> PLCP       : two 32-bit FSL FIFOs, one per direction
//   PLCP processor bus : PLCP local BRAM, PLCP intc, chain controller, PHY
//                        registers, SPI master for the front end
//   PHY                : TX chain and RX chain, each linked to the PLCP
//                        processor by an FSL port, and the MAX19713 interface
//
// Each processor is represented by a plain bus port (bus_req_t in, read data
// out one cycle later) decoded on address bits 19:16 (64 KB per slave, in
// the order listed above), its interrupt line and its FSL ports. clk is the
// processor clock (100 MHz in the reference system); clk_rf is the RF sample
// clock (44 MHz, 4 samples per chip) of the MAX19713 interface, the
// correlator and the RF side of both data synchronizers.
// PLCP interrupt sources: 0 SFD found, 1 RX demux switch, 2 RX mux switch,
// 3 TX demux switch, 4 TX mux switch, 5 RX sample overflow, 6 SPI done,
// 7 word from the MAC waiting. MAC sources: 0 mailbox, 1 timer, 2 word from
// the PLCP waiting. OS source: 0 mailbox.
module flex_radio_top
  import radio_pkg::*;
#(
  parameter int SHARED_WORDS = 4096,
  parameter int LOCAL_WORDS  = 4096,
  parameter int FSL_DEPTH    = 16,
  parameter int MBOX_DEPTH   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_rf,
  input  logic        rst_rf_n,
  // OS processor
  input  bus_req_t    os_req,
  output logic [31:0] os_rdata,
  output logic        os_irq,
  // MAC processor
  input  bus_req_t    mac_req,
  output logic [31:0] mac_rdata,
  output logic        mac_irq,
  input  logic [31:0] mac_fsl_m_data,    // MAC -> PLCP
  input  logic        mac_fsl_m_control,
  input  logic        mac_fsl_m_write,
  output logic        mac_fsl_m_full,
  output logic [31:0] mac_fsl_s_data,    // PLCP -> MAC
  output logic        mac_fsl_s_control,
  output logic        mac_fsl_s_exists,
  input  logic        mac_fsl_s_read,
  // PLCP processor
  input  bus_req_t    plcp_req,
  output logic [31:0] plcp_rdata,
  output logic        plcp_irq,
  output logic [31:0] plcp_fsl_s_data,   // MAC -> PLCP
  output logic        plcp_fsl_s_control,
  output logic        plcp_fsl_s_exists,
  input  logic        plcp_fsl_s_read,
  input  logic [31:0] plcp_fsl_m_data,   // PLCP -> MAC
  input  logic        plcp_fsl_m_control,
  input  logic        plcp_fsl_m_write,
  output logic        plcp_fsl_m_full,
  input  logic [31:0] tx_fsl_m_data,     // PLCP -> TX chain
  input  logic        tx_fsl_m_control,
  input  logic        tx_fsl_m_write,
  output logic        tx_fsl_m_full,
  output logic [31:0] rx_fsl_s_data,     // RX chain -> PLCP
  output logic        rx_fsl_s_control,
  output logic        rx_fsl_s_exists,
  input  logic        rx_fsl_s_read,
  // RF front end
  input  logic [SAMPLE_W-1:0] adc_data,
  output logic [SAMPLE_W-1:0] dac_data,
  output logic        spi_sclk,
  output logic        spi_cs_n,
  output logic        spi_mosi
);
  localparam bus_req_t IDLE = '0;

  // ---------------- OS side ----------------
  bus_req_t    os_s [3];
  logic [31:0] os_r [3];
  bus_decoder #(.N(3)) u_os_dec (.clk, .rst_n, .m_req(os_req), .m_rdata(os_rdata), .s_req(os_s), .s_rdata(os_r));

  // ---------------- MAC side ----------------
  bus_req_t    mac_s [5];
  logic [31:0] mac_r [5];
  bus_decoder #(.N(5)) u_mac_dec (.clk, .rst_n, .m_req(mac_req), .m_rdata(mac_rdata), .s_req(mac_s), .s_rdata(mac_r));

  logic [31:0] mac_lmem_b;
  dp_ram #(.WORDS(LOCAL_WORDS)) u_mac_lmem (.clk, .a_req(mac_s[0]), .a_rdata(mac_r[0]), .b_req(IDLE), .b_rdata(mac_lmem_b));
  dp_ram #(.WORDS(SHARED_WORDS)) u_shared (.clk, .a_req(os_s[0]), .a_rdata(os_r[0]), .b_req(mac_s[1]), .b_rdata(mac_r[1]));

  logic mbox_irq_os, mbox_irq_mac;
  mailbox #(.DEPTH(MBOX_DEPTH)) u_mbox (.clk, .rst_n,
    .a_req(os_s[1]), .a_rdata(os_r[1]), .irq_a(mbox_irq_os),
    .b_req(mac_s[2]), .b_rdata(mac_r[2]), .irq_b(mbox_irq_mac));

  intc #(.N(1)) u_os_intc (.clk, .rst_n, .req(os_s[2]), .rdata(os_r[2]), .src(mbox_irq_os), .irq(os_irq));

  logic timer_irq;
  timer u_timer (.clk, .rst_n, .req(mac_s[4]), .rdata(mac_r[4]), .irq(timer_irq));
  intc #(.N(3)) u_mac_intc (.clk, .rst_n, .req(mac_s[3]), .rdata(mac_r[3]),
    .src({mac_fsl_s_exists, timer_irq, mbox_irq_mac}), .irq(mac_irq));

  // ---------------- MAC <-> PLCP FSL links ----------------
  logic [$clog2(FSL_DEPTH):0] lvl_m2p, lvl_p2m;
  fsl_fifo #(.W(32), .DEPTH(FSL_DEPTH)) u_fsl_m2p (.clk, .rst_n,
    .m_data(mac_fsl_m_data), .m_control(mac_fsl_m_control), .m_write(mac_fsl_m_write), .m_full(mac_fsl_m_full),
    .s_data(plcp_fsl_s_data), .s_control(plcp_fsl_s_control), .s_exists(plcp_fsl_s_exists), .s_read(plcp_fsl_s_read),
    .level(lvl_m2p));
  fsl_fifo #(.W(32), .DEPTH(FSL_DEPTH)) u_fsl_p2m (.clk, .rst_n,
    .m_data(plcp_fsl_m_data), .m_control(plcp_fsl_m_control), .m_write(plcp_fsl_m_write), .m_full(plcp_fsl_m_full),
    .s_data(mac_fsl_s_data), .s_control(mac_fsl_s_control), .s_exists(mac_fsl_s_exists), .s_read(mac_fsl_s_read),
    .level(lvl_p2m));

  // ---------------- PLCP side ----------------
  bus_req_t    plcp_s [5];
  logic [31:0] plcp_r [5];
  bus_decoder #(.N(5)) u_plcp_dec (.clk, .rst_n, .m_req(plcp_req), .m_rdata(plcp_rdata), .s_req(plcp_s), .s_rdata(plcp_r));

  logic [31:0] plcp_lmem_b;
  dp_ram #(.WORDS(LOCAL_WORDS)) u_plcp_lmem (.clk, .a_req(plcp_s[0]), .a_rdata(plcp_r[0]), .b_req(IDLE), .b_rdata(plcp_lmem_b));

  logic init_tx, init_rx, init_tx_rf, init_rx_rf;
  chain_ctrl u_chain_ctrl (.clk, .rst_n, .req(plcp_s[2]), .rdata(plcp_r[2]),
    .init_tx, .init_rx, .clk_rf, .rst_rf_n, .init_tx_rf, .init_rx_rf);

  logic rx_en, tx_en; id_t rx_id;
  logic [CHIPS-1:0] rx_seq, tx_seq;
  logic [SAMPLE_W-2:0] tx_amp;
  switch_cfg_t rx_demux, rx_mux, tx_demux, tx_mux;
  logic [31:0] pf_pattern; logic [5:0] pf_len;
  phy_regs u_phy_regs (.clk, .rst_n, .req(plcp_s[3]), .rdata(plcp_r[3]),
    .rx_en, .tx_en, .rx_id, .rx_seq, .tx_seq, .tx_amp,
    .rx_demux, .rx_mux, .tx_demux, .tx_mux, .pf_pattern, .pf_len);

  logic spi_irq;
  spi_master #(.BITS(16)) u_spi (.clk, .rst_n, .req(plcp_s[4]), .rdata(plcp_r[4]),
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .irq_done(spi_irq));

  // configuration used in the clk_rf domain
  logic rx_en_rf, tx_en_rf; id_t rx_id_rf; logic [CHIPS-1:0] rx_seq_rf;
  cfg_sync #(.W(2+ID_W+CHIPS)) u_cfg_rf (.clk(clk_rf), .rst_n(rst_rf_n),
    .d({rx_en, tx_en, rx_id, rx_seq}), .q({rx_en_rf, tx_en_rf, rx_id_rf, rx_seq_rf}));

  // ---------------- PHY ----------------
  logic rf_rx_v, rf_rx_r, rf_tx_v, rf_tx_r, rf_ovf, rf_ovf_s;
  sample_t rf_rx_d, rf_tx_d; id_t rf_rx_id;
  max19713_if u_rf (.clk_rf, .rst_n(rst_rf_n), .init(init_rx_rf),
    .cfg_rx_en(rx_en_rf), .cfg_tx_en(tx_en_rf), .cfg_rx_id(rx_id_rf),
    .adc_data, .dac_data,
    .rx_valid(rf_rx_v), .rx_ready(rf_rx_r), .rx_data(rf_rx_d), .rx_id(rf_rx_id),
    .tx_valid(rf_tx_v), .tx_ready(rf_tx_r), .tx_data(rf_tx_d), .irq_overflow(rf_ovf));
  cfg_sync #(.W(1)) u_ovf_sync (.clk, .rst_n, .d(rf_ovf), .q(rf_ovf_s));

  logic irq_sfd, irq_rx_demux, irq_rx_mux, irq_tx_demux, irq_tx_mux;
  rx_chain #(.FIFO_DEPTH(FSL_DEPTH)) u_rx (.clk, .rst_n, .clk_rf, .rst_rf_n, .init(init_rx), .init_rf(init_rx_rf),
    .cfg_corr_seq(rx_seq_rf), .cfg_demux(rx_demux), .cfg_mux(rx_mux), .cfg_pf_pattern(pf_pattern), .cfg_pf_len(pf_len),
    .in_valid(rf_rx_v), .in_ready(rf_rx_r), .in_data(rf_rx_d), .in_id(rf_rx_id),
    .fsl_s_data(rx_fsl_s_data), .fsl_s_control(rx_fsl_s_control), .fsl_s_exists(rx_fsl_s_exists), .fsl_s_read(rx_fsl_s_read),
    .irq_sfd, .irq_demux(irq_rx_demux), .irq_mux(irq_rx_mux));

  tx_chain #(.FIFO_DEPTH(FSL_DEPTH)) u_tx (.clk, .rst_n, .clk_rf, .rst_rf_n, .init(init_tx),
    .cfg_demux(tx_demux), .cfg_mux(tx_mux), .cfg_seq(tx_seq), .cfg_amp(tx_amp),
    .fsl_m_data(tx_fsl_m_data), .fsl_m_control(tx_fsl_m_control), .fsl_m_write(tx_fsl_m_write), .fsl_m_full(tx_fsl_m_full),
    .out_valid(rf_tx_v), .out_ready(rf_tx_r), .out_data(rf_tx_d),
    .irq_demux(irq_tx_demux), .irq_mux(irq_tx_mux));

  intc #(.N(8)) u_plcp_intc (.clk, .rst_n, .req(plcp_s[1]), .rdata(plcp_r[1]),
    .src({plcp_fsl_s_exists, spi_irq, rf_ovf_s, irq_tx_mux, irq_tx_demux, irq_rx_mux, irq_rx_demux, irq_sfd}),
    .irq(plcp_irq));

  // unused: port B of the local memories, FIFO levels, TX init in the RF domain
  logic unused;
  assign unused = ^{mac_lmem_b, plcp_lmem_b, lvl_m2p, lvl_p2m, init_tx_rf};
endmodule
