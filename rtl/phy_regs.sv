// phy_regs: memory-mapped configuration of the PHY processing chains on the
// PLCP processor's bus. Byte offsets and reset values:
//   0x00 RF_CTRL    bit 0 rx_en, bit 1 tx_en, bits 7:4 rx_id       0
//   0x04 RX_SEQ     bits 10:0 correlator chip sequence            Barker 11
//   0x08 TX_SEQ     bits 10:0 spreading chip sequence             Barker 11
//   0x0C TX_AMP     bits 8:0 chip amplitude                       256
//   0x10 RX_DEMUX   switch rule: 3:0 ID, 4 target path, 5 enable, 6 path after init
//   0x14 RX_MUX     same layout                                   0
//   0x18 TX_DEMUX   same layout                                   0
//   0x1C TX_MUX     same layout                                   0
//   0x20 PF_PATTERN pattern filter pattern, first bit in bit 0    0xF3A0
//   0x24 PF_LEN     pattern length in bits, 1..32                 16
// Path 0 is DBPSK, path 1 DQPSK. Writes take effect on the next cycle;
// reads return one cycle after the request. One register file serves all
// blocks of both chains (this design's arrangement).
module phy_regs
  import radio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  output logic        rx_en,
  output logic        tx_en,
  output id_t         rx_id,
  output logic [CHIPS-1:0] rx_seq,
  output logic [CHIPS-1:0] tx_seq,
  output logic [SAMPLE_W-2:0] tx_amp,
  output switch_cfg_t rx_demux,
  output switch_cfg_t rx_mux,
  output switch_cfg_t tx_demux,
  output switch_cfg_t tx_mux,
  output logic [31:0] pf_pattern,
  output logic [5:0]  pf_len
);
  logic [3:0] a;
  assign a = req.addr[5:2];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rx_en <= 1'b0; tx_en <= 1'b0; rx_id <= '0;
      rx_seq <= BARKER11; tx_seq <= BARKER11; tx_amp <= 9'd256;
      rx_demux <= '0; rx_mux <= '0; tx_demux <= '0; tx_mux <= '0;
      pf_pattern <= SFD_8021; pf_len <= 6'(SFD_LEN); rdata <= '0;
    end else begin
      if (req.cs && req.we)
        case (a)
          4'd0: begin rx_en <= req.wdata[0]; tx_en <= req.wdata[1]; rx_id <= req.wdata[7:4]; end
          4'd1: rx_seq <= req.wdata[CHIPS-1:0];
          4'd2: tx_seq <= req.wdata[CHIPS-1:0];
          4'd3: tx_amp <= req.wdata[SAMPLE_W-2:0];
          4'd4: rx_demux <= req.wdata[$bits(switch_cfg_t)-1:0];
          4'd5: rx_mux   <= req.wdata[$bits(switch_cfg_t)-1:0];
          4'd6: tx_demux <= req.wdata[$bits(switch_cfg_t)-1:0];
          4'd7: tx_mux   <= req.wdata[$bits(switch_cfg_t)-1:0];
          4'd8: pf_pattern <= req.wdata;
          4'd9: pf_len <= req.wdata[5:0];
          default: ;
        endcase
      if (req.cs && !req.we)
        case (a)
          4'd0: rdata <= {24'b0, rx_id, 2'b0, tx_en, rx_en};
          4'd1: rdata <= 32'(rx_seq);
          4'd2: rdata <= 32'(tx_seq);
          4'd3: rdata <= 32'(tx_amp);
          4'd4: rdata <= 32'(rx_demux);
          4'd5: rdata <= 32'(rx_mux);
          4'd6: rdata <= 32'(tx_demux);
          4'd7: rdata <= 32'(tx_mux);
          4'd8: rdata <= pf_pattern;
          4'd9: rdata <= 32'(pf_len);
          default: rdata <= '0;
        endcase
    end
endmodule
