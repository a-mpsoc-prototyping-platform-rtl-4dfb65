// chain_ctrl: chain controller. Each processing chain has one
// initialization signal shared by all its blocks; a bus write to offset 0x0
// with bit 0 set starts an init of the TX chain, bit 1 of the RX chain.
// The init pulse lasts one clk cycle on init_tx / init_rx and, for the
// blocks clocked by the RF sample clock, one clk_rf cycle on init_tx_rf /
// init_rx_rf a few clk_rf cycles later (toggle synchronizer). Reading 0x0
// returns the number of inits of each chain so far {RX count, TX count}.
module chain_ctrl
  import radio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  output logic        init_tx,
  output logic        init_rx,
  input  logic        clk_rf,
  input  logic        rst_rf_n,
  output logic        init_tx_rf,
  output logic        init_rx_rf
);
  logic [1:0] tog;
  logic [15:0] n_tx, n_rx;
  logic [1:0] s1, s2, s3;
  logic go_tx, go_rx;
  assign go_tx = req.cs && req.we && req.addr[3:2] == 2'd0 && req.wdata[0];
  assign go_rx = req.cs && req.we && req.addr[3:2] == 2'd0 && req.wdata[1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      init_tx <= 1'b0; init_rx <= 1'b0; tog <= '0; n_tx <= '0; n_rx <= '0; rdata <= '0;
    end else begin
      init_tx <= go_tx;
      init_rx <= go_rx;
      if (go_tx) begin tog[0] <= ~tog[0]; n_tx <= n_tx + 1'b1; end
      if (go_rx) begin tog[1] <= ~tog[1]; n_rx <= n_rx + 1'b1; end
      if (req.cs && !req.we) rdata <= {n_rx, n_tx};
    end

  always_ff @(posedge clk_rf or negedge rst_rf_n)
    if (!rst_rf_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= tog; s2 <= s1; s3 <= s2;
    end
  assign init_tx_rf = s2[0] ^ s3[0];
  assign init_rx_rf = s2[1] ^ s3[1];
endmodule
