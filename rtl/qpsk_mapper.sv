// qpsk_mapper: DQPSK mapper (2 Mb/s) of the transmit chain. It collects two
// bits, d0 first, and emits one phase increment per pair following 802.11
// DQPSK: 00 -> 0, 01 -> pi/2, 11 -> pi, 10 -> 3pi/2. The output carries the
// ID of the second bit. A lone first bit waits until its partner arrives;
// init discards it.
module qpsk_mapper
  import radio_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   in_valid,
  output logic   in_ready,
  input  logic   in_data,
  input  id_t    in_id,
  output logic   out_valid,
  input  logic   out_ready,
  output phase_t out_data,
  output id_t    out_id
);
  logic have_d0, d0;
  logic [1:0] quarter;
  // quarter turns: (d0,d1) = 00 -> 0, 01 -> 1, 11 -> 2, 10 -> 3
  assign quarter  = {d0, d0 ^ in_data};
  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; out_id <= '0; have_d0 <= 1'b0; d0 <= 1'b0;
    end else if (init) begin
      out_valid <= 1'b0; have_d0 <= 1'b0;
    end else if (in_ready) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have_d0) begin
          d0 <= in_data; have_d0 <= 1'b1;
        end else begin
          have_d0   <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= {quarter, {(PHASE_W-2){1'b0}}};
          out_id    <= in_id;
        end
      end
    end
endmodule
