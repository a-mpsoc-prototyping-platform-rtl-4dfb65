// bpsk_mapper: DBPSK mapper (1 Mb/s) of the transmit chain. Each bit becomes
// a phase increment: 0 -> 0, 1 -> pi (half a turn). The differential
// encoder after the mux turns increments into phases. One register stage.
module bpsk_mapper
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
  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; out_id <= '0;
    end else if (init) begin
      out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= {in_data, {(PHASE_W-1){1'b0}}};
        out_id   <= in_id;
      end
    end
endmodule
