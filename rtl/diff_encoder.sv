// diff_encoder: differential encoder of the transmit chain. It adds each
// phase increment to a running phase, modulo one turn, and outputs the new
// phase; the running phase starts at 0 after init. One register stage with
// the same handshake as diff_decoder, whose inverse it is.
module diff_encoder
  import radio_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   in_valid,
  output logic   in_ready,
  input  phase_t in_data,
  input  id_t    in_id,
  output logic   out_valid,
  input  logic   out_ready,
  output phase_t out_data,
  output id_t    out_id
);
  phase_t acc;
  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0; out_valid <= 1'b0; out_data <= '0; out_id <= '0;
    end else if (init) begin
      acc <= '0; out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= acc + in_data;
        out_id   <= in_id;
        acc      <= acc + in_data;
      end
    end
endmodule
