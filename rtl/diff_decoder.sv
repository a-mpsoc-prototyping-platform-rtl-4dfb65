// diff_decoder: Differential Decoder of the receive chain. For each phase it
// outputs the difference to the previous phase, modulo one turn, which
// removes the unknown carrier phase for DBPSK/DQPSK. The first phase after
// init is compared with 0. One register stage: an output is held until
// out_ready; input is accepted when the output register is free.
module diff_decoder
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
  phase_t prev;
  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev <= '0; out_valid <= 1'b0; out_data <= '0; out_id <= '0;
    end else if (init) begin
      prev <= '0; out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= in_data - prev;
        out_id   <= in_id;
        prev     <= in_data;
      end
    end
endmodule
