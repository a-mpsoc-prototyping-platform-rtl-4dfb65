// bpsk_demapper: DBPSK demapper (1 Mb/s). A phase difference closer to pi
// than to 0 gives bit 1, otherwise bit 0 (802.11 DBPSK: 0 -> 0, 1 -> pi).
// The decision is the top bit of (phase + quarter turn). One register stage.
module bpsk_demapper
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
  output logic   out_data,
  output id_t    out_id
);
  phase_t r;
  assign r = in_data + phase_t'(1 << (PHASE_W-2));
  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= 1'b0; out_id <= '0;
    end else if (init) begin
      out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= r[PHASE_W-1];
        out_id   <= in_id;
      end
    end
endmodule
