// stream_mux: merges two paths into one stream. After init it forwards input
// cfg.init_sel. It moves to the other input only when the selected input
// has nothing waiting and the other input presents an item whose ID equals
// cfg.sw_id (with cfg.sw_en set), so items left in the old path are not
// overtaken. irq_switch pulses for one cycle at a switch. Routing is
// combinational. The ID trigger is the document's; waiting for the old path
// to be empty is this design's choice.
module stream_mux
  import radio_pkg::*;
#(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  switch_cfg_t  cfg,
  input  logic [1:0]   in_valid,
  output logic [1:0]   in_ready,
  input  logic [W-1:0] in_data [2],
  input  id_t          in_id [2],
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output id_t          out_id,
  output logic         irq_switch
);
  logic sel, route, other;
  assign other = ~sel;
  assign route = (cfg.sw_en && !in_valid[sel] && in_valid[other] &&
                  in_id[other] == cfg.sw_id) ? other : sel;
  assign out_valid = in_valid[route];
  assign out_data  = in_data[route];
  assign out_id    = in_id[route];
  assign in_ready  = route ? {out_ready, 1'b0} : {1'b0, out_ready};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sel <= 1'b0; irq_switch <= 1'b0;
    end else if (init) begin
      sel <= cfg.init_sel; irq_switch <= 1'b0;
    end else begin
      irq_switch <= (route != sel);
      sel <= route;
    end
endmodule
