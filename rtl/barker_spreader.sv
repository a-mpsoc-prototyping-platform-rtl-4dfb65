// barker_spreader: DSSS spreading of the transmit chain. Each phase symbol
// becomes CHIPS chips of the configured sequence (chip 0 = cfg_seq[CHIPS-1],
// 1 = +1), each chip repeated SPS times, so one symbol gives SPS*CHIPS
// complex samples (44 for 802.11 at 44 MHz). A sample is chip * amplitude *
// (cos, sin) of the symbol phase rounded to the nearest quarter turn, which
// covers every phase DBPSK and DQPSK produce. A symbol is taken when the
// last sample of the previous one leaves (or when idle); samples then leave
// one per accepted out_ready.
module barker_spreader
  import radio_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic [CHIPS-1:0]    cfg_seq,
  input  logic [SAMPLE_W-2:0] cfg_amp,
  input  logic    in_valid,
  output logic    in_ready,
  input  phase_t  in_data,
  input  id_t     in_id,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data,
  output id_t     out_id
);
  localparam int WIN = SPS*CHIPS;
  logic [$clog2(WIN)-1:0] pos;       // sample index in the symbol
  logic [1:0] quad;
  logic signed [SAMPLE_W-1:0] a, ci, cq;
  logic chip;
  logic last;

  assign last = (pos == WIN-1);
  assign in_ready = !out_valid || (out_ready && last);
  assign chip = cfg_seq[CHIPS-1 - int'(pos) / SPS];
  assign a = chip ? SAMPLE_W'(cfg_amp) : -SAMPLE_W'(cfg_amp);
  always_comb begin
    case (quad)
      2'd0: begin ci = a;  cq = '0; end
      2'd1: begin ci = '0; cq = a;  end
      2'd2: begin ci = -a; cq = '0; end
      default: begin ci = '0; cq = -a; end
    endcase
  end
  assign out_data = '{i: ci, q: cq};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pos <= '0; quad <= '0; out_valid <= 1'b0; out_id <= '0;
    end else if (init) begin
      pos <= '0; out_valid <= 1'b0;
    end else if (in_valid && in_ready) begin
      phase_t r;
      r = in_data + phase_t'(1 << (PHASE_W-3));
      quad <= r[PHASE_W-1 -: 2];
      out_id <= in_id; pos <= '0; out_valid <= 1'b1;
    end else if (out_valid && out_ready) begin
      if (last) out_valid <= 1'b0;
      else      pos <= pos + 1'b1;
    end
endmodule
