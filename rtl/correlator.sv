// correlator: despreading stage of the receive chain. Each complex input
// sample enters a delay line of (CHIPS-1)*SPS+1 samples; the correlation is
// the sum over the CHIPS taps, SPS samples apart, of the tap times the
// configured chip (+1 or -1; chip 0 is cfg_seq[CHIPS-1] and meets the oldest
// tap). With the 11-chip Barker code and 4 samples per chip a received
// symbol gives a peak of 11 times its amplitude, at SPS neighbouring sample
// positions.
// Symbol timing: the input is counted in windows of SPS*CHIPS samples (one
// symbol). For each position in the window a leaky sum of the correlation
// magnitude (|I|+|Q|, decay 1/8 per symbol) is kept. At each window end the
// position with the largest sum becomes the sampling position, but only if
// its sum exceeds the current position's by more than 1/8, so the choice
// does not wander inside a peak. The correlation at the sampling position
// is emitted with the ID of that sample: exactly one output per window.
// After init the sums are cleared and the sampling position is the last of
// the window (right for symbols that start at the first sample after init).
// This timing recovery is this design's choice; the document says only
// that the output is the correlation with the configured sequence.
// Input is accepted whenever no output is waiting; the output register is
// released by out_ready.
module correlator
  import radio_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic [CHIPS-1:0] cfg_seq,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  input  id_t     in_id,
  output logic    out_valid,
  input  logic    out_ready,
  output corr_t   out_data,
  output id_t     out_id
);
  localparam int TAPS  = (CHIPS-1)*SPS + 1;
  localparam int WIN   = SPS*CHIPS;
  localparam int PW    = $clog2(WIN);
  localparam int ACC_W = CORR_W + 5;    // leaky sum settles at 8x the magnitude
  sample_t dl [TAPS-1];                 // dl[0] is the previous sample
  logic [PW-1:0] pos, tpos, best_pos;
  corr_t   sum;
  logic [CORR_W:0] mag;
  logic [ACC_W-1:0] acc [WIN];
  logic [ACC_W-1:0] acc_nx, best_acc, tacc;

  // correlation over the delay line with the new sample at tap 0
  always_comb begin
    logic signed [CORR_W-1:0] si, sq;
    sample_t x;
    si = '0; sq = '0;
    for (int k = 0; k < CHIPS; k++) begin
      x = (k == CHIPS-1) ? in_data : dl[(CHIPS-1-k)*SPS - 1];
      if (cfg_seq[CHIPS-1-k]) begin
        si = si + CORR_W'(x.i); sq = sq + CORR_W'(x.q);
      end else begin
        si = si - CORR_W'(x.i); sq = sq - CORR_W'(x.q);
      end
    end
    sum = '{i: si, q: sq};
    mag = (CORR_W+1)'(si[CORR_W-1] ? -si : si) + (CORR_W+1)'(sq[CORR_W-1] ? -sq : sq);
  end

  assign acc_nx   = acc[pos] - (acc[pos] >> 3) + ACC_W'(mag);
  assign tacc     = acc[tpos];
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int t = 0; t < TAPS-1; t++) dl[t] <= '0;
      for (int t = 0; t < WIN; t++) acc[t] <= '0;
      pos <= '0; tpos <= PW'(WIN-1); best_pos <= '0; best_acc <= '0;
      out_valid <= 1'b0; out_data <= '0; out_id <= '0;
    end else if (init) begin
      for (int t = 0; t < TAPS-1; t++) dl[t] <= '0;
      for (int t = 0; t < WIN; t++) acc[t] <= '0;
      pos <= '0; tpos <= PW'(WIN-1); best_acc <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        dl[0] <= in_data;
        for (int t = 1; t < TAPS-1; t++) dl[t] <= dl[t-1];
        acc[pos] <= acc_nx;
        if (pos == tpos) begin
          out_valid <= 1'b1; out_data <= sum; out_id <= in_id;
        end
        if (pos == PW'(WIN-1)) begin
          pos <= '0;
          best_acc <= '0;
          // the current position's sum as of this window (last sample's own
          // sum is the updated one)
          if (acc_nx > best_acc) begin
            if (acc_nx > tacc + (tacc >> 3)) tpos <= pos;
          end else if (best_acc > tacc + (tacc >> 3)) tpos <= best_pos;
        end else begin
          pos <= pos + 1'b1;
          if (pos == 0 || acc_nx > best_acc) begin best_acc <= acc_nx; best_pos <= pos; end
        end
      end
    end
endmodule
