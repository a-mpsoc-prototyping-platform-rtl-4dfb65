// phase_computer: turns each complex value into its phase, an unsigned
// PHASE_W-bit fraction of a turn (0 = angle 0, 2**(PHASE_W-2) = pi/2).
// It uses an iterative CORDIC in vectoring mode with a 16-bit angle
// accumulator: a value in the left half plane is first rotated by pi, then
// ITER micro-rotations drive Q to zero while the accumulator sums the
// rotation angles atan(2**-k). The result is rounded to PHASE_W bits.
// One item is processed at a time: in_ready is high only while idle, and a
// result appears ITER+1 cycles after its input was taken. The CORDIC is this
// design's choice; the document gives only the function.
module phase_computer
  import radio_pkg::*;
#(
  parameter int ITER = 12
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   in_valid,
  output logic   in_ready,
  input  corr_t  in_data,
  input  id_t    in_id,
  output logic   out_valid,
  input  logic   out_ready,
  output phase_t out_data,
  output id_t    out_id
);
  localparam int XW = CORR_W + 3;
  // atan(2**-k) in units of 2*pi/65536, k = 0..13
  function automatic logic [15:0] atan_tab(input int k);
    case (k)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;  3: return 16'd1297;
      4: return 16'd651;   5: return 16'd326;   6: return 16'd163;   7: return 16'd81;
      8: return 16'd41;    9: return 16'd20;   10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;   13: return 16'd1;
      default: return 16'd0;
    endcase
  endfunction

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;
  state_t state;
  logic signed [XW-1:0] x, y;
  logic [15:0] z;
  logic [3:0] k;
  id_t id_q;

  assign in_ready  = (state == IDLE) && !init;
  assign out_valid = (state == DONE);
  assign out_data  = phase_t'((z + (16'd1 << (15 - PHASE_W))) >> (16 - PHASE_W));
  assign out_id    = id_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= IDLE; x <= '0; y <= '0; z <= '0; k <= '0; id_q <= '0;
    end else if (init) begin
      state <= IDLE;
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          id_q <= in_id;
          k    <= '0;
          state <= RUN;
          if (in_data.i < 0) begin
            x <= -XW'(in_data.i); y <= -XW'(in_data.q); z <= 16'h8000;
          end else begin
            x <= XW'(in_data.i);  y <= XW'(in_data.q);  z <= 16'h0000;
          end
        end
        RUN: begin
          if (y >= 0) begin
            x <= x + (y >>> k); y <= y - (x >>> k); z <= z + atan_tab(int'(k));
          end else begin
            x <= x - (y >>> k); y <= y + (x >>> k); z <= z - atan_tab(int'(k));
          end
          if (k == 4'(ITER-1)) state <= DONE;
          k <= k + 1'b1;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
endmodule
