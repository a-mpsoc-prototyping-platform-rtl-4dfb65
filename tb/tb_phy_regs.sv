// tb_phy_regs: checks reset values of all PHY configuration registers,
// then writes random values, and checks both the read-back and the
// decoded configuration outputs that drive the chains.
module tb_phy_regs;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bus_req_t req = '0; logic [31:0] rdata;
  logic rx_en, tx_en; id_t rx_id; logic [CHIPS-1:0] rx_seq, tx_seq; logic [SAMPLE_W-2:0] tx_amp;
  switch_cfg_t rx_demux, rx_mux, tx_demux, tx_mux; logic [31:0] pf_pattern; logic [5:0] pf_len;
  phy_regs dut (.*);
  `include "bus_tasks.svh"
  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  localparam logic [31:0] MASK [10] = '{32'hF3, 32'h7FF, 32'h7FF, 32'h1FF, 32'h7F, 32'h7F, 32'h7F, 32'h7F, 32'hFFFF_FFFF, 32'h3F};
  function automatic logic [31:0] outv(int r);
    case (r)
      0: return {24'b0, rx_id, 2'b0, tx_en, rx_en};
      1: return 32'(rx_seq);  2: return 32'(tx_seq);  3: return 32'(tx_amp);
      4: return 32'(rx_demux); 5: return 32'(rx_mux); 6: return 32'(tx_demux); 7: return 32'(tx_mux);
      8: return pf_pattern;   default: return 32'(pf_len);
    endcase
  endfunction
  initial begin
    logic [31:0] d, v;
    logic [31:0] rst_val [10] = '{0, 32'(BARKER11), 32'(BARKER11), 256, 0, 0, 0, 0, SFD_8021, 16};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      bus_rd(32'(r*4), d);
      chk(d == rst_val[r], $sformatf("reset value of reg %0d: %h", r, d));
      chk(outv(r) == rst_val[r], $sformatf("reset output of reg %0d", r));
    end
    for (int n = 0; n < 200; n++) begin
      automatic int r = $urandom_range(0, 9);
      v = 32'($urandom) & MASK[r];
      bus_wr(32'(r*4), v);
      bus_rd(32'(r*4), d);
      chk(d == v, $sformatf("readback reg %0d", r));
      chk(outv(r) == v, $sformatf("output reg %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
